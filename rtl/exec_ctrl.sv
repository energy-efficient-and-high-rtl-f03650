// exec_ctrl: execution controller (EC) of one CGRA on the ring.
//
// The EC holds a small table of control-data entries (rsf_pkg::ctrl_t).
// Each entry runs one kernel on the PA for `iterations` iterations: per
// iteration it reads `exec_cycles` consecutive CE layers from cm_base on,
// fetches one operand line from the DB (line db_rd_base+iteration) when in
// read mode, and writes the PA result to line db_wr_base+iteration when in
// write mode. When an entry is done the EC moves to the next one: this is
// how a PA is reconfigured within a run, and how the shifting
// configuration of a kernel stream across the ring is built (each EC's
// list says which kernel it runs in each phase).
//
// Synchronisation of a kernel stream follows the published RSF scheme:
//  * Sender ECs pulse Intermediate Done (`idone`) when an iteration's result
//    is on the PA result bus; `idone_last` marks the last iteration of an
//    entry. The pulse goes to both ring neighbours.
//  * A Receiver EC that is not Head starts an iteration only when its
//    upstream neighbour (Partner: 0 = tile k-1, 1 = tile k+1) has delivered
//    a result, i.e. when `link_count` is non-zero; it then pops that result.
//  * The Head EC paces the stream. The largest execution cycle count of
//    the stream travels against the stream, EC by EC (`max_out`, one
//    register per EC, the Tail starting with its own count); the Head waits
//    IDLE = max - own cycles, counted from its previous result (also
//    across a change of entry), before every iteration but its first.
//  * A Head that is also a Receiver is first activated: it waits for an
//    Intermediate Done marked last from its downstream neighbour, i.e. for
//    the PA that ran the head kernel in the previous configuration to finish.
//
// Timing of one iteration: 1 cycle WAIT (at least), exec_cycles cycles RUN
// issuing CE layers, 1 cycle DRAIN while the PA executes the last layer,
// 1 cycle FIN with the result on the bus (DB write, Intermediate Done).
// A stream therefore advances every max(exec_cycles)+3 cycles. Moving to a
// new entry costs one LOAD cycle. The field list and the IDLE rule follow
// the published RSF architecture; the state machine, the cycle budget, the activation rule
// for a shifted head and the per-iteration DB addressing are this design's
// choice.
module exec_ctrl
  import rsf_pkg::*;
#(
  parameter int unsigned ENTRIES = NUM_ENTRIES,
  parameter int unsigned LINK_CW = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // control-data load
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  ctrl_t                      cfg_data,
  input  logic                       start,
  // neighbours (prev = tile k-1, next = tile k+1)
  input  logic                       idone_prev,
  input  logic                       last_prev,
  input  logic                       idone_next,
  input  logic                       last_next,
  input  logic [CYC_W-1:0]           max_prev,
  input  logic [CYC_W-1:0]           max_next,
  // direct link
  input  logic [LINK_CW-1:0]         link_count,
  output logic                       link_pop,
  output logic                       link_push_en,
  output logic                       link_sel,
  // memories and PA
  output cm_req_t                    cm_req,
  output db_req_t                    db_req,
  output logic                       cm_sel,
  output logic                       db_sel,
  input  logic [BUS_W-1:0]           pa_result,
  output logic                       pe_en,
  // to neighbours
  output logic                       idone,
  output logic                       idone_last,
  output logic [CYC_W-1:0]           max_out,
  // status
  output logic                       busy,
  output logic                       done,
  output logic                       stall_wait,   // receiver waiting for upstream
  output logic                       idle_wait,    // head spending IDLE cycles
  output logic                       act_wait,     // shifted head waiting for activation
  output logic                       reconf        // moved to a new entry
);

  localparam int unsigned EW = $clog2(ENTRIES);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ACT, S_WAIT, S_RUN, S_DRAIN, S_FIN, S_DONE} state_e;

  state_e            state;
  ctrl_t             tbl [ENTRIES];
  ctrl_t             cur;
  logic [EW:0]       entry;
  logic [ITER_W-1:0] iter;
  logic [CYC_W-1:0]  t;
  logic [CYC_W-1:0]  wait_cnt;
  logic [CYC_W-1:0]  idle_cyc;
  logic              paced;     // this EC has produced a result since start
  logic [CYC_W-1:0]  max_q;
  logic              pe_en_q;
  logic              active, last_iter, go;
  logic              act_in, down_last;
  logic [CYC_W-1:0]  max_down;

  assign cur       = tbl[entry[EW-1:0]];
  assign active    = state inside {S_ACT, S_WAIT, S_RUN, S_DRAIN, S_FIN};
  assign last_iter = (iter == cur.iterations - 1'b1);

  // downstream neighbour: the one that is not the Partner
  assign max_down  = cur.partner ? max_prev : max_next;
  assign down_last = cur.partner ? (idone_prev && last_prev) : (idone_next && last_next);
  assign act_in    = down_last;

  // IDLE cycles of a Head: the gap between its own count and the stream's max
  assign idle_cyc  = (max_q > cur.exec_cycles) ? max_q - cur.exec_cycles : '0;

  // start condition of an iteration in S_WAIT
  always_comb begin
    if (cur.head)          go = !paced || (wait_cnt >= idle_cyc);
    else if (cur.receiver) go = (link_count != '0);
    else                   go = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      entry    <= '0;
      iter     <= '0;
      t        <= '0;
      wait_cnt <= '0;
      paced    <= 1'b0;
      max_q    <= '0;
      pe_en_q  <= 1'b0;
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else begin
      if (cfg_we) tbl[cfg_idx] <= cfg_data;
      pe_en_q <= (state == S_RUN);

      // maximum execution cycles, passed against the stream
      if (active) begin
        if (cur.tail || max_down < cur.exec_cycles) max_q <= cur.exec_cycles;
        else                                        max_q <= max_down;
      end else begin
        max_q <= '0;
      end

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            entry <= '0;
            paced <= 1'b0;
            state <= S_LOAD;
          end
        end
        S_LOAD: begin
          iter     <= '0;
          wait_cnt <= wait_cnt + 1'b1;
          if (entry == (EW+1)'(ENTRIES) || cur.iterations == '0) state <= S_DONE;
          else if (cur.head && cur.receiver)                    state <= S_ACT;
          else                                                   state <= S_WAIT;
        end
        S_ACT: begin
          if (act_in) state <= S_WAIT;
        end
        S_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (go) begin
            t     <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          t <= t + 1'b1;
          if (t == cur.exec_cycles - 1'b1) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_FIN;
        S_FIN: begin
          wait_cnt <= '0;
          paced    <= 1'b1;
          if (last_iter) begin
            entry <= entry + 1'b1;
            state <= S_LOAD;
          end else begin
            iter  <= iter + 1'b1;
            state <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // requests
  always_comb begin
    cm_req.req     = (state == S_RUN);
    cm_req.addr    = cur.cm_base + CM_AW'(t);
    db_req         = '0;
    db_req.req     = active && (cur.db_rd || cur.db_wr);
    db_req.set     = cur.db_set;
    db_req.rd      = (state == S_RUN) && (t == '0) && cur.db_rd;
    db_req.rd_addr = cur.db_rd_base + BANK_B_AW'(iter);
    db_req.we      = (state == S_FIN) && cur.db_wr;
    db_req.wr_addr = cur.db_wr_base + BANK_B_AW'(iter);
    db_req.wdata   = pa_result;
  end

  assign cm_sel       = cur.cm_sel;
  assign db_sel       = cur.db_sel;
  assign pe_en        = pe_en_q;
  assign link_sel     = cur.partner;
  assign link_push_en = active && cur.receiver && !cur.head;
  assign link_pop     = (state == S_WAIT) && go && cur.receiver && !cur.head;
  assign idone        = (state == S_FIN) && cur.sender;
  assign idone_last   = idone && last_iter;
  assign max_out      = max_q;
  assign busy         = !(state inside {S_IDLE, S_DONE});
  assign done         = (state == S_DONE);
  assign stall_wait   = (state == S_WAIT) && !go && cur.receiver && !cur.head;
  assign idle_wait    = (state == S_WAIT) && !go && cur.head;
  assign act_wait     = (state == S_ACT) && !act_in;
  assign reconf       = (state == S_LOAD) && (entry != '0) && (entry != (EW+1)'(ENTRIES))
                        && (cur.iterations != '0);

endmodule
