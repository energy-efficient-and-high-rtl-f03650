// data_buffer: data buffer (DB) with its DB controller.
//
// A DB holds two sets of three banks (6 x 256 B = 1.5 KB). In each set
// bank 0 is the write bank, on the PA write bus, and banks 1 and 2 are the
// read banks, which drive the two 64-bit read buses of the PA. On the
// ring a DB sits between two PAs: port 0 serves the EC of the same index,
// port 1 the EC of the next index. The controller lets each EC drive one
// set at a time, and any one-to-one mapping of the two ECs onto the two
// sets is allowed, so both neighbours can use the DB in the same cycle.
// While the PAs work on one set (port B of its banks), transfers can
// fill or drain any bank through port A (`dma`), which is how data
// transfer overlaps computation. If both ECs ask for the same set, port 0
// is served and `conflict` is raised for that cycle.
// Timing: read data of a request in cycle t is on ec_rd0/ec_rd1 (and
// dma_rdata) in t+1; writes take effect at the clock edge.
// The set/bank organisation follows the published RSF architecture; the port numbering, the
// priority on a conflict and the transfer port are this design's choice.
module data_buffer
  import rsf_pkg::*;
(
  input  logic                clk,
  input  db_req_t             ec_req [2],
  output logic [BUS_W-1:0]    ec_rd0 [2],
  output logic [BUS_W-1:0]    ec_rd1 [2],
  input  dma_req_t            dma,
  output logic [BANK_A_W-1:0] dma_rdata,
  output logic                conflict
);

  logic [BANK_A_W-1:0] a_rdata [DB_SETS][DB_BANKS];
  logic [BANK_B_W-1:0] b_rdata [DB_SETS][DB_BANKS];
  db_req_t             owner   [DB_SETS];
  logic                set_q   [2];
  logic                dma_set_q;
  logic [1:0]          dma_bank_q;

  assign conflict = ec_req[0].req && ec_req[1].req && (ec_req[0].set == ec_req[1].set);

  for (genvar s = 0; s < DB_SETS; s++) begin : g_set
    // DB controller: route the EC that selected this set to its banks
    always_comb begin
      if (ec_req[0].req && ec_req[0].set == 1'(s))      owner[s] = ec_req[0];
      else if (ec_req[1].req && ec_req[1].set == 1'(s)) owner[s] = ec_req[1];
      else                                              owner[s] = '0;
    end

    for (genvar b = 0; b < DB_BANKS; b++) begin : g_bank
      logic                 b_en, b_we;
      logic [BANK_B_AW-1:0] b_addr;
      if (b == 0) begin : g_wr
        assign b_en   = owner[s].we;
        assign b_we   = 1'b1;
        assign b_addr = owner[s].wr_addr;
      end else begin : g_rd
        assign b_en   = owner[s].rd;
        assign b_we   = 1'b0;
        assign b_addr = owner[s].rd_addr;
      end
      db_bank u_bank (
        .clk     (clk),
        .a_en    (dma.en && dma.set == 1'(s) && dma.bank == 2'(b)),
        .a_we    (dma.we),
        .a_addr  (dma.addr),
        .a_wdata (dma.wdata),
        .a_rdata (a_rdata[s][b]),
        .b_en    (b_en),
        .b_we    (b_we),
        .b_addr  (b_addr),
        .b_wdata (owner[s].wdata),
        .b_rdata (b_rdata[s][b])
      );
    end
  end

  always_ff @(posedge clk) begin
    set_q[0]   <= ec_req[0].set;
    set_q[1]   <= ec_req[1].set;
    dma_set_q  <= dma.set;
    dma_bank_q <= dma.bank;
  end

  for (genvar p = 0; p < 2; p++) begin : g_ret
    assign ec_rd0[p] = b_rdata[set_q[p]][1];
    assign ec_rd1[p] = b_rdata[set_q[p]][2];
  end

  assign dma_rdata = (dma_bank_q < 2'(DB_BANKS)) ? a_rdata[dma_set_q][dma_bank_q] : '0;

endmodule
