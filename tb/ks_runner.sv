// ks_runner: drives one ring of NK tiles through kernel streams of NK
// kernels, one kernel per tile, for a list of iteration counts.
//
// Used by tb_kernel_streams. For run t the stream runs ITERS(t) = 32, 64,
// 128, 192, 256 iterations (t = 0 .. NK/4). All kernels work in the last
// PE row. Kernel 0 on tile 0 is the Head: it adds the two operand words of
// its column from DB 0. Kernel j > 0 on
// tile j applies one operation with an immediate to the upstream result
// (ADD, XOR, MUL or SUB by j mod 4). Kernel j takes E(j) = 2 + (5j mod 7)
// cycles (padding layers are NOPs), so the stream is paced by the slowest
// kernel. The last tile is the Tail and writes its result to DB NK-1.
// A DB set holds 32 operand lines, so for longer runs the operand lines
// are refilled through the transfer port behind the Head, and results are
// read out behind the Tail, while the stream computes. Every result is
// compared with a model of the chain. The Head's iteration period must be
// max(E)+3 cycles.
module ks_runner
  import rsf_pkg::*;
#(
  parameter int NK = 4
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int NRUN = NK / 4 + 1;
  localparam int CW_T = $clog2(NK);

  logic rst_n = 0, start = 0, cfg_we = 0, cm_we = 0;
  logic [CW_T-1:0] cfg_tile, cm_idx;
  logic [1:0] cfg_idx;
  ctrl_t cfg_data;
  logic [3:0] cm_ce;
  logic [5:0] cm_layer;
  logic [31:0] cm_wdata;
  dma_req_t dma [NK];
  logic [31:0] dma_rdata [NK];
  logic done;
  logic [NK-1:0] busy, db_conflict, link_overflow, stall_wait, idle_wait, act_wait, reconf;

  rsf_top #(.NUM_CGRA(NK)) dut (.*);

  function automatic int iters_of(int t);
    return (t < 2) ? 32 * (t + 1) : 64 * t;   // 32, 64, 128, 192, 256
  endfunction

  function automatic int e_of(int j);
    return 2 + (5 * j) % 7;
  endfunction

  function automatic logic [15:0] opnd(int run, int i, int c, int which);
    return 16'((run * 7919 + i * 104729 + c * 1299709 + which * 15485863) * 2654435761 >> 7);
  endfunction

  function automatic logic [15:0] imm_of(int j);
    case (j % 4)
      0: return 16'(j * 17);
      1: return 16'h5A5A ^ 16'(j);
      2: return 16'(2 * j + 1);
      default: return 16'(3 * j + 1);
    endcase
  endfunction

  function automatic logic [15:0] model(int run, int i, int c);
    logic [15:0] v;
    v = opnd(run, i, c, 0) + opnd(run, i, c, 1);
    for (int j = 1; j < NK; j++)
      case (j % 4)
        0: v = v + imm_of(j);
        1: v = v ^ imm_of(j);
        2: v = 16'(v * imm_of(j));
        default: v = v - imm_of(j);
      endcase
    return v;
  endfunction

  function automatic logic [31:0] kword(int j);
    ctx_t c;
    c = '0; c.out_we = 1;
    if (j == 0) begin
      c.op = OP_ADD; c.src_a = SRC_DB0; c.src_b = SRC_DB1;
    end else begin
      c.src_a = SRC_RING; c.src_b = SRC_IMM; c.imm = imm_of(j);
      case (j % 4)
        0: c.op = OP_ADD;
        1: c.op = OP_XOR;
        2: c.op = OP_MUL;
        default: c.op = OP_SUB;
      endcase
    end
    return 32'(c);
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("NK=%0d FAIL %s", NK, what); end
  endtask

  // transfers, one port-A access per cycle
  task automatic dma_w(int j, int set, int bank, int addr, logic [31:0] d);
    dma[j] = '0; dma[j].en = 1; dma[j].we = 1; dma[j].set = 1'(set); dma[j].bank = 2'(bank);
    dma[j].addr = 6'(addr); dma[j].wdata = d;
    @(negedge clk);
    dma[j] = '0;
  endtask

  task automatic write_line(int run, int i);
    int l;
    l = i % 32;
    dma_w(0, 0, 1, 2*l,   {opnd(run, i, 1, 0), opnd(run, i, 0, 0)});
    dma_w(0, 0, 1, 2*l+1, {opnd(run, i, 3, 0), opnd(run, i, 2, 0)});
    dma_w(0, 0, 2, 2*l,   {opnd(run, i, 1, 1), opnd(run, i, 0, 1)});
    dma_w(0, 0, 2, 2*l+1, {opnd(run, i, 3, 1), opnd(run, i, 2, 1)});
  endtask

  // event counters fed by the monitors below
  int head_fin = 0, tail_wr = 0;
  int head_cyc [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.g_tile[0].u_tile.idone) begin head_fin++; head_cyc.push_back(cyc); end
    if (rst_n && dut.db_req[NK-1][0].we) tail_wr++;
  end

  initial begin
    int iters, run_e, maxe, refilled, readout, limit;
    ctrl_t e;
    logic [31:0] lo, hi;
    finished = 0; checks = 0; failures = 0;
    for (int j = 0; j < NK; j++) dma[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // configuration memories: kernel j in CM j from layer 0, NOPs after the first layer
    maxe = 0;
    for (int j = 0; j < NK; j++) begin
      if (e_of(j) > maxe) maxe = e_of(j);
      for (int l = 0; l < e_of(j); l++)
        for (int ce = 0; ce < 16; ce++) begin
          cm_we = 1; cm_idx = CW_T'(j); cm_ce = 4'(ce); cm_layer = 6'(l);
          cm_wdata = (l == 0 && ce / 4 == 3) ? kword(j) : 32'h0;   // last row only
          @(negedge clk);
        end
    end
    cm_we = 0;

    for (int run = 0; run < NRUN; run++) begin
      iters = iters_of(run);
      head_fin = 0; tail_wr = 0; head_cyc.delete();
      for (int i = 0; i < 32; i++) write_line(run, i);
      for (int j = 0; j < NK; j++) begin
        e = '0; e.exec_cycles = 7'(e_of(j)); e.iterations = 9'(iters); e.cm_sel = 1;
        e.partner = 0;
        e.head = (j == 0); e.tail = (j == NK - 1);
        e.sender = (j != NK - 1); e.receiver = (j != 0);
        if (j == 0)      begin e.db_rd = 1; e.db_sel = 1; e.db_set = 0; end
        if (j == NK - 1) begin e.db_wr = 1; e.db_sel = 1; e.db_set = 0; end
        for (int k = 0; k < 4; k++) begin
          cfg_we = 1; cfg_tile = CW_T'(j); cfg_idx = 2'(k); cfg_data = (k == 0) ? e : '0;
          @(negedge clk);
        end
      end
      cfg_we = 0;
      start = 1; @(negedge clk); start = 0;
      // refill behind the head, read out behind the tail
      refilled = 32; readout = 0; limit = 0;
      while ((readout < iters) && limit < 200000) begin
        limit++;
        if (refilled < iters && head_fin > refilled - 32) begin
          write_line(run, refilled);
          refilled++;
        end else if (readout < tail_wr) begin
          dma[NK-1] = '0; dma[NK-1].en = 1; dma[NK-1].set = 0; dma[NK-1].bank = 0;
          dma[NK-1].addr = 6'(2 * (readout % 32));
          @(negedge clk);
          lo = dma_rdata[NK-1];
          dma[NK-1].addr = 6'(2 * (readout % 32) + 1);
          @(negedge clk);
          dma[NK-1] = '0;
          hi = dma_rdata[NK-1];
          for (int c = 0; c < 4; c++)
            chk({hi, lo}[c*16 +: 16] == model(run, readout, c),
                $sformatf("run %0d it %0d col %0d: %h expected %h", run, readout, c,
                          {hi, lo}[c*16 +: 16], model(run, readout, c)));
          readout++;
        end else begin
          @(negedge clk);
        end
      end
      for (int i = 0; i < 100 && !done; i++) @(negedge clk);
      chk(done, $sformatf("run %0d done", run));
      chk(readout == iters && tail_wr == iters, $sformatf("run %0d results %0d/%0d", run, readout, tail_wr));
      run_e = 0;
      for (int i = 1; i < head_cyc.size(); i++)
        if (head_cyc[i] - head_cyc[i-1] != maxe + 3) run_e++;
      chk(run_e == 0, $sformatf("run %0d: %0d head periods differ from %0d", run, run_e, maxe + 3));
      $display("NK=%0d run %0d: %0d iterations, period %0d cycles, %0d operand lines refilled during the run",
               NK, run, iters, maxe + 3, refilled - 32);
    end
    finished = 1;
  end
endmodule
