// tb_rsf_top: end-to-end test of the four-CGRA ring at its default sizes.
//
// A kernel stream K_A -> K_B -> K_C runs in pipeline around the ring with
// a shifting configuration:
//   phase 1 (I1 iterations): K_A on tile 0, K_B on tile 1, K_C on tile 2
//   phase 2 (I2 iterations): K_A on tile 3, K_B on tile 0, K_C on tile 1
// K_A  (4 layers): (x + y) << 1, x and y from the read banks of a DB
// K_B  (6 layers, the longest): 6*a - 1, a from the upstream PA
// K_C  (3 layers): signed max(b ^ 0x00FF, 100), written to a DB
// Tile 3 is activated by tile 0's last phase-1 result; tile 0 and tile 1
// change kernels (intra-CGRA reconfiguration); tile 0 runs K_B from CM 3,
// tiles 2 and 1 write their results into the DB of the previous index.
// Phase-2 operands are transferred into DB 3 while phase 1 computes.
// All results are read back through the transfer ports and compared with
// values computed here. The head's iteration period must be
// max(exec cycles)+3 = 9 cycles and the stream must pass from phase 1 to
// phase 2 without losing more than the activation and reload cycles.
// Each mechanism (IDLE pacing, receiver stall, activation, entry switch,
// shared CM, two PAs on one CM in one cycle, shared DB, transfer overlap,
// direct-link transfers) is counted and must occur.
module tb_rsf_top;
  import rsf_pkg::*;

  localparam int I1 = 24, I2 = 8;
  localparam int N  = 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic cfg_we = 0, cm_we = 0;
  logic [1:0] cfg_tile, cfg_idx, cm_idx;
  ctrl_t cfg_data;
  logic [3:0] cm_ce;
  logic [5:0] cm_layer;
  logic [31:0] cm_wdata;
  dma_req_t dma [N];
  logic [31:0] dma_rdata [N];
  logic done;
  logic [N-1:0] busy, db_conflict, link_overflow, stall_wait, idle_wait, act_wait, reconf;
  int checks = 0, failures = 0, cyc = 0;

  rsf_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d %s", cyc, what); end
  endtask

  function automatic logic [31:0] cw(op_e op, src_e a, src_e b, logic [15:0] imm = 0, bit rwe = 0);
    ctx_t c;
    c = '0; c.op = op; c.src_a = a; c.src_b = b; c.imm = imm; c.out_we = 1; c.reg_we = rwe;
    return 32'(c);
  endfunction

  task automatic cm_row(int j, int layer, int row, logic [31:0] w);
    for (int ce = 0; ce < 16; ce++) begin
      @(negedge clk);
      cm_we = 1; cm_idx = 2'(j); cm_ce = 4'(ce); cm_layer = 6'(layer);
      cm_wdata = (ce / 4 == row) ? w : 32'h0;
    end
    @(negedge clk);
    cm_we = 0;
  endtask

  task automatic load_ka(int j, int base);
    cm_row(j, base + 0, 0, cw(OP_ADD, SRC_DB0, SRC_DB1));
    cm_row(j, base + 1, 1, cw(OP_PASS, SRC_N, SRC_ZERO));
    cm_row(j, base + 2, 2, cw(OP_PASS, SRC_N, SRC_ZERO));
    cm_row(j, base + 3, 3, cw(OP_SHL, SRC_N, SRC_IMM, 16'd1));
  endtask
  task automatic load_kb(int j, int base);
    cm_row(j, base + 0, 3, cw(OP_MUL, SRC_RING, SRC_IMM, 16'd3, 1));
    cm_row(j, base + 1, 3, cw(OP_ADD, SRC_OUT, SRC_R0));
    cm_row(j, base + 2, 3, cw(OP_SUB, SRC_OUT, SRC_IMM, 16'd1));
    cm_row(j, base + 3, 3, 32'h0);
    cm_row(j, base + 4, 3, 32'h0);
    cm_row(j, base + 5, 3, 32'h0);
  endtask
  task automatic load_kc(int j, int base);
    cm_row(j, base + 0, 3, cw(OP_XOR, SRC_RING, SRC_IMM, 16'h00FF));
    cm_row(j, base + 1, 3, cw(OP_MAX, SRC_OUT, SRC_IMM, 16'd100));
    cm_row(j, base + 2, 3, 32'h0);
  endtask

  function automatic logic [15:0] kstream(logic [15:0] x, logic [15:0] y);
    logic [15:0] a, b, c;
    a = 16'((x + y) << 1);
    b = 16'(6 * a - 1);
    c = b ^ 16'h00FF;
    return ($signed(c) > $signed(16'sd100)) ? c : 16'd100;
  endfunction

  task automatic dma_w(int j, int set, int bank, int addr, logic [31:0] d);
    @(negedge clk);
    dma[j] = '0; dma[j].en = 1; dma[j].we = 1; dma[j].set = 1'(set); dma[j].bank = 2'(bank);
    dma[j].addr = 6'(addr); dma[j].wdata = d;
    @(negedge clk);
    dma[j] = '0;
  endtask

  task automatic dma_r(int j, int set, int bank, int addr, output logic [31:0] d);
    @(negedge clk);
    dma[j] = '0; dma[j].en = 1; dma[j].set = 1'(set); dma[j].bank = 2'(bank); dma[j].addr = 6'(addr);
    @(negedge clk);
    dma[j] = '0;
    d = dma_rdata[j];
  endtask

  task automatic cfg(int tile, int idx, ctrl_t d);
    @(negedge clk);
    cfg_we = 1; cfg_tile = 2'(tile); cfg_idx = 2'(idx); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic ctrl_t ent(int e, int it, int cmb, bit cms, bit head, bit tail, bit recv, bit send);
    ctrl_t c;
    c = '0; c.exec_cycles = 7'(e); c.iterations = 9'(it); c.cm_base = 6'(cmb); c.cm_sel = cms;
    c.head = head; c.tail = tail; c.receiver = recv; c.sender = send; c.partner = 0;
    return c;
  endfunction

  // mechanism counters
  int n_idle = 0, n_stall = 0, n_act = 0, n_reconf = 0, n_cm_shared = 0, n_cm_dual = 0;
  int n_db_shared = 0, n_overlap = 0, n_link = 0;
  int head_start [$];   // FIN cycles of the heads
  int tail_write [$];   // cycles of the tails' DB writes
  logic dma_active = 0;
  always @(posedge clk) if (rst_n) begin
    n_idle   += $countones(idle_wait);
    n_stall  += $countones(stall_wait);
    n_act    += $countones(act_wait);
    n_reconf += $countones(reconf);
    for (int j = 0; j < N; j++) begin
      if (dut.cm_req[j][1].req) n_cm_shared++;
      if (dut.cm_req[j][0].req && dut.cm_req[j][1].req) n_cm_dual++;
      if (dut.db_req[j][1].req && (dut.db_req[j][1].we || dut.db_req[j][1].rd)) n_db_shared++;
      if (dut.db_req[j][0].we || dut.db_req[j][1].we) tail_write.push_back(cyc);
    end
    if (dma_active && (busy != 0)) n_overlap++;
    n_link += int'(dut.g_tile[0].u_tile.link_pop) + int'(dut.g_tile[1].u_tile.link_pop) +
              int'(dut.g_tile[2].u_tile.link_pop) + int'(dut.g_tile[3].u_tile.link_pop);
    if (dut.g_tile[0].u_tile.idone && dut.g_tile[0].u_tile.u_ec.cur.head) head_start.push_back(cyc);
  end

  initial begin
    logic [15:0] x1 [I1][4], y1 [I1][4], x2 [I2][4], y2 [I2][4];
    logic [31:0] lo, hi;
    ctrl_t e;
    int t_done, gap;
    for (int j = 0; j < N; j++) dma[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // configuration memories
    load_ka(0, 0);
    load_kb(1, 0);  load_kc(1, 16);
    load_kc(2, 0);
    load_ka(3, 0);  load_kb(3, 16);

    // phase-1 operands in DB 0, set 0
    for (int i = 0; i < I1; i++) begin
      for (int c = 0; c < 4; c++) begin x1[i][c] = 16'($urandom); y1[i][c] = 16'($urandom); end
      dma_w(0, 0, 1, 2*i, {x1[i][1], x1[i][0]}); dma_w(0, 0, 1, 2*i+1, {x1[i][3], x1[i][2]});
      dma_w(0, 0, 2, 2*i, {y1[i][1], y1[i][0]}); dma_w(0, 0, 2, 2*i+1, {y1[i][3], y1[i][2]});
    end

    // tile 0: K_A head (phase 1), then K_B from CM 3 (phase 2)
    e = ent(4, I1, 0, 1, 1, 0, 0, 1); e.db_rd = 1; e.db_sel = 1; e.db_set = 0; cfg(0, 0, e);
    e = ent(6, I2, 16, 0, 0, 0, 1, 1);                                        cfg(0, 1, e);
    cfg(0, 2, '0); cfg(0, 3, '0);
    // tile 1: K_B (phase 1), then K_C tail writing DB 0 set 1 (phase 2)
    e = ent(6, I1, 0, 1, 0, 0, 1, 1);                                         cfg(1, 0, e);
    e = ent(3, I2, 16, 1, 0, 1, 1, 0); e.db_wr = 1; e.db_sel = 0; e.db_set = 1; cfg(1, 1, e);
    cfg(1, 2, '0); cfg(1, 3, '0);
    // tile 2: K_C tail writing DB 1 set 1 (phase 1)
    e = ent(3, I1, 0, 1, 0, 1, 1, 0); e.db_wr = 1; e.db_sel = 0; e.db_set = 1; cfg(2, 0, e);
    cfg(2, 1, '0); cfg(2, 2, '0); cfg(2, 3, '0);
    // tile 3: K_A head of phase 2, activated by tile 0's last phase-1 result
    e = ent(4, I2, 0, 1, 1, 0, 1, 1); e.db_rd = 1; e.db_sel = 1; e.db_set = 0; cfg(3, 0, e);
    cfg(3, 1, '0); cfg(3, 2, '0); cfg(3, 3, '0);

    @(negedge clk); start = 1; @(negedge clk); start = 0;

    // phase-2 operands go into DB 3 while phase 1 runs
    dma_active = 1;
    for (int i = 0; i < I2; i++) begin
      for (int c = 0; c < 4; c++) begin x2[i][c] = 16'($urandom); y2[i][c] = 16'($urandom); end
      dma_w(3, 0, 1, 2*i, {x2[i][1], x2[i][0]}); dma_w(3, 0, 1, 2*i+1, {x2[i][3], x2[i][2]});
      dma_w(3, 0, 2, 2*i, {y2[i][1], y2[i][0]}); dma_w(3, 0, 2, 2*i+1, {y2[i][3], y2[i][2]});
    end
    dma_active = 0;

    t_done = 0;
    for (int i = 0; i < 5000 && !done; i++) begin @(negedge clk); t_done = i; end
    chk(done, "all tiles done");
    $display("run finished %0d cycles after the operand transfer", t_done);

    // results of phase 1: DB 1 set 1 bank 0; phase 2: DB 0 set 1 bank 0
    for (int i = 0; i < I1; i++) begin
      dma_r(1, 1, 0, 2*i, lo); dma_r(1, 1, 0, 2*i+1, hi);
      for (int c = 0; c < 4; c++)
        chk({hi, lo}[c*16 +: 16] == kstream(x1[i][c], y1[i][c]),
            $sformatf("phase 1 it %0d col %0d: %h expected %h", i, c, {hi, lo}[c*16 +: 16], kstream(x1[i][c], y1[i][c])));
    end
    for (int i = 0; i < I2; i++) begin
      dma_r(0, 1, 0, 2*i, lo); dma_r(0, 1, 0, 2*i+1, hi);
      for (int c = 0; c < 4; c++)
        chk({hi, lo}[c*16 +: 16] == kstream(x2[i][c], y2[i][c]),
            $sformatf("phase 2 it %0d col %0d: %h expected %h", i, c, {hi, lo}[c*16 +: 16], kstream(x2[i][c], y2[i][c])));
    end

    // rate: head of phase 1 advances every max(4,6,3)+3 = 9 cycles
    chk(head_start.size() == I1, $sformatf("phase-1 head iterations %0d", head_start.size()));
    for (int i = 1; i < head_start.size(); i++)
      chk(head_start[i] - head_start[i-1] == 9,
          $sformatf("head period %0d expected 9", head_start[i] - head_start[i-1]));
    // tail writes: I1 + I2 results; period 9 inside each phase, and the
    // phase change costs at most the activation and reload cycles
    chk(tail_write.size() == I1 + I2, $sformatf("tail writes %0d", tail_write.size()));
    for (int i = 1; i < tail_write.size(); i++) begin
      gap = tail_write[i] - tail_write[i-1];
      if (i == I1) begin
        $display("phase change: %0d cycles between the last phase-1 and the first phase-2 result", gap);
        chk(gap <= 9 + 6, $sformatf("phase-change gap %0d", gap));
      end else begin
        chk(gap == 9, $sformatf("tail period %0d at %0d", gap, i));
      end
    end

    $display("mechanisms: idle=%0d stall=%0d activation=%0d reconf=%0d cm_shared=%0d cm_dual=%0d db_shared=%0d overlap=%0d link=%0d",
             n_idle, n_stall, n_act, n_reconf, n_cm_shared, n_cm_dual, n_db_shared, n_overlap, n_link);
    chk(n_idle > 0, "head IDLE pacing happened");
    chk(n_stall > 0, "receiver stall happened");
    chk(n_act > 0, "activation of a shifted head happened");
    chk(n_reconf == 2, "two intra-CGRA reconfigurations");
    chk(n_cm_shared > 0, "a PA ran from the CM of the previous index");
    chk(n_cm_dual > 0, "two PAs read one CM in the same cycle");
    chk(n_db_shared > 0, "a PA used the DB of the previous index");
    chk(n_overlap > 0, "transfer overlapped computation");
    chk(n_link == 2 * I1 + 2 * I2, $sformatf("direct-link transfers %0d", n_link));
    chk(db_conflict == 0 && link_overflow == 0, "no conflict or overflow at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
