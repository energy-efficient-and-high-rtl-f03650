// tb_cgra_tile: self-checking test of one CGRA tile with real memories.
// The tile is connected to a CM and a DB on each side (index k-1 and k).
// Entry 0 runs kernel A, a Head/Tail kernel from the own CM that reads
// operand lines x, y from the own DB and writes (x+y)<<1 back. Entry 1
// runs kernel B from the shared CM k-1 as a Receiver: the testbench plays
// the upstream tile k-1, sending results g with Intermediate Done, and
// the tile writes 6*g-1 into DB k-1. Results are read back through the
// transfer ports and compared with values computed here; the iteration
// period of kernel A (4 layers + 3 cycles) is checked too.
module tb_cgra_tile;
  import rsf_pkg::*;

  localparam int NA = 6, NB = 4;

  logic clk = 0, rst_n = 0, cfg_we = 0, start = 0;
  logic [1:0] cfg_idx;
  ctrl_t cfg_data;
  cm_req_t cm_req_prev, cm_req_own;
  logic [511:0] cm_rdata [2][2];
  db_req_t db_req_prev, db_req_own;
  logic [63:0] rd0 [2][2], rd1 [2][2];
  logic idone_prev = 0, last_prev = 0, idone_next = 0, last_next = 0;
  logic [6:0] max_prev = 0, max_next = 0, max_out;
  logic [63:0] result_prev = 0, result_next = 0, result;
  logic idone, idone_last, busy, done, stall_wait, idle_wait, act_wait, reconf, link_overflow;
  int checks = 0, failures = 0, cyc = 0;

  // memory j: 0 = index k-1, 1 = index k. Tile uses port 1 of j=0, port 0 of j=1.
  logic cm_we [2];
  logic [3:0] cm_ce;
  logic [5:0] cm_layer;
  logic [31:0] cm_wdata;
  dma_req_t dma [2];
  logic [31:0] dma_rdata [2];
  logic conflict [2];
  db_req_t dbq [2][2];
  logic cmr [2][2];
  logic [5:0] cma [2][2];

  always_comb begin
    dbq[0][0] = '0; dbq[0][1] = db_req_prev;
    dbq[1][0] = db_req_own; dbq[1][1] = '0;
    cmr[0][0] = 0; cma[0][0] = 0; cmr[0][1] = cm_req_prev.req; cma[0][1] = cm_req_prev.addr;
    cmr[1][0] = cm_req_own.req; cma[1][0] = cm_req_own.addr; cmr[1][1] = 0; cma[1][1] = 0;
  end

  for (genvar j = 0; j < 2; j++) begin : g_m
    config_memory u_cm (.clk, .wr_en(cm_we[j]), .wr_ce(cm_ce), .wr_layer(cm_layer), .wr_data(cm_wdata),
                        .rd_req(cmr[j]), .rd_addr(cma[j]), .rdata(cm_rdata[j]));
    data_buffer u_db (.clk, .ec_req(dbq[j]), .ec_rd0(rd0[j]), .ec_rd1(rd1[j]), .dma(dma[j]),
                      .dma_rdata(dma_rdata[j]), .conflict(conflict[j]));
  end

  cgra_tile dut (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_data, .start,
    .cm_req_prev, .cm_req_own, .cm_rdata_prev(cm_rdata[0][1]), .cm_rdata_own(cm_rdata[1][0]),
    .db_req_prev, .db_req_own, .db_rd0_prev(rd0[0][1]), .db_rd1_prev(rd1[0][1]),
    .db_rd0_own(rd0[1][0]), .db_rd1_own(rd1[1][0]),
    .idone_prev, .last_prev, .max_prev, .result_prev,
    .idone_next, .last_next, .max_next, .result_next,
    .idone, .idone_last, .max_out, .result,
    .busy, .done, .stall_wait, .idle_wait, .act_wait, .reconf, .link_overflow);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d %s", cyc, what); end
  endtask

  function automatic logic [31:0] cw(op_e op, src_e a, src_e b, logic [15:0] imm = 0, bit rwe = 0);
    ctx_t c;
    c = '0; c.op = op; c.src_a = a; c.src_b = b; c.imm = imm; c.out_we = 1; c.reg_we = rwe; c.dst = 0;
    return 32'(c);
  endfunction

  // one layer: `row` gets word w in every column, other PEs get NOP (all-zero word)
  task automatic cm_layer_row(int j, int layer, int row, logic [31:0] w);
    for (int ce = 0; ce < 16; ce++) begin
      @(negedge clk);
      cm_we[j] = 1; cm_ce = 4'(ce); cm_layer = 6'(layer);
      cm_wdata = (ce / 4 == row) ? w : 32'h0;
    end
    @(negedge clk);
    cm_we[j] = 0;
  endtask

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

  int idone_cyc [$];
  always @(posedge clk) if (idone && !reconf && dut.u_ec.cur.head) idone_cyc.push_back(cyc);

  initial begin
    logic [15:0] x [NA][4], y [NA][4], g [NB][4];
    logic [31:0] lo, hi;
    ctrl_t ea, eb;
    cm_we[0] = 0; cm_we[1] = 0; dma[0] = '0; dma[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // kernel A in own CM at layer 0
    cm_layer_row(1, 0, 0, cw(OP_ADD, SRC_DB0, SRC_DB1));
    cm_layer_row(1, 1, 1, cw(OP_PASS, SRC_N, SRC_ZERO));
    cm_layer_row(1, 2, 2, cw(OP_PASS, SRC_N, SRC_ZERO));
    cm_layer_row(1, 3, 3, cw(OP_SHL, SRC_N, SRC_IMM, 16'd1));
    // kernel B in the shared CM k-1 at layer 10
    cm_layer_row(0, 10, 3, cw(OP_MUL, SRC_RING, SRC_IMM, 16'd3, 1));
    cm_layer_row(0, 11, 3, cw(OP_ADD, SRC_OUT, SRC_R0));
    cm_layer_row(0, 12, 3, cw(OP_SUB, SRC_OUT, SRC_IMM, 16'd1));
    // operands of kernel A: own DB, set 1, read banks 1 (x) and 2 (y), lines 0..NA-1
    for (int i = 0; i < NA; i++) begin
      for (int c = 0; c < 4; c++) begin x[i][c] = 16'($urandom); y[i][c] = 16'($urandom); end
      dma_w(1, 1, 1, 2*i,   {x[i][1], x[i][0]}); dma_w(1, 1, 1, 2*i+1, {x[i][3], x[i][2]});
      dma_w(1, 1, 2, 2*i,   {y[i][1], y[i][0]}); dma_w(1, 1, 2, 2*i+1, {y[i][3], y[i][2]});
    end
    ea = '0; ea.exec_cycles = 4; ea.iterations = NA; ea.cm_base = 0; ea.db_rd_base = 0; ea.db_wr_base = 4;
    ea.db_rd = 1; ea.db_wr = 1; ea.db_set = 1; ea.cm_sel = 1; ea.db_sel = 1;
    ea.head = 1; ea.tail = 1; ea.sender = 1;
    eb = '0; eb.exec_cycles = 3; eb.iterations = NB; eb.cm_base = 10; eb.db_wr_base = 20;
    eb.db_wr = 1; eb.db_set = 0; eb.cm_sel = 0; eb.db_sel = 0;
    eb.receiver = 1; eb.tail = 1; eb.partner = 0;
    @(negedge clk);
    cfg_we = 1; cfg_idx = 0; cfg_data = ea; @(negedge clk);
    cfg_idx = 1; cfg_data = eb; @(negedge clk);
    cfg_idx = 2; cfg_data = '0; @(negedge clk);
    cfg_idx = 3; cfg_data = '0; @(negedge clk);
    cfg_we = 0;
    start = 1; @(negedge clk); start = 0;
    // upstream tile k-1 delivers NB results once the tile reaches entry 1
    for (int i = 0; i < 200 && !reconf; i++) @(negedge clk);
    chk(reconf, "switched to entry 1");
    for (int i = 0; i < NB; i++) begin
      repeat (3) @(negedge clk);
      for (int c = 0; c < 4; c++) g[i][c] = 16'($urandom);
      result_prev = {g[i][3], g[i][2], g[i][1], g[i][0]};
      idone_prev = 1; @(negedge clk); idone_prev = 0;
      result_prev = '1;
      repeat (6) @(negedge clk);
    end
    for (int i = 0; i < 100 && !done; i++) @(negedge clk);
    chk(done, "tile done");
    chk(!link_overflow, "no link overflow");
    // kernel A results: own DB set 1 bank 0 lines 4..
    for (int i = 0; i < NA; i++) begin
      dma_r(1, 1, 0, 2*(4+i), lo); dma_r(1, 1, 0, 2*(4+i)+1, hi);
      for (int c = 0; c < 4; c++)
        chk({hi, lo}[c*16 +: 16] == 16'((x[i][c] + y[i][c]) << 1),
            $sformatf("kernel A it %0d col %0d: %h", i, c, {hi, lo}[c*16 +: 16]));
    end
    // kernel B results: DB k-1 set 0 bank 0 lines 20..
    for (int i = 0; i < NB; i++) begin
      dma_r(0, 0, 0, 2*(20+i), lo); dma_r(0, 0, 0, 2*(20+i)+1, hi);
      for (int c = 0; c < 4; c++)
        chk({hi, lo}[c*16 +: 16] == 16'(6 * g[i][c] - 1),
            $sformatf("kernel B it %0d col %0d: %h expected %h", i, c, {hi, lo}[c*16 +: 16], 16'(6*g[i][c]-1)));
    end
    chk(idone_cyc.size() == NA, $sformatf("kernel A iterations %0d", idone_cyc.size()));
    for (int i = 1; i < idone_cyc.size(); i++)
      chk(idone_cyc[i] - idone_cyc[i-1] == 4 + 3, "kernel A period 7 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
