// tb_pe_array: self-checking test of the 4x4 PE array.
// Runs short layer sequences that move data through the mesh in all four
// directions, read both DB buses and the ring input column by column,
// read the ring input row by row (row-wise transfer),
// and checks the last-row result bus against values computed here,
// including the zero seen at the array edges and the one-cycle latency.
module tb_pe_array;
  import rsf_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  ctx_t ctx [16];
  logic [63:0] db0, db1, ring_in, result;
  int checks = 0, failures = 0;

  pe_array dut (.clk, .rst_n, .en, .ctx, .db0, .db1, .ring_in, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctx_t mk(op_e op, src_e a, src_e b, logic [15:0] imm = 0);
    ctx_t c;
    c = '0; c.op = op; c.src_a = a; c.src_b = b; c.out_we = 1'b1; c.imm = imm;
    return c;
  endfunction

  // apply one layer where only row `r` works, others NOP
  task automatic layer_row(int r, op_e op, src_e a, src_e b, logic [15:0] imm = 0);
    @(negedge clk);
    foreach (ctx[i]) ctx[i] = '0;
    for (int c = 0; c < 4; c++) ctx[r*4+c] = mk(op, a, b, imm);
    en = 1;
    @(posedge clk);
    @(negedge clk);
    en = 0;
  endtask

  task automatic expect_res(logic [15:0] e [4], string what);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (result[c*16 +: 16] !== e[c]) begin
        failures++;
        $display("%s col %0d: %h expected %h", what, c, result[c*16 +: 16], e[c]);
      end
    end
  endtask

  initial begin
    logic [15:0] x [4], y [4], g [4], e [4];
    foreach (ctx[i]) ctx[i] = '0;
    db0 = '0; db1 = '0; ring_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      for (int c = 0; c < 4; c++) begin
        x[c] = 16'($urandom); y[c] = 16'($urandom); g[c] = 16'($urandom);
        db0[c*16 +: 16] = x[c]; db1[c*16 +: 16] = y[c]; ring_in[c*16 +: 16] = g[c];
      end
      // north-to-south flow: (x + y) << 1 reaches the last row after 4 layers
      layer_row(0, OP_ADD, SRC_DB0, SRC_DB1);
      layer_row(1, OP_PASS, SRC_N, SRC_ZERO);
      layer_row(2, OP_PASS, SRC_N, SRC_ZERO);
      layer_row(3, OP_SHL, SRC_N, SRC_IMM, 16'd1);
      for (int c = 0; c < 4; c++) e[c] = 16'((x[c] + y[c]) << 1);
      expect_res(e, "north flow");
      // idle cycles hold the result
      @(negedge clk); @(negedge clk);
      expect_res(e, "hold");
      // west to east shift inside the last row: column 0 sees the edge (0)
      layer_row(3, OP_PASS, SRC_W, SRC_ZERO);
      e[3] = e[2]; e[2] = e[1]; e[1] = e[0]; e[0] = 16'h0;
      expect_res(e, "west shift");
      // ring operand minus east neighbour: column 3 sees the edge (0)
      layer_row(3, OP_SUB, SRC_RING, SRC_E);
      for (int c = 0; c < 4; c++) e[c] = g[c] - ((c < 3) ? e[c+1] : 16'h0);
      expect_res(e, "ring-east");
      // last row copied up to row 2, then back down with an offset
      layer_row(2, OP_PASS, SRC_S, SRC_ZERO);
      layer_row(3, OP_ADD, SRC_N, SRC_IMM, 16'd7);
      for (int c = 0; c < 4; c++) e[c] = e[c] + 16'd7;
      expect_res(e, "south-north");
      // row-wise transfer: PE (r,c) takes g[r] + g[c], then the rows are
      // summed down each column, giving g0+g1+g2+g3 + 4*g[c]
      @(negedge clk);
      foreach (ctx[i]) ctx[i] = mk(OP_ADD, SRC_RROW, SRC_RING);
      en = 1; @(posedge clk); @(negedge clk); en = 0;
      for (int r = 1; r < 4; r++) layer_row(r, OP_ADD, SRC_N, SRC_OUT);
      for (int c = 0; c < 4; c++) e[c] = g[0] + g[1] + g[2] + g[3] + 16'(4 * g[c]);
      expect_res(e, "row-wise ring");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
