// tb_pe: self-checking test of one processing element.
// Drives random context words and operands for 2000 cycles (with `en`
// sometimes low) and compares the output register, and the four
// registers read back through later operations, with a reference model
// kept in the testbench. The result must appear one cycle after the
// context that computes it.
module tb_pe;
  import rsf_pkg::*;

  logic clk = 0, rst_n = 0, en;
  ctx_t ctx;
  logic [15:0] n, s, w, e, d0, d1, rg, rr, out_q;
  int checks = 0, failures = 0;

  pe dut (.clk, .rst_n, .en, .ctx, .nbr_n(n), .nbr_s(s), .nbr_w(w), .nbr_e(e),
          .db0(d0), .db1(d1), .ring(rg), .ring_row(rr), .out_q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] m_out, m_rf [4];

  function automatic logic [15:0] sel(input int s_, input logic [15:0] imm);
    case (s_)
      0, 1, 2, 3: return m_rf[s_];
      4: return n;  5: return s;  6: return w;  7: return e;
      8: return d0; 9: return d1; 10: return rg; 11: return imm;
      12: return m_out;
      14: return rr;
      default: return 16'h0;
    endcase
  endfunction

  function automatic logic [15:0] alu(input int op, input logic [15:0] a, b, o);
    int sa, sb;
    sa = $signed(a); sb = $signed(b);
    case (op)
      1: return a + b;
      2: return a - b;
      3: return 16'((int'(a) * int'(b)) & 32'hFFFF);
      4: return a & b;
      5: return a | b;
      6: return a ^ b;
      7: return 16'(a << b[3:0]);
      8: return a >> b[3:0];
      9: return 16'(sa >>> b[3:0]);
      10: return (sa < sb) ? a : b;
      11: return (sa > sb) ? a : b;
      12: return 16'((sa > sb) ? sa - sb : sb - sa);
      13: return a;
      14: return 16'(int'(a) * int'(b) + int'(o));
      default: return o;
    endcase
  endfunction

  initial begin
    int op, sa_, sb_;
    logic [15:0] a, b, r;
    en = 0; ctx = '0;
    {n, s, w, e, d0, d1, rg, rr} = '0;
    m_out = 0; foreach (m_rf[i]) m_rf[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      op  = $urandom_range(0, 15);
      sa_ = $urandom_range(0, 15);
      sb_ = $urandom_range(0, 15);
      ctx.op     = op_e'(op);
      ctx.src_a  = src_e'(sa_);
      ctx.src_b  = src_e'(sb_);
      ctx.dst    = 2'($urandom_range(0, 3));
      ctx.reg_we = ($urandom_range(0, 1) == 1);
      ctx.out_we = ($urandom_range(0, 3) != 0);
      ctx.imm    = 16'($urandom);
      en = ($urandom_range(0, 7) != 0);
      n = 16'($urandom); s = 16'($urandom); w = 16'($urandom); e = 16'($urandom);
      d0 = 16'($urandom); d1 = 16'($urandom); rg = 16'($urandom); rr = 16'($urandom);
      a = sel(sa_, ctx.imm);
      b = sel(sb_, ctx.imm);
      r = alu(op, a, b, m_out);
      @(posedge clk);
      if (en && op != 0 && op != 15) begin
        if (ctx.out_we) m_out = r;
        if (ctx.reg_we) m_rf[ctx.dst] = r;
      end
      #1;
      checks++;
      if (out_q !== m_out) begin
        failures++;
        if (failures < 10) $display("cycle %0d op %0d sa %0d sb %0d a %h b %h ctx %h: out %h expected %h", cyc, op, sa_, sb_, a, b, ctx, out_q, m_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
