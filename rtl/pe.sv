// pe: processing element of the PE array.
//
// Each cycle with `en` high the PE decodes its 32-bit context word, picks
// two 16-bit operands (own registers, the four mesh neighbours, the two DB
// read buses, the upstream PA's result as seen by its column (`ring`) or
// by its row (`ring_row`), an immediate, its own output or zero), runs one ALU operation and writes the result to its output
// register and/or one of its four registers. The output register is what
// the neighbours and the PA result bus see, so a result is visible one
// cycle after the context that computed it. OP_NOP, an undefined opcode,
// or `en` low, holds all state. Register width (16 bits) and count (4) follow the published RSF architecture; the
// operation set and the context-word layout (rsf_pkg::ctx_t) are this
// design's own choice. Reset clears the output and registers.
module pe
  import rsf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  ctx_t              ctx,
  input  logic [DATA_W-1:0] nbr_n,
  input  logic [DATA_W-1:0] nbr_s,
  input  logic [DATA_W-1:0] nbr_w,
  input  logic [DATA_W-1:0] nbr_e,
  input  logic [DATA_W-1:0] db0,
  input  logic [DATA_W-1:0] db1,
  input  logic [DATA_W-1:0] ring,
  input  logic [DATA_W-1:0] ring_row,
  output logic [DATA_W-1:0] out_q
);

  logic [DATA_W-1:0] rf [NREG];
  logic [DATA_W-1:0] a, b, res;

  function automatic logic [DATA_W-1:0] pick(input src_e s,
                                             input logic [DATA_W-1:0] r0, r1, r2, r3,
                                             input logic [DATA_W-1:0] n, so, w, e,
                                             input logic [DATA_W-1:0] d0, d1, rg, rr, im, o);
    unique case (s)
      SRC_R0:   return r0;
      SRC_R1:   return r1;
      SRC_R2:   return r2;
      SRC_R3:   return r3;
      SRC_N:    return n;
      SRC_S:    return so;
      SRC_W:    return w;
      SRC_E:    return e;
      SRC_DB0:  return d0;
      SRC_DB1:  return d1;
      SRC_RING: return rg;
      SRC_RROW: return rr;
      SRC_IMM:  return im;
      SRC_OUT:  return o;
      default:  return '0;
    endcase
  endfunction

  always_comb begin
    logic [DATA_W-1:0] prod;
    a    = pick(ctx.src_a, rf[0], rf[1], rf[2], rf[3], nbr_n, nbr_s, nbr_w, nbr_e,
                db0, db1, ring, ring_row, ctx.imm, out_q);
    b    = pick(ctx.src_b, rf[0], rf[1], rf[2], rf[3], nbr_n, nbr_s, nbr_w, nbr_e,
                db0, db1, ring, ring_row, ctx.imm, out_q);
    prod = DATA_W'(a * b);
    unique case (ctx.op)
      OP_ADD:  res = a + b;
      OP_SUB:  res = a - b;
      OP_MUL:  res = prod;
      OP_AND:  res = a & b;
      OP_OR:   res = a | b;
      OP_XOR:  res = a ^ b;
      OP_SHL:  res = a << b[3:0];
      OP_SHR:  res = a >> b[3:0];
      OP_SRA:  res = DATA_W'($signed(a) >>> b[3:0]);
      OP_MIN:  res = ($signed(a) < $signed(b)) ? a : b;
      OP_MAX:  res = ($signed(a) > $signed(b)) ? a : b;
      OP_ABSD: res = ($signed(a) > $signed(b)) ? a - b : b - a;
      OP_PASS: res = a;
      OP_MAC:  res = prod + out_q;
      default: res = out_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else if (en && ctx.op != OP_NOP && ctx.op <= OP_MAC) begin
      if (ctx.out_we) out_q <= res;
      if (ctx.reg_we) rf[ctx.dst] <= res;
    end
  end

endmodule
