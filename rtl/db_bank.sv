// db_bank: one bank of a data buffer (DB), 256 bytes, dual-ported.
//
// Port A is 32 bits x 64 words and serves transfers between the DB and
// the rest of the system; port B is 64 bits x 32 lines and serves the PE
// array (one line = one 16-bit word per PA column). Line L of port B is
// the pair of port-A words 2L (low half) and 2L+1 (high half). Both ports
// read synchronously (data in the cycle after `en`). If both ports write
// the same word in one cycle, port B wins. Widths and depths follow the
// design; the word order inside a line and the collision rule are this
// design's choice.
module db_bank
  import rsf_pkg::*;
(
  input  logic                 clk,
  input  logic                 a_en,
  input  logic                 a_we,
  input  logic [BANK_A_AW-1:0] a_addr,
  input  logic [BANK_A_W-1:0]  a_wdata,
  output logic [BANK_A_W-1:0]  a_rdata,
  input  logic                 b_en,
  input  logic                 b_we,
  input  logic [BANK_B_AW-1:0] b_addr,
  input  logic [BANK_B_W-1:0]  b_wdata,
  output logic [BANK_B_W-1:0]  b_rdata
);

  logic [BANK_A_W-1:0] mem [BANK_A_DEP];

  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (b_en && b_we) begin
      mem[{b_addr, 1'b0}] <= b_wdata[BANK_A_W-1:0];
      mem[{b_addr, 1'b1}] <= b_wdata[BANK_B_W-1:BANK_A_W];
    end
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= {mem[{b_addr, 1'b1}], mem[{b_addr, 1'b0}]};
  end

endmodule
