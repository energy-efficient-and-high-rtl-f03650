// tb_db_bank: self-checking test of one dual-port DB bank.
// Mixes random reads and writes on the 32-bit port A and the 64-bit
// port B against a word-level model of the bank: a port-B line is the
// pair of port-A words 2L (low) and 2L+1 (high); read data appears one
// cycle after the request; on a same-word write collision port B wins.
module tb_db_bank;
  import rsf_pkg::*;

  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [5:0] a_addr;
  logic [4:0] b_addr;
  logic [31:0] a_wdata, a_rdata;
  logic [63:0] b_wdata, b_rdata;
  int checks = 0, failures = 0;

  db_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] m [64];

  initial begin
    logic [31:0] ea;
    logic [63:0] eb;
    logic ca, cb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      a_en = 1; a_we = 1; a_addr = 6'(2*i); a_wdata = $urandom; m[2*i] = a_wdata;
      b_en = 0;
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 5'(i); b_wdata = {$urandom, $urandom};
      a_en = 0;
      m[2*i] = b_wdata[31:0]; m[2*i+1] = b_wdata[63:32];
      @(negedge clk);
    end
    b_en = 0;
    for (int i = 0; i < 3000; i++) begin
      a_en = $urandom_range(0, 1); a_we = $urandom_range(0, 1);
      b_en = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      a_addr = 6'($urandom); b_addr = 5'($urandom);
      a_wdata = $urandom; b_wdata = {$urandom, $urandom};
      ca = a_en && !a_we; cb = b_en && !b_we;
      ea = m[a_addr]; eb = {m[{b_addr, 1'b1}], m[{b_addr, 1'b0}]};
      if (a_en && a_we) m[a_addr] = a_wdata;
      if (b_en && b_we) begin m[{b_addr, 1'b0}] = b_wdata[31:0]; m[{b_addr, 1'b1}] = b_wdata[63:32]; end
      @(negedge clk);
      if (ca) begin
        checks++;
        if (a_rdata !== ea) begin failures++; $display("A read %0d: %h expected %h", i, a_rdata, ea); end
      end
      if (cb) begin
        checks++;
        if (b_rdata !== eb) begin failures++; $display("B read %0d: %h expected %h", i, b_rdata, eb); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
