// tb_data_buffer: self-checking test of a DB with its controller.
// Fills the read banks of both sets through the transfer port, then has
// the two adjacent ECs read and write their sets at the same time in
// both mappings (EC0->set0/EC1->set1 and swapped), checks the two read
// buses of each EC one cycle later, reads the written lines back through
// the transfer port, checks that transfers into one set proceed while
// an EC works on the other, and checks the conflict flag.
module tb_data_buffer;
  import rsf_pkg::*;

  logic clk = 0;
  db_req_t ec_req [2];
  logic [63:0] ec_rd0 [2], ec_rd1 [2];
  dma_req_t dma;
  logic [31:0] dma_rdata;
  logic conflict;
  int checks = 0, failures = 0;

  data_buffer dut (.clk, .ec_req, .ec_rd0, .ec_rd1, .dma, .dma_rdata, .conflict);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] m [2][3][64];

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic dma_wr(int s, int b, int a, logic [31:0] d);
    dma = '0; dma.en = 1; dma.we = 1; dma.set = 1'(s); dma.bank = 2'(b); dma.addr = 6'(a); dma.wdata = d;
    m[s][b][a] = d;
  endtask

  function automatic logic [63:0] line(int s, int b, int l);
    return {m[s][b][2*l+1], m[s][b][2*l]};
  endfunction

  initial begin
    int l0, l1, w0, w1, da, ds, db_;
    logic [63:0] wd0, wd1;
    ec_req[0] = '0; ec_req[1] = '0; dma = '0;
    @(negedge clk);
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 3; b++)
        for (int a = 0; a < 64; a++) begin
          dma_wr(s, b, a, $urandom);
          @(negedge clk);
        end
    dma = '0;
    for (int i = 0; i < 400; i++) begin
      logic swap;
      swap = 1'($urandom_range(0, 1));
      l0 = $urandom_range(0, 31); l1 = $urandom_range(0, 31);
      w0 = $urandom_range(0, 31); w1 = $urandom_range(0, 31);
      wd0 = {$urandom, $urandom}; wd1 = {$urandom, $urandom};
      ec_req[0] = '{req: 1, set: swap, rd: 1, rd_addr: 5'(l0), we: 1, wr_addr: 5'(w0), wdata: wd0};
      ec_req[1] = '{req: 1, set: !swap, rd: 1, rd_addr: 5'(l1), we: 1, wr_addr: 5'(w1), wdata: wd1};
      // in the same cycle a transfer writes a read bank through port A
      // (any line other than the one being read)
      ds = $urandom_range(0, 1); db_ = $urandom_range(1, 2); da = $urandom_range(0, 63);
      while (db_ != 0 && (da / 2 == ((ds == int'(swap)) ? l0 : l1))) da = $urandom_range(0, 63);
      dma_wr(ds, db_, da, $urandom);
      checks++;
      if (conflict) begin failures++; $display("conflict raised for distinct sets"); end
      @(negedge clk);
      chk(ec_rd0[0], line(swap, 1, l0), "EC0 bus0");
      chk(ec_rd1[0], line(swap, 2, l0), "EC0 bus1");
      chk(ec_rd0[1], line(!swap, 1, l1), "EC1 bus0");
      chk(ec_rd1[1], line(!swap, 2, l1), "EC1 bus1");
      m[swap][0][2*w0] = wd0[31:0];  m[swap][0][2*w0+1] = wd0[63:32];
      m[!swap][0][2*w1] = wd1[31:0]; m[!swap][0][2*w1+1] = wd1[63:32];
      // read back one written word through the transfer port
      ec_req[0] = '0; ec_req[1] = '0;
      dma = '0; dma.en = 1; dma.set = swap; dma.bank = 0; dma.addr = 6'(2*w0 + (i % 2));
      @(negedge clk);
      chk(64'(dma_rdata), 64'(m[swap][0][2*w0 + (i % 2)]), "write bank via transfer port");
      dma = '0;
    end
    // both ECs on one set: conflict
    ec_req[0] = '0; ec_req[1] = '0;
    ec_req[0].req = 1; ec_req[1].req = 1; ec_req[0].set = 1; ec_req[1].set = 1;
    #1;
    checks++;
    if (!conflict) begin failures++; $display("conflict not raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
