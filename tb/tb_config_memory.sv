// tb_config_memory: self-checking test of the configuration memory.
// Fills all 16 CEs x 64 layers with a pattern computed from (CE, layer),
// then reads random layers on both ports at once (two ECs sharing the
// CM), checking every CE word of the returned layer one cycle after the
// request, and that a port without a request keeps its last data.
module tb_config_memory;
  import rsf_pkg::*;

  logic clk = 0;
  logic wr_en = 0;
  logic [3:0] wr_ce;
  logic [5:0] wr_layer;
  logic [31:0] wr_data;
  logic rd_req [2];
  logic [5:0] rd_addr [2];
  logic [511:0] rdata [2];
  int checks = 0, failures = 0;

  config_memory dut (.clk, .wr_en, .wr_ce, .wr_layer, .wr_data, .rd_req, .rd_addr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(int ce, int layer);
    return 32'(ce * 32'h0101_0003 + layer * 32'h0007_1000 + 32'h5A00_0000) ^ 32'(layer << ce);
  endfunction

  task automatic check_port(int p, int layer);
    for (int ce = 0; ce < 16; ce++) begin
      checks++;
      if (rdata[p][ce*32 +: 32] !== pat(ce, layer)) begin
        failures++;
        if (failures < 10)
          $display("port %0d layer %0d ce %0d: %h expected %h", p, layer, ce, rdata[p][ce*32 +: 32], pat(ce, layer));
      end
    end
  endtask

  initial begin
    int l0, l1;
    rd_req[0] = 0; rd_req[1] = 0; rd_addr[0] = 0; rd_addr[1] = 0;
    @(negedge clk);
    for (int l = 0; l < 64; l++)
      for (int ce = 0; ce < 16; ce++) begin
        wr_en = 1; wr_ce = 4'(ce); wr_layer = 6'(l); wr_data = pat(ce, l);
        @(negedge clk);
      end
    wr_en = 0;
    for (int i = 0; i < 200; i++) begin
      l0 = $urandom_range(0, 63); l1 = $urandom_range(0, 63);
      rd_req[0] = 1; rd_addr[0] = 6'(l0);
      rd_req[1] = 1; rd_addr[1] = 6'(l1);
      @(negedge clk);
      check_port(0, l0);
      check_port(1, l1);
      // port 1 idle: it must keep the layer it returned
      rd_req[1] = 0; rd_addr[1] = 6'($urandom);
      l0 = $urandom_range(0, 63); rd_addr[0] = 6'(l0);
      @(negedge clk);
      check_port(0, l0);
      check_port(1, l1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
