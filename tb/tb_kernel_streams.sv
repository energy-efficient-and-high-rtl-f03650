// tb_kernel_streams: kernel-stream workloads on rings of 4, 8, 12 and 16
// CGRAs. The ring sizes and the iteration counts are the evaluated ones
// (streams of 4/8/12/16 kernels, 32 to 256 iterations); the kernels
// themselves are synthetic. Each ring is driven by a ks_runner, all four
// in parallel; the checks and failures of all runners are added up.
module tb_kernel_streams;
  logic clk = 0;
  logic fin [4];
  int ch [4], fa [4];

  always #5 clk = ~clk;

  ks_runner #(.NK(4))  u_ks4  (.clk, .finished(fin[0]), .checks(ch[0]), .failures(fa[0]));
  ks_runner #(.NK(8))  u_ks8  (.clk, .finished(fin[1]), .checks(ch[1]), .failures(fa[1]));
  ks_runner #(.NK(12)) u_ks12 (.clk, .finished(fin[2]), .checks(ch[2]), .failures(fa[2]));
  ks_runner #(.NK(16)) u_ks16 (.clk, .finished(fin[3]), .checks(ch[3]), .failures(fa[3]));

  initial begin
    int checks, failures;
    repeat (2) @(posedge clk);   // let every runner clear its finished flag
    for (int i = 0; i < 400000 && !(fin[0] && fin[1] && fin[2] && fin[3]); i++) @(posedge clk);
    checks = 0; failures = 0;
    for (int k = 0; k < 4; k++) begin checks += ch[k]; failures += fa[k]; end
    if (!(fin[0] && fin[1] && fin[2] && fin[3])) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
