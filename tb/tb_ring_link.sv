// tb_ring_link: self-checking test of the direct PA-to-PA link.
// Random Intermediate Done pulses arrive from both neighbours with random
// upstream selection, push enable and pops; a queue model checks the
// result count, the data handed to the PA on every pop (only the selected
// neighbour's results, in order), and the overflow flag when a push finds
// the link full.
module tb_ring_link;
  import rsf_pkg::*;

  logic clk = 0, rst_n = 0, sel, push_en, idone_prev, idone_next, pop, overflow;
  logic [63:0] data_prev, data_next, data_q;
  logic [1:0] count;
  int checks = 0, failures = 0;

  ring_link #(.DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] q [$];
  logic [63:0] exp_q;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic push, do_pop, full_ovf;
    sel = 0; push_en = 0; idone_prev = 0; idone_next = 0; pop = 0;
    data_prev = 0; data_next = 0; exp_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      sel = ($urandom_range(0, 15) == 0) ? !sel : sel;
      push_en = ($urandom_range(0, 9) != 0);
      idone_prev = $urandom_range(0, 1); idone_next = $urandom_range(0, 1);
      data_prev = {$urandom, $urandom}; data_next = {$urandom, $urandom};
      pop = ($urandom_range(0, 2) == 0);
      push = push_en && (sel ? idone_next : idone_prev);
      do_pop = pop && q.size() > 0;
      full_ovf = push && !pop && q.size() == 2;
      #1;
      chk(overflow == full_ovf, "overflow flag");
      chk(count == 2'(q.size()), "count");
      @(posedge clk);
      if (do_pop) exp_q = q.pop_front();
      if (push && (q.size() < 2)) q.push_back(sel ? data_next : data_prev);
      #1;
      chk(data_q == exp_q, "popped data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
