// tb_exec_ctrl: self-checking test of the execution controller.
// Neighbours and the direct link are driven by the testbench. Checked:
//  * the CE layer sequence, the DB read/write lines and the write data of
//    each iteration, and the Intermediate Done / last flags;
//  * the iteration period: exec_cycles+3 for a lone Head/Tail, and
//    max+3 when the downstream neighbour reports a larger max (IDLE
//    cycles), with max_out forwarding the larger value;
//  * a Receiver never starts without a waiting result and pops one per
//    iteration;
//  * a Head that is also a Receiver starts only on a last-marked
//    Intermediate Done from its downstream neighbour;
//  * moving to the second entry (reconf pulse, new CM_Sel/DB_Sel, new
//    Partner direction) and `done` at the end of the list;
//  * a three-entry list, as a stream shifted twice needs: each entry runs
//    its own CM layers at its own period.
module tb_exec_ctrl;
  import rsf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, start = 0;
  logic [1:0] cfg_idx;
  ctrl_t cfg_data;
  logic idone_prev = 0, last_prev = 0, idone_next = 0, last_next = 0;
  logic [6:0] max_prev = 0, max_next = 0;
  logic [1:0] link_count = 0;
  logic link_pop, link_push_en, link_sel, cm_sel, db_sel, pe_en, idone, idone_last;
  cm_req_t cm_req;
  db_req_t db_req;
  logic [63:0] pa_result;
  logic [6:0] max_out;
  logic busy, done, stall_wait, idle_wait, act_wait, reconf;
  int checks = 0, failures = 0;
  int cyc = 0;

  exec_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign pa_result = {32'hC0DE_0000, 32'(cyc)};

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

  function automatic ctrl_t mk(int e, int it, int cmb, bit head, bit tail, bit recv, bit send,
                               bit partner = 0, bit cms = 1, bit dbs = 1);
    ctrl_t c;
    c = '0;
    c.exec_cycles = 7'(e); c.iterations = 9'(it); c.cm_base = 6'(cmb);
    c.db_rd_base = 5'd3; c.db_wr_base = 5'd10; c.db_rd = 1; c.db_wr = 1; c.db_set = 1;
    c.head = head; c.tail = tail; c.receiver = recv; c.sender = send; c.partner = partner;
    c.cm_sel = cms; c.db_sel = dbs;
    return c;
  endfunction

  task automatic load(ctrl_t e0, ctrl_t e1, ctrl_t e2 = '0);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 0; cfg_data = e0; @(negedge clk);
    cfg_idx = 1; cfg_data = e1; @(negedge clk);
    cfg_idx = 2; cfg_data = e2; @(negedge clk);
    cfg_idx = 3; cfg_data = '0; @(negedge clk);
    cfg_we = 0;
  endtask

  // monitor: collect iteration events of the EC
  int idone_cyc [$];
  int pops = 0, lasts = 0, reconfs = 0, stalls = 0, idles = 0, acts = 0;
  int run_len = 0, exp_e = 0, exp_base = 0, iter_mon = 0;
  bit mon_on = 0;
  int nxt_e [$], nxt_base [$];   // expected E and CM base of later entries
  always @(posedge clk) if (rst_n && mon_on) begin
    if (cm_req.req) begin
      if (cm_req.addr != 6'(exp_base + run_len)) begin
        failures++; $display("FAIL @%0d layer %0d expected %0d", cyc, cm_req.addr, exp_base + run_len);
      end
      if (run_len == 0) begin
        checks++;
        if (!(db_req.req && db_req.rd && db_req.rd_addr == 5'(3 + iter_mon) && db_req.set)) begin
          failures++; $display("FAIL @%0d DB read line %0d", cyc, db_req.rd_addr);
        end
      end else if (db_req.rd) begin
        failures++; $display("FAIL @%0d extra DB read", cyc);
      end
      run_len++;
    end
    if (db_req.we) begin
      checks++;
      if (!(run_len == exp_e && db_req.wr_addr == 5'(10 + iter_mon) && db_req.wdata == pa_result)) begin
        failures++; $display("FAIL @%0d DB write run_len %0d line %0d", cyc, run_len, db_req.wr_addr);
      end
    end
    if (idone) begin
      idone_cyc.push_back(cyc);
      run_len = 0;
      iter_mon++;
      if (idone_last) lasts++;
    end
    if (link_pop) begin
      pops++;
      checks++;
      if (link_count == 0) begin failures++; $display("FAIL pop from empty link"); end
    end
    if (stall_wait) stalls++;
    if (idle_wait) idles++;
    if (act_wait) acts++;
    if (reconf) begin
      reconfs++;
      if (nxt_e.size() > 0) begin
        exp_e = nxt_e.pop_front(); exp_base = nxt_base.pop_front(); iter_mon = 0; run_len = 0;
      end
    end
  end

  task automatic reset_mon(int e, int base);
    idone_cyc.delete(); pops = 0; lasts = 0; reconfs = 0; stalls = 0; idles = 0; acts = 0;
    run_len = 0; exp_e = e; exp_base = base; iter_mon = 0; mon_on = 1;
    nxt_e.delete(); nxt_base.delete();
  endtask

  task automatic go_and_wait(int limit);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < limit && !done; i++) @(negedge clk);
    chk(done, "done reached");
  endtask

  task automatic check_period(int p, int n, string what);
    chk(idone_cyc.size() == n, $sformatf("%s: %0d iterations (got %0d)", what, n, idone_cyc.size()));
    for (int i = 1; i < idone_cyc.size(); i++)
      chk(idone_cyc[i] - idone_cyc[i-1] == p,
          $sformatf("%s: period %0d expected %0d", what, idone_cyc[i] - idone_cyc[i-1], p));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1: lone head/tail, E=3, 4 iterations
    load(mk(3, 4, 8, 1, 1, 0, 1), '0);
    reset_mon(3, 8);
    go_and_wait(200);
    check_period(3 + 3, 4, "lone head");
    chk(lasts == 1, "one last flag");
    chk(idles == 0, "no IDLE cycles for a lone head");

    // 2: head, not tail, downstream reports max 7 -> IDLE = 4
    max_next = 7;
    load(mk(3, 5, 0, 1, 0, 0, 1), '0);
    reset_mon(3, 0);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (4) @(negedge clk);
    chk(max_out == 7, "max_out forwards the larger downstream max");
    for (int i = 0; i < 200 && !done; i++) @(negedge clk);
    check_period(7 + 3, 5, "paced head");
    chk(idles == 4 * 4, $sformatf("IDLE cycles %0d expected 16", idles));
    max_next = 0;

    // 3: body receiver, upstream = prev; results arrive slowly
    load(mk(2, 3, 20, 0, 0, 1, 1), '0);
    reset_mon(2, 20);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < 3; k++) begin
      repeat (12) begin
        @(negedge clk);
        chk(!cm_req.req || run_len > 0 || k > 0, "no start before a result");
      end
      link_count = 1;
      @(negedge clk);
      link_count = 0;
    end
    repeat (10) @(negedge clk);
    chk(done, "receiver done");
    chk(pops == 3, $sformatf("pops %0d expected 3", pops));
    chk(stalls > 20, "receiver stalled waiting for upstream");
    chk(link_push_en == 0, "no push enable after done");

    // 4: shifted head: activation by downstream (partner=0 -> downstream = next)
    //    then second entry as body receiving from next (partner=1), other selects
    load(mk(2, 2, 30, 1, 0, 1, 1), mk(4, 2, 40, 0, 1, 1, 1, 1, 0, 0));
    reset_mon(2, 30);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    // wrong side and non-last pulses do not activate
    idone_prev = 1; last_prev = 1; @(negedge clk); idone_prev = 0; last_prev = 0;
    idone_next = 1; last_next = 0; @(negedge clk); idone_next = 0;
    repeat (3) @(negedge clk);
    chk(run_len == 0 && act_wait, "still waiting for activation");
    chk(cm_sel == 1 && db_sel == 1 && link_sel == 0, "entry 0 selects");
    idone_next = 1; last_next = 1; @(negedge clk); idone_next = 0; last_next = 0;
    repeat (3) @(negedge clk);
    chk(run_len > 0, "activated");
    // wait for entry switch
    for (int i = 0; i < 50 && !reconfs; i++) @(negedge clk);
    chk(reconfs == 1, "reconfiguration to entry 1");
    @(negedge clk);
    chk(cm_sel == 0 && db_sel == 0 && link_sel == 1 && link_push_en, "entry 1 selects");
    exp_e = 4; exp_base = 40; iter_mon = 0;
    repeat (2) begin
      link_count = 1; @(negedge clk); link_count = 0;
      repeat (12) @(negedge clk);
    end
    chk(done, "two-entry run done");
    chk(pops == 2 && lasts == 2, $sformatf("pops %0d lasts %0d", pops, lasts));
    chk(acts >= 5, $sformatf("activation wait counted (%0d cycles)", acts));

    // 5: three entries (a stream shifted twice): E = 2, 3, 5 from three
    //    CM regions, two iterations each, lone head/tail in every phase
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    load(mk(2, 2, 0, 1, 1, 0, 1), mk(3, 2, 20, 1, 1, 0, 1, 0, 0, 1), mk(5, 2, 50, 1, 1, 0, 1, 0, 1, 0));
    reset_mon(2, 0);
    nxt_e = '{3, 5}; nxt_base = '{20, 50};
    go_and_wait(300);
    chk(reconfs == 2, $sformatf("two reconfigurations (got %0d)", reconfs));
    chk(lasts == 3, $sformatf("one last flag per entry (got %0d)", lasts));
    chk(idone_cyc.size() == 6, $sformatf("six iterations (got %0d)", idone_cyc.size()));
    if (idone_cyc.size() == 6) begin
      chk(idone_cyc[1] - idone_cyc[0] == 5, "entry 0 period E+3");
      chk(idone_cyc[3] - idone_cyc[2] == 6, "entry 1 period E+3");
      chk(idone_cyc[5] - idone_cyc[4] == 8, "entry 2 period E+3");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
