// tb_pa_input_mux: self-checking test of the PA input multiplexer.
// For random CM_Sel/DB_Sel settings and requests, checks that the request
// reaches only the selected memory (the other sees no req/rd/we), and that
// the context layer and the two read buses returned one cycle later come
// from the memory that was selected in the cycle of the request.
module tb_pa_input_mux;
  import rsf_pkg::*;

  logic clk = 0, cm_sel, db_sel;
  cm_req_t cm_req, cm_req_prev, cm_req_own;
  db_req_t db_req, db_req_prev, db_req_own;
  logic [511:0] cm_rdata_prev, cm_rdata_own;
  logic [63:0] db_rd0_prev, db_rd1_prev, db_rd0_own, db_rd1_own, db0, db1;
  ctx_t ctx [16];
  int checks = 0, failures = 0;

  pa_input_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic cs, ds;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      cs = 1'($urandom); ds = 1'($urandom);
      cm_sel = cs; db_sel = ds;
      cm_req = '{req: 1'b1, addr: 6'($urandom)};
      db_req = '{req: 1'b1, set: 1'($urandom), rd: 1'b1, rd_addr: 5'($urandom),
                 we: 1'b1, wr_addr: 5'($urandom), wdata: {$urandom, $urandom}};
      #1;
      chk((cm_req_own.req == cs) && (cm_req_prev.req == !cs), "CM request steering");
      chk((cs ? cm_req_own.addr : cm_req_prev.addr) == cm_req.addr, "CM address");
      chk((db_req_own.req == ds) && (db_req_prev.req == !ds), "DB request steering");
      chk(ds ? (!db_req_prev.rd && !db_req_prev.we && db_req_own == db_req)
             : (!db_req_own.rd && !db_req_own.we && db_req_prev == db_req), "DB request fields");
      @(negedge clk);
      // memories answer now; change the selects to make sure the registered ones are used
      cm_sel = !cs; db_sel = !ds;
      for (int k = 0; k < 16; k++) begin
        cm_rdata_prev[k*32 +: 32] = $urandom;
        cm_rdata_own[k*32 +: 32]  = $urandom;
      end
      db_rd0_prev = {$urandom, $urandom}; db_rd1_prev = {$urandom, $urandom};
      db_rd0_own  = {$urandom, $urandom}; db_rd1_own  = {$urandom, $urandom};
      #1;
      for (int k = 0; k < 16; k++)
        chk(32'(ctx[k]) == (cs ? cm_rdata_own[k*32 +: 32] : cm_rdata_prev[k*32 +: 32]), "context word");
      chk(db0 == (ds ? db_rd0_own : db_rd0_prev), "read bus 0");
      chk(db1 == (ds ? db_rd1_own : db_rd1_prev), "read bus 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
