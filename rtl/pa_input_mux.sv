// pa_input_mux: the PA input multiplexer of one CGRA on the ring.
//
// PA k is adjacent to two CMs and two DBs: those of index k-1 (shared with
// PA k-1) and those of index k (shared with PA k+1). The EC's CM_Sel and
// DB_Sel bits choose which one is used (0 = index k-1, 1 = index k). The
// mux steers the EC's CM and DB requests to the chosen memory (the other
// one sees no request from this EC), and steers the context layer and the
// two read buses coming back into the PA. Because the memories answer one
// cycle after a request, the select bits are registered for the return
// path. The selection rule follows the published RSF architecture; the one-cycle alignment is
// this design's choice.
module pa_input_mux
  import rsf_pkg::*;
(
  input  logic                 clk,
  input  logic                 cm_sel,
  input  logic                 db_sel,
  input  cm_req_t              cm_req,
  input  db_req_t              db_req,
  output cm_req_t              cm_req_prev,
  output cm_req_t              cm_req_own,
  output db_req_t              db_req_prev,
  output db_req_t              db_req_own,
  input  logic [CTX_BUS_W-1:0] cm_rdata_prev,
  input  logic [CTX_BUS_W-1:0] cm_rdata_own,
  input  logic [BUS_W-1:0]     db_rd0_prev,
  input  logic [BUS_W-1:0]     db_rd1_prev,
  input  logic [BUS_W-1:0]     db_rd0_own,
  input  logic [BUS_W-1:0]     db_rd1_own,
  output ctx_t                 ctx [NUM_PE],
  output logic [BUS_W-1:0]     db0,
  output logic [BUS_W-1:0]     db1
);

  logic cm_sel_q, db_sel_q;
  logic [CTX_BUS_W-1:0] layer;

  always_comb begin
    cm_req_prev = cm_req;
    cm_req_own  = cm_req;
    db_req_prev = db_req;
    db_req_own  = db_req;
    if (cm_sel) cm_req_prev.req = 1'b0;
    else        cm_req_own.req  = 1'b0;
    if (db_sel) db_req_prev.req = 1'b0;
    else        db_req_own.req  = 1'b0;
    if (db_sel) begin
      db_req_prev.rd = 1'b0;
      db_req_prev.we = 1'b0;
    end else begin
      db_req_own.rd  = 1'b0;
      db_req_own.we  = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    cm_sel_q <= cm_sel;
    db_sel_q <= db_sel;
  end

  assign layer = cm_sel_q ? cm_rdata_own : cm_rdata_prev;
  assign db0   = db_sel_q ? db_rd0_own   : db_rd0_prev;
  assign db1   = db_sel_q ? db_rd1_own   : db_rd1_prev;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_ctx
    assign ctx[i] = ctx_t'(layer[i*CE_W +: CE_W]);
  end

endmodule
