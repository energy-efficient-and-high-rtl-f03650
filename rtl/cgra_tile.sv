// cgra_tile: one CGRA on the ring-based sharing fabric, without its memories.
//
// A tile is the execution controller (EC), the PE array (PA), the PA input
// mux and the receiving end of the direct PA-to-PA link. Its configuration
// memory (CM) and data buffer (DB) are not inside: on the ring, CM k and
// DB k sit between tile k and tile k+1 and are shared by both, so the tile
// has one request/return port towards the memories of index k-1 (`*_prev`)
// and one towards those of index k (`*_own`). Towards its neighbours the
// tile sends its PA result bus, Intermediate Done (plus a last-iteration
// flag) and its max-cycle value, and receives the same from both sides.
// Timing: CM and DB answer one cycle after a request; the PA result is on
// `result` in the FIN cycle of each iteration, marked by `idone` when the
// EC is a Sender. The partition into tile and shared memories follows the
// published RSF ring; the port grouping is this design's choice.
module cgra_tile
  import rsf_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_we,
  input  logic [$clog2(NUM_ENTRIES)-1:0] cfg_idx,
  input  ctrl_t                      cfg_data,
  input  logic                       start,
  // memories of index k-1 and k
  output cm_req_t                    cm_req_prev,
  output cm_req_t                    cm_req_own,
  input  logic [CTX_BUS_W-1:0]       cm_rdata_prev,
  input  logic [CTX_BUS_W-1:0]       cm_rdata_own,
  output db_req_t                    db_req_prev,
  output db_req_t                    db_req_own,
  input  logic [BUS_W-1:0]           db_rd0_prev,
  input  logic [BUS_W-1:0]           db_rd1_prev,
  input  logic [BUS_W-1:0]           db_rd0_own,
  input  logic [BUS_W-1:0]           db_rd1_own,
  // neighbour tiles
  input  logic                       idone_prev,
  input  logic                       last_prev,
  input  logic [CYC_W-1:0]           max_prev,
  input  logic [BUS_W-1:0]           result_prev,
  input  logic                       idone_next,
  input  logic                       last_next,
  input  logic [CYC_W-1:0]           max_next,
  input  logic [BUS_W-1:0]           result_next,
  output logic                       idone,
  output logic                       idone_last,
  output logic [CYC_W-1:0]           max_out,
  output logic [BUS_W-1:0]           result,
  // status
  output logic                       busy,
  output logic                       done,
  output logic                       stall_wait,
  output logic                       idle_wait,
  output logic                       act_wait,
  output logic                       reconf,
  output logic                       link_overflow
);

  cm_req_t          cm_req;
  db_req_t          db_req;
  logic             cm_sel, db_sel, pe_en;
  logic             link_pop, link_push_en, link_sel;
  logic [1:0]       link_count;
  logic [BUS_W-1:0] ring_q, db0, db1;
  ctx_t             ctx [NUM_PE];

  exec_ctrl u_ec (
    .clk          (clk),
    .rst_n        (rst_n),
    .cfg_we       (cfg_we),
    .cfg_idx      (cfg_idx),
    .cfg_data     (cfg_data),
    .start        (start),
    .idone_prev   (idone_prev),
    .last_prev    (last_prev),
    .idone_next   (idone_next),
    .last_next    (last_next),
    .max_prev     (max_prev),
    .max_next     (max_next),
    .link_count   (link_count),
    .link_pop     (link_pop),
    .link_push_en (link_push_en),
    .link_sel     (link_sel),
    .cm_req       (cm_req),
    .db_req       (db_req),
    .cm_sel       (cm_sel),
    .db_sel       (db_sel),
    .pa_result    (result),
    .pe_en        (pe_en),
    .idone        (idone),
    .idone_last   (idone_last),
    .max_out      (max_out),
    .busy         (busy),
    .done         (done),
    .stall_wait   (stall_wait),
    .idle_wait    (idle_wait),
    .act_wait     (act_wait),
    .reconf       (reconf)
  );

  pa_input_mux u_mux (
    .clk           (clk),
    .cm_sel        (cm_sel),
    .db_sel        (db_sel),
    .cm_req        (cm_req),
    .db_req        (db_req),
    .cm_req_prev   (cm_req_prev),
    .cm_req_own    (cm_req_own),
    .db_req_prev   (db_req_prev),
    .db_req_own    (db_req_own),
    .cm_rdata_prev (cm_rdata_prev),
    .cm_rdata_own  (cm_rdata_own),
    .db_rd0_prev   (db_rd0_prev),
    .db_rd1_prev   (db_rd1_prev),
    .db_rd0_own    (db_rd0_own),
    .db_rd1_own    (db_rd1_own),
    .ctx           (ctx),
    .db0           (db0),
    .db1           (db1)
  );

  ring_link #(.DEPTH(2)) u_link (
    .clk        (clk),
    .rst_n      (rst_n),
    .sel        (link_sel),
    .push_en    (link_push_en),
    .idone_prev (idone_prev),
    .data_prev  (result_prev),
    .idone_next (idone_next),
    .data_next  (result_next),
    .pop        (link_pop),
    .data_q     (ring_q),
    .count      (link_count),
    .overflow   (link_overflow)
  );

  pe_array u_pa (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (pe_en),
    .ctx     (ctx),
    .db0     (db0),
    .db1     (db1),
    .ring_in (ring_q),
    .result  (result)
  );

endmodule
