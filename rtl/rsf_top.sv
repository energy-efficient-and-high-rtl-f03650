// rsf_top: ring-based sharing fabric (RSF) of NUM_CGRA CGRAs.
//
// The tiles (EC + PA) form a ring. Between tile k and tile k+1 sit
// configuration memory CM k and data buffer DB k, shared by both tiles:
// tile k reaches CM/DB k-1 and CM/DB k, selected per control-data entry.
// Neighbouring PAs are wired together directly (result bus, Intermediate
// Done, last-iteration flag, max-cycle value) in both ring directions, so
// a kernel stream can run in pipeline around the ring in either direction
// and its placement can be shifted by one tile between phases. The host
// side (processor, DMA engine, on-chip bus) is outside: its control-data
// load port, CM write port and one transfer port per DB are the top's
// ports. `start` starts every EC; `done` rises when every EC has run out
// of entries. Sizes and ring structure follow the published RSF architecture (four CGRAs is
// the configuration of its figures; 8, 12 and 16 were also built); the
// host ports and status outputs are this design's choice.
module rsf_top
  import rsf_pkg::*;
#(
  parameter int unsigned NUM_CGRA = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  // control data
  input  logic                            cfg_we,
  input  logic [$clog2(NUM_CGRA)-1:0]     cfg_tile,
  input  logic [$clog2(NUM_ENTRIES)-1:0]  cfg_idx,
  input  ctrl_t                           cfg_data,
  // configuration memory load
  input  logic                            cm_we,
  input  logic [$clog2(NUM_CGRA)-1:0]     cm_idx,
  input  logic [$clog2(NUM_PE)-1:0]       cm_ce,
  input  logic [CM_AW-1:0]                cm_layer,
  input  logic [CE_W-1:0]                 cm_wdata,
  // data transfer, one port per DB
  input  dma_req_t                        dma       [NUM_CGRA],
  output logic [BANK_A_W-1:0]             dma_rdata [NUM_CGRA],
  // status
  output logic                            done,
  output logic [NUM_CGRA-1:0]             busy,
  output logic [NUM_CGRA-1:0]             db_conflict,
  output logic [NUM_CGRA-1:0]             link_overflow,
  output logic [NUM_CGRA-1:0]             stall_wait,
  output logic [NUM_CGRA-1:0]             idle_wait,
  output logic [NUM_CGRA-1:0]             act_wait,
  output logic [NUM_CGRA-1:0]             reconf
);

  // memory side, indexed by memory number j; port 0 = tile j, port 1 = tile j+1
  cm_req_t              cm_req   [NUM_CGRA][2];
  logic [CTX_BUS_W-1:0] cm_rdata [NUM_CGRA][2];
  db_req_t              db_req   [NUM_CGRA][2];
  logic [BUS_W-1:0]     db_rd0   [NUM_CGRA][2];
  logic [BUS_W-1:0]     db_rd1   [NUM_CGRA][2];

  // tile side
  logic                 idone  [NUM_CGRA];
  logic                 ilast  [NUM_CGRA];
  logic [CYC_W-1:0]     maxc   [NUM_CGRA];
  logic [BUS_W-1:0]     result [NUM_CGRA];
  logic [NUM_CGRA-1:0]  done_t;

  for (genvar j = 0; j < NUM_CGRA; j++) begin : g_mem
    logic                 rd_req  [2];
    logic [CM_AW-1:0]     rd_addr [2];
    assign rd_req[0]  = cm_req[j][0].req;
    assign rd_req[1]  = cm_req[j][1].req;
    assign rd_addr[0] = cm_req[j][0].addr;
    assign rd_addr[1] = cm_req[j][1].addr;

    config_memory u_cm (
      .clk      (clk),
      .wr_en    (cm_we && cm_idx == ($clog2(NUM_CGRA))'(j)),
      .wr_ce    (cm_ce),
      .wr_layer (cm_layer),
      .wr_data  (cm_wdata),
      .rd_req   (rd_req),
      .rd_addr  (rd_addr),
      .rdata    (cm_rdata[j])
    );

    data_buffer u_db (
      .clk       (clk),
      .ec_req    (db_req[j]),
      .ec_rd0    (db_rd0[j]),
      .ec_rd1    (db_rd1[j]),
      .dma       (dma[j]),
      .dma_rdata (dma_rdata[j]),
      .conflict  (db_conflict[j])
    );
  end

  for (genvar k = 0; k < NUM_CGRA; k++) begin : g_tile
    localparam int unsigned P = (k + NUM_CGRA - 1) % NUM_CGRA;
    localparam int unsigned N = (k + 1) % NUM_CGRA;

    cgra_tile u_tile (
      .clk           (clk),
      .rst_n         (rst_n),
      .cfg_we        (cfg_we && cfg_tile == ($clog2(NUM_CGRA))'(k)),
      .cfg_idx       (cfg_idx),
      .cfg_data      (cfg_data),
      .start         (start),
      .cm_req_prev   (cm_req[P][1]),
      .cm_req_own    (cm_req[k][0]),
      .cm_rdata_prev (cm_rdata[P][1]),
      .cm_rdata_own  (cm_rdata[k][0]),
      .db_req_prev   (db_req[P][1]),
      .db_req_own    (db_req[k][0]),
      .db_rd0_prev   (db_rd0[P][1]),
      .db_rd1_prev   (db_rd1[P][1]),
      .db_rd0_own    (db_rd0[k][0]),
      .db_rd1_own    (db_rd1[k][0]),
      .idone_prev    (idone[P]),
      .last_prev     (ilast[P]),
      .max_prev      (maxc[P]),
      .result_prev   (result[P]),
      .idone_next    (idone[N]),
      .last_next     (ilast[N]),
      .max_next      (maxc[N]),
      .result_next   (result[N]),
      .idone         (idone[k]),
      .idone_last    (ilast[k]),
      .max_out       (maxc[k]),
      .result        (result[k]),
      .busy          (busy[k]),
      .done          (done_t[k]),
      .stall_wait    (stall_wait[k]),
      .idle_wait     (idle_wait[k]),
      .act_wait      (act_wait[k]),
      .reconf        (reconf[k]),
      .link_overflow (link_overflow[k])
    );
  end

  assign done = &done_t;

  // A valid mapping never gives both neighbours the same DB set, and never
  // lets an upstream PA run more than the link depth ahead.
  for (genvar k = 0; k < NUM_CGRA; k++) begin : g_chk
    a_no_conflict : assert property (@(posedge clk) disable iff (!rst_n) !db_conflict[k]);
    a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) !link_overflow[k]);
  end

endmodule
