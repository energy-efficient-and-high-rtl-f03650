// config_memory: configuration memory (CM) of one CGRA with its controller.
//
// The CM holds NUM_CE configuration elements (CEs), one per PE, each
// LAYERS deep and CE_W bits wide (16 x 64 x 32 bit = 4 KB). A read returns
// one layer of every CE at once, the full context of the PE array for one
// cycle. On the ring each CM sits between two PAs; the controller can be
// activated by either of the two adjacent ECs, and serves both in the
// same cycle through two read ports, so two neighbouring PAs can run
// different kernels stored in the same CM (port 0 serves the EC of the
// same index, port 1 the EC of the next index). The host loads one
// 32-bit context word per cycle through the write port. Reads are
// synchronous: the layer addressed in cycle t is on `rdata` in t+1.
// Sizes follow the published RSF architecture; the two-port controller and the write port
// are this design's choice.
module config_memory
  import rsf_pkg::*;
#(
  parameter int unsigned LAYERS = CM_LAYERS,
  parameter int unsigned NCE    = NUM_PE
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(NCE)-1:0]    wr_ce,
  input  logic [$clog2(LAYERS)-1:0] wr_layer,
  input  logic [CE_W-1:0]           wr_data,
  input  logic                      rd_req  [2],
  input  logic [$clog2(LAYERS)-1:0] rd_addr [2],
  output logic [NCE*CE_W-1:0]       rdata   [2]
);

  logic [NCE*CE_W-1:0] mem [LAYERS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_layer][wr_ce*CE_W +: CE_W] <= wr_data;
  end

  for (genvar p = 0; p < 2; p++) begin : g_port
    always_ff @(posedge clk) begin
      if (rd_req[p]) rdata[p] <= mem[rd_addr[p]];
    end
  end

endmodule
