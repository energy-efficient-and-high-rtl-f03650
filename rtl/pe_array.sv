// pe_array: the PE array (PA) of one CGRA, a ROWS x COLS mesh of PEs.
//
// Every PE gets its own context word from the layer the configuration
// memory delivers this cycle (PE (r,c) takes word r*COLS+c of `ctx`). PEs
// talk to their four nearest neighbours; an edge PE sees zero where it has
// no neighbour. Column c of the array sees word c of the two DB read buses
// (`db0`, `db1`) and of the upstream PA's result (`ring_in`): that is the
// column-wise direct transfer. With operand SRC_RROW, PE (r,c) instead
// reads word r of `ring_in`, the row-wise direct transfer. The output
// registers of the last row form the 64-bit `result` bus, which goes to
// the DB write bus and to the neighbouring PAs over the direct ring
// links. The 4x4 size, 16-bit data and column- or row-wise transfer
// between neighbouring PAs follow the published RSF architecture; the
// edge handling and the word-to-column / word-to-row mapping are this
// design's choice.
// Timing: a context applied with `en` in cycle t shows on `result` in t+1.
module pe_array
  import rsf_pkg::*;
#(
  parameter int unsigned ROWS = PA_ROWS,
  parameter int unsigned COLS = PA_COLS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  ctx_t                   ctx     [ROWS*COLS],
  input  logic [COLS*DATA_W-1:0] db0,
  input  logic [COLS*DATA_W-1:0] db1,
  input  logic [COLS*DATA_W-1:0] ring_in,
  output logic [COLS*DATA_W-1:0] result
);

  logic [DATA_W-1:0] q [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [DATA_W-1:0] n, s, w, e;
      assign n = (r > 0)        ? q[(r > 0) ? r-1 : 0][c]               : '0;
      assign s = (r < ROWS - 1) ? q[(r < ROWS - 1) ? r+1 : r][c]        : '0;
      assign w = (c > 0)        ? q[r][(c > 0) ? c-1 : 0]               : '0;
      assign e = (c < COLS - 1) ? q[r][(c < COLS - 1) ? c+1 : c]        : '0;
      pe u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (en),
        .ctx   (ctx[r*COLS+c]),
        .nbr_n (n),
        .nbr_s (s),
        .nbr_w (w),
        .nbr_e (e),
        .db0   (db0[c*DATA_W +: DATA_W]),
        .db1   (db1[c*DATA_W +: DATA_W]),
        .ring  (ring_in[c*DATA_W +: DATA_W]),
        .ring_row (ring_in[(r % COLS)*DATA_W +: DATA_W]),
        .out_q (q[r][c])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_res
    assign result[c*DATA_W +: DATA_W] = q[ROWS-1][c];
  end

endmodule
