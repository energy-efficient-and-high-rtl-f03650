// ring_link: direct PA-to-PA data link on the receiving side of a PA.
//
// Adjacent PAs on the ring are wired to each other directly, so a kernel's
// result reaches the next kernel in one cycle without passing through a DB
// and the on-chip bus. This block sits at the input of a PA: `sel` picks
// which neighbour is upstream (0 = PA k-1, 1 = PA k+1, as the EC's Partner
// field says). When that neighbour signals Intermediate Done and
// `push_en` is high, its 64-bit result bus is captured into a small FIFO.
// `pop` (start of an iteration) moves the oldest entry into `data_q`,
// which the PA reads as SRC_RING operands for the whole iteration.
// `count` tells the EC how many results are waiting. Capturing the
// result is this design's choice (the published architecture only says the PAs are
// directly connected); it lets the upstream PA start its next iteration
// while this one still works on the previous result.
// Timing: a push in cycle t counts from t+1; a pop in t updates data_q at
// the edge ending t.
module ring_link
  import rsf_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sel,
  input  logic                       push_en,
  input  logic                       idone_prev,
  input  logic [BUS_W-1:0]           data_prev,
  input  logic                       idone_next,
  input  logic [BUS_W-1:0]           data_next,
  input  logic                       pop,
  output logic [BUS_W-1:0]           data_q,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [BUS_W-1:0] fifo [DEPTH];
  logic [PW-1:0]    rp, wp;
  logic             push;
  logic [BUS_W-1:0] din;

  assign push     = push_en && (sel ? idone_next : idone_prev);
  assign din      = sel ? data_next : data_prev;
  assign overflow = push && !pop && (count == CW'(DEPTH));

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_pop, do_push;
  assign do_pop  = pop && (count != 0);
  assign do_push = push && (count != CW'(DEPTH) || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp     <= '0;
      wp     <= '0;
      count  <= '0;
      data_q <= '0;
    end else begin
      if (do_push) begin
        fifo[wp] <= din;
        wp       <= inc(wp);
      end
      if (do_pop) begin
        data_q <= fifo[rp];
        rp     <= inc(rp);
      end
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

endmodule
