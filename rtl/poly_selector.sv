// poly_selector: the polynomial wheel and its feedback network.
//
// The wheel is a log2(M)-bit position register. Each clock with rotate high
// advances it one position, from p_M back round to p_1; a rotation by two
// positions is two rotate pulses on consecutive clocks, issued by the
// decoding logic. The position is decoded one-hot and drives the tap network
// (poly_feedback), which returns the feedback bit of the selected polynomial
// for the current LFSR state.
//
// Timing: sel_idx changes on the clock edge where rotate is high, so the new
// polynomial produces the feedback for the next shift. After reset p_1 is
// selected. fb is combinational from state and the position register.
// From the published design: the wheel that steps one polynomial at a time,
// the 3-bit position with a one-hot decoder, start at p_1. This design's own:
// the synchronous active-low reset.
module poly_selector #(
  parameter int unsigned  N = prng_pkg::N_CELLS,
  parameter int unsigned  M = prng_pkg::M_POLYS,
  parameter logic [N-1:0] COEF [M] = prng_pkg::POLY_COEF,
  localparam int unsigned W = (M > 1) ? $clog2(M) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rotate,      // advance the wheel one position
  input  logic [N-1:0] state,       // LFSR state S_N..S_1
  output logic [W-1:0] sel_idx,     // 0 selects p_1
  output logic [M-1:0] sel_onehot,
  output logic         fb           // feedback bit for the next shift
);

  always_ff @(posedge clk) begin
    if (!rst_n)      sel_idx <= '0;
    else if (rotate) sel_idx <= (sel_idx == W'(M - 1)) ? '0 : sel_idx + 1'b1;
  end

  always_comb begin
    sel_onehot = '0;
    sel_onehot[sel_idx] = 1'b1;
  end

  poly_feedback #(.N(N), .M(M), .COEF(COEF)) u_fb (
    .sel_onehot (sel_onehot),
    .state      (state),
    .fb         (fb)
  );

endmodule
