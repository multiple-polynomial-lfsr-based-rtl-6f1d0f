// mp_lfsr_prng: multiple-polynomial LFSR pseudorandom number generator for
// EPC Gen2 tags (top level).
//
// A 16-cell LFSR produces the output bit stream. Its feedback polynomial is
// not fixed: a wheel of eight primitive polynomials selects one, and once per
// 16-bit output word a true random bit from an on-tag noise source advances
// the wheel by one position (trn = 0) or two (trn = 1). The update happens
// after 15 of the word's 16 shifts, so each word is made with at least two
// polynomials and the linear structure of a single LFSR is broken up.
//
// Blocks: decoding_logic (frame sequencer, trn sampling, wheel steps),
// poly_selector (wheel, one-hot decoder, tap network), mp_lfsr (register and
// output gate). The noise source and the clock are outside: trn_req asks the
// TRNG for a bit, which must be on trn at the same clock edge.
//
// Interface and timing: with run high, the clock after run rises starts a
// frame of FR = 16 cycles; prng_out carries one output bit per cycle while
// out_valid is high, the first bit with frame_start and the last with
// frame_end. Frames repeat back to back while run stays high. seed_load
// writes seed into the register (the reset state is 0x0001). poly_idx shows
// which polynomial feeds the register (0 = p_1).
// The structure, sizes, polynomials and update rule are the published
// design's; the ports, handshake and reset are this design's own.
module mp_lfsr_prng #(
  parameter int unsigned  N    = prng_pkg::N_CELLS,
  parameter int unsigned  M    = prng_pkg::M_POLYS,
  parameter int unsigned  FR   = prng_pkg::FRAME,
  parameter int unsigned  L    = prng_pkg::UPD,
  parameter logic [N-1:0] SEED = N'(prng_pkg::SEED),
  parameter logic [N-1:0] COEF [M] = prng_pkg::POLY_COEF,
  localparam int unsigned W = (M > 1) ? $clog2(M) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,          // produce output words
  input  logic         trn,          // true random bit from the TRNG
  output logic         trn_req,      // TRNG sample request
  input  logic         seed_load,    // load seed into the LFSR
  input  logic [N-1:0] seed,
  output logic         prng_out,     // output bit stream
  output logic         out_valid,    // prng_out carries a bit
  output logic         frame_start,  // first bit of a word
  output logic         frame_end,    // last bit of a word
  output logic [W-1:0] poly_idx      // polynomial in use
);

  logic         shift_en, out_en, rotate, fb;
  logic [N-1:0] state;

  decoding_logic #(.FR(FR), .L(L)) u_ctrl (
    .clk, .rst_n, .run, .trn, .trn_req,
    .shift_en, .out_en, .rotate, .frame_start, .frame_end
  );

  poly_selector #(.N(N), .M(M), .COEF(COEF)) u_sel (
    .clk, .rst_n, .rotate, .state,
    .sel_idx (poly_idx), .sel_onehot (), .fb
  );

  mp_lfsr #(.N(N), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .shift_en, .fb,
    .load (seed_load), .load_val (seed),
    .out_en, .state, .prng_out
  );

  assign out_valid = out_en;

endmodule
