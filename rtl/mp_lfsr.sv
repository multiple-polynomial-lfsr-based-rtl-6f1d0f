// mp_lfsr: the shift register core of the multiple-polynomial LFSR generator.
//
// N cells S1..SN held in state[N-1:0] (state[k-1] = S_k). On every clock with
// shift_en high the register moves one place towards S1: the feedback bit,
// computed outside by the polynomial selector, enters SN and S1 leaves as the
// output bit. The output is S1 ANDed with out_en, the single gate between
// the register and the PRNG output; while out_en is low the output is 0.
// load (priority over shift_en) writes load_val, so a tag can be started
// from any state; reset puts the register in SEED.
//
// Timing: prng_out shows the bit that the next enabled clock edge shifts out,
// so the k-th output bit of a frame is S1 before the k-th shift.
//
// From the published design: the cell count, the shift direction (feedback
// into S16, output from S1), the output AND and the initial state 0x0001.
// This design's own: active-low synchronous reset, the load port.
module mp_lfsr #(
  parameter int unsigned    N    = prng_pkg::N_CELLS,
  parameter logic [N-1:0]   SEED = N'(prng_pkg::SEED)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,   // advance one step this clock
  input  logic         fb,         // feedback bit into S_N
  input  logic         load,       // write load_val this clock
  input  logic [N-1:0] load_val,
  input  logic         out_en,     // output gate from the decoding logic
  output logic [N-1:0] state,      // S_N..S_1
  output logic         prng_out    // S1 & out_en
);

  always_ff @(posedge clk) begin
    if (!rst_n)        state <= SEED;
    else if (load)     state <= load_val;
    else if (shift_en) state <= {fb, state[N-1:1]};
  end

  assign prng_out = state[0] & out_en;

endmodule
