// trng_model: behavioural stand-in for the on-tag thermal-noise TRNG
// (an oscillator-based high-frequency sampler). Not synthesizable.
//
// A free-running fast oscillator toggles with a half period of HALF_NS plus
// a random jitter of up to JITTER_NS; the accumulated jitter makes its level
// at any later clock edge unpredictable. While req is high the oscillator
// level is presented on trn, and the generator's decoding logic samples it
// on the clock edge (that flip-flop is the sampler). While req is low the
// sampler is off and trn is 0. Ports: req (sample request), trn (bit).
module trng_model #(
  parameter real HALF_NS   = 183.0,
  parameter real JITTER_NS = 40.0
) (
  input  logic req,
  output logic trn
);
  logic osc = 1'b0;

  always begin
    #(HALF_NS + JITTER_NS * real'($urandom_range(1000)) / 1000.0);
    osc = ~osc;
  end

  assign trn = req & osc;
endmodule
