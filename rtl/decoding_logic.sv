// decoding_logic: frame sequencer of the multiple-polynomial LFSR generator.
//
// The generator delivers its output in frames of FR shifts (one 16-bit word).
// While run is high, frames follow each other without a gap; a frame that has
// started always completes, and the generator idles once run is low at the
// end of a frame. Within a frame, counted by pos = 0..FR-1:
//   * shift_en and out_en are high on every cycle, so the LFSR shifts once per
//     cycle and its output gate is open;
//   * trn_req is high at pos 0: the true random bit is sampled once per
//     frame, taken from trn on that clock edge and held in trn_q;
//   * rotate steps the polynomial wheel so that it has advanced 1 + trn_q
//     positions by the last shift of the frame: one step on the clock edge of
//     pos L-1, and for trn_q = 1 one more on the edge of pos L-2. The new
//     polynomial is then in use from shift L+1 (L-1 for the skipped one).
//   * frame_end marks the cycle of the frame's last shift.
// With FR = 16 and L = 15 one polynomial is never used for a whole word.
//
// From the published design: one trn per 16-bit output, a rotation by one
// position for trn = 0 and two for trn = 1, the update after l = 15 shifts,
// and the placement of the rotations that the published 32-shift example
// shows (shift 16 for trn = 0; shifts 31 and 32 for trn = 1). This design's
// own: the run/frame handshake, sampling trn at the first shift of a frame,
// and the synchronous active-low reset. The published gate budget also lists
// a 6-bit "64 cycle clock" whose role is not described; it is not built.
module decoding_logic #(
  parameter int unsigned FR = prng_pkg::FRAME,
  parameter int unsigned L  = prng_pkg::UPD,
  localparam int unsigned PW = $clog2(FR)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,         // keep producing frames
  input  logic trn,         // true random bit, read when trn_req is high
  output logic trn_req,     // sample request to the TRNG
  output logic shift_en,    // LFSR shift enable
  output logic out_en,      // PRNG output gate
  output logic rotate,      // polynomial wheel step
  output logic frame_start, // first shift of a frame
  output logic frame_end    // last shift of a frame
);

  logic          busy;
  logic [PW-1:0] pos;
  logic          trn_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      pos   <= '0;
      trn_q <= 1'b0;
    end else begin
      if (trn_req) trn_q <= trn;
      if (!busy) begin
        busy <= run;
        pos  <= '0;
      end else if (pos == PW'(FR - 1)) begin
        busy <= run;
        pos  <= '0;
      end else begin
        pos  <= pos + 1'b1;
      end
    end
  end

  assign shift_en    = busy;
  assign out_en      = busy;
  assign trn_req     = busy && (pos == '0);
  assign frame_start = trn_req;
  assign frame_end   = busy && (pos == PW'(FR - 1));
  assign rotate      = busy && ((pos == PW'(L - 1)) || (trn_q && (pos == PW'(L - 2))));

  // The update must come after trn is sampled and inside the frame.
  if (L < 3 || L >= FR) begin : g_bad_params
    $error("decoding_logic: need 3 <= L < FR");
  end

  // The wheel never moves more than two positions per frame.
  property p_two_rotations;
    @(posedge clk) disable iff (!rst_n) rotate && $past(rotate) |-> !$past(rotate, 2);
  endproperty
  a_two_rotations: assert property (p_two_rotations);

endmodule
