// tb_prng_stats: statistical run of the generator at its default sizes,
// a scaled-down version of the EPC Gen2 randomness evaluation.
//
// The generator runs NW back-to-back 16-bit words (first output bit = MSB)
// with an ideal true random bit ($urandom) sampled once per word. Checked:
//   * 0x0000 never occurs: a word is the register state at the start of its
//     frame and the all-zero state is unreachable;
//   * uniformity of the other 65535 word values: chi-square within 6 standard
//     deviations of its mean (65534); the smallest and largest frequencies,
//     scaled to their expected value, are printed (the EPC Gen2 bounds 0.8
//     and 1.25 need tens of millions of words and are not checked here);
//   * fraction of ones in the bit stream within 5 standard deviations of 1/2;
//   * lag-1 correlation of the bit stream and of consecutive words below
//     5/sqrt(samples) in magnitude.
// Also checks the throughput: one word per 16 clocks.
module tb_prng_stats;
  localparam int NW = 1 << 22;

  logic        clk = 0, rst_n = 0, run = 0, seed_load = 0;
  logic [15:0] seed = '0;
  logic        trn, trn_req, prng_out, out_valid, frame_start, frame_end;
  logic [2:0]  poly_idx;
  int checks = 0, failures = 0;

  mp_lfsr_prng dut (.*);

  always #5 clk = ~clk;

  // Ideal TRNG: a fresh random bit whenever one is requested.
  always @(negedge clk) trn <= 1'($urandom_range(1));

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #((NW + 100) * 16 * 10 * 2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   hist [65536];
  int   nwords = 0, nbits = 0, ones = 0, cycles = 0;
  real  sxy_bits = 0.0, sxy_words = 0.0, swords = 0.0, swords2 = 0.0;
  logic [15:0] word = '0, prev_word = '0;
  bit   prev_bit = 0;

  always @(posedge clk) if (run) cycles++;

  always @(posedge clk) begin
    if (out_valid) begin
      real b, pb;
      b  = prng_out ? 1.0 : -1.0;
      pb = prev_bit ? 1.0 : -1.0;
      if (nbits > 0) sxy_bits += b * pb;
      prev_bit = prng_out;
      nbits++;
      ones += int'(prng_out);
      word = {word[14:0], prng_out};
      if (frame_end) begin
        real w, pw;
        hist[word]++;
        w  = (real'(word) - 32767.5) / 18918.6;   // roughly unit variance
        pw = (real'(prev_word) - 32767.5) / 18918.6;
        if (nwords > 0) sxy_words += w * pw;
        swords  += w;
        swords2 += w * w;
        prev_word = word;
        nwords++;
      end
    end
  end

  initial begin
    real e, chi2, sd, c_bits, c_words;
    int  mn, mx;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    run = 1;
    wait (nwords == NW);
    @(negedge clk);
    run = 0;
    check(cycles == NW * 16 + 1, $sformatf("cycles %0d for %0d words", cycles, NW));
    // A word is the register state at the start of its frame, and the
    // all-zero state cannot be reached, so 0x0000 never occurs; the other
    // 65535 values should be uniform.
    check(hist[0] == 0, "0x0000 never produced");
    e = real'(NW) / 65535.0;
    chi2 = 0.0; mn = hist[1]; mx = hist[1];
    for (int i = 1; i < 65536; i++) begin
      chi2 += (real'(hist[i]) - e) * (real'(hist[i]) - e) / e;
      if (hist[i] < mn) mn = hist[i];
      if (hist[i] > mx) mx = hist[i];
    end
    sd = $sqrt(2.0 * 65534.0);
    $display("words=%0d chi2=%.1f (mean 65534, sd %.1f) min=%.3f max=%.3f (of expected)",
             NW, chi2, sd, real'(mn) / e, real'(mx) / e);
    check(chi2 > 65534.0 - 6.0 * sd && chi2 < 65534.0 + 6.0 * sd, "word uniformity");
    $display("ones=%0d of %0d bits", ones, nbits);
    check(fabs(real'(ones) / real'(nbits) - 0.5) < 5.0 * 0.5 / $sqrt(real'(nbits)), "bit balance");
    c_bits  = sxy_bits / real'(nbits - 1);
    c_words = sxy_words / real'(nwords - 1);
    $display("lag-1 correlation: bits %.6f words %.6f", c_bits, c_words);
    check(fabs(c_bits) < 5.0 / $sqrt(real'(nbits)), "bit correlation");
    check(fabs(c_words) < 5.0 / $sqrt(real'(nwords)), "word correlation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
