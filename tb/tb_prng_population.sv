// tb_prng_population: a population of K tags, each a generator at default
// sizes with its own random initial state and its own random bit source,
// clocked together (the EPC Gen2 rule: among up to 10,000 tags, the chance
// that two tags produce the same 16-bit word at the same time must be below
// 0.1%).
//
// The population is 2,000 tags rather than the 10,000 of the rule, to keep the
// build of one model per tag to about a minute; the rate measured is per
// pair of tags, which does not depend on the population size.
//
// All tags are seeded through seed_load with random non-zero values and then
// run ITER words in lock step. After each word the number of tag pairs that
// hold the same word is counted from a histogram of the K words. Checked:
// the per-pair collision rate over all iterations is below 0.1%, and also
// within 6 standard deviations of 1/65535, the rate for independent uniform
// words over the 65535 possible values. Also checked: each tag delivers
// one word per 16 clocks.
module tb_prng_population;
  localparam int K    = 2000;
  localparam int ITER = 1000;

  logic clk = 0, rst_n = 0, run = 0, seed_load = 0;
  logic [15:0] seed [K];
  logic [K-1:0] trn, trn_req, prng_out, out_valid, frame_start, frame_end;
  logic [2:0]  poly_idx [K];
  logic [15:0] word [K];
  int checks = 0, failures = 0;

  for (genvar t = 0; t < K; t++) begin : g_tag
    mp_lfsr_prng u_tag (
      .clk, .rst_n, .run, .trn (trn[t]), .trn_req (trn_req[t]),
      .seed_load, .seed (seed[t]),
      .prng_out (prng_out[t]), .out_valid (out_valid[t]),
      .frame_start (frame_start[t]), .frame_end (frame_end[t]),
      .poly_idx (poly_idx[t])
    );
    always @(posedge clk) if (out_valid[t]) word[t] <= {word[t][14:0], prng_out[t]};
  end

  always #5 clk = ~clk;

  always @(negedge clk)
    for (int t = 0; t < K; t++) trn[t] <= 1'($urandom_range(1));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #((ITER + 10) * 16 * 10 * 2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [65536];

  initial begin
    longint pairs = 0, same = 0;
    int     words = 0, cyc;
    real    p, rate, sd;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int t = 0; t < K; t++) seed[t] = 16'($urandom_range(1, 65535));
    seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    run = 1;
    for (int it = 0; it < ITER; it++) begin
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
      end while (!frame_end[0]);
      check(frame_end == '1, "all tags end the word together");
      if (it > 0) check(cyc == 16, $sformatf("word took %0d clocks", cyc));
      @(negedge clk);
      foreach (hist[i]) hist[i] = 0;
      for (int t = 0; t < K; t++) hist[word[t]]++;
      foreach (hist[i]) same += longint'(hist[i]) * (hist[i] - 1) / 2;
      pairs += longint'(K) * longint'(K - 1) / 2;
      words++;
    end
    run = 0;
    rate = real'(same) / real'(pairs);
    p = 1.0 / 65535.0;
    sd = $sqrt(p / real'(pairs));   // coinciding pairs are close to Poisson
    $display("tags=%0d words each=%0d coinciding pairs=%0d rate=%.5f%% (uniform %.5f%%)",
             K, words, same, 100.0 * rate, 100.0 * p);
    check(rate < 0.001, "pair collision rate below 0.1%");
    check(rate > p - 6.0 * sd && rate < p + 6.0 * sd, "pair collision rate as for uniform words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
