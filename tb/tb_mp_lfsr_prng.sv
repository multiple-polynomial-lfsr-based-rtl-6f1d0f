// tb_mp_lfsr_prng: end-to-end testbench of the generator at its default
// sizes (16 cells, 8 polynomials, 16-shift words, update after 15 shifts),
// clocked at 100 kHz.
//
// Phase 1 replays the published 32-shift example: from reset (0x0001), with
// true random bits 0 then 1, every output bit and the polynomial used for
// each shift (p1 x15, p2 x15, p3, p4) are checked against the reference
// model, and the model's states against the printed ones (the generator's
// register is seen through its output bits only).
// Phase 2 runs several hundred words with bits from the behavioural TRNG,
// with random reseeding and idle gaps, against a bit-level reference model
// that captures trn at each frame start. The cycle timing (first bit one
// clock after run rises, 16 bits per word, no gap between words) is checked
// on every cycle. Mechanisms counted, each must occur: one-step rotation,
// two-step rotation, wheel wrap p8 -> p1, seed load, stop and restart.
module tb_mp_lfsr_prng;
  import prng_ref_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0, seed_load = 0;
  logic [15:0] seed = '0;
  logic        trn, trn_req, prng_out, out_valid, frame_start, frame_end;
  logic [2:0]  poly_idx;
  logic        model_trn, force_en = 1, force_val = 0;
  logic        trn_edge;
  int checks = 0, failures = 0;

  trng_model u_trng (.req(trn_req), .trn(model_trn));
  assign trn = force_en ? (force_val & trn_req) : model_trn;

  mp_lfsr_prng dut (.*);

  always #5us clk = ~clk;

  // The bit the generator sees: trn just before the clock edge.
  always @(posedge clk) trn_edge <= trn;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #2s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  bit [15:0] m_state = 16'h0001;
  int  m_poly = 0;         // wheel position at frame start
  bit  m_busy = 0, m_trn = 0;
  int  m_pos = 0;          // 1..16 within a frame
  int  shift_no = 0;       // shifts since reset (for the example)
  int  ex = 0;
  int  n_rot1 = 0, n_rot2 = 0, n_wrap = 0, n_load = 0, n_restart = 0, n_words = 0;

  function automatic int poly_at(int q);
    if (q <= 14) return m_poly;
    if (q == 15) return (m_poly + int'(m_trn)) % 8;
    return (m_poly + 1 + int'(m_trn)) % 8;
  endfunction

  // One clock: compare this cycle's outputs with the model, then advance it.
  task automatic cycle();
    int p;
    #1;
    check(out_valid == m_busy, "out_valid");
    check(frame_start == (m_busy && m_pos == 1), "frame_start");
    check(frame_end == (m_busy && m_pos == 16), "frame_end");
    if (m_busy) begin
      p = poly_at(m_pos);
      check(prng_out == m_state[0], $sformatf("output bit at word position %0d", m_pos));
      check(int'(poly_idx) == p, $sformatf("polynomial p%0d, expected p%0d", poly_idx + 1, p + 1));
    end else begin
      check(prng_out == 1'b0, "output gated while idle");
    end
    @(posedge clk);
    #1;
    if (m_busy && m_pos == 1) m_trn = trn_edge;
    if (seed_load) begin
      m_state = seed;
      n_load++;
    end else if (m_busy) begin
      m_state = ref_step(m_state, poly_at(m_pos));
      shift_no++;
    end
    if (!m_busy) begin
      if (run) begin
        m_busy = 1; m_pos = 1;
      end
    end else if (m_pos == 16) begin
      n_words++;
      if (m_trn) n_rot2++; else n_rot1++;
      if (m_poly + 1 + int'(m_trn) >= 8) n_wrap++;
      m_poly = (m_poly + 1 + int'(m_trn)) % 8;
      m_busy = run; m_pos = 1;
      if (!run) n_restart++;
    end else m_pos++;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Phase 1: the published example, trn = 0 then 1.
    @(negedge clk);
    run = 1;
    force_val = 0;
    for (int c = 0; c < 34; c++) begin
      if (m_busy && m_pos == 16) force_val = 1;   // second word takes trn = 1
      cycle();
      if (ex < EX_N && EX_SHIFT[ex] == shift_no) begin
        check(m_state == EX_STATE[ex], $sformatf("published state at shift %0d", shift_no));
        ex++;
      end
      if (shift_no == 32) run = 0;
    end
    check(ex == EX_N, "all published states visited");
    // Phase 2: TRNG model, reseeding, idle gaps.
    force_en = 0;
    for (int w = 0; w < 600; w++) begin
      run = 1;
      if (w % 97 == 50 && !(m_busy && m_pos != 16)) begin
        seed = 16'($urandom_range(1, 65535));
        seed_load = 1;
        cycle();
        seed_load = 0;
      end
      repeat (16) cycle();
      if (w % 53 == 7) begin
        run = 0;
        while (m_busy) cycle();
        repeat (3) cycle();
      end
    end
    run = 0;
    while (m_busy) cycle();
    $display("words=%0d one-step=%0d two-step=%0d wraps=%0d loads=%0d restarts=%0d",
             n_words, n_rot1, n_rot2, n_wrap, n_load, n_restart);
    check(n_rot1 > 0, "one-step rotation occurred");
    check(n_rot2 > 0, "two-step rotation occurred");
    check(n_wrap > 0, "wheel wrapped from p8 to p1");
    check(n_load > 0, "seed load occurred");
    check(n_restart > 0, "stop and restart occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
