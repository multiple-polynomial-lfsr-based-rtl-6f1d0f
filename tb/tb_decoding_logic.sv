// tb_decoding_logic: self-checking testbench of the frame sequencer.
//
// A cycle-level model kept in the testbench predicts every output: after run
// rises, a frame of 16 cycles with shift_en and out_en high; trn_req and
// frame_start on the first cycle, frame_end on the last; one rotate pulse on
// cycle 15 for trn = 0, and pulses on cycles 14 and 15 for trn = 1 (cycles
// counted 1..16). Frames follow back to back while run is high and stop at a
// frame boundary when it drops. The testbench also counts shifts per frame
// (16) and checks that each frame asks for exactly one trn.
module tb_decoding_logic;
  logic clk = 0, rst_n = 0, run = 0, trn = 0;
  logic trn_req, shift_en, out_en, rotate, frame_start, frame_end;
  int checks = 0, failures = 0;

  decoding_logic dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state: m_busy, m_pos (1..16), m_trn.
  bit m_busy = 0, m_trn = 0;
  int m_pos = 0;
  int frames = 0, frames_r2 = 0, shifts = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      // Drive: run held for stretches, with idle gaps.
      if (c % 300 == 0)   run = 1;
      if (c % 300 == 205) run = 0;
      trn = 1'($urandom_range(1));
      #1;
      // Compare outputs with the model for this cycle.
      check(shift_en == m_busy, "shift_en");
      check(out_en == m_busy, "out_en");
      check(trn_req == (m_busy && m_pos == 1), "trn_req");
      check(frame_start == (m_busy && m_pos == 1), "frame_start");
      check(frame_end == (m_busy && m_pos == 16), "frame_end");
      check(rotate == (m_busy && (m_pos == 15 || (m_trn && m_pos == 14))),
            $sformatf("rotate at cycle %0d of frame, trn %0d", m_pos, m_trn));
      // Advance the model on the coming edge.
      @(posedge clk);
      if (m_busy) shifts++;
      if (m_busy && m_pos == 1) m_trn = trn;
      if (!m_busy) begin
        m_busy = run; m_pos = 1;
      end else if (m_pos == 16) begin
        check(shifts == 16, "16 shifts per frame");
        frames++;
        if (m_trn) frames_r2++;
        shifts = 0;
        m_busy = run; m_pos = 1;
      end else m_pos++;
    end
    check(frames > 50, "frames completed");
    check(frames_r2 > 0 && frames_r2 < frames, "both rotation kinds seen");
    $display("frames=%0d with two-step rotation=%0d", frames, frames_r2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
