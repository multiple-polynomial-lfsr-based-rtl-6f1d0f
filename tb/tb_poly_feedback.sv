// tb_poly_feedback: self-checking testbench of the multiple-polynomial tap
// network. For each of the eight one-hot selects it compares the feedback
// bit with the reference model on every single-cell state (which isolates
// each tap) and on random states.
module tb_poly_feedback;
  import prng_ref_pkg::*;

  logic [7:0]  sel_onehot;
  logic [15:0] state;
  logic        fb;
  int checks = 0, failures = 0;

  poly_feedback dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 8; p++) begin
      sel_onehot = 8'(1 << p);
      for (int i = 0; i < 16; i++) begin
        state = 16'(1 << i);
        #1;
        checks++;
        if (fb !== ref_fb(state, p)) begin
          failures++;
          $display("FAIL: p%0d tap S%0d: got %b", p + 1, i + 1, fb);
        end
      end
      for (int r = 0; r < 200; r++) begin
        state = 16'($urandom);
        #1;
        checks++;
        if (fb !== ref_fb(state, p)) begin
          failures++;
          $display("FAIL: p%0d state %h", p + 1, state);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
