// tb_poly_selector: self-checking testbench of the polynomial wheel.
// Checks the reset position (p1), one step per rotate pulse with the wrap
// from p8 to p1, the one-hot decode, hold while rotate is low, and that fb
// is the feedback of the selected polynomial for random states.
module tb_poly_selector;
  import prng_ref_pkg::*;

  logic        clk = 0, rst_n = 0, rotate = 0;
  logic [15:0] state = '0;
  logic [2:0]  sel_idx;
  logic [7:0]  sel_onehot;
  logic        fb;
  int checks = 0, failures = 0;
  int pos = 0;

  poly_selector dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int c = 0; c < 200; c++) begin
      check(sel_idx == 3'(pos), $sformatf("position %0d, expected %0d", sel_idx, pos));
      check(sel_onehot == 8'(1 << pos), "one-hot decode");
      for (int r = 0; r < 4; r++) begin
        state = 16'($urandom);
        #1;
        check(fb == ref_fb(state, pos), $sformatf("fb of p%0d", pos + 1));
      end
      rotate = (c < 20) ? 1'b1 : 1'($urandom_range(1));
      @(negedge clk);
      if (rotate) pos = (pos + 1) % 8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
