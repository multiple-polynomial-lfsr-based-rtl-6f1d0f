// tb_mp_lfsr: self-checking testbench of the LFSR register and output gate.
//
// The feedback input is driven from the reference model, so the register is
// checked on its own: reset state 0x0001, the published 32-shift example
// (states at its printed shifts and every output bit), hold while shift_en
// is low, the load port, and the output AND (0 whenever out_en is low).
module tb_mp_lfsr;
  import prng_ref_pkg::*;

  logic        clk = 0, rst_n = 0, shift_en = 0, fb = 0, load = 0, out_en = 0;
  logic [15:0] load_val = '0, state;
  logic        prng_out;
  int checks = 0, failures = 0;

  mp_lfsr dut (.*);

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
    bit [15:0] model;
    int ex = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(state == 16'h0001, "reset state is 0x0001");
    model = 16'h0001;
    // Published example, 32 shifts.
    for (int k = 1; k <= 32; k++) begin
      shift_en = 1; out_en = 1;
      fb = ref_fb(state, ex_poly(k));
      #1;
      check(prng_out == model[0], $sformatf("output bit before shift %0d", k));
      @(negedge clk);
      model = ref_step(model, ex_poly(k));
      check(state == model, $sformatf("state after shift %0d", k));
      if (ex < EX_N && EX_SHIFT[ex] == k) begin
        check(state == EX_STATE[ex], $sformatf("published state at shift %0d: %b", k, state));
        ex++;
      end
    end
    // Hold and output gate.
    shift_en = 0; out_en = 0; fb = ~fb;
    @(negedge clk);
    #1;
    check(state == model, "state holds while shift_en is low");
    check(prng_out == 1'b0, "output gated off");
    // Load, then a few random shifts.
    load = 1; load_val = 16'hA5C3; shift_en = 1;
    @(negedge clk);
    load = 0;
    check(state == 16'hA5C3, "load writes load_val");
    model = state;
    for (int k = 0; k < 50; k++) begin
      int p = $urandom_range(7);
      fb = ref_fb(state, p);
      out_en = 1'($urandom_range(1));
      #1;
      check(prng_out == (model[0] & out_en), "gated output bit");
      @(negedge clk);
      model = ref_step(model, p);
      check(state == model, "random shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
