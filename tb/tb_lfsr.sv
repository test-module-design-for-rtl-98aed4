// tb_lfsr -- checks the ten-bit LFSR against a model.
//
// The model shifts left and feeds bit 0 with state[9] ^ state[5] ^ state[4].
// The bench loads each seed, steps with a random enable, checks state_out and
// q (= state[9]) every cycle, checks that the state holds while enable and
// load are low, that a load in the middle of a run restarts the sequence, and
// that the register seeded with 1 returns to 1 after the period of the model
// (counted in enabled cycles; with these taps it is 63 steps, not the
// maximal 1023).
module tb_lfsr;
  import serdes_pkg::*;

  logic       clk = 0, rst = 0;
  initial #1 rst = 1;   // a rising edge, so the asynchronous reset acts at once
  logic [9:0] seed;
  logic       load = 0, enable = 0, q;
  logic [9:0] state_out, model;
  int checks = 0, failures = 0;

  lfsr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [9:0] step(input logic [9:0] s);
    return {s[8:0], s[9] ^ s[5] ^ s[4]};
  endfunction

  initial begin
    int period;
    repeat (2) @(posedge clk);
    check(state_out == 0, "reset clears the state");
    rst = 0;
    for (int s = 0; s < 2; s++) begin
      seed = s ? SEED_B : SEED_A;
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      model = seed;
      check(state_out == seed, "load takes the seed");
      for (int n = 0; n < 300; n++) begin
        enable = 1'($urandom);
        @(negedge clk);
        if (enable) model = step(model);
        check(state_out == model && q == model[9], $sformatf("step %0d", n));
      end
      enable = 0;
    end
    // Period from seed 1.
    seed = SEED_B;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; enable = 1;
    period = 0;
    do begin @(negedge clk); period++; end while (state_out != SEED_B && period < 2000);
    enable = 0;
    begin
      int want = 0;
      model = SEED_B;
      do begin model = step(model); want++; end while (model != SEED_B && want < 2000);
      check(period == want && want == 63, $sformatf("period %0d, model %0d", period, want));
    end
    // Load mid-run.
    enable = 1; repeat (7) @(negedge clk);
    load = 1; @(negedge clk); load = 0; enable = 0;
    check(state_out == SEED_B, "reload mid-run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
