// tb_clock_divider -- checks the eight-phase strobe generator.
//
// After reset phase 0 must be active. On every reference clock exactly one
// phase is active and the active phase advances by one, so each phase repeats
// every eight cycles (the serial bit period of the design).
module tb_clock_divider;

  logic       ref_clk = 0, a_rst = 0;
  initial #1 a_rst = 1;   // a rising edge, so the asynchronous reset acts at once
  logic [7:0] clocks_out;
  int checks = 0, failures = 0;

  clock_divider dut (.*);

  always #5 ref_clk = ~ref_clk;

  initial begin
    int last0, cnt;
    repeat (2) @(posedge ref_clk);
    #1;
    checks++;
    if (clocks_out !== 8'b1) begin failures++; $display("FAIL: reset phase %b", clocks_out); end
    @(negedge ref_clk) a_rst = 0;
    last0 = -1; cnt = 0;
    for (int n = 0; n < 200; n++) begin
      logic [7:0] prev_ph;
      prev_ph = clocks_out;
      @(posedge ref_clk); #1;
      cnt++;
      checks += 2;
      if ($countones(clocks_out) != 1) begin failures++; $display("FAIL: not one-hot %b", clocks_out); end
      if (clocks_out !== {prev_ph[6:0], prev_ph[7]}) begin
        failures++; $display("FAIL: %b does not follow %b", clocks_out, prev_ph);
      end
      if (clocks_out[0]) begin
        if (last0 >= 0) begin
          checks++;
          if (cnt - last0 != 8) begin failures++; $display("FAIL: phase 0 period %0d", cnt - last0); end
        end
        last0 = cnt;
      end
    end
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
