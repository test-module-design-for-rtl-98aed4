// tb_freq_div -- checks the divide-by-four of the analog receiver signal.
//
// A square wave with a random period is applied to the default instance; the
// output must change once every two rising input edges (one output period per
// four input periods), start low after reset, and hold while the input stops.
module tb_freq_div;

  logic rx_an = 0, rst = 0, rx_an_div;
  initial #1 rst = 1;   // a rising edge, so the asynchronous reset acts at once
  int checks = 0, failures = 0;

  freq_div dut (.*);

  initial begin
    int rises, half;
    logic prev;
    #20;
    checks++;
    if (rx_an_div !== 1'b0) begin failures++; $display("FAIL: reset value"); end
    rst = 0;
    #7;
    rises = 0;
    for (int n = 0; n < 40; n++) begin
      half = $urandom_range(3, 20);
      prev = rx_an_div;
      #half rx_an = 1;
      rises++;
      #1;
      checks++;
      if (rx_an_div !== ((rises / 2) % 2 == 1)) begin
        failures++; $display("FAIL: after %0d rising edges output is %b", rises, rx_an_div);
      end
      #half rx_an = 0;
    end
    prev = rx_an_div;
    #200;
    checks++;
    if (rx_an_div !== prev) begin failures++; $display("FAIL: output moved without input"); end
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
