// tb_serial_config -- checks the serial configuration register.
//
// Random 24-bit frames are shifted in most significant bit first on
// config_clk and taken with a set_config pulse; the outputs must show
// N(23:16), P(15:8), BIST select(7:4) and mode(3:0) of the last frame only
// after the pulse, and hold while a new frame is being shifted. Reset clears
// every output.
module tb_serial_config;

  logic       rst = 0, config_clk = 0, data_config = 0, set_config = 0;
  initial #1 rst = 1;   // a rising edge, so the asynchronous reset acts at once
  logic [3:0] mode, bist_sel;
  logic [7:0] trans_config_p, trans_config_n;
  int checks = 0, failures = 0;

  serial_config dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic shift(input logic [23:0] f);
    for (int i = 23; i >= 0; i--) begin
      data_config = f[i];
      #5 config_clk = 1;
      #5 config_clk = 0;
    end
  endtask

  initial begin
    logic [23:0] f, prev;
    #10;
    check(mode == 0 && bist_sel == 0 && trans_config_p == 0 && trans_config_n == 0, "reset");
    rst = 0;
    prev = '0;
    for (int n = 0; n < 30; n++) begin
      f = 24'($urandom);
      shift(f);
      check({trans_config_n, trans_config_p, bist_sel, mode} == prev, "outputs hold while shifting");
      #5 set_config = 1;
      #5 set_config = 0;
      check({trans_config_n, trans_config_p, bist_sel, mode} == f,
            $sformatf("frame %h read as %h", f, {trans_config_n, trans_config_p, bist_sel, mode}));
      prev = f;
    end
    rst = 1; #5;
    check(mode == 0 && trans_config_n == 0, "reset after use");
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
