// tb_test_ctrl -- checks the mode-dependent test control.
//
// The bench models the LFSR (load has priority over enable) and feeds its
// state back, then checks:
//  * modes 10/11: a burst of 16 characters per 16 transmitter frames, the
//    K28.7 comma followed by the seed's low byte and 14 further LFSR values,
//    repeating after the reload; mode 13 does the same on the second
//    transmitter's frames;
//  * mode 9: seed A, one LFSR step per bit strobe and a reload every 160
//    strobes;
//  * modes 8/13/14: rx_pass low until a data character directly follows a
//    K28.7 comma, other commas or characters do not open it;
//  * comparator enables and fd_in per mode, the one-cycle mode_change pulse,
//    and that both comparator enables drop during that pulse.
module tb_test_ctrl;
  import serdes_pkg::*;

  logic       clk = 0, rst = 0;
  initial #1 rst = 1;   // a rising edge, so the asynchronous reset acts at once
  logic [3:0] mode = 0;
  logic       lfsr_tick = 0, tx_frame = 0, tx_frame2 = 0;
  logic       comma_detected = 0, data_valid = 0;
  logic [8:0] rx_char = 0;
  logic [9:0] state_out = 0, seed;
  logic       rx_an = 0;
  logic       lfsr_load, lfsr_enable, rx_pass, cmp_par_en, cmp_ser_en, fd_in, mode_change;
  logic [8:0] lfsr_word;
  int checks = 0, failures = 0;

  test_ctrl dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (lfsr_load) state_out <= seed;
    else if (lfsr_enable) state_out <= {state_out[8:0], state_out[9] ^ state_out[5] ^ state_out[4]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic set_mode(input int m);
    @(negedge clk) mode = 4'(m);
    #1 check(mode_change && !cmp_par_en && !cmp_ser_en, $sformatf("mode %0d: change pulse", m));
    @(negedge clk);
    check(!mode_change, "change pulse lasts one cycle");
  endtask

  // One transmitter frame on the chosen strobe; returns the word it takes.
  task automatic frame(input bit second, output logic [8:0] w);
    @(negedge clk);
    w = lfsr_word;
    if (second) tx_frame2 = 1; else tx_frame = 1;
    @(negedge clk);
    tx_frame = 0; tx_frame2 = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic rx(input logic [8:0] c, input bit comma);
    @(negedge clk);
    rx_char = c; data_valid = 1; comma_detected = comma;
    @(negedge clk);
    data_valid = 0; comma_detected = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [8:0] w;
    logic [9:0] s;
    repeat (2) @(negedge clk);
    rst = 0;

    // Parallel bursts on both transmitters.
    for (int pass = 0; pass < 3; pass++) begin
      int m;
      m = (pass == 0) ? 11 : (pass == 1) ? 10 : 13;
      set_mode(m);
      check(seed == SEED_B, "parallel modes use seed B");
      check(cmp_par_en == (m != 13) && cmp_ser_en == (m == 13), "comparator enable");
      for (int b = 0; b < 2; b++) begin
        frame(m == 13, w);
        check(w == COMMA_CHAR, $sformatf("mode %0d burst %0d opens with the comma", m, b));
        s = SEED_B;
        for (int i = 1; i < BURST_WORDS; i++) begin
          frame(m == 13, w);
          check(w == {1'b0, s[7:0]}, $sformatf("mode %0d word %0d: %h want %h", m, i, w, s[7:0]));
          s = {s[8:0], s[9] ^ s[5] ^ s[4]};
        end
      end
    end

    // Serial LFSR mode.
    set_mode(9);
    check(seed == SEED_A && state_out == SEED_A, "mode 9 loads seed A");
    s = SEED_A;
    for (int n = 1; n <= 2 * 160 + 5; n++) begin
      @(negedge clk) lfsr_tick = 1;
      @(negedge clk) lfsr_tick = 0;
      s = (n % 160 == 0) ? SEED_A : {s[8:0], s[9] ^ s[5] ^ s[4]};
      check(state_out == s, $sformatf("mode 9 tick %0d", n));
    end

    // Receiver gate.
    for (int k = 0; k < 3; k++) begin
      int m;
      m = (k == 0) ? 8 : (k == 1) ? 13 : 14;
      set_mode(m);
      check(!rx_pass && cmp_ser_en && !cmp_par_en, $sformatf("mode %0d starts closed, serial compare", m));
      rx(9'h1BC, 1);                      // K28.5 is not the burst comma
      rx(9'h055, 0);
      check(!rx_pass, "gate stays closed after another comma");
      rx(9'h1FC, 1);
      check(!rx_pass, "gate still closed on the comma itself");
      @(negedge clk);
      rx_char = 9'h001; data_valid = 1;
      #1 check(rx_pass, "gate opens with the character after the comma");
      @(negedge clk) data_valid = 0;
      repeat (3) @(negedge clk);
      check(rx_pass, "gate stays open");
    end
    set_mode(6);
    check(rx_pass && !cmp_ser_en && !cmp_par_en, "other modes pass the receiver");

    // Frequency divider input.
    for (int m = 0; m < 15; m++) begin
      set_mode(m);
      rx_an = 1; #1;
      check(fd_in == (m == 3 || m == 7), $sformatf("fd_in in mode %0d", m));
      rx_an = 0; #1;
      check(!fd_in, "fd_in follows rx_an");
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
