// tb_comparator -- checks the 16-entry BIST comparator in both modes.
//
// Parallel mode: the input side stores the first 16 non-comma words; the
// output side waits for a word equal to the first stored one and stores 16
// from there. The bench sends a random word stream on both sides, the output
// side delayed and preceded by unrelated words and commas, and checks that
// every result bit is set and that bist follows bist_sel. One entry is then
// corrupted in a second run: exactly that result bit must be clear.
// Serial mode: the input bit stream carries random balanced-weight noise, the
// marker and then 15 ten-bit words; the output stream repeats the same bits
// later. All 16 entries must match; a flipped bit in output word k clears only
// result[k] (k = 0 is the marker itself: the output side then never starts). A rising edge on the enable clears the results; done rises when
// both memories are full. Bits are strobed every 8 cycles as in the SerDes.
module tb_comparator;
  import serdes_pkg::*;

  logic       clk = 0, rst = 0;
  initial #1 rst = 1;   // a rising edge, so the asynchronous reset acts at once
  logic       par_en = 0, ser_en = 0;
  logic [3:0] bist_sel = 0;
  logic [8:0] in_word = 0, out_word = 0;
  logic       in_word_stb = 0, out_word_stb = 0;
  logic       in_bit = 0, in_bit_stb = 0, out_bit = 0, out_bit_stb = 0;
  logic [9:0] marker = SYNC_MARKER;
  logic       bist, done;
  logic [15:0] result;
  int checks = 0, failures = 0;

  comparator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic restart(input bit par);
    @(negedge clk); par_en = 0; ser_en = 0;
    @(negedge clk); par_en = par; ser_en = !par;
    @(negedge clk);
    check(result == 0 && !done, "enable edge clears the comparator");
  endtask

  task automatic check_bist(input logic [15:0] want);
    for (int k = 0; k < 16; k++) begin
      bist_sel = 4'(k);
      #1 check(bist == want[k], $sformatf("bist_sel %0d: %b want %b", k, bist, want[k]));
    end
  endtask

  // Parallel run; corrupt output entry bad (-1 for none).
  task automatic par_run(input int bad);
    logic [8:0] w[20];
    for (int i = 0; i < 20; i++) w[i] = {1'b0, 8'($urandom)};
    // Make the first word unique in the stream.
    w[0] = 9'h0A5;
    for (int i = 1; i < 20; i++) if (w[i] == 9'h0A5) w[i] = 9'h05A;
    restart(1);
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      in_word_stb = 0; out_word_stb = 0;
      if (t < 20) begin in_word = (t == 3) ? COMMA_CHAR : w[t]; in_word_stb = 1; end
      if (t >= 6) begin
        int j;
        j = t - 9;
        out_word_stb = 1;
        out_word = (j < 0) ? ((t == 7) ? COMMA_CHAR : 9'h05A) :
                   (j == 3) ? COMMA_CHAR :
                   (j < 20) ? w[j] ^ ((j == bad + (bad >= 3)) ? 9'h010 : 9'h000) : 9'h000;
      end
      @(negedge clk);
      in_word_stb = 0; out_word_stb = 0;
    end
    repeat (3) @(negedge clk);
  endtask

  // Serial stream: noise, marker, 15 words, noise; the output copy later.
  task automatic ser_run(input int bad_word, input int delay);
    bit s[$];
    logic [9:0] v;
    int head;
    restart(0);
    // Noise: repetitions of D0.0 (never contains the marker).
    for (int i = 0; i < 3; i++) begin v = 10'b0010111001; for (int b = 0; b < 10; b++) s.push_back(v[b]); end
    head = s.size();
    for (int b = 0; b < 10; b++) s.push_back(marker[b]);
    for (int i = 0; i < 15; i++) begin
      v = 10'($urandom);
      for (int b = 0; b < 10; b++) s.push_back(v[b]);
    end
    for (int i = 0; i < 4; i++) begin v = 10'b0010111001; for (int b = 0; b < 10; b++) s.push_back(v[b]); end
    for (int n = 0; n < s.size() + delay; n++) begin
      repeat (7) @(negedge clk);
      in_bit_stb = n < s.size(); in_bit = (n < s.size()) ? s[n] : 1'b0;
      out_bit_stb = 1;
      if (n >= delay) begin
        int m;
        m = n - delay;
        out_bit = s[m] ^ (bad_word >= 0 && m == head + 10 * bad_word + 4);
      end else out_bit = 1'b0;
      @(negedge clk);
      in_bit_stb = 0; out_bit_stb = 0;
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;

    par_run(-1);
    check(done, "parallel: done");
    check(result == 16'hFFFF, $sformatf("parallel: all match (%h)", result));
    check_bist(16'hFFFF);
    par_run(5);
    check(result == ~(16'h1 << 5), $sformatf("parallel: entry 5 corrupted (%h)", result));
    check_bist(~(16'h1 << 5));

    ser_run(-1, 37);
    check(done, "serial: done");
    check(result == 16'hFFFF, $sformatf("serial: all match (%h)", result));
    ser_run(0, 29);
    check(result == 0, "serial: corrupted marker, output side never synchronises");
    for (int k = 1; k < 16; k += 5) begin
      ser_run(k, 23 + k);
      check(result == ~(16'h1 << k), $sformatf("serial: entry %0d corrupted (%h)", k, result));
    end
    // No marker: nothing stored, nothing passes.
    restart(0);
    for (int n = 0; n < 300; n++) begin
      repeat (7) @(negedge clk);
      in_bit_stb = 1; out_bit_stb = 1; in_bit = n[0]; out_bit = n[0];
      @(negedge clk); in_bit_stb = 0; out_bit_stb = 0;
    end
    check(result == 0 && !done, "serial: no marker, no pass");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
