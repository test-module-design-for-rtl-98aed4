// tb_rx_digital -- checks the digital receiver (oversampling clock recovery,
// comma alignment, 8b/10b decoding).
//
// The bench encodes a random character stream with its own reference encoder
// and drives it on a_rx at 8 clk cycles per bit, starting at a random phase and
// with a one-cycle early or late edge now and then. The stream opens with a
// K28.5 so the receiver can align, and carries K28.5 / K28.7 now and then.
// Every character after the first comma must come out on dataout, in order,
// with data_valid; comma_detected must accompany each comma; no code or
// disparity error may appear after alignment. The spacing of data_valid must
// be 80 cycles (give or take the edge jitter) and a character must come out
// 80 to 96 cycles after its first bit entered (72 to 100 allowing for the
// edge jitter), i.e. within two bit periods of its last bit.
module tb_rx_digital;

  logic       clk = 0, rst = 0, a_rx = 0;
  initial #1 rst = 1;   // a rising edge, so the asynchronous reset acts at once
  logic [8:0] dataout;
  logic       data_valid, comma_detected, rx_clk, code_err, disp_err, rx_bit, rx_bit_valid;
  int checks = 0, failures = 0;

  rx_digital dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Standard tables, negative running disparity, 'a' / 'f' first (MSB here).
  function automatic logic [5:0] t6(input int x);
    logic [5:0] t[32] = '{6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001,
                         6'b011001, 6'b111000, 6'b111001, 6'b100101, 6'b010101, 6'b110100,
                         6'b001101, 6'b101100, 6'b011100, 6'b010111, 6'b011011, 6'b100011,
                         6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
                         6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110,
                         6'b011110, 6'b101011};
    return t[x];
  endfunction

  function automatic logic [3:0] t4(input int y);
    logic [3:0] t[8] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
    return t[y];
  endfunction

  function automatic int ones(input logic [9:0] v, input int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += v[i];
    return c;
  endfunction

  // Reference: returns {rd_out, code abcdeifghj} for character c at disparity rd.
  function automatic logic [10:0] ref_enc(input logic [8:0] c, input bit rd);
    int x, y;
    bit k, k28;
    logic [5:0] s6; logic [3:0] s4; bit rdm, rdo, a7;
    x = c[4:0]; y = c[7:5]; k = c[8]; k28 = k && x == 28;
    s6 = k28 ? 6'b001111 : t6(x);
    if (rd && (ones({4'b0, s6}, 6) != 3 || x == 7)) s6 = ~s6;
    rdm = (ones({4'b0, s6}, 6) == 3) ? rd : !rd;
    a7 = (y == 7) && (k || (!rdm && x inside {17, 18, 20}) || (rdm && x inside {11, 13, 14}));
    s4 = a7 ? 4'b0111 : t4(y);
    if (rdm && (ones({6'b0, s4}, 4) != 2 || y == 3)) s4 = ~s4;
    if (k28 && !rdm && ones({6'b0, s4}, 4) == 2 && y != 3) s4 = ~s4;
    rdo = (ones({6'b0, s4}, 4) == 2) ? rdm : !rdm;
    return {rdo, s6, s4};
  endfunction

  logic [8:0] sent[$];
  int         sent_start[$];   // cycle at which the first bit of each character starts
  int         cyc = 0;
  int         n_out = 0, n_comma = 0, idx, last_valid;
  bit         aligned;
  always @(posedge clk) cyc <= cyc + 1;

  // Line driver.
  initial begin
    bit rd;
    logic [10:0] r;
    logic [8:0] c;
    repeat ($urandom_range(3, 12)) @(posedge clk);
    rst = 0;
    repeat ($urandom_range(0, 7)) @(posedge clk);
    rd = 0;
    for (int n = 0; n < 300; n++) begin
      if (n < 3) c = 9'h1BC;
      else if ($urandom_range(9) == 0) c = ($urandom_range(1) == 0) ? 9'h1BC : 9'h1FC;
      else c = {1'b0, 8'($urandom)};
      r = ref_enc(c, rd);
      rd = r[10];
      sent.push_back(c);
      sent_start.push_back(cyc);
      for (int b = 9; b >= 0; b--) begin
        int len;
        a_rx <= r[b];
        len = 8;
        if ($urandom_range(19) == 0) len = $urandom_range(0, 1) ? 7 : 9;
        repeat (len) @(posedge clk);
      end
    end
  end

  initial begin
    idx = 2; last_valid = -1; aligned = 0;
    while (idx < 299) begin
      @(posedge clk);
      if (data_valid) begin
        if (comma_detected && dataout == 9'h1BC && !aligned) begin
          aligned = 1;
          // The character now on the line is the one after this comma.
          idx = sent.size() - 2;
        end else if (aligned) begin
          idx++;
          check(idx < sent.size() && dataout == sent[idx],
                $sformatf("char %0d: got %h want %h", idx, dataout, (idx < sent.size()) ? sent[idx] : 0));
          check(comma_detected == (dataout == 9'h1BC || dataout == 9'h1FC), "comma flag matches the character");
          check(!code_err && !disp_err, "no code or disparity error");
          if (idx < sent_start.size())
            check((cyc - sent_start[idx]) inside {[72:100]},
                  $sformatf("latency %0d cycles from first bit", cyc - sent_start[idx]));
          if (last_valid >= 0)
            check((cyc - last_valid) inside {[78:82]}, $sformatf("spacing %0d", cyc - last_valid));
          n_out++;
          if (comma_detected) n_comma++;
        end
        last_valid = cyc;
      end
      if (cyc > 300 * 90) break;
    end
    $display("received %0d characters, %0d commas", n_out, n_comma);
    check(n_out > 250, $sformatf("received %0d characters", n_out));
    check(n_comma > 10, "commas seen in the stream");
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
