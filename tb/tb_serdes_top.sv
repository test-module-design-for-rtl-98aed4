// tb_serdes_top -- end-to-end test of the SerDes digital part with its test
// module, at the default parameters.
//
// Every one of the fifteen operating modes is configured through the serial
// configuration pins and exercised:
//   0  normal: tx_data -> transmitter -> (cable) -> receiver -> rx_data
//   1  RXD: serial stream on testIn decoded on rx_data
//   2  TXA: testIn reaches the analog-transmitter data pins
//   3  RXA frequency divider: testOut_P toggles at 1/4 of the receiver signal
//   4  TXD: tx_data characters appear serially on testOut_P
//   5  RXD loop: testIn -> receiver -> transmitter -> testOut_P
//   6  TXD loop: tx_data -> transmitter -> receiver -> rx_data
//   7  RXA loop: analog receiver output reaches the analog transmitter
//   8  full loop with serial BIST, stream from the bench on rxpcie_out
//   9  serial LFSR on the analog-transmitter pins (seed and recurrence)
//   10 LFSR full loop (cable from txa_data_p to rxpcie_out), parallel BIST
//   11 LFSR digital loop, parallel BIST, LFSR burst repeat
//   12 tx_data full loop, parallel BIST, plus a corrupted run that must fail
//   13 LFSR transmitter -> testOut_P -(cable)-> receiver loop, serial BIST
//   14 LFSR transmitter -> receiver -> transmitter, serial BIST
// Expected serial codes come from a small 8b/10b table written here (the
// balanced characters, D0.0, D1.0, K28.5, K28.7), expected LFSR values from a
// model of the register. The bench counts each mechanism it saw and fails a
// mechanism that never happened.
module tb_serdes_top;

  localparam int BIT = 8;                    // ref_clk cycles per serial bit

  logic       reset = 1'b0, ref_clk = 1'b0;
  initial #1 reset = 1'b1;   // a rising edge, so the asynchronous reset acts at once
  logic       rxpcie_out;
  logic       rx_clk;
  logic [8:0] rx_data, tx_data = '0;
  logic       txa_data_p, txa_data_n;
  logic [7:0] trans_config_p, trans_config_n;
  logic       configClk = 1'b0, dataConfig = 1'b0, setConfig = 1'b0;
  logic       testIn, testOut_P, testOut_N, bist;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  serdes_top dut (.*);

  always #5 ref_clk = ~ref_clk;

  // -------------------------------------------------------------- reporting
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // --------------------------------------------------------- line sources
  // rx_src: 0 = cable from txa_data_p, 1 = cable from testOut_P, 2 = bench.
  int   rx_src = 2;
  logic gen_bit = 1'b0;
  bit   gen_q[$];
  assign testIn     = gen_bit;
  assign rxpcie_out = (rx_src == 0) ? txa_data_p : (rx_src == 1) ? testOut_P : gen_bit;

  // Reference codes, written abcdei fghj with 'a' as bit 9.
  function automatic logic [9:0] code_of(input logic [8:0] c);
    logic [5:0] s6; logic [3:0] s4;
    if (c == 9'h1BC) return 10'b001111_1010;      // K28.5 at RD-
    if (c == 9'h1FC) return 10'b001111_1000;      // K28.7 at RD-
    if (c == 9'h000) return 10'b100111_0100;      // D0.0  at RD-
    if (c == 9'h001) return 10'b011101_0100;      // D1.0  at RD-
    case (c[4:0])                                 // balanced six-bit codes
      5'd3: s6 = 6'b110001;  5'd5: s6 = 6'b101001;  5'd6: s6 = 6'b011001;
      5'd9: s6 = 6'b100101;  5'd10: s6 = 6'b010101; 5'd11: s6 = 6'b110100;
      5'd12: s6 = 6'b001101; 5'd13: s6 = 6'b101100; 5'd14: s6 = 6'b011100;
      5'd17: s6 = 6'b100011; 5'd18: s6 = 6'b010011; 5'd19: s6 = 6'b110010;
      5'd20: s6 = 6'b001011; 5'd21: s6 = 6'b101010; 5'd22: s6 = 6'b011010;
      5'd25: s6 = 6'b100110; 5'd26: s6 = 6'b010110; default: s6 = 6'b001110;
    endcase
    case (c[7:5])                                 // balanced four-bit codes
      3'd1: s4 = 4'b1001; 3'd2: s4 = 4'b0101; 3'd5: s4 = 4'b1010; default: s4 = 4'b0110;
    endcase
    return {s6, s4};
  endfunction

  // A random character whose code is balanced in both halves.
  function automatic logic [8:0] rand_balanced();
    int x6[18] = '{3,5,6,9,10,11,12,13,14,17,18,19,20,21,22,25,26,28};
    int y4[4]  = '{1,2,5,6};
    return {1'b0, 3'(y4[$urandom_range(3)]), 5'(x6[$urandom_range(17)])};
  endfunction

  task automatic queue_char(input logic [8:0] c);
    logic [9:0] s;
    s = code_of(c);
    for (int i = 9; i >= 0; i--) gen_q.push_back(s[i]);  // 'a' first
  endtask

  // Bench serial generator: one bit per BIT cycles, D0.0 when idle.
  int gen_phase = 0;
  always @(posedge ref_clk) begin
    if (gen_phase == BIT - 1) begin
      gen_phase <= 0;
      if (gen_q.size() == 0) queue_char(9'h000);
      gen_bit <= gen_q.pop_front();
    end else gen_phase <= gen_phase + 1;
  end

  // ------------------------------------------------------- observation
  always @(posedge ref_clk) if (!reset) cyc <= cyc + 1;

  // rx_data characters, in order, on each rx_clk strobe.
  logic [8:0] rx_seen[$];
  always @(posedge ref_clk) if (!reset && rx_clk) rx_seen.push_back(rx_data);

  // Character rate: cycles between receiver strobes.
  int unsigned last_strobe = 0; int gaps[$];
  always @(posedge ref_clk)
    if (!reset && rx_clk) begin
      gaps.push_back(int'(cyc - last_strobe));
      last_strobe <= cyc;
    end

  // Serial capture of testOut_P (cap_sel 0) or txa_data_p (cap_sel 1), mid-bit.
  bit cap_on = 0; int cap_sel = 0; bit cap_q[$];
  always @(posedge ref_clk)
    if (cap_on) begin
      if (cap_sel == 0 && cyc % BIT == 5) cap_q.push_back(testOut_P);
      if (cap_sel == 1 && cyc % BIT == 4) cap_q.push_back(txa_data_p);
    end

  function automatic bit contains(input bit hay[$], input bit needle[$]);
    for (int i = 0; i + needle.size() <= hay.size(); i++) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < needle.size() && ok; j++) ok = (hay[i+j] == needle[j]);
      if (ok) return 1;
    end
    return 0;
  endfunction

  function automatic bit seq_in(input logic [8:0] hay[$], input logic [8:0] needle[$]);
    for (int i = 0; i + needle.size() <= hay.size(); i++) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < needle.size() && ok; j++) ok = (hay[i+j] == needle[j]);
      if (ok) return 1;
    end
    return 0;
  endfunction

  function automatic void bits_of(ref bit q[$], input logic [8:0] cs[$]);
    q.delete();
    foreach (cs[k]) begin
      logic [9:0] s;
      s = code_of(cs[k]);
      for (int i = 9; i >= 0; i--) q.push_back(s[i]);
    end
  endfunction

  // ------------------------------------------------------- configuration
  task automatic configure(input logic [3:0] mode, input logic [3:0] bsel,
                           input logic [7:0] tp = 8'hA5, input logic [7:0] tn = 8'h3C);
    logic [23:0] frame;
    frame = {tn, tp, bsel, mode};
    for (int i = 23; i >= 0; i--) begin
      dataConfig = frame[i];
      #3 configClk = 1'b1;
      #3 configClk = 1'b0;
    end
    #3 setConfig = 1'b1;
    #3 setConfig = 1'b0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge ref_clk);
  endtask

  // Mechanism counters.
  int m_mode[15];
  int m_bist_pass = 0, m_bist_fail_seen = 0, m_lfsr_reload = 0, m_fdiv = 0, m_gate = 0;

  // ------------------------------------------------------- BIST read-out
  task automatic read_bist(input logic [3:0] mode, input bit expect_all, output int ones);
    ones = 0;
    for (int k = 0; k < 16; k++) begin
      configure(mode, 4'(k));
      wait_cycles(2);
      ones += int'(bist);
    end
    if (expect_all) begin
      check(ones == 16, $sformatf("mode %0d: all 16 BIST entries pass (got %0d)", mode, ones));
      if (ones == 16) m_bist_pass++;
    end
  endtask

  // LFSR model: data characters of one burst after the comma.
  function automatic void lfsr_burst(ref logic [8:0] q[$]);
    logic [9:0] s;
    s = 10'b0000000001;
    q.delete();
    for (int i = 0; i < 15; i++) begin
      q.push_back({1'b0, s[7:0]});
      s = {s[8:0], s[9] ^ s[5] ^ s[4]};
    end
  endfunction

  // ----------------------------------------------------------- the test
  initial begin
    logic [8:0] sent[$], expq[$];
    bit bits[$];
    int ones, toggles_in, toggles_out;
    logic prev_in, prev_out;

    wait_cycles(4);
    reset = 1'b0;
    wait_cycles(4);

    // After reset: everything cleared, normal mode.
    check(trans_config_p == 0 && trans_config_n == 0, "reset clears transmitter settings");

    // ---- mode 0: normal, with a cable from the analog transmitter to the receiver.
    configure(4'd0, 4'd0, 8'hFF, 8'h55);
    check(trans_config_p == 8'hFF && trans_config_n == 8'h55, "transmitter settings stored");
    rx_src = 0;
    sent.delete();
    for (int i = 0; i < 12; i++) sent.push_back(rand_balanced());
    tx_data = 9'h1BC; wait_cycles(3 * 10 * BIT);
    rx_seen.delete();
    foreach (sent[i]) begin tx_data = sent[i]; wait_cycles(10 * BIT); end
    tx_data = 9'h1BC; wait_cycles(4 * 10 * BIT);
    check(seq_in(rx_seen, sent), "mode 0: characters sent come back on rx_data");
    check(txa_data_n == ~txa_data_p, "mode 0: negative transmitter gets inverted data");
    if (seq_in(rx_seen, sent)) m_mode[0]++;

    // ---- mode 1: RXD from testIn.
    rx_src = 2; configure(4'd1, 4'd0);
    sent.delete();
    for (int i = 0; i < 10; i++) sent.push_back(rand_balanced());
    queue_char(9'h1BC); queue_char(9'h1BC);
    foreach (sent[i]) queue_char(sent[i]);
    rx_seen.delete();
    wait_cycles(16 * 10 * BIT);
    check(seq_in(rx_seen, sent), "mode 1: testIn stream decoded on rx_data");
    if (seq_in(rx_seen, sent)) m_mode[1]++;

    // ---- mode 2: TXA from testIn.
    configure(4'd2, 4'd0);
    begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 40; i++) begin
        wait_cycles(BIT);
        if (txa_data_p !== testIn || txa_data_n !== ~testIn) ok = 0;
      end
      check(ok == 1, "mode 2: testIn drives the analog transmitter pins");
      if (ok == 1) m_mode[2]++;
    end

    // ---- mode 3: analog receiver through the frequency divider to testOut_P.
    configure(4'd3, 4'd0);
    for (int i = 0; i < 60; i++) queue_char(9'h115);   // D21.0... alternating bits
    wait_cycles(20 * BIT);
    toggles_in = 0; toggles_out = 0; prev_in = rxpcie_out; prev_out = testOut_P;
    for (int i = 0; i < 400 * BIT / 4; i++) begin
      @(posedge ref_clk);
      if (rxpcie_out && !prev_in) toggles_in++;
      if (testOut_P != prev_out) toggles_out++;
      prev_in = rxpcie_out; prev_out = testOut_P;
    end
    // Output toggles once per two input rising edges: rising edges in = toggles out * 2.
    check(toggles_out > 10 && (toggles_in - 2 * toggles_out) inside {[-2:2]},
          $sformatf("mode 3: divide by 4 (in rises %0d, out toggles %0d)", toggles_in, toggles_out));
    if (toggles_out > 10) m_fdiv++;
    if (toggles_out > 10) m_mode[3]++;
    gen_q.delete();

    // ---- mode 4: TXD on testOut_P.
    configure(4'd4, 4'd0);
    sent.delete();
    for (int i = 0; i < 8; i++) sent.push_back(rand_balanced());
    cap_sel = 0; cap_q.delete(); cap_on = 1;
    foreach (sent[i]) begin tx_data = sent[i]; wait_cycles(10 * BIT); end
    wait_cycles(3 * 10 * BIT); cap_on = 0;
    bits_of(bits, sent);
    check(contains(cap_q, bits), "mode 4: transmitter stream on testOut_P");
    check(testOut_N == ~testOut_P, "mode 4: testOut_N is the complement");
    if (contains(cap_q, bits)) m_mode[4]++;

    // ---- mode 5: testIn -> RXD -> TXD -> testOut_P.
    configure(4'd5, 4'd0);
    sent.delete();
    for (int i = 0; i < 10; i++) sent.push_back(rand_balanced());
    cap_sel = 0; cap_q.delete(); cap_on = 1;
    queue_char(9'h1BC); queue_char(9'h1BC);
    foreach (sent[i]) queue_char(sent[i]);
    wait_cycles(18 * 10 * BIT); cap_on = 0;
    bits_of(bits, sent);
    check(contains(cap_q, bits), "mode 5: testIn stream looped to testOut_P");
    if (!contains(cap_q, bits)) begin
      string a, b;
      a = ""; b = "";
      foreach (cap_q[i]) a = {a, cap_q[i] ? "1" : "0"};
      foreach (bits[i]) b = {b, bits[i] ? "1" : "0"};
      $display("cap %s\nexp %s", a, b);
      foreach (rx_seen[i]) $write("%h ", rx_seen[i]); $display("");
      foreach (sent[i]) $write("%h ", sent[i]); $display("");
    end
    if (contains(cap_q, bits)) m_mode[5]++;

    // ---- mode 6: tx_data -> TXD -> RXD.
    configure(4'd6, 4'd0);
    sent.delete();
    for (int i = 0; i < 10; i++) sent.push_back({1'b0, 8'($urandom)});
    tx_data = 9'h1BC; wait_cycles(3 * 10 * BIT);
    rx_seen.delete();
    foreach (sent[i]) begin tx_data = sent[i]; wait_cycles(10 * BIT); end
    tx_data = 9'h1BC; wait_cycles(3 * 10 * BIT);
    check(seq_in(rx_seen, sent), "mode 6: any byte survives transmitter -> receiver");
    if (seq_in(rx_seen, sent)) m_mode[6]++;

    // ---- mode 7: analog receiver -> analog transmitter.
    rx_src = 2; configure(4'd7, 4'd0);
    begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 10; i++) queue_char(rand_balanced());
      for (int i = 0; i < 60; i++) begin
        wait_cycles(BIT);
        if (txa_data_p !== rxpcie_out) ok = 0;
      end
      check(ok == 1, "mode 7: analog receiver output on the analog transmitter pins");
      if (ok == 1) m_mode[7]++;
    end

    // ---- mode 8: full loop, serial BIST, stream from the bench.
    rx_src = 2;
    wait (gen_q.size() == 0);
    configure(4'd8, 4'd0);
    cap_sel = 1; cap_q.delete(); cap_on = 1; rx_seen.delete();
    for (int i = 0; i < 4; i++) queue_char(9'h000);
    queue_char(9'h1FC); queue_char(9'h001);
    for (int i = 0; i < 20; i++) queue_char(rand_balanced());
    wait_cycles(40 * 10 * BIT);
    check(dut.u_ctrl.rx_pass, "mode 8: receiver gate opened after comma and first character");
    if (dut.u_ctrl.rx_pass) m_gate++;
    cap_on = 0;
    read_bist(4'd8, 1, ones);
    if (ones == 16) m_mode[8]++;

    // ---- mode 9: serial LFSR on the analog transmitter.
    configure(4'd9, 4'd0);
    cap_sel = 1; cap_q.delete(); cap_on = 1;
    wait_cycles(200 * BIT); cap_on = 0;
    begin
      int ok, start;
      bit seedbits[$];
      ok = 1; start = -1;
      for (int i = 9; i >= 0; i--) seedbits.push_back(serdes_pkg::SEED_A[i]);
      for (int i = 0; i + 10 <= cap_q.size() && start < 0; i++) begin
        bit m;
        m = 1;
        for (int j = 0; j < 10; j++) if (cap_q[i+j] != seedbits[j]) m = 0;
        if (m) start = i;
      end
      check(start >= 0 && start < 8, $sformatf("mode 9: seed A leads the serial pattern (at bit %0d)", start));
      if (start >= 0) begin
        for (int n = start; n + 10 < cap_q.size() && n + 10 < start + 160; n++)
          if (cap_q[n+10] != (cap_q[n] ^ cap_q[n+4] ^ cap_q[n+5])) ok = 0;
        check(ok == 1, "mode 9: serial pattern follows the LFSR recurrence");
        begin
          bit again;
          again = 1;
          for (int j = 0; j < 10; j++) if (cap_q[start + 160 + j] != seedbits[j]) again = 0;
          check(again, "mode 9: seed reloaded after 160 bit periods");
          if (again) m_lfsr_reload++;
        end
        if (ok == 1) m_mode[9]++;
      end
    end

    // ---- mode 10: LFSR -> TXD -> (cable) -> RXD, parallel BIST.
    rx_src = 0; configure(4'd10, 4'd0);
    rx_seen.delete();
    wait_cycles(40 * 10 * BIT);
    lfsr_burst(expq);
    check(seq_in(rx_seen, expq), "mode 10: LFSR burst received");
    read_bist(4'd10, 1, ones);
    if (ones == 16) m_mode[10]++;

    // ---- mode 11: LFSR -> TXD -> RXD, parallel BIST; the burst repeats.
    configure(4'd11, 4'd0);
    rx_seen.delete();
    wait_cycles(40 * 10 * BIT);
    lfsr_burst(expq);
    expq.push_front(9'h1FC);
    begin
      logic [8:0] two[$];
      two = {expq, expq};
      check(seq_in(rx_seen, two), "mode 11: comma + LFSR burst repeats");
      if (seq_in(rx_seen, two)) m_lfsr_reload++;
    end
    begin
      int bad;
      bad = 0;
      gaps.delete();
      wait_cycles(20 * 10 * BIT);
      for (int i = 1; i < gaps.size(); i++) if (gaps[i] != 10 * BIT) bad++;
      check(gaps.size() > 15 && bad == 0,
            $sformatf("mode 11: one character every 80 reference cycles (%0d gaps, %0d off)", gaps.size(), bad));
    end
    read_bist(4'd11, 1, ones);
    if (ones == 16) m_mode[11]++;

    // ---- mode 12: tx_data -> TXD -> (cable) -> RXD, parallel BIST.
    rx_src = 0; configure(4'd12, 4'd0);
    tx_data = 9'h1FC; wait_cycles(3 * 10 * BIT);
    for (int i = 0; i < 20; i++) begin tx_data = {1'b0, 8'(i * 37 + 11)}; wait_cycles(10 * BIT); end
    tx_data = 9'h1FC; wait_cycles(6 * 10 * BIT);
    read_bist(4'd12, 1, ones);
    if (ones == 16) m_mode[12]++;

    // Same run with the cable corrupted during one character: BIST must fail.
    configure(4'd0, 4'd0); wait_cycles(4);
    configure(4'd12, 4'd0);
    tx_data = 9'h1FC; wait_cycles(3 * 10 * BIT);
    for (int i = 0; i < 20; i++) begin
      tx_data = {1'b0, 8'(i * 37 + 11)};
      if (i == 6) begin rx_src = 2; wait_cycles(10 * BIT); rx_src = 0; end
      else wait_cycles(10 * BIT);
    end
    tx_data = 9'h1FC; wait_cycles(6 * 10 * BIT);
    read_bist(4'd12, 0, ones);
    check(ones < 16 && ones > 0, $sformatf("mode 12: corrupted loop fails some BIST entries (%0d pass)", ones));
    if (ones < 16) m_bist_fail_seen++;

    // ---- mode 13: LFSR TX -> testOut_P -(cable)-> RXA -> RXD -> TXD, serial BIST.
    rx_src = 1; configure(4'd13, 4'd0);
    wait_cycles(45 * 10 * BIT);
    read_bist(4'd13, 1, ones);
    if (ones == 16) m_mode[13]++;

    // ---- mode 14: LFSR TX -> RXD -> TXD -> testOut_P, serial BIST.
    rx_src = 2; configure(4'd14, 4'd0);
    wait_cycles(45 * 10 * BIT);
    read_bist(4'd14, 1, ones);
    if (ones == 16) m_mode[14]++;

    // ---- mechanisms seen
    for (int m = 0; m < 15; m++) begin
      $display("mode %0d exercised: %0d", m, m_mode[m]);
      check(m_mode[m] > 0, $sformatf("mode %0d was exercised", m));
    end
    $display("bist all-pass %0d, bist failure detected %0d, LFSR burst reload %0d, divider %0d, receiver gate %0d",
             m_bist_pass, m_bist_fail_seen, m_lfsr_reload, m_fdiv, m_gate);
    check(m_bist_pass > 0,      "BIST pass seen");
    check(m_bist_fail_seen > 0, "BIST failure seen");
    check(m_lfsr_reload > 0,    "LFSR burst reload seen");
    check(m_fdiv > 0,           "frequency divider seen");
    check(m_gate > 0,           "receiver gate seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge ref_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
