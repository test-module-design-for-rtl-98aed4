// tb_dec8b10b -- self-checking test of the 8b/10b decoder.
//
// A reference encoder written in the bench (the standard code tables)
// produces the code of every data byte and of the twelve control characters
// from both running disparities. Each code is fed to the decoder in line
// order ('a' at bit 0) with the matching disparity: the character, K flag and
// new disparity must come back and neither error flag may rise. Random
// ten-bit words whose six-bit or four-bit sub-block appears in no code must
// raise code_err, and a valid
// unbalanced code applied at the wrong disparity must raise disp_err. The
// decoder is combinational; outputs are read 1 ns after each input.
module tb_dec8b10b;

  logic [9:0] datain;
  logic       dispin;
  logic [8:0] dataout;
  logic       dispout, code_err, disp_err;
  int checks = 0, failures = 0;

  dec8b10b dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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

  function automatic logic [9:0] line_order(input logic [9:0] v);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[9-i] = v[i];
    return r;
  endfunction

  initial begin
    int ksyms[12] = '{28, 60, 92, 124, 156, 188, 220, 252, 247, 251, 253, 254};
    logic [9:0] valid_codes[$];
    logic [10:0] r;
    logic [8:0] c;
    int n_bad = 0;

    for (int rdi = 0; rdi < 2; rdi++) begin
      for (int i = 0; i < 256 + 12; i++) begin
        c = (i < 256) ? 9'(i) : {1'b1, 8'(ksyms[i - 256])};
        r = ref_enc(c, bit'(rdi));
        valid_codes.push_back(r[9:0]);
        datain = line_order(r[9:0]); dispin = bit'(rdi);
        #1;
        check(dataout == c && dispout == r[10] && !code_err && !disp_err,
              $sformatf("%s%0d.%0d RD%s: got %h rd %0d err %0d%0d", c[8] ? "K" : "D", c[4:0], c[7:5],
                        rdi ? "+" : "-", dataout, dispout, code_err, disp_err));
      end
    end

    // Non-codes: a sub-block that appears in no valid code.
    for (int n = 0; n < 4000 && n_bad < 300; n++) begin
      logic [9:0] w;
      bit known;
      w = 10'($urandom);
      known = 0;
      foreach (valid_codes[j]) if (valid_codes[j][9:4] == w[9:4]) known = 1;
      if (known) begin
        known = 0;
        foreach (valid_codes[j]) if (valid_codes[j][3:0] == w[3:0]) known = 1;
      end
      if (!known) begin
        datain = line_order(w); dispin = 1'($urandom);
        #1;
        check(code_err, $sformatf("non-code %b accepted", w));
        n_bad++;
      end
    end
    check(n_bad > 100, "enough non-codes tried");

    // Unbalanced codes at the wrong disparity.
    for (int i = 0; i < 256; i++) begin
      r = ref_enc(9'(i), 1'b0);
      if (r[10] != 1'b0 || r[9:4] != ref_enc(9'(i), 1'b1)[9:4]) begin
        if ($countones(r[9:4]) != 3) begin
          datain = line_order(r[9:0]); dispin = 1'b1;
          #1;
          check(disp_err, $sformatf("D%0d.%0d RD- code at RD+ not flagged", i % 32, i / 32));
        end
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
