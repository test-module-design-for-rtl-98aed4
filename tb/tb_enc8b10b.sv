// tb_enc8b10b -- self-checking test of the 8b/10b encoder.
//
// The bench holds its own copy of the standard 5b/6b and 3b/4b code tables and
// encodes every data byte and the twelve control characters from both running
// disparities, comparing code and new disparity with the encoder. It also
// checks the character table printed for D0.0..D9.0, a few textbook codes
// (K28.5, K28.7, D1.0), and that a long random stream keeps the code rules:
// every code has 4, 5 or 6 ones, the running disparity stays bounded, and no
// run on the line is longer than five. The encoder is combinational; values are
// checked 1 ns after they are applied.
module tb_enc8b10b;

  logic [8:0] datain;
  logic       dispin;
  logic [9:0] dataout;
  logic       dispout;
  int checks = 0, failures = 0;

  enc8b10b dut (.*);

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

  // The encoder's output with 'a' at bit 0, turned to a..j MSB-first.
  function automatic logic [9:0] msb_first(input logic [9:0] v);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[9-i] = v[i];
    return r;
  endfunction

  task automatic apply(input logic [8:0] c, input bit rd, output logic [9:0] code, output bit rdo);
    datain = c; dispin = rd;
    #1;
    code = msb_first(dataout); rdo = dispout;
  endtask

  initial begin
    logic [9:0] code;
    bit rdo, rd;
    int run, last, ksyms[12] = '{28, 60, 92, 124, 156, 188, 220, 252, 247, 251, 253, 254};
    logic [9:0] tbl[10] = '{10'b1001110100, 10'b0111010100, 10'b1011010100, 10'b1100011011,
                            10'b1101010100, 10'b1010011011, 10'b0110011011, 10'b1110001011,
                            10'b1110010100, 10'b1001011011};

    // Table of D0.0..D9.0 at negative disparity.
    for (int i = 0; i < 10; i++) begin
      apply(9'(i), 1'b0, code, rdo);
      check(code == tbl[i], $sformatf("D%0d.0 RD- = %b, want %b", i, code, tbl[i]));
    end
    apply(9'h1BC, 0, code, rdo); check(code == 10'b0011111010 && rdo, "K28.5 RD-");
    apply(9'h1BC, 1, code, rdo); check(code == 10'b1100000101 && !rdo, "K28.5 RD+");
    apply(9'h1FC, 0, code, rdo); check(code == 10'b0011111000 && !rdo, "K28.7 RD-");
    apply(9'h001, 0, code, rdo); check(code == 10'b0111010100 && !rdo, "D1.0 RD-");

    // Every data byte and control character from both disparities.
    for (int rdi = 0; rdi < 2; rdi++) begin
      for (int c = 0; c < 256; c++) begin
        logic [10:0] r;
        r = ref_enc(9'(c), bit'(rdi));
        apply(9'(c), bit'(rdi), code, rdo);
        check({rdo, code} == r, $sformatf("D%0d.%0d RD%s: %b/%b want %b/%b",
              c % 32, c / 32, rdi ? "+" : "-", code, rdo, r[9:0], r[10]));
      end
      foreach (ksyms[i]) begin
        logic [10:0] r;
        r = ref_enc({1'b1, 8'(ksyms[i])}, bit'(rdi));
        apply({1'b1, 8'(ksyms[i])}, bit'(rdi), code, rdo);
        check({rdo, code} == r, $sformatf("K%0d.%0d RD%0d", ksyms[i] % 32, ksyms[i] / 32, rdi));
      end
    end

    // Random stream: code rules on the line.
    rd = 0; run = 0; last = -1;
    for (int n = 0; n < 3000; n++) begin
      logic [8:0] c;
      int o;
      c = ($urandom_range(9) == 0) ? {1'b1, 8'(ksyms[$urandom_range(11)])} : {1'b0, 8'($urandom)};
      apply(c, rd, code, rdo);
      o = ones(code, 10);
      check(o inside {4, 5, 6}, "code weight");
      check((o == 5) ? (rdo == rd) : (rdo == (o == 6)), "running disparity follows the code weight");
      for (int i = 9; i >= 0; i--) begin
        if (int'(code[i]) == last) run++; else begin run = 1; last = code[i]; end
        if (run > 5) begin check(0, "run length above five"); run = 0; end
      end
      rd = rdo;
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
