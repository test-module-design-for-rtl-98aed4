// tb_tx_digital -- checks the digital transmitter (encoder + serializer).
//
// bit_tick pulses every 8 clk cycles, as in the SerDes. The bench presents a
// new random character (data or control) after each tx_frame_started pulse,
// records ser_out one cycle after every bit_tick, and compares each group of
// ten bits, 'a' first, with its own reference encoder while tracking the
// running disparity. It checks that tx_frame_started repeats every 80 cycles
// (one character per ten bit periods) and that disp_clear makes the next
// character start from negative disparity.
module tb_tx_digital;

  logic       clk = 0, rst = 0, bit_tick = 0, disp_clear = 0;
  initial #1 rst = 1;   // a rising edge, so the asynchronous reset acts at once
  logic [8:0] datain = 0;
  logic       ser_out, tx_frame_started;
  int checks = 0, failures = 0;

  tx_digital dut (.*);

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

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    bit_tick <= (cyc % 8 == 7);
  end

  initial begin
    logic [8:0] sent[$];
    bit rd_model;
    int ksyms[12] = '{28, 60, 92, 124, 156, 188, 220, 252, 247, 251, 253, 254};
    int last_frame, nframes;
    logic [10:0] r;
    logic [9:0] got;
    repeat (3) @(negedge clk);
    rst = 0;
    rd_model = 0;
    last_frame = -1; nframes = 0;
    while (nframes < 400) begin
      @(posedge clk);
      if (tx_frame_started) begin
        logic [8:0] c;
        c = datain;
        if (last_frame >= 0)
          check(cyc - last_frame == 80, $sformatf("frame spacing %0d", cyc - last_frame));
        last_frame = cyc;
        nframes++;
        // The ten bits of c: sampled after each of the next ten bit ticks.
        r = ref_enc(c, (nframes == 200) ? 1'b0 : rd_model);
        for (int b = 0; b < 10; b++) begin
          if (b > 0) do @(posedge clk); while (!bit_tick);
          #1 got[9-b] = ser_out;
          if (b == 0) begin
            // Next character, chosen now (it is taken at the next frame).
            datain = ($urandom_range(7) == 0) ? {1'b1, 8'(ksyms[$urandom_range(11)])} : {1'b0, 8'($urandom)};
            disp_clear = (nframes == 199);
            @(posedge clk); #1 disp_clear = 0;
          end
        end
        check(got == r[9:0], $sformatf("char %0d %h: sent %b want %b", nframes, c, got, r[9:0]));
        rd_model = r[10];
      end
    end
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
