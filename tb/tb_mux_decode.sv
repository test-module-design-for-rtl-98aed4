// tb_mux_decode -- checks the mode-to-selector table.
//
// The bench holds the expected selector pairs of multiplexers A..E for the
// fifteen operating modes (the mode table of the test module, with mode 3
// routing the divided receiver signal to the test pin and mode 10 using the
// receiver's parallel data on the comparator's output side) and the normal
// selection for the unused code 15. The decoder is combinational; each mode
// is applied and read back 1 ns later.
module tb_mux_decode;
  import serdes_pkg::*;

  logic [3:0] mode;
  mux_sel_t   sel;
  int checks = 0, failures = 0;

  mux_decode dut (.*);

  initial begin
    // {A, B, C, D, E} per mode.
    logic [9:0] expect_sel[16] = '{
      10'b10_00_00_00_00, 10'b01_00_00_00_00, 10'b00_00_01_00_00, 10'b00_00_00_01_00,
      10'b00_00_01_00_00, 10'b01_01_10_00_00, 10'b00_00_00_00_00, 10'b00_00_10_00_00,
      10'b10_01_00_00_00, 10'b00_00_11_00_00, 10'b10_10_00_00_01, 10'b00_10_00_00_01,
      10'b10_00_00_00_01, 10'b10_01_00_10_00, 10'b11_01_00_00_00, 10'b10_00_00_00_00};
    for (int m = 0; m < 16; m++) begin
      mode = 4'(m);
      #1;
      checks++;
      if (sel !== expect_sel[m]) begin
        failures++;
        $display("FAIL: mode %0d gives %b, want %b", m, sel, expect_sel[m]);
      end
    end
    // Field order inside the packed selector.
    mode = 4'd14;
    #1;
    checks++;
    if (sel.a !== 2'b11 || sel.b !== 2'b01) begin failures++; $display("FAIL: field order"); end
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
