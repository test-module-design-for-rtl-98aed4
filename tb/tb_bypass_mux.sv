// tb_bypass_mux -- checks the routing multiplexer at two sizes.
//
// A four-input one-bit instance (the default) and a three-input nine-bit
// instance are driven with random inputs for every selector value. Each
// selector picks its input; on the three-input instance the unused code 3
// must give input 0. Combinational; read 1 ns after each change.
module tb_bypass_mux;

  logic [3:0]      in4;
  logic [2:0][8:0] in3;
  logic [1:0]      sel;
  logic            q4;
  logic [8:0]      q3;
  int checks = 0, failures = 0;

  bypass_mux                      u4 (.in(in4), .sel(sel), .q(q4));
  bypass_mux #(.N(3), .WIDTH(9)) u3 (.in(in3), .sel(sel), .q(q3));

  initial begin
    for (int n = 0; n < 200; n++) begin
      in4 = 4'($urandom);
      for (int i = 0; i < 3; i++) in3[i] = 9'($urandom);
      sel = 2'(n % 4);
      #1;
      checks += 2;
      if (q4 !== in4[sel]) begin failures++; $display("FAIL: 4-input sel %0d", sel); end
      if (q3 !== ((sel == 2'd3) ? in3[0] : in3[sel])) begin
        failures++; $display("FAIL: 3-input sel %0d", sel);
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
