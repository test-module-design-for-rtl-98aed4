// bypass_mux -- one of the bypass and looping multiplexers A..E.
//
// Selects one of N inputs of WIDTH bits with a 2-bit selector; a selector
// value with no input behind it (3 on a three-input multiplexer, 2 or 3 on a
// two-input one) returns input 0, as the source design does. Purely
// combinational. The five instances in the top differ only in N and WIDTH
// (A, C: four 1-bit inputs; B: three 9-bit; D: three 1-bit; E: two 9-bit).
module bypass_mux #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 1
) (
  input  logic [N-1:0][WIDTH-1:0] in,
  input  logic [1:0]              sel,
  output logic [WIDTH-1:0]        q
);

  initial begin
    assert (N >= 2 && N <= 4) else $error("bypass_mux: N must be 2..4");
  end

  always_comb begin
    q = in[0];
    for (int i = 1; i < N; i++)
      if (sel == 2'(i)) q = in[i];
  end

endmodule
