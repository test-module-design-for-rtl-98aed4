// clock_divider -- bit-period phase generator of the SerDes.
//
// The serial bit rate is one eighth of ref_clk. A 3-bit counter steps through
// the eight ref_clk cycles of a bit period and phase[k] is high during cycle
// k, so each output is a one-cycle strobe once per bit period. phase[0] is the
// serializer bit strobe, phase[7] the serial-LFSR strobe and phase[4] the
// mid-bit sampling point for the transmitted stream. Reset is asynchronous
// and active high; phase[0] is the first strobe after reset.
//
// The document names only an eight-phase clock divider. Using strobes of one
// ref_clk domain instead of eight derived clocks is this design's choice.
module clock_divider #(
  parameter int unsigned PHASES = 8
) (
  input  logic              ref_clk,
  input  logic              a_rst,
  output logic [PHASES-1:0] clocks_out
);

  localparam int unsigned CW = $clog2(PHASES);

  logic [CW-1:0] count;

  always_ff @(posedge ref_clk or posedge a_rst) begin
    if (a_rst) count <= '0;
    else if (count == CW'(PHASES - 1)) count <= '0;
    else count <= count + 1'b1;
  end

  always_comb begin
    clocks_out = '0;
    clocks_out[count] = 1'b1;
  end

endmodule
