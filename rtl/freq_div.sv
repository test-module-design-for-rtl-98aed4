// freq_div -- frequency divider for observing the analog receiver output.
//
// The single-ended output of the analog receiver is too fast to watch from
// outside the chip, so this block divides it: the signal itself clocks a
// small counter, and the output toggles once every DIV/2 rising edges of the
// input, giving one output period per DIV input periods (DIV = 4 by default,
// as in the source design). Reset is asynchronous and active high. The block
// runs only while the test controller passes the analog signal to it (modes
// 3 and 7); at other times its input is held low and it stops.
module freq_div #(
  parameter int unsigned DIV = 4
) (
  input  logic rx_an,
  input  logic rst,
  output logic rx_an_div
);

  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] counter;

  always_ff @(posedge rx_an or posedge rst) begin
    if (rst) begin
      counter   <= '0;
      rx_an_div <= 1'b0;
    end else if (counter == CW'(HALF - 1)) begin
      counter   <= '0;
      rx_an_div <= ~rx_an_div;
    end else begin
      counter   <= counter + 1'b1;
    end
  end

  initial assert (DIV >= 2 && DIV % 2 == 0) else $error("freq_div: DIV must be even");

endmodule
