// mux_decode -- operating-mode decoder of the SerDes test module.
//
// Turns the 4-bit operating mode held by the serial configuration block into
// the selector pairs of the five routing multiplexers A..E. It is a purely
// combinational look-up table; the output changes in the same cycle as the
// mode. Codes 15 and above fall back to the normal-mode selection.
//
// The table follows the document's operating-mode truth table with two
// choices of this design where the sources disagree: mode 3 routes the
// frequency divider to the test pin (D = 01, as in the table and the decoder
// figure), and mode 10 sends rx_data to the comparator (E = 01, as the mode-10
// description and the source code require, where the table prints E = 00).
module mux_decode
  import serdes_pkg::*;
(
  input  logic [3:0] mode,
  output mux_sel_t   sel
);

  always_comb begin
    unique case (mode)
      //                          A      B      C      D      E
      4'd0:    sel = '{a: 2'b10, b: 2'b00, c: 2'b00, d: 2'b00, e: 2'b00};
      4'd1:    sel = '{a: 2'b01, b: 2'b00, c: 2'b00, d: 2'b00, e: 2'b00};
      4'd2:    sel = '{a: 2'b00, b: 2'b00, c: 2'b01, d: 2'b00, e: 2'b00};
      4'd3:    sel = '{a: 2'b00, b: 2'b00, c: 2'b00, d: 2'b01, e: 2'b00};
      4'd4:    sel = '{a: 2'b00, b: 2'b00, c: 2'b01, d: 2'b00, e: 2'b00};
      4'd5:    sel = '{a: 2'b01, b: 2'b01, c: 2'b10, d: 2'b00, e: 2'b00};
      4'd6:    sel = '{a: 2'b00, b: 2'b00, c: 2'b00, d: 2'b00, e: 2'b00};
      4'd7:    sel = '{a: 2'b00, b: 2'b00, c: 2'b10, d: 2'b00, e: 2'b00};
      4'd8:    sel = '{a: 2'b10, b: 2'b01, c: 2'b00, d: 2'b00, e: 2'b00};
      4'd9:    sel = '{a: 2'b00, b: 2'b00, c: 2'b11, d: 2'b00, e: 2'b00};
      4'd10:   sel = '{a: 2'b10, b: 2'b10, c: 2'b00, d: 2'b00, e: 2'b01};
      4'd11:   sel = '{a: 2'b00, b: 2'b10, c: 2'b00, d: 2'b00, e: 2'b01};
      4'd12:   sel = '{a: 2'b10, b: 2'b00, c: 2'b00, d: 2'b00, e: 2'b01};
      4'd13:   sel = '{a: 2'b10, b: 2'b01, c: 2'b00, d: 2'b10, e: 2'b00};
      4'd14:   sel = '{a: 2'b11, b: 2'b01, c: 2'b00, d: 2'b00, e: 2'b00};
      default: sel = '{a: 2'b10, b: 2'b00, c: 2'b00, d: 2'b00, e: 2'b00};
    endcase
  end

endmodule
