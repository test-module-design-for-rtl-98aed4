// enc8b10b -- 8b/10b encoder of the digital transmitter.
//
// Combinational. datain is a 9-bit character: bit 8 is the control flag K,
// bits 7:0 the byte HGFEDCBA. dispin is the running disparity before the
// character (1 = positive), dispout the running disparity after it. dataout
// is the 10-bit code in line order: bit 0 = 'a' is sent first, bit 9 = 'j'
// last. The serializer holds the running disparity between characters.
//
// How it works: EDCBA is looked up as six bits and HGF as four bits in the
// negative-disparity tables; a sub-block is complemented when the running
// disparity in front of it is positive and it is unbalanced (or is D.07 or
// D.x.3). An unbalanced sub-block flips the running disparity. x.7 uses the
// alternate form A7 for D17/18/20 at negative and D11/13/14 at positive
// disparity and for every K.x.7. Valid control characters are K28.0-K28.7 and
// K23/K27/K29/K30.7; with K set on any other byte the byte is encoded as data.
//
// The document requires 8b/10b coding of 9-bit characters (PCIe 1.0) and
// shows part of the table; the rest of the code is the standard one.
module enc8b10b
  import code8b10b_pkg::*;
(
  input  logic [8:0] datain,
  input  logic       dispin,
  output logic [9:0] dataout,
  output logic       dispout
);

  always_comb begin
    logic [4:0] x;
    logic [2:0] y;
    logic       k28, kx7, use_a7, rd_mid;
    logic [5:0] six;
    logic [3:0] four;
    int unsigned n6, n4;

    x   = datain[4:0];
    y   = datain[7:5];
    k28 = datain[8] && x == 5'd28;
    kx7 = datain[8] && y == 3'd7 &&
          (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);

    six = k28 ? K28_NEG : abcdei_neg(x);
    n6  = ones6(six);
    if (dispin && (n6 != 3 || (!k28 && x == 5'd7))) six = ~six;
    rd_mid = (n6 != 3) ? ~dispin : dispin;

    use_a7 = (y == 3'd7) &&
             (k28 || kx7 ||
              (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    four = use_a7 ? A7_NEG : fghj_neg(y);
    n4   = ones4(four);
    if (rd_mid && (n4 != 2 || y == 3'd3)) four = ~four;
    // K28 with a balanced fghj (x.1, x.2, x.5, x.6): complemented at negative
    // disparity so that the comma stays singular.
    else if (k28 && !rd_mid && n4 == 2 && y != 3'd3) four = ~four;

    dispout = (n4 != 2) ? ~rd_mid : rd_mid;
    dataout = to_line_order({six, four});
  end

endmodule
