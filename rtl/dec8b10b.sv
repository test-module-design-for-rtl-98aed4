// dec8b10b -- 8b/10b decoder of the digital receiver.
//
// Combinational. datain is a 10-bit code in line order (bit 0 = 'a', the
// first bit received). dataout is the 9-bit character: bit 8 = K flag, bits
// 7:0 the byte. dispin is the running disparity before the code (1 =
// positive), dispout after it. code_err flags a six- or four-bit sub-block
// that is not in the code; disp_err flags a sub-block whose disparity does
// not fit the running disparity. The deserializer holds the running disparity
// between characters.
//
// How it works: abcdei is matched against the 32 six-bit codes in both
// disparity forms and against K28; fghj against the eight four-bit codes and
// the alternate x.7. Behind a K28 sent at positive disparity (abcdei =
// 110000) the balanced fghj was complemented by the encoder and is
// complemented back first. A7 behind D/K 23, 27, 29 or 30 marks a control
// character. The document names the decoder and its 9-bit output; the code
// is the standard one.
module dec8b10b
  import code8b10b_pkg::*;
(
  input  logic [9:0] datain,
  input  logic       dispin,
  output logic [8:0] dataout,
  output logic       dispout,
  output logic       code_err,
  output logic       disp_err
);

  // Six-bit sub-block: {found, EDCBA}; K28 is handled by the caller.
  function automatic logic [5:0] decode6(input logic [5:0] six);
    logic [5:0] r, t6;
    r = '0;
    for (int i = 0; i < 32; i++) begin
      t6 = abcdei_neg(5'(i));
      if (six == t6 || (six == ~t6 && (ones6(t6) != 3 || i == 7))) r = {1'b1, 5'(i)};
    end
    return r;
  endfunction

  // Four-bit sub-block: {found, HGF}; the alternate x.7 is handled by the caller.
  function automatic logic [3:0] decode4(input logic [3:0] four);
    logic [3:0] r, t4;
    r = '0;
    for (int j = 0; j < 8; j++) begin
      t4 = fghj_neg(3'(j));
      if (four == t4 || (four == ~t4 && (ones4(t4) != 2 || j == 3))) r = {1'b1, 3'(j)};
    end
    return r;
  endfunction

  logic [9:0] s;
  logic [5:0] six, d6;
  logic [3:0] four, four_adj, d4;
  logic [4:0] x;
  logic [2:0] y;
  logic       k28, a7, kflag, rd_mid;
  int unsigned n6, n4;

  assign s    = to_line_order(datain);   // back to abcdeifghj with a = bit 9
  assign six  = s[9:4];
  assign four = s[3:0];
  assign n6   = ones6(six);
  assign n4   = ones4(four);
  assign k28  = (six == K28_NEG) || (six == ~K28_NEG);
  assign d6   = decode6(six);
  assign x    = k28 ? 5'd28 : d6[4:0];

  // Behind K28 at positive disparity the encoder complemented a balanced fghj.
  assign four_adj = (k28 && six == ~K28_NEG && n4 == 2 && four != 4'b1100 && four != 4'b0011)
                    ? ~four : four;
  assign a7 = (four_adj == A7_NEG) || (four_adj == ~A7_NEG);
  assign d4 = decode4(four_adj);
  assign y  = a7 ? 3'd7 : d4[2:0];

  assign kflag  = k28 || (a7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
  assign rd_mid = (n6 > 3) ? 1'b1 : (n6 < 3) ? 1'b0 : dispin;

  assign dispout  = (n4 > 2) ? 1'b1 : (n4 < 2) ? 1'b0 : rd_mid;
  assign disp_err = (n6 > 3 && dispin) || (n6 < 3 && !dispin) ||
                    (six == 6'b111000 && dispin) || (six == 6'b000111 && !dispin) ||
                    (n6 > 4) || (n6 < 2) ||
                    (n4 > 2 && rd_mid) || (n4 < 2 && !rd_mid) ||
                    (four == 4'b1100 && rd_mid) || (four == 4'b0011 && !rd_mid);
  assign code_err = !(k28 || d6[5]) || !(a7 || d4[3]);
  assign dataout  = {kflag, y, x};

endmodule
