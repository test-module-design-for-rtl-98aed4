// code8b10b_pkg -- sub-block tables of the 8b/10b line code.
//
// 8b/10b sends each byte HGF EDCBA as ten bits: the low five bits EDCBA become
// the six bits abcdei and the high three bits HGF become the four bits fghj.
// The tables below hold the form used at negative running disparity, written
// with 'a' (or 'f') as the most significant bit. The form for positive
// running disparity is the bitwise complement, taken only for sub-blocks that
// are unbalanced, plus the two balanced exceptions D.07 (111000/000111) and
// D.x.3 (1100/0011). The encoder and the decoder share these tables; the code
// itself is the standard one the PCIe 1.0 link uses.
package code8b10b_pkg;

  function automatic logic [5:0] abcdei_neg(input logic [4:0] x);
    unique case (x)
      5'd0:  return 6'b100111;   5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;   5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;   5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;   5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;   5'd9:  return 6'b100101;
      5'd10: return 6'b010101;   5'd11: return 6'b110100;
      5'd12: return 6'b001101;   5'd13: return 6'b101100;
      5'd14: return 6'b011100;   5'd15: return 6'b010111;
      5'd16: return 6'b011011;   5'd17: return 6'b100011;
      5'd18: return 6'b010011;   5'd19: return 6'b110010;
      5'd20: return 6'b001011;   5'd21: return 6'b101010;
      5'd22: return 6'b011010;   5'd23: return 6'b111010;
      5'd24: return 6'b110011;   5'd25: return 6'b100110;
      5'd26: return 6'b010110;   5'd27: return 6'b110110;
      5'd28: return 6'b001110;   5'd29: return 6'b101110;
      5'd30: return 6'b011110;   default: return 6'b101011;
    endcase
  endfunction

  // fghj at negative running disparity; y = 7 gives the primary form P7.
  function automatic logic [3:0] fghj_neg(input logic [2:0] y);
    unique case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  localparam logic [5:0] K28_NEG = 6'b001111;  // abcdei of K28 at negative disparity
  localparam logic [3:0] A7_NEG  = 4'b0111;    // alternate fghj of x.7

  function automatic int unsigned ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  function automatic int unsigned ones4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // Reverse a 10-bit string abcdeifghj (a = bit 9) into line order (a = bit 0).
  function automatic logic [9:0] to_line_order(input logic [9:0] s);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[i] = s[9-i];
    return r;
  endfunction

endpackage
