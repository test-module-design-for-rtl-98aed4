// tx_digital -- digital transmitter: 8b/10b encoder and serializer.
//
// Takes a 9-bit character (bit 8 = K flag) on datain, encodes it with the
// running disparity kept in the serializer, and sends the ten bits on ser_out
// at one bit per bit_tick, 'a' first. tx_frame_started pulses for one clk
// cycle when datain is taken; the character then appears on ser_out from the
// next cycle on, for ten bit periods. The SerDes uses two of these: the main
// transmitter and the one that encodes the LFSR pattern for the receiver
// tests. The document gives the function; the insides are this design's.
//
// disp_clear (this design's addition, the document does not mention it)
// forces the next character to be encoded at negative running disparity.
// The test module pulses it on a change of mode so that a loop test always
// starts from the same disparity as the fixed marker the serial comparator
// looks for.
module tx_digital (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_tick,
  input  logic       disp_clear,
  input  logic [8:0] datain,
  output logic       ser_out,
  output logic       tx_frame_started
);

  logic [9:0] encoded;
  logic       disp_d, disp_q, disp_in, clear_pend;

  // Held from disp_clear until the next character is taken.
  always_ff @(posedge clk or posedge rst) begin
    if (rst)                   clear_pend <= 1'b0;
    else if (disp_clear)       clear_pend <= 1'b1;
    else if (tx_frame_started) clear_pend <= 1'b0;
  end

  assign disp_in = disp_q && !clear_pend;

  enc8b10b u_enc (
    .datain  (datain),
    .dispin  (disp_in),
    .dataout (encoded),
    .dispout (disp_d)
  );

  serializer u_ser (
    .clk              (clk),
    .rst              (rst),
    .bit_tick         (bit_tick),
    .par_in           (encoded),
    .disparity_d      (disp_d),
    .ser_out          (ser_out),
    .disparity_q      (disp_q),
    .tx_frame_started (tx_frame_started)
  );

endmodule
