// rx_digital -- digital receiver: clock recovery, deserializer and 8b/10b
// decoder.
//
// a_rx is the serial line at one bit per eight clk cycles. The deserializer
// recovers the bits, locks to the character boundary on the first comma and
// hands each 10-bit code to the decoder; dataout is the decoded 9-bit
// character (bit 8 = K flag), valid from the cycle data_valid is high and
// held until the next character. comma_detected marks a comma character.
// rx_bit/rx_bit_valid expose the recovered bit stream (used by the BIST
// comparator). code_err/disp_err come from the decoder for the held
// character. The document gives the function; the insides are this design's.
module rx_digital #(
  parameter int unsigned OVERSAMPLE = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       a_rx,
  output logic [8:0] dataout,
  output logic       data_valid,
  output logic       comma_detected,
  output logic       rx_clk,
  output logic       code_err,
  output logic       disp_err,
  output logic       rx_bit,
  output logic       rx_bit_valid
);

  logic [9:0] encoded;
  logic       disp_d, disp_q;

  deserializer #(.OVERSAMPLE(OVERSAMPLE)) u_des (
    .clk            (clk),
    .a_rst          (rst),
    .a_rx           (a_rx),
    .disparity_d    (disp_d),
    .c_parallel_out (encoded),
    .disparity_q    (disp_q),
    .c_data_valid   (data_valid),
    .comma_detected (comma_detected),
    .clock_out      (rx_clk),
    .rx_bit         (rx_bit),
    .rx_bit_valid   (rx_bit_valid)
  );

  dec8b10b u_dec (
    .datain   (encoded),
    .dispin   (disp_q),
    .dataout  (dataout),
    .dispout  (disp_d),
    .code_err (code_err),
    .disp_err (disp_err)
  );

endmodule
