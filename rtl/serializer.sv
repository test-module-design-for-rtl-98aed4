// serializer -- parallel-to-serial converter of the digital transmitter.
//
// Sends one 10-bit code every ten bit periods, bit 0 ('a') first. bit_tick is
// a one-cycle strobe once per bit period. On the tick that starts a frame the
// block takes par_in, drives its bit 0 onto ser_out, stores the running
// disparity disparity_d that belongs to the code (the encoder's output), and
// raises tx_frame_started for that one cycle so that the source can present
// the next character. On the nine ticks that follow, bits 1..9 go out.
// ser_out is registered and changes one ref_clk cycle after each tick.
// disparity_q feeds the encoder's running-disparity input.
//
// The document describes the block's function and its ports (par_in,
// ser_out, disparity_d/q, tx_frame_started); the one-clock-with-strobe timing
// is this design's choice. Reset (asynchronous, active high) starts at
// negative disparity with the line low.
module serializer #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         bit_tick,
  input  logic [W-1:0] par_in,
  input  logic         disparity_d,
  output logic         ser_out,
  output logic         disparity_q,
  output logic         tx_frame_started
);

  localparam int unsigned CW = $clog2(W);

  logic [CW-1:0] bit_cnt;
  logic [W-1:0]  shreg;

  assign tx_frame_started = bit_tick && bit_cnt == '0;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      bit_cnt     <= '0;
      shreg       <= '0;
      ser_out     <= 1'b0;
      disparity_q <= 1'b0;
    end else if (bit_tick) begin
      if (bit_cnt == '0) begin
        shreg       <= par_in;
        ser_out     <= par_in[0];
        disparity_q <= disparity_d;
      end else begin
        ser_out     <= shreg[bit_cnt];
      end
      bit_cnt <= (bit_cnt == CW'(W - 1)) ? '0 : bit_cnt + 1'b1;
    end
  end

endmodule
