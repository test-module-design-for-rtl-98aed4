// deserializer -- clock recovery and serial-to-parallel converter of the
// digital receiver.
//
// The serial input a_rx runs at one eighth of clk and has no clock of its
// own. It is synchronised by two flip-flops and oversampled: a phase counter
// restarts on every input edge and the bit is taken in the middle of the bit
// period (OVERSAMPLE/2 cycles after the edge), and every OVERSAMPLE cycles
// when no edge comes. Each recovered bit also leaves the block on rx_bit with
// a one-cycle rx_bit_valid strobe.
//
// Recovered bits shift into a 10-bit window, newest at the top, so the window
// holds a code in line order (bit 0 = 'a'). When the first seven bits of the
// window are a comma (0011111 or 1100000) the window is a character boundary:
// the block locks, outputs the code and flags comma_detected. After locking it
// outputs every tenth bit's window. c_parallel_out holds the last code and
// c_data_valid / clock_out pulse for one cycle when it changes. disparity_q is
// the running disparity in front of the held code: it takes the decoder's
// disparity_d on every new code, and a comma sets it from its own polarity.
//
// The document gives the function (clock data recovery, deserialisation,
// comma and data-valid flags, the ports); the oversampling recovery is this
// design's choice. Reset is asynchronous and active high; until the first
// comma the output holds D0.0. Bit 0 of the stored window is never read: the
// next window (window_n) drops it as the new bit enters at the top.
module deserializer #(
  parameter int unsigned OVERSAMPLE = 8
) (
  input  logic       clk,
  input  logic       a_rst,
  input  logic       a_rx,
  input  logic       disparity_d,
  output logic [9:0] c_parallel_out,
  output logic       disparity_q,
  output logic       c_data_valid,
  output logic       comma_detected,
  output logic       clock_out,
  output logic       rx_bit,
  output logic       rx_bit_valid
);

  localparam int unsigned PW = $clog2(OVERSAMPLE);
  localparam logic [9:0] IDLE_CODE = code8b10b_pkg::to_line_order(10'b1001110100); // D0.0, RD-

  logic          sync1, sync2, prev;
  logic [PW-1:0] phase;
  logic [9:0]    window, window_n;
  logic [3:0]    bit_cnt;
  logic          locked;
  logic          sample, comma_neg, comma_pos;

  // Clock recovery.
  always_ff @(posedge clk or posedge a_rst) begin
    if (a_rst) begin
      sync1 <= 1'b0;
      sync2 <= 1'b0;
      prev  <= 1'b0;
      phase <= '0;
    end else begin
      sync1 <= a_rx;
      sync2 <= sync1;
      prev  <= sync2;
      if (sync2 != prev) phase <= PW'(1);
      else               phase <= phase + 1'b1;
    end
  end

  assign sample    = phase == PW'(OVERSAMPLE / 2);
  assign window_n  = {sync2, window[9:1]};
  assign comma_neg = window_n[6:0] == 7'b1111100;   // a..f = 0011111
  assign comma_pos = window_n[6:0] == 7'b0000011;   // a..f = 1100000

  // Word alignment.
  always_ff @(posedge clk or posedge a_rst) begin
    if (a_rst) begin
      window         <= '0;
      bit_cnt        <= '0;
      locked         <= 1'b0;
      c_parallel_out <= IDLE_CODE;
      disparity_q    <= 1'b0;
      c_data_valid   <= 1'b0;
      comma_detected <= 1'b0;
      rx_bit         <= 1'b0;
      rx_bit_valid   <= 1'b0;
    end else begin
      c_data_valid   <= 1'b0;
      comma_detected <= 1'b0;
      rx_bit_valid   <= sample;
      if (sample) begin
        rx_bit <= sync2;
        window <= window_n;
        if (comma_neg || comma_pos) begin
          locked         <= 1'b1;
          bit_cnt        <= '0;
          c_parallel_out <= window_n;
          c_data_valid   <= 1'b1;
          comma_detected <= 1'b1;
          disparity_q    <= comma_pos;
        end else if (locked && bit_cnt == 4'd9) begin
          bit_cnt        <= '0;
          c_parallel_out <= window_n;
          c_data_valid   <= 1'b1;
          disparity_q    <= disparity_d;
        end else begin
          bit_cnt <= (bit_cnt == 4'd9) ? '0 : bit_cnt + 1'b1;
        end
      end
    end
  end

  assign clock_out = c_data_valid;

endmodule
