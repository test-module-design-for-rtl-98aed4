// test_ctrl -- mode-dependent control of the SerDes test module.
//
// Drives the test blocks from the operating mode:
//  * LFSR seed: SEED_A in the serial LFSR mode (9), SEED_B otherwise.
//  * Parallel LFSR modes (10, 11 through the main transmitter, 13, 14 through
//    the LFSR transmitter): the pattern goes out in bursts of BURST_WORDS
//    characters, a K28.7 comma followed by the seed and the next LFSR states
//    (low eight bits, as data). lfsr_word is the character the transmitter
//    takes at its next frame start; each frame start advances the LFSR, and
//    the frame start that completes a burst presents the comma again and
//    reloads the seed, so every burst repeats the same sequence.
//  * Serial LFSR mode (9): the LFSR shifts once per bit period (lfsr_tick)
//    and is reseeded every BURST_WORDS*10 bit periods.
//  * Loop modes through the receiver (8, 13, 14): the receiver's characters
//    pass to the transmitter only from the first data character that directly
//    follows a received K28.7 comma; before that the transmitter is fed zero
//    (rx_pass low). Requiring the comma to decode as K28.7 (not just any comma
//    pattern) and to be the character right before keeps stray commas seen
//    while the receiver is still aligning from opening the gate early.
//  * Comparator enables: parallel in modes 10-12, serial in 8, 13, 14.
//  * Frequency divider input: the analog receiver output in modes 3 and 7,
//    low otherwise.
// A change of mode restarts the LFSR sequence and the receiver gate.
//
// The seeds, the comma, the burst length (160 serializer bit periods in the
// source design), the gating rule and the mode lists follow the document's
// top-level source. Sending only the low eight LFSR bits (K = 0) in modes 10
// and 11 as well as 13 and 14, counting the burst in frames rather than bit
// periods, and holding the LFSR in modes that do not use it are this
// design's choices. All outputs are in the clk domain; reset is asynchronous
// and active high. Bits 9:8 of state_out are not used: the LFSR characters
// carry only the low byte.
module test_ctrl
  import serdes_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [3:0]        mode,
  input  logic              lfsr_tick,      // one strobe per bit period
  input  logic              tx_frame,       // main transmitter takes a character
  input  logic              tx_frame2,      // LFSR transmitter takes a character
  input  logic              comma_detected, // receiver found a comma
  input  logic              data_valid,     // receiver produced a character
  input  logic [CHAR_W-1:0] rx_char,        // that character
  input  logic [LFSR_W-1:0] state_out,      // LFSR state
  input  logic              rx_an,          // analog receiver output
  output logic [LFSR_W-1:0] seed,
  output logic              lfsr_load,
  output logic              lfsr_enable,
  output logic [CHAR_W-1:0] lfsr_word,
  output logic              rx_pass,
  output logic              cmp_par_en,
  output logic              cmp_ser_en,
  output logic              fd_in,
  output logic              mode_change     // one cycle after a new mode is set
);

  localparam int unsigned SERIAL_RELOAD = BURST_WORDS * CODE_W;

  logic [3:0]  mode_q;
  logic        restart;
  logic        par_lfsr, ser_lfsr, rx_loop, frame, wrap;
  logic [$clog2(BURST_WORDS)-1:0]   word_cnt;
  logic [$clog2(SERIAL_RELOAD)-1:0] tick_cnt;
  logic        comma_flag, valid_flag;

  assign restart  = mode != mode_q;
  assign par_lfsr = mode inside {4'd10, 4'd11, 4'd13, 4'd14};
  assign ser_lfsr = mode == 4'd9;
  assign rx_loop  = mode inside {4'd8, 4'd13, 4'd14};
  assign frame    = (mode inside {4'd10, 4'd11}) ? tx_frame : tx_frame2;
  assign wrap     = word_cnt == ($bits(word_cnt))'(BURST_WORDS - 1);

  assign seed       = ser_lfsr ? SEED_A : SEED_B;
  // Both enables drop for the cycle of a mode change, so the comparator sees
  // a fresh rising edge and clears its memories even between two BIST modes.
  assign cmp_par_en = mode inside {4'd10, 4'd11, 4'd12} && !restart;
  assign cmp_ser_en = rx_loop && !restart;
  assign mode_change = restart;
  assign fd_in      = (mode == 4'd3 || mode == 4'd7) ? rx_an : 1'b0;
  assign rx_pass    = !rx_loop || valid_flag || (comma_flag && data_valid && !comma_detected);

  always_comb begin
    lfsr_load   = 1'b0;
    lfsr_enable = 1'b0;
    if (restart) begin
      lfsr_load = par_lfsr || ser_lfsr;
    end else if (par_lfsr) begin
      lfsr_load   = frame && wrap;
      lfsr_enable = frame && !wrap;
    end else if (ser_lfsr) begin
      lfsr_load   = lfsr_tick && tick_cnt == ($bits(tick_cnt))'(SERIAL_RELOAD - 1);
      lfsr_enable = lfsr_tick;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mode_q     <= '0;
      word_cnt   <= '0;
      tick_cnt   <= '0;
      lfsr_word  <= COMMA_CHAR;
      comma_flag <= 1'b0;
      valid_flag <= 1'b0;
    end else begin
      mode_q <= mode;
      if (restart) begin
        word_cnt  <= '0;
        tick_cnt  <= '0;
        lfsr_word <= COMMA_CHAR;
      end else begin
        if (par_lfsr && frame) begin
          word_cnt  <= wrap ? '0 : word_cnt + 1'b1;
          lfsr_word <= wrap ? COMMA_CHAR : {1'b0, state_out[7:0]};
        end
        if (ser_lfsr && lfsr_tick)
          tick_cnt <= (tick_cnt == ($bits(tick_cnt))'(SERIAL_RELOAD - 1)) ? '0 : tick_cnt + 1'b1;
      end

      if (!rx_loop || restart) begin
        comma_flag <= 1'b0;
        valid_flag <= 1'b0;
      end else begin
        if (data_valid) begin
          comma_flag <= comma_detected && rx_char == COMMA_CHAR;
          if (comma_flag && !comma_detected) valid_flag <= 1'b1;
        end
      end
    end
  end

endmodule
