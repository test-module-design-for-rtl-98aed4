// serdes_top -- digital part of the SerDes with its test module.
//
// A PCIe-1.0-style SerDes: a digital receiver (clock recovery, deserializer,
// 8b/10b decoder) and a digital transmitter (8b/10b encoder, serializer) for
// 9-bit characters, both at one bit per eight ref_clk cycles, plus a test
// module that can route every block's input from a test pin, from another
// block or from an on-chip pattern generator, and check the result on chip.
//
// The operating mode, the comparator read-out select and the two 8-bit
// analog-transmitter settings arrive serially (config_clk / data_config) and
// take effect on a rising set_config. The mode decoder turns the mode into the
// selectors of five multiplexers:
//   A  receiver input     : tx_pcie | testIn | analog receiver | LFSR transmitter
//   B  transmitter input  : tx_data | received character (gated) | LFSR character
//   C  analog transmitter : tx_pcie | testIn | analog receiver (modes 3, 7) | LFSR bit
//   D  test output pin    : tx_pcie | divided analog receiver | LFSR transmitter
//   E  comparator output  : serial transmitter bit | received character
// A 10-bit LFSR makes the test pattern; a second encoder/serializer (the LFSR
// transmitter) sends it as a valid 8b/10b stream, and the comparator checks
// the loop and reports one pass bit, chosen by bist_sel, on the bist pin.
//
// The analog receiver, the analog transmitters and the pad buffers in front
// of the multiplexers are analog cells and are not part of this RTL: the
// analog receiver's single-ended output enters on rxpcie_out, and the data and
// settings of the positive and negative analog transmitters leave on
// txa_data_p/n and trans_config_p/n. testOut_P/N are registered on ref_clk.
//
// Block structure, multiplexer inputs and mode behaviour follow the document;
// the clocking scheme (one ref_clk with phase strobes), the insides of the
// digital receiver and transmitter and the comparator's output-side source in
// the serial modes (the transmitter output) are this design's choices.
// Reset is asynchronous and active high.
//
// The receiver's code and disparity error flags and the comparator's full
// result vector and done flag have no pin: they are left as internal nets
// (rx_code_err, rx_disp_err, bist_result, bist_done) that a simulation can
// observe, and lint reports them as unused.
module serdes_top
  import serdes_pkg::*;
(
  input  logic             reset,
  input  logic             ref_clk,
  // analog receiver output (single-ended)
  input  logic             rxpcie_out,
  // digital receiver
  output logic             rx_clk,
  output logic [8:0]       rx_data,
  // digital transmitter
  input  logic [8:0]       tx_data,
  // to the analog transmitters
  output logic             txa_data_p,
  output logic             txa_data_n,
  output logic [7:0]       trans_config_p,
  output logic [7:0]       trans_config_n,
  // serial configuration
  input  logic             configClk,
  input  logic             dataConfig,
  input  logic             setConfig,
  // test pins
  input  logic             testIn,
  output logic             testOut_P,
  output logic             testOut_N,
  output logic             bist
);

  logic [PHASES-1:0] phases;
  logic              ser_tick, lfsr_tick, mid_tick;
  logic [3:0]        mode, bist_sel;
  mux_sel_t          sel;

  logic              tx_pcie, tx_frame, tx_pcie2, tx_frame2;
  logic              rx_valid, rx_comma, rx_bit, rx_bit_valid;
  logic              rx_code_err, rx_disp_err;
  logic [8:0]        rx_in, lfsr_word;
  logic              rx_pass, mode_change;

  logic [LFSR_W-1:0] seed, state_out;
  logic              lfsr_load, lfsr_enable, q;
  logic              cmp_par_en, cmp_ser_en, fd_in, rx_an_div;

  logic              sout_a, sout_b;
  logic              mux_a, mux_c, mux_d;
  logic [8:0]        mux_b, mux_e;
  logic [15:0]       bist_result;
  logic              bist_done;

  // ---------------------------------------------------------------- clocking
  clock_divider #(.PHASES(PHASES)) u_clkdiv (
    .ref_clk    (ref_clk),
    .a_rst      (reset),
    .clocks_out (phases)
  );
  assign ser_tick  = phases[0];
  assign lfsr_tick = phases[PHASES-1];
  assign mid_tick  = phases[PHASES/2];

  // ----------------------------------------------------------- configuration
  serial_config u_cfg (
    .rst            (reset),
    .config_clk     (configClk),
    .data_config    (dataConfig),
    .set_config     (setConfig),
    .mode           (mode),
    .bist_sel       (bist_sel),
    .trans_config_p (trans_config_p),
    .trans_config_n (trans_config_n)
  );

  mux_decode u_dec (
    .mode (mode),
    .sel  (sel)
  );

  // The analog receiver output reaches the multiplexers through pad buffers.
  assign sout_a = rxpcie_out;
  assign sout_b = sout_a;

  // -------------------------------------------------------------- data path
  rx_digital u_rxd (
    .clk            (ref_clk),
    .rst            (reset),
    .a_rx           (mux_a),
    .dataout        (rx_data),
    .data_valid     (rx_valid),
    .comma_detected (rx_comma),
    .rx_clk         (rx_clk),
    .code_err       (rx_code_err),
    .disp_err       (rx_disp_err),
    .rx_bit         (rx_bit),
    .rx_bit_valid   (rx_bit_valid)
  );

  tx_digital u_txd (
    .clk              (ref_clk),
    .rst              (reset),
    .bit_tick         (ser_tick),
    .disp_clear       (mode_change),
    .datain           (mux_b),
    .ser_out          (tx_pcie),
    .tx_frame_started (tx_frame)
  );

  tx_digital u_lfsr_txd (
    .clk              (ref_clk),
    .rst              (reset),
    .bit_tick         (ser_tick),
    .disp_clear       (mode_change),
    .datain           (lfsr_word),
    .ser_out          (tx_pcie2),
    .tx_frame_started (tx_frame2)
  );

  assign rx_in = rx_pass ? rx_data : '0;

  // ------------------------------------------------------------ test blocks
  lfsr #(.WIDTH(LFSR_W)) u_lfsr (
    .clk       (ref_clk),
    .rst       (reset),
    .seed      (seed),
    .load      (lfsr_load),
    .enable    (lfsr_enable),
    .q         (q),
    .state_out (state_out)
  );

  test_ctrl u_ctrl (
    .clk            (ref_clk),
    .rst            (reset),
    .mode           (mode),
    .lfsr_tick      (lfsr_tick),
    .tx_frame       (tx_frame),
    .tx_frame2      (tx_frame2),
    .comma_detected (rx_comma),
    .data_valid     (rx_valid),
    .rx_char        (rx_data),
    .state_out      (state_out),
    .rx_an          (sout_a),
    .seed           (seed),
    .lfsr_load      (lfsr_load),
    .lfsr_enable    (lfsr_enable),
    .lfsr_word      (lfsr_word),
    .rx_pass        (rx_pass),
    .cmp_par_en     (cmp_par_en),
    .cmp_ser_en     (cmp_ser_en),
    .fd_in          (fd_in),
    .mode_change    (mode_change)
  );

  freq_div u_fdiv (
    .rx_an     (fd_in),
    .rst       (reset),
    .rx_an_div (rx_an_div)
  );

  bypass_mux #(.N(4), .WIDTH(1)) u_mux_a (
    .in ({tx_pcie2, sout_b, testIn, tx_pcie}), .sel (sel.a), .q (mux_a));
  bypass_mux #(.N(3), .WIDTH(9)) u_mux_b (
    .in ({lfsr_word, rx_in, tx_data}),         .sel (sel.b), .q (mux_b));
  bypass_mux #(.N(4), .WIDTH(1)) u_mux_c (
    .in ({q, fd_in, testIn, tx_pcie}),         .sel (sel.c), .q (mux_c));
  bypass_mux #(.N(3), .WIDTH(1)) u_mux_d (
    .in ({tx_pcie2, rx_an_div, tx_pcie}),      .sel (sel.d), .q (mux_d));
  bypass_mux #(.N(2), .WIDTH(9)) u_mux_e (
    .in ({rx_data, {8'b0, tx_pcie}}),          .sel (sel.e), .q (mux_e));

  comparator u_cmp (
    .clk          (ref_clk),
    .rst          (reset),
    .par_en       (cmp_par_en),
    .ser_en       (cmp_ser_en),
    .bist_sel     (bist_sel),
    .in_word      (mux_b),
    .in_word_stb  (tx_frame),
    .out_word     (mux_e),
    .out_word_stb (rx_valid),
    .in_bit       (rx_bit),
    .in_bit_stb   (rx_bit_valid),
    .out_bit      (mux_e[0]),
    .out_bit_stb  (mid_tick),
    .marker       (SYNC_MARKER),
    .bist         (bist),
    .result       (bist_result),
    .done         (bist_done)
  );

  // ------------------------------------------------------------ output pins
  assign txa_data_p = mux_c;
  assign txa_data_n = ~mux_c;

  always_ff @(posedge ref_clk or posedge reset) begin
    if (reset) begin
      testOut_P <= 1'b0;
      testOut_N <= 1'b0;
    end else begin
      testOut_P <= mux_d;
      testOut_N <= ~mux_d;
    end
  end

endmodule
