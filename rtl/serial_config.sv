// serial_config -- serial settings input block of the SerDes test module.
//
// The chip has too few pins for its settings, so they arrive one bit at a
// time. Every rising edge of config_clk shifts data_config into bit 0 of a
// 24-bit shift register, so the first bit sent ends up in bit 23. A rising
// edge of set_config then copies the shift register into the output
// registers at once:
//   bits  3:0  -> mode            (operating mode, to the mode decoder)
//   bits  7:4  -> bist_sel        (which comparator result drives the bist pin)
//   bits 15:8  -> trans_config_p  (settings of the positive analog transmitter)
//   bits 23:16 -> trans_config_n  (settings of the negative analog transmitter)
// so a frame is sent as trans_config_n, trans_config_p, bist_sel, mode, each
// most significant bit first. Reset (asynchronous, active high) clears all.
//
// The field layout, the 24-bit length and the two clocks (config_clk for the
// shift register, set_config for the output registers) follow the document.
// The bit order (new bit in at bit 0) is read from its test waveform. The
// outputs change only on set_config and are treated as static by the
// ref_clk logic that uses them.
module serial_config #(
  parameter int unsigned FRAME_BITS = 24
) (
  input  logic       rst,
  input  logic       config_clk,
  input  logic       data_config,
  input  logic       set_config,
  output logic [3:0] mode,
  output logic [3:0] bist_sel,
  output logic [7:0] trans_config_p,
  output logic [7:0] trans_config_n
);

  logic [FRAME_BITS-1:0] config_in;

  always_ff @(posedge config_clk or posedge rst) begin
    if (rst) config_in <= '0;
    else     config_in <= {config_in[FRAME_BITS-2:0], data_config};
  end

  always_ff @(posedge set_config or posedge rst) begin
    if (rst) begin
      mode           <= '0;
      bist_sel       <= '0;
      trans_config_p <= '0;
      trans_config_n <= '0;
    end else begin
      mode           <= config_in[3:0];
      bist_sel       <= config_in[7:4];
      trans_config_p <= config_in[15:8];
      trans_config_n <= config_in[23:16];
    end
  end

endmodule
