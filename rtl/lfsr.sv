// lfsr -- 10-bit linear feedback shift register of the SerDes test module.
//
// Ten flip-flops in a chain. Each register has a two-way input multiplexer:
// while load is high it takes its bit of the seed, otherwise it takes the bit
// of its neighbour, and the first register takes the feedback
// state[9] ^ state[5] ^ state[4]. A register updates on a rising clock edge
// when enable or load is high. The pattern leaves the block in two forms:
// serially on q (the last register, one new bit per enabled cycle) and in
// parallel on state_out.
//
// Register count, seed multiplexers, serial and parallel outputs and the
// two-XOR feedback follow the document. The document's prose places the
// second XOR input at register 3 and its source code at register 4; this
// design follows the source code. Reset is asynchronous and active high and
// clears the register (a zero state is locked until a seed is loaded).
module lfsr #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] seed,
  input  logic             load,
  input  logic             enable,
  output logic             q,
  output logic [WIDTH-1:0] state_out
);

  logic feedback;
  logic [WIDTH-1:0] state_in;

  assign feedback = state_out[9] ^ state_out[5] ^ state_out[4];
  assign state_in = load ? seed : {state_out[WIDTH-2:0], feedback};
  assign q        = state_out[WIDTH-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                 state_out <= '0;
    else if (enable || load) state_out <= state_in;
  end

  initial assert (WIDTH >= 10) else $error("lfsr: taps need WIDTH >= 10");

endmodule
