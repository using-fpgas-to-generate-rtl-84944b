// lfsr32: 32-bit linear feedback shift register for pseudo-random test data.
//
// Fibonacci form with the maximal-length taps 32, 22, 2, 1 (period 2^32-1).
// load copies the seed in (a zero seed, which would lock the register, is
// replaced by 1); step shifts once. The low byte of the state is the data
// byte. The document asks for "a simple random pattern derived from a seed
// value and a linear feedback shift register"; the polynomial and one shift
// per byte are this design's own choices.
module lfsr32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] seed,
  input  logic        step,
  output logic [31:0] state
);
  logic fb;
  assign fb = state[31] ^ state[21] ^ state[1] ^ state[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= 32'd1;
    else if (load)  state <= (seed == 32'd0) ? 32'd1 : seed;
    else if (step)  state <= {state[30:0], fb};
  end
endmodule
