// prng: 16-bit pseudo random number generator for the key generator.
//
// A Fibonacci linear feedback shift register with the maximal-length
// polynomial x^16 + x^14 + x^13 + x^11 + 1: on each enabled clock the
// register shifts left by one and the XOR of bits 15, 13, 12 and 10 enters
// at bit 0. Every non-zero state recurs after 65535 steps. The all-zero
// state is never entered: a zero seed is replaced by the SEED parameter.
//
// Interface: load (priority over step) copies seed into the register; step
// advances it by one position; value is the current state. All changes
// take effect at the rising clock edge, value is valid in the next cycle.
//
// The document asks only for a generator of 16-bit pseudo random numbers;
// the LFSR, its polynomial and the seed handling are this design's choice.
module prng #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [15:0] seed,
  input  logic        step,
  output logic [15:0] value
);
  logic [15:0] state;
  logic        fb;

  assign fb = state[15] ^ state[13] ^ state[12] ^ state[10];

  always_ff @(posedge clk) begin
    if (rst)       state <= SEED;
    else if (load) state <= (seed == '0) ? SEED : seed;
    else if (step) state <= {state[14:0], fb};
  end

  assign value = state;
endmodule
