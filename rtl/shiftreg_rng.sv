// shiftreg_rng: 32-bit shift-register feedback random number generator.
//
// Each Functional Unit owns one of these and draws one 32-bit number per
// update. The generator is Marsaglia's xorshift32, a shift-register
// generator with period 2^32-1: the state is fed back through three
// shift-and-xor stages, x ^= x<<13; x ^= x>>17; x ^= x<<5. Which feedback
// a 32-bit shift-register generator uses is this design's choice.
//
// Interface: `rnd` is the current state, valid every cycle. When `step` is
// high the state advances to the next value at the rising clock edge.
// `rst_n` (active low, synchronous) loads SEED; a zero seed, which would lock
// the generator, is replaced by 1.
module shiftreg_rng
  import ising_pkg::*;
#(
  parameter rand_t SEED = 32'h2545_F491
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  output rand_t rnd
);

  localparam rand_t SEED_NZ = (SEED == '0) ? rand_t'(1) : SEED;

  rand_t state;

  function automatic rand_t xorshift32(input rand_t x);
    rand_t y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n)    state <= SEED_NZ;
    else if (step) state <= xorshift32(state);
  end

  assign rnd = state;

endmodule
