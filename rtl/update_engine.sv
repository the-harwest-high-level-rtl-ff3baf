// update_engine: heat-bath decision for one site.
//
// The new spin is +1 (bit 1) when the locally drawn random value is below
// the table threshold HBT(nbs), and -1 (bit 0) otherwise, as the kernel's
// "if (rand() < HBT(nbs))" does. The comparison is unsigned over 32 bits.
// Purely combinational; the FU writes the result into its column store.
// The rule is the kernel's; the 32-bit unsigned form is this design's.
module update_engine
  import ising_pkg::*;
(
  input  rand_t rnd,
  input  rand_t threshold,
  output logic  new_spin
);

  assign new_spin = (rnd < threshold);

endmodule
