// energy_engine: local energy of one site, used as the heat-bath table address.
//
// For the site being updated it forms the six products spin(nb)*J(nb) of
// the neighbour spins and the couplings stored with those neighbours, as the
// kernel's nbs sum does, and counts how many are +1. With the one-bit
// encoding (1 = +1, 0 = -1) a product is an XNOR, and the count n in 0..6
// gives nbs = 2n - 6. The count is the table address. Purely combinational.
//
// The six products arrive pre-formed from the neighbour sites' owners except
// for the two k-direction ones, which this block forms from the spin and
// Jz bits of the sites at k+1 and k-1.
// The sum itself is the kernel's; the bit encoding and the count-as-address
// form are this design's choices.
module energy_engine
  import ising_pkg::*;
(
  input  logic     px_minus,   // spin*Jx of site (i-1, j, k)
  input  logic     px_plus,    // spin*Jx of site (i+1, j, k)
  input  logic     py_minus,   // spin*Jy of site (i, j-1, k)
  input  logic     py_plus,    // spin*Jy of site (i, j+1, k)
  input  site_t    z_minus,    // site (i, j, k-1)
  input  site_t    z_plus,     // site (i, j, k+1)
  output nbs_idx_t nbs_idx     // number of +1 products, 0..6
);

  logic [5:0] prod;

  always_comb begin
    prod[0] = px_minus;
    prod[1] = px_plus;
    prod[2] = py_minus;
    prod[3] = py_plus;
    prod[4] = pm_mul(z_minus.spin, z_minus.jz);
    prod[5] = pm_mul(z_plus.spin,  z_plus.jz);
    nbs_idx = '0;
    for (int n = 0; n < 6; n++) nbs_idx = nbs_idx + NBS_W'(prod[n]);
  end

endmodule
