// ising_pkg: types and constants shared by the Heat-Bath Ising engine.
//
// A lattice site carries four bits: its spin and the three coupling
// coefficients Jx, Jy, Jz stored with it. Every one of these quantities is
// +1 or -1 and is encoded as one bit, 1 for +1 and 0 for -1. With that
// encoding the product of two such values is the XNOR of their bits.
// The heat-bath table (HBT) has seven entries because the neighbour sum
// nbs = sum of six +/-1 products takes only the values -6,-4,...,+6; the
// table is addressed by the number of +1 products, 0..6, i.e. (nbs+6)/2.
// Random numbers and table thresholds are 32-bit unsigned values.
package ising_pkg;

  localparam int unsigned RAND_W    = 32;  // random number / threshold width
  localparam int unsigned HBT_DEPTH = 7;   // entries of the heat-bath table
  localparam int unsigned NBS_W     = 3;   // width of the table address 0..6

  typedef logic [RAND_W-1:0] rand_t;
  typedef logic [NBS_W-1:0]  nbs_idx_t;

  // One lattice site: spin and the couplings indexed by this site.
  typedef struct packed {
    logic spin;  // 1: spin up (+1), 0: spin down (-1)
    logic jx;    // Jx of this site, 1: +1, 0: -1
    logic jy;    // Jy of this site
    logic jz;    // Jz of this site
  } site_t;

  // Product of two +/-1 values in the one-bit encoding.
  function automatic logic pm_mul(input logic a, input logic b);
    return ~(a ^ b);
  endfunction

  // Threshold a table entry holds after reset: probability 1/2 (beta = 0).
  localparam rand_t HBT_RESET_VALUE = 32'h8000_0000;

  // Seed of the random number generator of FU number idx (row-major over
  // the FU grid): the base seed scrambled by a Weyl step, never zero.
  function automatic rand_t fu_seed(input rand_t base, input int unsigned idx);
    rand_t s;
    s = base ^ (rand_t'(idx + 1) * 32'h9E37_79B9);
    return (s == '0) ? rand_t'(1) : s;
  endfunction

endpackage
