// ising_fu: one Functional Unit of the Heat-Bath array.
//
// It owns the two lattice columns (ROW, 2*PAIR) and (ROW, 2*PAIR+1) and
// updates one site per clock: a random number generator, the heat-bath
// table HBT[7], the computing engine (local energy nbs as table address)
// and the update engine (rand < HBT(nbs)), around a column_store.
//
// Schedule (checkerboard): a lattice sweep is two half-sweeps of L steps.
// In half-sweep p at step k every FU updates the one site of its pair at
// (ROW, j, k) whose parity (ROW+j+k) mod 2 equals p, i.e. column
// c = (ROW + k + p) mod 2. All sites updated in the same half-sweep have
// only opposite-parity neighbours, which hold still, so the result equals
// a sequential heat-bath pass over one parity then the other.
//
// Neighbour traffic: the other column of the pair (o = 1-c) is at rest; its
// head is exactly the site the x-neighbour FUs (ROW+-1, same pair) need,
// and the site the y-neighbour FU on one side needs. So each FU exports two
// bits per clock, px_out = spin*Jx and py_out = spin*Jy of that resting
// head, and takes px from the FUs above and below and py from the FUs left
// and right. The y neighbours of the updated site are its own other column
// and one column of the neighbouring pair: for c = 0 the pair to the left
// (py_west), for c = 1 the pair to the right (py_east). The k neighbours
// come from the column store taps. All of this is combinational within the
// clock: the new spin is written at the edge that ends the step.
//
// Inputs `run` and `par` = (k + p) mod 2 come from the sweep controller.
// The host ports (table write, site write/read) are used while `run` is low.
// The four parts of the unit and the one-site-per-clock rate follow the
// architecture; the checkerboard column-pair schedule, the rotating storage
// and the two-bit neighbour exchange are this design's own.
module ising_fu
  import ising_pkg::*;
#(
  parameter int unsigned L    = 24,
  parameter int unsigned ROW  = 0,
  parameter rand_t       SEED = 32'h2545_F491,
  parameter int unsigned KW   = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // step control
  input  logic          run,
  input  logic          par,
  // neighbour links
  input  logic          px_minus,   // px_out of FU (ROW-1, PAIR)
  input  logic          px_plus,    // px_out of FU (ROW+1, PAIR)
  input  logic          py_west,    // py_out of FU (ROW, PAIR-1)
  input  logic          py_east,    // py_out of FU (ROW, PAIR+1)
  output logic          px_out,
  output logic          py_out,
  // heat-bath table load
  input  logic          hbt_we,
  input  nbs_idx_t      hbt_addr,
  input  rand_t         hbt_data,
  // host access to the two columns
  input  logic          site_we,
  input  logic          site_col,
  input  logic [KW-1:0] site_k,
  input  site_t         site_wdata,
  input  logic          rd_col,
  input  logic [KW-1:0] rd_k,
  output site_t         rd_data
);

  site_t    head [2];
  site_t    next [2];
  site_t    prev [2];
  logic     c, o;
  logic     py_own;
  logic     py_minus, py_plus;
  nbs_idx_t nbs_idx;
  rand_t    rnd, threshold;
  logic     new_spin;

  assign c = par ^ 1'(ROW % 2);
  assign o = ~c;

  column_store #(.L(L), .KW(KW)) u_store (
    .clk     (clk),
    .shift   (run),
    .upd_col (c),
    .upd_spin(new_spin),
    .head    (head),
    .next    (next),
    .prev    (prev),
    .we      (site_we && !run),
    .wcol    (site_col),
    .wk      (site_k),
    .wdata   (site_wdata),
    .rcol    (rd_col),
    .rk      (rd_k),
    .rdata   (rd_data)
  );

  // Exports: products of the resting head.
  assign px_out = pm_mul(head[o].spin, head[o].jx);
  assign py_own = pm_mul(head[o].spin, head[o].jy);
  assign py_out = py_own;

  assign py_minus = c ? py_own  : py_west;
  assign py_plus  = c ? py_east : py_own;

  energy_engine u_energy (
    .px_minus(px_minus),
    .px_plus (px_plus),
    .py_minus(py_minus),
    .py_plus (py_plus),
    .z_minus (prev[c]),
    .z_plus  (next[c]),
    .nbs_idx (nbs_idx)
  );

  shiftreg_rng #(.SEED(SEED)) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .step (run),
    .rnd  (rnd)
  );

  hbt_lut u_hbt (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (hbt_we && !run),
    .waddr(hbt_addr),
    .wdata(hbt_data),
    .raddr(nbs_idx),
    .rdata(threshold)
  );

  update_engine u_update (
    .rnd      (rnd),
    .threshold(threshold),
    .new_spin (new_spin)
  );

endmodule
