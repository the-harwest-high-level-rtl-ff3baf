// ising_top: special-purpose Heat-Bath Monte Carlo engine for the 3D
// Edwards-Anderson spin glass on an L x L x L periodic lattice.
//
// It is an array of L x L/2 Functional Units (fu_array), each owning two
// lattice columns along the k axis, run in lockstep by a control FSM
// (sweep_controller). One full lattice update takes 2*L clocks: 2*24 = 48
// clocks for L^3 = 13824 sites at the default size.
//
// Host interface (use while busy is low):
//  - hbt_we/hbt_addr/hbt_data: write entry hbt_addr (0..6, = (nbs+6)/2) of
//    the heat-bath table; the write reaches the table copy of every FU.
//  - site_we/site_i/site_j/site_k/site_wdata: write spin and couplings of
//    one site. rd_i/rd_j/rd_k: combinational read of one site on rd_data.
//  - start/n_sweeps: run n_sweeps lattice updates; busy is high meanwhile
//    and done pulses once at the end. Writes while busy are dropped.
//    phase/step_k show the position in the current sweep.
// Synchronous active-low reset; the lattice contents are not reset.
// Array size, unit contents and sweep time follow the architecture; the host
// interface and the handshake are this design's own.
module ising_top
  import ising_pkg::*;
#(
  parameter int unsigned L         = 24,
  parameter rand_t       SEED_BASE = 32'h2545_F491,
  parameter int unsigned CW        = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   n_sweeps,
  output logic          busy,
  output logic          done,
  output logic [15:0]   sweeps_done,
  output logic          phase,        // current half-sweep parity
  output logic [CW-1:0] step_k,       // current step k within the half-sweep
  input  logic          hbt_we,
  input  nbs_idx_t      hbt_addr,
  input  rand_t         hbt_data,
  input  logic          site_we,
  input  logic [CW-1:0] site_i,
  input  logic [CW-1:0] site_j,
  input  logic [CW-1:0] site_k,
  input  site_t         site_wdata,
  input  logic [CW-1:0] rd_i,
  input  logic [CW-1:0] rd_j,
  input  logic [CW-1:0] rd_k,
  output site_t         rd_data
);

  logic          run, par;

  sweep_controller #(.L(L), .CW(CW), .SW(16)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .n_sweeps   (n_sweeps),
    .run        (run),
    .par        (par),
    .phase      (phase),
    .k          (step_k),
    .sweeps_done(sweeps_done),
    .busy       (busy),
    .done       (done)
  );

  fu_array #(.L(L), .SEED_BASE(SEED_BASE), .CW(CW)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .run       (run),
    .par       (par),
    .hbt_we    (hbt_we),
    .hbt_addr  (hbt_addr),
    .hbt_data  (hbt_data),
    .site_we   (site_we),
    .site_i    (site_i),
    .site_j    (site_j),
    .site_k    (site_k),
    .site_wdata(site_wdata),
    .rd_i      (rd_i),
    .rd_j      (rd_j),
    .rd_k      (rd_k),
    .rd_data   (rd_data)
  );

endmodule
