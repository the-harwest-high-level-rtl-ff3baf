// column_store: the lattice sites owned by one Functional Unit.
//
// An FU owns two neighbouring lattice columns (i, j) and (i, j+1), j even,
// each holding the L sites k = 0..L-1 along the third axis, one site_t
// (spin, Jx, Jy, Jz) per site. While the machine runs, both columns rotate
// by one place per clock as circular shift registers, so that position 0
// always holds site k of the current step, position 1 site k+1 and
// position L-1 site k-1: the neighbours along the k axis are fixed taps at
// delays 1 and L-1 of the loop. As the head of the column being updated
// moves to the tail it takes the new spin (its couplings are kept). After L
// steps the columns are back in their rest alignment, position k = site k,
// which is where the host reads and writes them.
//
// Interface: `shift` rotates both columns; `upd_col` selects the column
// whose head takes `upd_spin` in that same cycle. Host port: `we` writes
// `wdata` to site `wk` of column `wcol`; `rcol`/`rk` read a site
// combinationally. The host port must only be used while `shift` is low
// (a write during a shift is dropped). No reset: the contents are loaded
// by the host.
// Keeping the columns in rotating registers is this design's choice; the
// loop taps at delays 1 and L-1 mirror the self loops of each unit in the
// architecture's array diagram.
module column_store
  import ising_pkg::*;
#(
  parameter int unsigned L  = 24,
  parameter int unsigned KW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          shift,
  input  logic          upd_col,
  input  logic          upd_spin,
  output site_t         head  [2],  // site k
  output site_t         next  [2],  // site k+1 (mod L)
  output site_t         prev  [2],  // site k-1 (mod L)
  input  logic          we,
  input  logic          wcol,
  input  logic [KW-1:0] wk,
  input  site_t         wdata,
  input  logic          rcol,
  input  logic [KW-1:0] rk,
  output site_t         rdata
);

  site_t col_q [2][L];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int c = 0; c < 2; c++) begin
        for (int n = 0; n < L - 1; n++) col_q[c][n] <= col_q[c][n+1];
        col_q[c][L-1] <= col_q[c][0];
        if (upd_col == c[0]) col_q[c][L-1].spin <= upd_spin;
      end
    end else if (we && (int'(wk) < L)) begin
      col_q[wcol][wk] <= wdata;
    end
  end

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      head[c] = col_q[c][0];
      next[c] = col_q[c][(L > 1) ? 1 : 0];
      prev[c] = col_q[c][L-1];
    end
  end

  assign rdata = (int'(rk) < L) ? col_q[rcol][rk] : '0;

endmodule
