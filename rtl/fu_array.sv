// fu_array: the L x L/2 grid of Functional Units with torus links.
//
// FU (x, y) owns lattice columns (i = x, j = 2y) and (x, 2y+1). Each FU
// passes its two one-bit neighbour products to the four grid neighbours:
// px along the x axis to FUs (x-1, y) and (x+1, y), py along the y axis to
// FUs (x, y-1) and (x, y+1). Both grid directions close into rings (x mod
// L, y mod L/2), which gives the periodic boundary of the lattice; the k
// axis is closed inside each FU's rotating columns. All FUs run in lockstep
// from the same `run`/`par`; the host ports are decoded here from lattice
// coordinates (i, j, k) to one FU and one of its columns.
//
// The links are combinational (zero clock delay): an FU's update uses the
// products its neighbours present in the same clock. L must be even.
// The L x L/2 grid on a torus follows the architecture; the assignment of
// columns to units, the link contents and the host decode are this design's.
module fu_array
  import ising_pkg::*;
#(
  parameter int unsigned L         = 24,
  parameter rand_t       SEED_BASE = 32'h2545_F491,
  parameter int unsigned CW        = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          par,
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

  localparam int unsigned H = L / 2;   // FUs per grid row

  logic  px [L][H];
  logic  py [L][H];
  site_t fu_rd [L][H];

  for (genvar x = 0; x < L; x++) begin : g_row
    for (genvar y = 0; y < H; y++) begin : g_col
      ising_fu #(
        .L   (L),
        .ROW (x),
        .SEED(fu_seed(SEED_BASE, x * H + y)),
        .KW  (CW)
      ) u_fu (
        .clk       (clk),
        .rst_n     (rst_n),
        .run       (run),
        .par       (par),
        .px_minus  (px[(x + L - 1) % L][y]),
        .px_plus   (px[(x + 1) % L][y]),
        .py_west   (py[x][(y + H - 1) % H]),
        .py_east   (py[x][(y + 1) % H]),
        .px_out    (px[x][y]),
        .py_out    (py[x][y]),
        .hbt_we    (hbt_we),
        .hbt_addr  (hbt_addr),
        .hbt_data  (hbt_data),
        .site_we   (site_we && (int'(site_i) == x) && (int'(site_j) / 2 == y)),
        .site_col  (site_j[0]),
        .site_k    (site_k),
        .site_wdata(site_wdata),
        .rd_col    (rd_j[0]),
        .rd_k      (rd_k),
        .rd_data   (fu_rd[x][y])
      );
    end
  end

  assign rd_data = (int'(rd_i) < L && int'(rd_j) < L) ? fu_rd[rd_i][rd_j / 2] : '0;

  initial begin
    assert (L >= 2 && L % 2 == 0)
      else $error("fu_array: L must be even and at least 2");
  end

endmodule
