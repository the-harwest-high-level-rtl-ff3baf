// tb_ising_fu: one Functional Unit with random neighbour inputs.
// The model holds the FU's two columns at rest positions, picks the column
// of the step from the checkerboard rule, forms the neighbour sum as an
// integer sum of +1/-1 values, draws from a software xorshift32 and applies
// rand < HBT(nbs). Every clock it checks the two exported products; after
// each sweep it reads back all sites. Two units with even and odd row index
// are tested, and host writes during a run must be dropped.
module tb_ising_fu;
  import ising_pkg::*;
  import ising_ref_pkg::*;

  localparam int L  = 6;
  localparam int KW = $clog2(L);
  localparam rand_t SEED0 = 32'h1234_5678;
  localparam rand_t SEED1 = 32'h0BAD_CAFE;

  logic          clk = 1'b0;
  logic          rst_n, run, par;
  logic          px_minus, px_plus, py_west, py_east;
  logic          px_out [2], py_out [2];
  logic          hbt_we;
  nbs_idx_t      hbt_addr;
  rand_t         hbt_data;
  logic          site_we, site_col, rd_col;
  logic [KW-1:0] site_k, rd_k;
  site_t         site_wdata, rd_data [2];
  site_t         m [2][2][L];
  int unsigned   rng [2];
  int unsigned   hbt [7];
  int            checks = 0, failures = 0, ups = 0, downs = 0;

  always #5 clk = ~clk;

  for (genvar u = 0; u < 2; u++) begin : g_fu
    ising_fu #(.L(L), .ROW(u + 2), .SEED(u == 0 ? SEED0 : SEED1)) dut (
      .clk, .rst_n, .run, .par, .px_minus, .px_plus, .py_west, .py_east,
      .px_out(px_out[u]), .py_out(py_out[u]), .hbt_we, .hbt_addr, .hbt_data,
      .site_we, .site_col, .site_k, .site_wdata, .rd_col, .rd_k, .rd_data(rd_data[u]));
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; run = 0; par = 0; hbt_we = 0; hbt_addr = '0; hbt_data = '0;
    site_we = 0; site_col = 0; site_k = '0; site_wdata = '0; rd_col = 0; rd_k = '0;
    px_minus = 0; px_plus = 0; py_west = 0; py_east = 0;
    rng[0] = SEED0; rng[1] = SEED1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < 7; a++) begin
      hbt[a] = ref_hbt(0.4, 2 * a - 6);
      hbt_we = 1; hbt_addr = 3'(a); hbt_data = hbt[a];
      @(posedge clk); #1;
    end
    hbt_we = 0;
    // Both units receive the same writes; their sites are the same.
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < L; k++) begin
        site_we = 1; site_col = c[0]; site_k = KW'(k); site_wdata = site_t'(4'($urandom));
        m[0][c][k] = site_wdata; m[1][c][k] = site_wdata;
        @(posedge clk); #1;
      end
    site_we = 0;
    for (int sw = 0; sw < 6; sw++) begin
      for (int p = 0; p < 2; p++)
        for (int k = 0; k < L; k++) begin
          logic [1:0] nsp;
          run = 1; par = 1'((k + p) % 2);
          px_minus = $urandom_range(0, 1); px_plus = $urandom_range(0, 1);
          py_west  = $urandom_range(0, 1); py_east = $urandom_range(0, 1);
          site_we = 1; site_wdata = '0; site_col = 0; site_k = '0;  // must be dropped
          #1;
          for (int u = 0; u < 2; u++) begin
            int c, o, nbs;
            site_t so, zp, zm;
            c  = (u + 2 + k + p) % 2;
            o  = 1 - c;
            so = m[u][o][k];
            zp = m[u][c][(k + 1) % L];
            zm = m[u][c][(k + L - 1) % L];
            check("px_out", px_out[u], (pm(so.spin) * pm(so.jx) > 0));
            check("py_out", py_out[u], (pm(so.spin) * pm(so.jy) > 0));
            nbs = pm(px_minus) + pm(px_plus)
                + (c == 0 ? pm(py_west) : pm(so.spin) * pm(so.jy))
                + (c == 0 ? pm(so.spin) * pm(so.jy) : pm(py_east))
                + pm(zp.spin) * pm(zp.jz) + pm(zm.spin) * pm(zm.jz);
            nsp[u] = (rng[u] < hbt[(nbs + 6) / 2]);
            if (nsp[u]) ups++; else downs++;
            rng[u] = ref_xorshift(rng[u]);
          end
          @(posedge clk); #1;
          for (int u = 0; u < 2; u++) m[u][(u + 2 + k + p) % 2][k].spin = nsp[u];
        end
      run = 0; site_we = 0;
      for (int u = 0; u < 2; u++)
        for (int c = 0; c < 2; c++)
          for (int k = 0; k < L; k++) begin
            rd_col = c[0]; rd_k = KW'(k); #1;
            check($sformatf("fu%0d site c%0d k%0d", u, c, k), rd_data[u], m[u][c][k]);
          end
    end
    check("both outcomes seen", int'(ups > 0 && downs > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
