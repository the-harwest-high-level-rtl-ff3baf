// tb_ising_top: end-to-end test of the engine at its default size
// (L = 24: 288 FUs, 13824 sites), with no parameter overrides.
// It loads a heat-bath table for beta = 0.3 and a random spin glass, runs
// one sweep, then two back-to-back sweeps, then a zero-sweep start, and
// after each run reads back all 13824 sites against the software reference.
// It checks the cycle count (2*L clocks per sweep), the done pulse, that
// host writes and a second start are ignored while busy, and counts how
// often each mechanism occurred: both half-sweep phases, every one of the
// seven energy levels, both update outcomes, table loads, dropped writes,
// ignored starts, back-to-back sweeps and the zero-sweep run. A mechanism
// that never occurs is a failure.
module tb_ising_top;
  import ising_pkg::*;
  import ising_ref_pkg::*;

  localparam int L  = 24;
  localparam int CW = $clog2(L);
  localparam rand_t BASE = 32'h2545_F491;   // the top's default seed base

  logic          clk = 1'b0;
  logic          rst_n, start, busy, done, phase, hbt_we, site_we;
  logic [15:0]   n_sweeps, sweeps_done;
  logic [CW-1:0] step_k;
  nbs_idx_t      hbt_addr;
  rand_t         hbt_data;
  logic [CW-1:0] site_i, site_j, site_k, rd_i, rd_j, rd_k;
  site_t         site_wdata, rd_data;
  site_t         lat [];
  int unsigned   rng [];
  int unsigned   hbt [7];
  int            hist [7];
  int            ups = 0, downs = 0;
  int            checks = 0, failures = 0;
  int            n_phase [2];
  int            n_hbt_loads = 0, n_dropped_writes = 0, n_ignored_starts = 0;
  int            n_back_to_back = 0, n_zero_runs = 0;

  always #5 clk = ~clk;

  ising_top dut (
    .clk, .rst_n, .start, .n_sweeps, .busy, .done, .sweeps_done, .phase, .step_k,
    .hbt_we, .hbt_addr, .hbt_data, .site_we, .site_i, .site_j, .site_k, .site_wdata,
    .rd_i, .rd_j, .rd_k, .rd_data);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic read_back(input string tag);
    int bad = 0;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < L; j++)
        for (int k = 0; k < L; k++) begin
          rd_i = CW'(i); rd_j = CW'(j); rd_k = CW'(k); #1;
          checks++;
          if (rd_data !== lat[idx3(L, i, j, k)]) begin
            failures++;
            bad++;
            if (bad < 6)
              $display("FAIL %s site (%0d,%0d,%0d): got %h expected %h", tag, i, j, k, rd_data,
                       lat[idx3(L, i, j, k)]);
          end
        end
  endtask

  // Run n sweeps; returns after done. Disturbs the run with a host write
  // and a second start, both of which must be ignored.
  task automatic run_sweeps(input int n);
    int cycles = 0;
    start = 1; n_sweeps = 16'(n);
    @(posedge clk); #1;
    start = 0;
    while (busy) begin
      n_phase[phase]++;
      if (cycles == 5) begin
        site_we = 1; site_i = '0; site_j = '0; site_k = '0; site_wdata = ~lat[0];
        start = 1; n_sweeps = 16'd7;
        n_dropped_writes++;
        n_ignored_starts++;
      end else begin
        site_we = 0; start = 0;
      end
      if (int'(sweeps_done) > 0 && int'(step_k) == 0 && phase == 1'b0 && cycles % (2 * L) == 0)
        n_back_to_back++;
      @(posedge clk); #1;
      cycles++;
    end
    site_we = 0; start = 0;
    check("clocks per run = 2*L*n", cycles, 2 * L * n);
    check("done at end of run", done, 1);
    check("sweeps_done", sweeps_done, n);
    for (int s = 0; s < n; s++) ref_sweep(L, lat, rng, hbt, hist, ups, downs);
    @(posedge clk); #1;
    check("done is one pulse", done, 0);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lat = new[L * L * L];
    rng = new[L * L / 2];
    foreach (rng[f]) rng[f] = ref_seed(BASE, f);
    foreach (hist[a]) hist[a] = 0;
    n_phase[0] = 0; n_phase[1] = 0;
    rst_n = 0; start = 0; n_sweeps = '0; hbt_we = 0; hbt_addr = '0; hbt_data = '0;
    site_we = 0; site_i = '0; site_j = '0; site_k = '0; site_wdata = '0;
    rd_i = '0; rd_j = '0; rd_k = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("idle after reset", busy, 0);
    for (int a = 0; a < 7; a++) begin
      hbt[a] = ref_hbt(0.3, 2 * a - 6);
      hbt_we = 1; hbt_addr = 3'(a); hbt_data = hbt[a];
      n_hbt_loads++;
      @(posedge clk); #1;
    end
    hbt_we = 0;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < L; j++)
        for (int k = 0; k < L; k++) begin
          site_we = 1; site_i = CW'(i); site_j = CW'(j); site_k = CW'(k);
          site_wdata = site_t'(4'($urandom));
          lat[idx3(L, i, j, k)] = site_wdata;
          @(posedge clk); #1;
        end
    site_we = 0;
    read_back("load");
    run_sweeps(1);
    read_back("after 1 sweep");
    run_sweeps(2);
    read_back("after 3 sweeps");
    // Zero sweeps: only the done pulse, lattice unchanged.
    start = 1; n_sweeps = '0;
    @(posedge clk); #1;
    start = 0;
    check("zero-sweep run: done", done, 1);
    check("zero-sweep run: not busy", busy, 0);
    n_zero_runs++;
    read_back("after zero-sweep run");

    $display("mechanisms: phase0=%0d phase1=%0d up=%0d down=%0d hbt_loads=%0d dropped_writes=%0d ignored_starts=%0d back_to_back=%0d zero_runs=%0d",
             n_phase[0], n_phase[1], ups, downs, n_hbt_loads, n_dropped_writes,
             n_ignored_starts, n_back_to_back, n_zero_runs);
    $display("energy levels nbs=-6..6: %0d %0d %0d %0d %0d %0d %0d",
             hist[0], hist[1], hist[2], hist[3], hist[4], hist[5], hist[6]);
    check("phase 0 occurred", int'(n_phase[0] > 0), 1);
    check("phase 1 occurred", int'(n_phase[1] > 0), 1);
    check("spin set up occurred", int'(ups > 0), 1);
    check("spin set down occurred", int'(downs > 0), 1);
    check("table load occurred", int'(n_hbt_loads > 0), 1);
    check("write while busy occurred", int'(n_dropped_writes > 0), 1);
    check("start while busy occurred", int'(n_ignored_starts > 0), 1);
    check("back-to-back sweep occurred", int'(n_back_to_back > 0), 1);
    check("zero-sweep run occurred", int'(n_zero_runs > 0), 1);
    for (int a = 0; a < 7; a++) check($sformatf("energy level %0d occurred", 2 * a - 6),
                                      int'(hist[a] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
