// tb_ising_physics: physical sanity runs of the engine at its default size
// (L = 24, no parameter overrides), checked only through the ports.
// The expected outcomes come from known 3D Ising physics (critical inverse
// temperature about 0.2217), not from a model of the hardware:
//  1. Ferromagnet (all J = +1) at beta = 0.5, ordered start: after 20
//     sweeps the magnetization stays above 0.9 (equilibrium value ~0.98).
//  2. Same couplings at beta = 0.1 (far above Tc), ordered start: after 20
//     sweeps |magnetization| is below 0.05 (its spread is about 0.01).
//  3. Antiferromagnet (all J = -1) at beta = 0.5, start all +1: the
//     staggered magnetization, sum of (-1)^(i+j+k) s, exceeds 0.9 in size,
//     and the plain magnetization is below 0.05 in size.
// It also checks 2*L clocks per sweep on every run.
module tb_ising_physics;
  import ising_pkg::*;

  localparam int L  = 24;
  localparam int CW = $clog2(L);
  localparam int NSITES = L * L * L;

  logic          clk = 1'b0;
  logic          rst_n, start, busy, done, phase, hbt_we, site_we;
  logic [15:0]   n_sweeps, sweeps_done;
  logic [CW-1:0] step_k;
  nbs_idx_t      hbt_addr;
  rand_t         hbt_data;
  logic [CW-1:0] site_i, site_j, site_k, rd_i, rd_j, rd_k;
  site_t         site_wdata, rd_data;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  ising_top dut (
    .clk, .rst_n, .start, .n_sweeps, .busy, .done, .sweeps_done, .phase, .step_k,
    .hbt_we, .hbt_addr, .hbt_data, .site_we, .site_i, .site_j, .site_k, .site_wdata,
    .rd_i, .rd_j, .rd_k, .rd_data);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load_table(input real beta);
    for (int a = 0; a < 7; a++) begin
      real p, t;
      p = 1.0 / (1.0 + $exp(-2.0 * beta * real'(2 * a - 6)));
      t = p * 4294967296.0;
      hbt_we = 1; hbt_addr = 3'(a);
      hbt_data = (t >= 4294967295.0) ? 32'hFFFF_FFFF : rand_t'(longint'(t));
      @(posedge clk); #1;
    end
    hbt_we = 0;
  endtask

  task automatic load_uniform(input logic spin, input logic j);
    for (int i = 0; i < L; i++)
      for (int jj = 0; jj < L; jj++)
        for (int k = 0; k < L; k++) begin
          site_we = 1; site_i = CW'(i); site_j = CW'(jj); site_k = CW'(k);
          site_wdata = '{spin: spin, jx: j, jy: j, jz: j};
          @(posedge clk); #1;
        end
    site_we = 0;
  endtask

  task automatic run(input int n);
    int cycles = 0;
    start = 1; n_sweeps = 16'(n);
    @(posedge clk); #1;
    start = 0;
    while (busy) begin
      @(posedge clk); #1;
      cycles++;
    end
    check($sformatf("%0d sweeps took %0d clocks, expected %0d", n, cycles, 2 * L * n),
          cycles == 2 * L * n);
  endtask

  task automatic measure(output real m, output real ms);
    int sum = 0, ssum = 0;
    for (int i = 0; i < L; i++)
      for (int j = 0; j < L; j++)
        for (int k = 0; k < L; k++) begin
          int s;
          rd_i = CW'(i); rd_j = CW'(j); rd_k = CW'(k); #1;
          s = rd_data.spin ? 1 : -1;
          sum += s;
          ssum += ((i + j + k) % 2 == 0) ? s : -s;
        end
    m  = real'(sum) / real'(NSITES);
    ms = real'(ssum) / real'(NSITES);
  endtask

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, ms;
    rst_n = 0; start = 0; n_sweeps = '0; hbt_we = 0; hbt_addr = '0; hbt_data = '0;
    site_we = 0; site_i = '0; site_j = '0; site_k = '0; site_wdata = '0;
    rd_i = '0; rd_j = '0; rd_k = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    load_table(0.5);
    load_uniform(1'b1, 1'b1);
    run(20);
    measure(m, ms);
    $display("ferromagnet beta=0.5: m=%f", m);
    check($sformatf("ordered ferromagnet keeps m > 0.9 (m = %f)", m), m > 0.9);

    load_table(0.1);
    load_uniform(1'b1, 1'b1);
    run(20);
    measure(m, ms);
    $display("ferromagnet beta=0.1: m=%f", m);
    check($sformatf("hot ferromagnet loses its order, |m| < 0.05 (m = %f)", m), absr(m) < 0.05);

    load_table(0.5);
    load_uniform(1'b1, 1'b0);
    run(20);
    measure(m, ms);
    $display("antiferromagnet beta=0.5: m=%f staggered=%f", m, ms);
    check($sformatf("antiferromagnet orders, |staggered m| > 0.9 (%f)", ms), absr(ms) > 0.9);
    check($sformatf("antiferromagnet has |m| < 0.05 (%f)", m), absr(m) < 0.05);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
