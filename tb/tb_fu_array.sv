// tb_fu_array: the FU grid at L = 6 (a 6 x 3 grid, so both torus rings wrap
// over more than two units), driven step by step as the control FSM does.
// After each sweep every site is read back and compared with the software
// reference sweep, which visits the sites in kernel order within each
// parity class and draws each site's random number from its owning FU's
// generator.
module tb_fu_array;
  import ising_pkg::*;
  import ising_ref_pkg::*;

  localparam int L  = 6;
  localparam int CW = $clog2(L);
  localparam rand_t BASE = 32'hC0FF_EE11;

  logic          clk = 1'b0;
  logic          rst_n, run, par, hbt_we, site_we;
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

  always #5 clk = ~clk;

  fu_array #(.L(L), .SEED_BASE(BASE)) dut (
    .clk, .rst_n, .run, .par, .hbt_we, .hbt_addr, .hbt_data, .site_we, .site_i, .site_j,
    .site_k, .site_wdata, .rd_i, .rd_j, .rd_k, .rd_data);

  initial begin
    #10000000;
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
    rst_n = 0; run = 0; par = 0; hbt_we = 0; hbt_addr = '0; hbt_data = '0; site_we = 0;
    site_i = '0; site_j = '0; site_k = '0; site_wdata = '0; rd_i = '0; rd_j = '0; rd_k = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < 7; a++) begin
      hbt[a] = ref_hbt(0.25, 2 * a - 6);
      hbt_we = 1; hbt_addr = 3'(a); hbt_data = hbt[a];
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
    for (int sw = 0; sw < 8; sw++) begin
      for (int p = 0; p < 2; p++)
        for (int k = 0; k < L; k++) begin
          run = 1; par = 1'((k + p) % 2);
          @(posedge clk); #1;
        end
      run = 0;
      ref_sweep(L, lat, rng, hbt, hist, ups, downs);
      for (int i = 0; i < L; i++)
        for (int j = 0; j < L; j++)
          for (int k = 0; k < L; k++) begin
            rd_i = CW'(i); rd_j = CW'(j); rd_k = CW'(k); #1;
            checks++;
            if (rd_data !== lat[idx3(L, i, j, k)]) begin
              failures++;
              if (failures < 10)
                $display("FAIL sweep %0d site (%0d,%0d,%0d): got %h expected %h", sw, i, j, k,
                         rd_data, lat[idx3(L, i, j, k)]);
            end
          end
    end
    checks++;
    if (ups == 0 || downs == 0) begin failures++; $display("FAIL one outcome never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
