// tb_column_store: host load and readback, then rotation with updates.
// The model keeps the sites at rest positions and a step counter s; the
// store must present site s, s+1 and s-1 (mod L) at its taps, write the
// new spin into site s of the selected column, drop host writes made
// during a shift, and be back at rest alignment after every L shifts.
module tb_column_store;
  import ising_pkg::*;

  localparam int L = 6;
  localparam int KW = $clog2(L);

  logic          clk = 1'b0;
  logic          shift, upd_col, upd_spin, we, wcol, rcol;
  logic [KW-1:0] wk, rk;
  site_t         wdata, rdata;
  site_t         head [2], next [2], prev [2];
  site_t         m [2][L];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  column_store #(.L(L)) dut (.clk, .shift, .upd_col, .upd_spin, .head, .next, .prev,
                             .we, .wcol, .wk, .wdata, .rcol, .rk, .rdata);

  task automatic check(input string what, input site_t got, input site_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic read_all();
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < L; k++) begin
        rcol = c[0]; rk = KW'(k); #1;
        check($sformatf("read c%0d k%0d", c, k), rdata, m[c][k]);
      end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; upd_col = 0; upd_spin = 0; we = 0; wcol = 0; wk = '0; wdata = '0;
    rcol = 0; rk = '0;
    @(posedge clk); #1;
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < L; k++) begin
        we = 1; wcol = c[0]; wk = KW'(k); wdata = site_t'(4'($urandom));
        m[c][k] = wdata;
        @(posedge clk); #1;
      end
    we = 0;
    read_all();
    for (int round = 0; round < 4; round++) begin
      for (int s = 0; s < L; s++) begin
        shift = 1; upd_col = $urandom_range(0, 1); upd_spin = $urandom_range(0, 1);
        // A host write during a shift must be dropped.
        we = 1; wcol = $urandom_range(0, 1); wk = KW'($urandom_range(0, L - 1)); wdata = '1;
        #1;
        for (int c = 0; c < 2; c++) begin
          check("head", head[c], m[c][s]);
          check("next", next[c], m[c][(s + 1) % L]);
          check("prev", prev[c], m[c][(s + L - 1) % L]);
        end
        @(posedge clk); #1;
        m[upd_col][s].spin = upd_spin;
      end
      shift = 0; we = 0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
