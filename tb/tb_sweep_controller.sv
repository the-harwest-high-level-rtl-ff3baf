// tb_sweep_controller: step and phase sequence, par = (k + phase) mod 2,
// exactly 2*L busy clocks per sweep with no gaps, one done pulse, start
// ignored while busy, and a zero-sweep start.
module tb_sweep_controller;
  localparam int L = 6;
  localparam int CW = $clog2(L);

  logic          clk = 1'b0;
  logic          rst_n, start;
  logic [15:0]   n_sweeps, sweeps_done;
  logic          run, par, phase, busy, done;
  logic [CW-1:0] k;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  sweep_controller #(.L(L)) dut (.clk, .rst_n, .start, .n_sweeps, .run, .par, .phase, .k,
                                 .sweeps_done, .busy, .done);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    rst_n = 0; start = 0; n_sweeps = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("idle after reset", busy, 0);
    for (int n = 0; n <= 4; n++) begin
      int cycles;
      cycles = 0;
      start = 1; n_sweeps = 16'(n);
      @(posedge clk); #1;
      start = 0;
      if (n == 0) begin
        check("zero sweeps: not busy", busy, 0);
        check("zero sweeps: done", done, 1);
        @(posedge clk); #1;
        check("zero sweeps: done once", done, 0);
        continue;
      end
      for (int s = 0; s < n; s++)
        for (int p = 0; p < 2; p++)
          for (int kk = 0; kk < L; kk++) begin
            check("run", run, 1);
            check("k", k, kk);
            check("phase", phase, p);
            check("par", par, (kk + p) % 2);
            check("sweeps_done", sweeps_done, s);
            check("no early done", done, 0);
            // A second start while busy is ignored.
            start = (kk == 2); n_sweeps = 16'd9;
            @(posedge clk); #1;
            start = 0;
            cycles++;
          end
      check("busy clocks = 2*L*n", cycles, 2 * L * n);
      check("done after last step", done, 1);
      check("idle after run", busy, 0);
      check("sweeps_done final", sweeps_done, n);
      @(posedge clk); #1;
      check("done is one pulse", done, 0);
      check("stays idle", busy, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
