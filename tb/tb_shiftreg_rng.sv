// tb_shiftreg_rng: checks the xorshift32 generator against a 64-bit software
// model, against the known first values from seed 1, its hold when step is
// low, and the replacement of a zero seed.
module tb_shiftreg_rng;
  import ising_pkg::*;
  import ising_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  step;
  rand_t rnd_a, rnd_b, rnd_z;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  shiftreg_rng #(.SEED(32'h1))          dut_a (.clk, .rst_n, .step, .rnd(rnd_a));
  shiftreg_rng #(.SEED(32'hDEAD_BEEF))  dut_b (.clk, .rst_n, .step, .rnd(rnd_b));
  shiftreg_rng #(.SEED(32'h0))          dut_z (.clk, .rst_n, .step, .rnd(rnd_z));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ma, mb;
    rst_n = 1'b0; step = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    check("seed a", rnd_a, 32'h1);
    check("seed b", rnd_b, 32'hDEAD_BEEF);
    check("zero seed replaced", rnd_z, 32'h1);
    // Known values of xorshift32 from state 1.
    step = 1'b1;
    @(posedge clk); #1 check("seed1 step1", rnd_a, 32'd270369);
    @(posedge clk); #1 check("seed1 step2", rnd_a, 32'd67634689);
    @(posedge clk); #1 check("seed1 step3", rnd_a, 32'd2647435461);
    ma = 32'd2647435461;
    mb = rnd_b;
    for (int n = 0; n < 500; n++) begin
      step = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (step) begin
        ma = ref_xorshift(ma);
        mb = ref_xorshift(mb);
      end
      check("seq a", rnd_a, ma);
      check("seq b", rnd_b, mb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
