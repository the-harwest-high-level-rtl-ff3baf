// tb_update_engine: the heat-bath decision rand < HBT(nbs), unsigned, over
// boundary and random values.
module tb_update_engine;
  import ising_pkg::*;

  rand_t rnd, threshold;
  logic  new_spin;
  int    checks = 0, failures = 0;

  update_engine dut (.rnd, .threshold, .new_spin);

  task automatic try(input rand_t r, input rand_t t);
    logic exp;
    rnd = r; threshold = t; #1;
    exp = ({1'b0, r} < {1'b0, t});
    checks++;
    if (new_spin !== exp) begin
      failures++;
      $display("FAIL rnd=%h thr=%h: got %b", r, t, new_spin);
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
    try(32'h0, 32'h0);
    try(32'h0, 32'h1);
    try(32'h7FFF_FFFF, 32'h8000_0000);
    try(32'h8000_0000, 32'h8000_0000);
    try(32'h8000_0001, 32'h8000_0000);
    try(32'hFFFF_FFFE, 32'hFFFF_FFFF);
    try(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    try(32'hFFFF_FFFF, 32'h0);
    for (int n = 0; n < 2000; n++) begin
      rand_t t;
      t = $urandom;
      try($urandom, t);
      try(t - 32'(n % 3), t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
