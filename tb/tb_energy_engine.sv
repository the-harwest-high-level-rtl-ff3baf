// tb_energy_engine: exhaustive check of the local-energy address over all
// neighbour product and k-neighbour site combinations, against an integer
// sum of +1/-1 products.
module tb_energy_engine;
  import ising_pkg::*;
  import ising_ref_pkg::*;

  logic     px_minus, px_plus, py_minus, py_plus;
  site_t    z_minus, z_plus;
  nbs_idx_t nbs_idx;
  int       checks = 0, failures = 0;

  energy_engine dut (.px_minus, .px_plus, .py_minus, .py_plus, .z_minus, .z_plus, .nbs_idx);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 12); v++) begin
      int nbs;
      {px_minus, px_plus, py_minus, py_plus} = 4'(v);
      z_minus = site_t'(4'(v >> 4));
      z_plus  = site_t'(4'(v >> 8));
      #1;
      nbs = (px_minus ? 1 : -1) + (px_plus ? 1 : -1) + (py_minus ? 1 : -1) + (py_plus ? 1 : -1)
          + pm(z_minus.spin) * pm(z_minus.jz) + pm(z_plus.spin) * pm(z_plus.jz);
      checks++;
      if (int'(nbs_idx) * 2 - 6 != nbs) begin
        failures++;
        $display("FAIL v=%h: nbs_idx=%0d expected nbs=%0d", v, nbs_idx, nbs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
