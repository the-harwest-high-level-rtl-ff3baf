// hbt_lut: the heat-bath probability table HBT[7] of one Functional Unit.
//
// Entry n holds, as a 32-bit unsigned threshold, the probability that a spin
// whose neighbour sum is nbs = 2n-6 is set to +1; the update engine sets the
// spin when the random value is below the threshold. The table contents are
// not fixed in hardware: they depend on the simulated temperature and are
// written by the host through the write port (one entry per cycle, the same
// write reaching every FU). After reset every entry holds 0x8000_0000,
// probability 1/2 (infinite temperature). The read port is combinational.
// The seven-entry table per FU is part of the architecture; loading it from
// the host, the 32-bit threshold format and the reset value are this
// design's choices.
module hbt_lut
  import ising_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     we,
  input  nbs_idx_t waddr,
  input  rand_t    wdata,
  input  nbs_idx_t raddr,
  output rand_t    rdata
);

  rand_t table_q [HBT_DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < HBT_DEPTH; n++) table_q[n] <= HBT_RESET_VALUE;
    end else if (we && (waddr < NBS_W'(HBT_DEPTH))) begin
      table_q[waddr] <= wdata;
    end
  end

  // Addresses 7 never occur (at most six neighbour products are +1).
  assign rdata = (raddr < NBS_W'(HBT_DEPTH)) ? table_q[raddr] : '0;

endmodule
