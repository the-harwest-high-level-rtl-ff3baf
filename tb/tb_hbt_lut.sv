// tb_hbt_lut: reset contents, writes to all seven entries, ignored writes
// to address 7, and combinational reads of the heat-bath table.
module tb_hbt_lut;
  import ising_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n, we;
  nbs_idx_t waddr, raddr;
  rand_t    wdata, rdata;
  rand_t    model [7];
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  hbt_lut dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 7; n++) begin
      model[n] = 32'h8000_0000;
      raddr = 3'(n); #1;
      checks++;
      if (rdata !== model[n]) begin failures++; $display("FAIL reset entry %0d: %h", n, rdata); end
    end
    for (int n = 0; n < 400; n++) begin
      we    = ($urandom_range(0, 1) == 1);
      waddr = 3'($urandom_range(0, 7));
      wdata = $urandom;
      @(posedge clk); #1;
      if (we && waddr != 3'd7) model[waddr] = wdata;
      we = 1'b0;
      for (int a = 0; a < 7; a++) begin
        raddr = 3'(a); #1;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL entry %0d: got %h expected %h", a, rdata, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
