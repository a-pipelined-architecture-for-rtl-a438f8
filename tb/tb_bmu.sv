// tb_bmu - checks the branch metric unit against the definition of the
// unsigned branch metrics, over the full input ranges (saturation included),
// with the one-cycle latency.
`timescale 1ns/1ps
module tb_bmu;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  chan_t ls, lp;
  ext_t la;
  gamma_t gamma;

  bmu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int a, b, c;
      @(negedge clk);
      a = int'($urandom_range(63, 0)) - 32;
      b = int'($urandom_range(63, 0)) - 32;
      c = int'($urandom_range(127, 0)) - 64;
      if (t < 64) begin a = t - 32; b = 31 - t; c = 2 * t - 64; end
      ls = chan_t'(a); lp = chan_t'(b); la = ext_t'(c);
      @(posedge clk); #1;
      for (int u = 0; u < 2; u++)
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (int'(gamma[u*2+p]) != gam(a, b, c, u, p)) begin
            failures++;
            if (failures < 10) $display("ls=%0d lp=%0d la=%0d u=%0d p=%0d got %0d", a, b, c, u, p, gamma[u*2+p]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
