// tb_acso - checks the pipelined ACSO kernel cycle by cycle.
// Random metrics (0..255), branch metrics (0..127) and re-scale requests are
// applied every cycle; the stage-1 sums, the `over` flag of stage 3 and the
// output of stage 4 are compared with the reference max* (floating-point
// correction term) at their expected latencies of 1, 3 and 4 cycles.
`timescale 1ns/1ps
module tb_acso;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 2000;
  logic clk = 0;
  always #5 clk = ~clk;

  metric_t [1:0] m;
  bm_t [1:0] g;
  logic rescale, over;
  sum_t [1:0] sum;
  metric_t m_out;

  acso dut (.*);

  int im0 [T], im1 [T], ig0 [T], ig1 [T], ir [T];
  int checks = 0, failures = 0;

  function automatic int pre(int t);
    return mstar(im0[t] + ig0[t], im1[t] + ig1[t]);
  endfunction

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) begin
      int p, e;
      @(negedge clk);
      im0[t] = $urandom_range(255, 0); im1[t] = $urandom_range(255, 0);
      ig0[t] = $urandom_range(127, 0); ig1[t] = $urandom_range(127, 0);
      if (t % 7 == 3) im1[t] = im0[t] + ig0[t] - ig1[t] + $urandom_range(3, 0);
      if (im1[t] > 255 || im1[t] < 0) im1[t] = 10;
      ir[t]  = $urandom_range(1, 0);
      m[0] = 9'(im0[t]); m[1] = 9'(im1[t]); g[0] = 7'(ig0[t]); g[1] = 7'(ig1[t]);
      rescale = ir[t][0];
      @(posedge clk); #1;
      checks++;
      if (int'(sum[0]) != im0[t] + ig0[t] || int'(sum[1]) != im1[t] + ig1[t]) failures++;
      if (t >= 3) begin
        p = pre(t - 3);
        e = (ir[t] == 0) ? p : (p > 128 ? p - 128 : 0);
        checks++;
        if (int'(m_out) != (e & 511)) begin
          failures++;
          if (failures < 10) $display("t=%0d m_out %0d expected %0d", t, m_out, e);
        end
      end
      if (t >= 2) begin
        checks++;
        if (over != (pre(t - 2) > 128)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
