// tb_llr_unit - checks the LLR unit against the reference Log-MAP LLR:
// random alpha+gamma branch sums, beta vectors, a-priori and systematic
// values every cycle; LLR, saturated extrinsic value, hard decision and the
// tags must appear 5 cycles after the inputs.
`timescale 1ns/1ps
module tb_llr_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid, hard;
  branch_sums_t sums;
  metric_vec_t beta;
  ext_t la, le;
  chan_t ls;
  logic [8:0] k, out_k;
  llr_t llr;

  llr_unit dut (.*);

  int e_llr [T], e_le [T], e_k [T];
  int checks = 0, failures = 0;

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T + 5; t++) begin
      int tt [2][NS], m [2], a, s;
      @(negedge clk);
      in_valid = (t < T);
      for (int st = 0; st < NS; st++) begin
        beta[st] = 9'($urandom_range(t % 3 == 0 ? 20 : 255, 0));
        for (int x = 0; x < 2; x++) sums[st][x] = 10'($urandom_range(t % 3 == 0 ? 20 : 380, 0));
      end
      a = int'($urandom_range(126, 0)) - 63;
      s = int'($urandom_range(62, 0)) - 31;
      la = ext_t'(a); ls = chan_t'(s); k = 9'(t % 512);
      if (t < T) begin
        for (int u = 0; u < 2; u++) begin
          for (int sp = 0; sp < NS; sp++)
            tt[u][sp] = int'(sums[enc_next(sp, u)][sp & 1]) + int'(beta[enc_next(sp, u)]);
          m[u] = mstar(mstar(mstar(tt[u][0], tt[u][1]), mstar(tt[u][2], tt[u][3])),
                       mstar(mstar(tt[u][4], tt[u][5]), mstar(tt[u][6], tt[u][7])));
        end
        e_llr[t] = m[1] - m[0];
        e_le[t]  = sat(e_llr[t] - a - s, 63);
        e_k[t]   = t % 512;
      end
      @(posedge clk); #1;
      if (t >= 4 && t - 4 < T) begin
        checks++;
        if (!out_valid || int'(llr) != e_llr[t-4] || int'(le) != e_le[t-4] ||
            hard != (e_llr[t-4] > 0) || int'(out_k) != e_k[t-4]) begin
          failures++;
          if (failures < 10) $display("t=%0d llr %0d/%0d le %0d/%0d", t - 4, llr, e_llr[t-4], le, e_le[t-4]);
        end
      end else begin
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
