// tb_sm_unit - checks the alpha unit (forward) and the beta unit (backward)
// with four sub-blocks interleaved cycle by cycle, as the SISO runs them.
// Each sub-block gets its own random initial vector, reloaded part-way,
// and random branch metrics. The vector entering every step, the stage-1
// branch sums of the forward unit (1 cycle later) and the new vector
// (4 cycles later, just in time for the sub-block's next step) are compared
// with the reference recursion, re-scaling included.
`timescale 1ns/1ps
module tb_sm_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int MB = 4, STEPS = 60, T = MB * STEPS;
  logic clk = 0;
  always #5 clk = ~clk;

  logic load;
  metric_vec_t init_vec;
  gamma_t gamma;
  metric_vec_t f_cur, f_out, b_cur, b_out;
  branch_sums_t f_sums, b_sums;
  logic f_resc, b_resc;

  sm_unit #(.BACKWARD(1'b0)) dut_f (.clk, .load, .init_vec, .gamma, .cur_vec(f_cur),
    .out_vec(f_out), .sums(f_sums), .rescaled(f_resc));
  sm_unit #(.BACKWARD(1'b1)) dut_b (.clk, .load, .init_vec, .gamma, .cur_vec(b_cur),
    .out_vec(b_out), .sums(b_sums), .rescaled(b_resc));

  vec_t vf [MB], vb [MB];
  vec_t ef [T], eb [T];
  int checks = 0, failures = 0, n_resc = 0;

  function automatic bit same(metric_vec_t h, vec_t r);
    for (int s = 0; s < NS; s++) if (int'(h[s]) != r[s]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (T + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T + 4; t++) begin
      int b, j, ls, lp, la;
      b = t % MB; j = t / MB;
      @(negedge clk);
      ls = int'($urandom_range(62, 0)) - 31;
      lp = int'($urandom_range(62, 0)) - 31;
      la = int'($urandom_range(126, 0)) - 63;
      for (int u = 0; u < 2; u++)
        for (int p = 0; p < 2; p++) gamma[u*2+p] = 7'(gam(ls, lp, la, u, p));
      load = (j == 0 || j == STEPS / 2);
      for (int s = 0; s < NS; s++) init_vec[s] = 9'($urandom_range(128, 0));
      if (t < T) begin
        if (load)
          for (int s = 0; s < NS; s++) begin vf[b][s] = int'(init_vec[s]); vb[b][s] = int'(init_vec[s]); end
        #1;
        checks += 2;
        if (!same(f_cur, vf[b])) failures++;
        if (!same(b_cur, vb[b])) failures++;
      end
      @(posedge clk); #1;
      if (t < T) begin
        // stage-1 sums of the forward unit
        for (int sp = 0; sp < NS; sp++)
          for (int u = 0; u < 2; u++) begin
            checks++;
            if (int'(f_sums[enc_next(sp, u)][sp & 1]) != vf[b][sp] + gam(ls, lp, la, u, enc_par(sp, u)))
              failures++;
          end
        step_fwd(vf[b], ls, lp, la);
        step_bwd(vb[b], ls, lp, la);
        ef[t] = vf[b]; eb[t] = vb[b];
      end
      if (t >= 3 && t - 3 < T) begin
        checks += 2;
        if (!same(f_out, ef[t-3])) begin
          failures++;
          if (failures < 10) $display("forward mismatch at step issued %0d", t - 3);
        end
        if (!same(b_out, eb[t-3])) begin
          failures++;
          if (failures < 10) $display("backward mismatch at step issued %0d", t - 3);
        end
      end
      if (f_resc || b_resc) n_resc++;
    end
    checks++;
    if (n_resc == 0) failures++;
    $display("re-scaling cycles: %0d", n_resc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
