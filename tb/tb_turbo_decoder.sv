// tb_turbo_decoder - end-to-end test of the turbo decoder at its default
// size (N = 512, M = 4 sub-blocks, windows of L = 32).
//
// Random information bits are turbo-encoded (two 8-state RSC encoders, the
// second behind the quadratic permutation interleaver), mapped to channel
// LLRs of +-8 (LSB = 1/4 nat) and disturbed by approximately Gaussian noise
// (sum of three uniform variables). Each frame is loaded, decoded with five
// iterations and read back. Checks:
//   * every decoded bit equals the reference turbo decoder built from the
//     reference SISO model (bit-exact), and
//   * after five iterations the frame is error-free although the channel
//     hard decisions were not;
//   * the decode takes 2*n_iter*((W+1)*M*L + 11) + 1 cycles.
// It also counts how often each mechanism of the design acted (re-scaling in
// both recursion units, warm-up-free start of a backward window from a
// stored vector, hand-over of backward vectors across sub-block borders at
// the end of a pass, start of a sub-block from a stored forward vector, both
// constituent codes, extrinsic and branch metric saturation) and fails if
// one never did.
`timescale 1ns/1ps
module tb_turbo_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 512, M = 4, L = 32;
  localparam int W = N / M / L;
  localparam int NITER = 5;
  localparam int FRAMES = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_en = 0, start = 0, busy, done, out_bit;
  logic [8:0] ld_addr = 0, out_addr = 0;
  chan_t ld_sys = 0, ld_p1 = 0, ld_p2 = 0;
  logic [3:0] n_iter = 4'(NITER);

  turbo_decoder dut (.*);

  int checks = 0, failures = 0, cycles = 0;
  int n_beta_rescale = 0, n_alpha_rescale = 0, n_nii = 0, n_aborder = 0;
  int n_code2 = 0, n_le_sat = 0, n_bm_sat = 0, n_raw_err = 0, n_commit = 0;

  always_ff @(posedge clk) cycles <= cycles + 1;

  // mechanism counters, observed inside the design
  always @(posedge clk) begin
    if (dut.u_siso.beta_rescaled)  n_beta_rescale++;
    if (dut.u_siso.alpha_rescaled) n_alpha_rescale++;
    if (dut.u_siso.bt[2].v && dut.u_siso.beta_load && dut.u_siso.beta_init != '0) n_nii++;
    if (dut.u_siso.at[2].v && dut.u_siso.alpha_load && dut.u_siso.a2b != '0
        && dut.u_siso.alpha_border != '0) n_aborder++;
    if (dut.u_siso.wr_en && dut.hcid) n_code2++;
    if (dut.u_siso.commit && dut.u_siso.bst_wdata != '0) n_commit++;
    if (dut.u_siso.wr_en && (dut.u_siso.wr_le == ext_t'(E_MAX) || dut.u_siso.wr_le == -ext_t'(E_MAX)))
      n_le_sat++;
    if (dut.u_siso.bt[1].v && (int'(dut.u_siso.rd_la) + int'(dut.u_siso.rd_ls) > A_MAX ||
                               int'(dut.u_siso.rd_la) + int'(dut.u_siso.rd_ls) < -A_MAX))
      n_bm_sat++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int noise();
    return int'($urandom_range(10, 0)) + int'($urandom_range(10, 0)) + int'($urandom_range(10, 0)) - 15;
  endfunction

  function automatic int clip(int v);
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  int info [N], sys [N], p1 [N], p2 [N], ref_dec [N];

  // reference turbo decoder on the same channel values
  task automatic ref_decode(int iters);
    siso_model mdl = new(N, M, L);
    int e [N];
    int ls [] = new[N], lp [] = new[N], la [] = new[N];
    for (int k = 0; k < N; k++) e[k] = 0;
    for (int it = 0; it < iters; it++) begin
      for (int k = 0; k < N; k++) begin
        ls[k] = sys[k]; lp[k] = p1[k]; la[k] = (it == 0) ? 0 : e[k];
      end
      mdl.run(0, ls, lp, la);
      for (int k = 0; k < N; k++) e[k] = mdl.le[k];
      for (int k = 0; k < N; k++) begin
        ls[k] = sys[qpp(k, N)]; lp[k] = p2[k]; la[k] = e[qpp(k, N)];
      end
      mdl.run(1, ls, lp, la);
      for (int k = 0; k < N; k++) begin
        e[qpp(k, N)] = mdl.le[k];
        ref_dec[qpp(k, N)] = mdl.hard[k];
      end
    end
  endtask

  initial begin
    int st1, st2, amp, t0, errs, raw, expect_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      amp = (f == 2) ? 16 : 8;
      // encode
      for (int k = 0; k < N; k++) info[k] = $urandom_range(1, 0);
      st1 = 0; st2 = 0;
      raw = 0;
      for (int k = 0; k < N; k++) begin
        int u2, c1, c2;
        u2 = info[qpp(k, N)];
        c1 = enc_par(st1, info[k]); st1 = enc_next(st1, info[k]);
        c2 = enc_par(st2, u2);      st2 = enc_next(st2, u2);
        sys[k] = clip((info[k] != 0 ? amp : -amp) + noise());
        p1[k]  = clip((c1 != 0 ? amp : -amp) + noise());
        p2[k]  = clip((c2 != 0 ? amp : -amp) + noise());
        if ((sys[k] > 0) != (info[k] == 1)) raw++;
      end
      n_raw_err += raw;
      ref_decode(NITER);
      // load
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        ld_en = 1; ld_addr = 9'(k);
        ld_sys = chan_t'(sys[k]); ld_p1 = chan_t'(p1[k]); ld_p2 = chan_t'(p2[k]);
      end
      @(negedge clk);
      ld_en = 0;
      start = 1;
      t0 = cycles;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      expect_cycles = 2 * NITER * ((W + 1) * M * L + 11) + 1;
      checks++;
      if (cycles - t0 != expect_cycles) begin
        failures++;
        $display("decode took %0d cycles, expected %0d", cycles - t0, expect_cycles);
      end
      // read back
      errs = 0;
      for (int k = 0; k < N; k++) begin
        out_addr = 9'(k);
        @(negedge clk);
        checks++;
        if (int'(out_bit) != ref_dec[k]) failures++;
        if (int'(out_bit) != info[k]) errs++;
      end
      checks++;
      if (errs != 0) begin
        failures++;
        $display("frame %0d: %0d bit errors after decoding (%0d raw)", f, errs, raw);
      end
      $display("frame %0d: raw channel errors %0d, decoded errors %0d", f, raw, errs);
    end
    $display("mechanisms: beta rescale %0d, alpha rescale %0d, NII starts %0d, sub-block border starts %0d, code-2 outputs %0d, sub-block border commits %0d, extrinsic saturation %0d, branch metric saturation %0d, channel errors corrected %0d",
             n_beta_rescale, n_alpha_rescale, n_nii, n_aborder, n_code2, n_commit, n_le_sat, n_bm_sat, n_raw_err);
    checks += 9;
    if (n_commit == 0) failures++;
    if (n_beta_rescale == 0) failures++;
    if (n_alpha_rescale == 0) failures++;
    if (n_nii == 0) failures++;
    if (n_aborder == 0) failures++;
    if (n_code2 == 0) failures++;
    if (n_le_sat == 0) failures++;
    if (n_bm_sat == 0) failures++;
    if (n_raw_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
