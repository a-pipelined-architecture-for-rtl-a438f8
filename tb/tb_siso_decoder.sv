// tb_siso_decoder - bit-exact check of the SISO decoder against the
// reference sliding-window Log-MAP model.
//
// A memory model answers the decoder's read requests one cycle later.
// Five half-iterations are run (codes 0,1,0,1,0, the first with clear_init)
// on random channel and a-priori values, strong enough to drive metric
// re-scaling, branch metric and extrinsic saturation. Every result (LLR,
// extrinsic value, hard decision) must match the model, every trellis step
// must be written exactly once per half-iteration, and each half-iteration
// must take (W+1)*M*L + 10 cycles from start to done. The border-metric
// stores carry state across half-iterations, so the later passes also check
// next-iteration initialisation.
`timescale 1ns/1ps
module tb_siso_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 512, M = 4, L = 32;
  localparam int W = N / M / L;
  localparam int HI_CYCLES = (W + 1) * M * L + 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, cid = 0, clear_init = 0;
  logic busy, done, rd_en, wr_en, wr_hard;
  logic [8:0] rd_k, wr_k;
  chan_t rd_ls, rd_lp;
  ext_t  rd_la, wr_le;
  llr_t  wr_llr;

  siso_decoder #(.N(N), .M(M), .L(L)) dut (.*);

  int ls [] = new[N], lp [] = new[N], la [] = new[N];
  int seen [N];
  int checks = 0, failures = 0, cycles = 0;
  siso_model model = new(N, M, L);

  always_ff @(posedge clk) begin
    cycles <= cycles + 1;
    if (rd_en) begin
      rd_ls <= chan_t'(ls[rd_k]);
      rd_lp <= chan_t'(lp[rd_k]);
      rd_la <= ext_t'(la[rd_k]);
    end
  end

  always @(posedge clk) if (wr_en) begin
    int k;
    k = int'(wr_k);
    seen[k]++;
    checks++;
    if (int'(wr_llr) != model.llr[k] || int'(wr_le) != model.le[k] || int'(wr_hard) != model.hard[k]) begin
      failures++;
      if (failures < 10)
        $display("mismatch k=%0d llr %0d/%0d le %0d/%0d", k, wr_llr, model.llr[k], wr_le, model.le[k]);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, amp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int hi = 0; hi < 5; hi++) begin
      amp = (hi == 2) ? 32 : 12;
      for (int k = 0; k < N; k++) begin
        ls[k] = $urandom_range(2 * amp, 0) - amp;
        lp[k] = $urandom_range(2 * amp, 0) - amp;
        la[k] = (hi == 0) ? 0 : int'($urandom_range(126, 0)) - 63;
        if (ls[k] < -31) ls[k] = -31;
        if (ls[k] > 31) ls[k] = 31;
        if (lp[k] < -31) lp[k] = -31;
        if (lp[k] > 31) lp[k] = 31;
        seen[k] = 0;
      end
      if (hi == 0) model.clear();
      model.run(hi % 2, ls, lp, la);
      @(negedge clk);
      start = 1; cid = hi[0]; clear_init = (hi == 0);
      t0 = cycles;
      @(negedge clk);
      start = 0; clear_init = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cycles - t0 != HI_CYCLES) begin
        failures++;
        $display("half-iteration took %0d cycles, expected %0d", cycles - t0, HI_CYCLES);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (seen[k] != 1) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
