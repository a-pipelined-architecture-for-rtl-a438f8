// acso - pipelined add-compare-select-offset kernel for one trellis state.
//
// Computes max*(m[0]+g[0], m[1]+g[1]) = max + ln(1+exp(-|diff|)), the
// Log-MAP state metric update, with the correction taken from a small
// combinational table. The kernel is cut into four register stages as the
// design prescribes, so that four independent sub-blocks can share it in
// turn (block-interleaved pipelining):
//   stage 1  add            -> sum[0], sum[1]
//   stage 2  compare/select -> larger sum, |difference|
//   stage 3  LUT + offset   -> un-normalised metric, flag `over` if > 2^(q-2)
//   stage 4  re-scale       -> subtract 2^(q-2) when `rescale` is set
// `rescale` is the OR of the `over` flags of all kernels of a unit, so all
// metrics of one vector are shifted together (the rule of the design). A
// metric that would become negative is clamped at zero: that choice and the
// placement of the cuts are this design's own.
// Timing: m_out is valid 4 cycles after m/g; sum is the stage-1 register.
module acso
  import turbo_pkg::*;
(
  input  logic                clk,
  input  metric_t [1:0]       m,        // metrics of the two connected states
  input  bm_t     [1:0]       g,        // branch metrics of the two branches
  input  logic                rescale,  // from all kernels' `over`
  output logic                over,     // stage-3 metric > 2^(q-2)
  output sum_t    [1:0]       sum,      // stage-1 register (metric + branch)
  output metric_t             m_out     // stage-4 register
);

  sum_t    r2_max, r2_diff;
  sum_t    r3_m;

  // stage 1: add
  always_ff @(posedge clk) begin
    sum[0] <= W_SUM'(m[0]) + W_SUM'(g[0]);
    sum[1] <= W_SUM'(m[1]) + W_SUM'(g[1]);
  end

  // stage 2: compare and select
  always_ff @(posedge clk) begin
    if (sum[0] >= sum[1]) begin
      r2_max  <= sum[0];
      r2_diff <= sum[0] - sum[1];
    end else begin
      r2_max  <= sum[1];
      r2_diff <= sum[1] - sum[0];
    end
  end

  // stage 3: correction table and offset
  always_ff @(posedge clk)
    r3_m <= r2_max + W_SUM'(max_star_corr(W_LLRS'(r2_diff)));

  assign over = (r3_m > W_SUM'(RESCALE_TH));

  // stage 4: re-scaling
  always_ff @(posedge clk) begin
    if (!rescale)
      m_out <= W_PM'(r3_m);
    else if (over)
      m_out <= W_PM'(r3_m - W_SUM'(RESCALE_TH));
    else
      m_out <= '0;
  end

endmodule
