// turbo_pkg - shared constants, types and trellis functions of the
// block-interleaved pipelined Log-MAP turbo decoder.
//
// The constituent code is the 8-state recursive systematic convolutional
// code of 3GPP (constraint length K = 4, feedback 1+D^2+D^3, parity
// 1+D+D^3). A state is written {s1,s2,s3}, s1 the most recent register bit.
// All state metrics are unsigned W_PM = 9 bit numbers, as in the design
// this RTL follows; input, extrinsic and branch metric widths, the code
// itself and the max* correction table are this design's own choices.
// Metric LSB = 1/4 nat, so the correction ln(1+exp(-d)) becomes
// round(4*ln(1+exp(-d/4))) for an integer difference d.
package turbo_pkg;

  localparam int K      = 4;            // constraint length
  localparam int NS     = 1 << (K - 1); // trellis states = ACSO kernels per unit
  localparam int W_PM   = 9;            // path (state) metric, unsigned
  localparam int W_I    = 6;            // channel LLR, signed
  localparam int W_E    = 7;            // extrinsic / a-priori LLR, signed
  localparam int W_BM   = 7;            // branch metric, unsigned
  localparam int W_SUM  = W_PM + 1;     // metric + branch metric
  localparam int W_LLRS = 12;           // alpha+gamma+beta and max* trees
  localparam int W_LLR  = 13;           // signed LLR

  localparam int PIPE   = 4;            // ACSO register stages (= sub-blocks M)
  localparam logic [W_PM-1:0] RESCALE_TH = 9'(1 << (W_PM - 2)); // 2^(q-2)
  localparam logic [W_PM-1:0] START_W    = 9'd64;  // weight of state 0 at frame start
  localparam int E_MAX  = (1 << (W_E - 1)) - 1;    // extrinsic saturation (63)
  localparam int A_MAX  = 63;           // |La+Ls| saturation inside the BMU
  localparam int P_MAX  = 31;           // |Lp| saturation inside the BMU

  typedef logic [W_PM-1:0]          metric_t;
  typedef metric_t [NS-1:0]         metric_vec_t;
  typedef logic [W_BM-1:0]          bm_t;
  typedef bm_t [3:0]                gamma_t;      // index {u,p}
  typedef logic [W_SUM-1:0]         sum_t;
  typedef sum_t [NS-1:0][1:0]       branch_sums_t; // [state][predecessor x]
  typedef logic signed [W_I-1:0]    chan_t;
  typedef logic signed [W_E-1:0]    ext_t;
  typedef logic signed [W_LLR-1:0]  llr_t;

  // feedback bit of the RSC encoder in state s with input u
  function automatic logic fb_bit(input logic [K-2:0] s, input logic u);
    return u ^ s[1] ^ s[0];
  endfunction

  // next state after input u
  function automatic logic [K-2:0] next_state(input logic [K-2:0] s, input logic u);
    return {fb_bit(s, u), s[2], s[1]};
  endfunction

  // parity bit emitted on the branch leaving s with input u
  function automatic logic parity(input logic [K-2:0] s, input logic u);
    return fb_bit(s, u) ^ s[2] ^ s[0];
  endfunction

  // predecessor number x (0/1) of state s: s' = {s[1], s[0], x}
  function automatic logic [K-2:0] pred_state(input logic [K-2:0] s, input logic x);
    return {s[1], s[0], x};
  endfunction

  // input bit on the branch from pred_state(s,x) into s
  function automatic logic pred_u(input logic [K-2:0] s, input logic x);
    return s[2] ^ s[0] ^ x;
  endfunction

  // Log-MAP correction term for a non-negative metric difference
  function automatic logic [1:0] max_star_corr(input logic [W_LLRS-1:0] d);
    if (d == 0)      return 2'd3;
    else if (d < 4)  return 2'd2;
    else if (d < 9)  return 2'd1;
    else             return 2'd0;
  endfunction

endpackage
