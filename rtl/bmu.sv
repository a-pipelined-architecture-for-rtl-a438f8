// bmu - branch metric (gamma) unit.
//
// For a rate-1/2 constituent code the branch metric of equation
//   gamma = 1/2 * (u*La + Lc*sum(y*x))
// takes only four values, one per (systematic bit u, parity bit p) pair, and
// the four are +-1/2*A +-1/2*B with A = La + Ls and B = Lp. Adding the per-step
// constant (|A|+|B|)/2 to all of them leaves every max* decision unchanged
// and makes them unsigned:
//   gamma{u,p} = (u agrees with sign(A) ? |A| : 0) + (p agrees with sign(B) ? |B| : 0)
// so only the two magnitudes and their signs need to be kept (the design
// stores a reduced set of branch metrics and derives the rest). |A| is
// saturated to 63 and |B| to 31 so that a branch metric stays below the
// re-scaling step 2^(q-2); these bounds and the single output register are
// this design's choices.
// Timing: gamma is registered, one cycle after ls/lp/la.
module bmu
  import turbo_pkg::*;
(
  input  logic   clk,
  input  chan_t  ls,     // systematic channel LLR
  input  chan_t  lp,     // parity channel LLR
  input  ext_t   la,     // a-priori LLR
  output gamma_t gamma   // [{u,p}]
);

  logic signed [W_E:0] a;
  logic [5:0] a_mag;
  logic [4:0] b_mag;
  logic       a_pos, b_pos;

  always_comb begin
    a     = (W_E+1)'(la) + (W_E+1)'(ls);
    a_pos = (a > 0);
    if (a > (W_E+1)'(A_MAX) || a < -(W_E+1)'(A_MAX)) a_mag = 6'(A_MAX);
    else                         a_mag = a_pos ? 6'(a) : 6'(-a);
    b_pos = (lp > 0);
    if (lp > W_I'(P_MAX) || lp < -W_I'(P_MAX)) b_mag = 5'(P_MAX);
    else                           b_mag = b_pos ? 5'(lp) : 5'(-lp);
  end

  always_ff @(posedge clk) begin
    for (int up = 0; up < 4; up++) begin
      gamma[up] <= ((up[1] == a_pos) ? W_BM'(a_mag) : '0)
                 + ((up[0] == b_pos) ? W_BM'(b_mag) : '0);
    end
  end

endmodule
