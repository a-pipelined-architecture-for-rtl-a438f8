// llr_unit - log-likelihood ratio unit of the SISO decoder.
//
// For trellis step k it receives, from the alpha unit's first ACSO stage,
// alpha_k(s') + gamma_k(s',s) for all 2*NS branches, and beta_{k+1} from the
// beta LIFO. It forms alpha + gamma + beta per branch and reduces the NS
// branches with input bit u = 1 and the NS branches with u = 0 by two
// balanced max* trees (Log-MAP, same correction table as the ACSO), leaves
// ordered by the branch's starting state s'. Then
//   llr  = max*_{u=1} - max*_{u=0}          (positive means bit 1)
//   le   = sat(llr - la - ls, +-E_MAX)      extrinsic information
//   hard = llr > 0
// One register after the additions, one per tree level and one on the
// outputs give a latency of 5 cycles; the tree shape and register placement
// are this design's choice (the design states only that the unit is
// pipelined). Tags k, la, ls travel with the data.
module llr_unit
  import turbo_pkg::*;
#(
  parameter int KW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  branch_sums_t  sums,
  input  metric_vec_t   beta,
  input  ext_t          la,
  input  chan_t         ls,
  input  logic [KW-1:0] k,
  output logic          out_valid,
  output logic [KW-1:0] out_k,
  output llr_t          llr,
  output ext_t          le,
  output logic          hard
);

  typedef logic [W_LLRS-1:0] lv_t;

  function automatic lv_t max_star(input lv_t a, input lv_t b);
    lv_t mx, d;
    mx = (a >= b) ? a : b;
    d  = (a >= b) ? a - b : b - a;
    return mx + lv_t'(max_star_corr(d));
  endfunction

  lv_t [1:0][NS-1:0]   lv0;  // leaves [u][s']
  lv_t [1:0][NS/2-1:0] lv1;
  lv_t [1:0][NS/4-1:0] lv2;
  lv_t [1:0]           lv3;

  logic [4:0]          vld;
  logic [3:0][KW-1:0]  k_d;
  ext_t [3:0]          la_d;
  chan_t [3:0]         ls_d;

  // stage 1: alpha + gamma + beta per branch
  always_ff @(posedge clk) begin
    for (int sp = 0; sp < NS; sp++) begin
      for (int u = 0; u < 2; u++) begin
        logic [K-2:0] sn;
        sn = next_state((K-1)'(sp), u[0]);
        lv0[u][sp] <= lv_t'(sums[sn][sp & 1]) + lv_t'(beta[sn]);
      end
    end
  end

  // stages 2..4: max* trees
  always_ff @(posedge clk) begin
    for (int u = 0; u < 2; u++) begin
      for (int i = 0; i < NS/2; i++) lv1[u][i] <= max_star(lv0[u][2*i], lv0[u][2*i+1]);
      for (int i = 0; i < NS/4; i++) lv2[u][i] <= max_star(lv1[u][2*i], lv1[u][2*i+1]);
      lv3[u] <= max_star(lv2[u][0], lv2[u][1]);
    end
  end

  // tags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[3:0], in_valid};
  end

  always_ff @(posedge clk) begin
    k_d  <= {k_d[2:0],  k};
    la_d <= {la_d[2:0], la};
    ls_d <= {ls_d[2:0], ls};
  end

  // stage 5: LLR, extrinsic value, decision
  llr_t l_c, e_c;
  always_comb begin
    l_c = llr_t'(lv3[1]) - llr_t'(lv3[0]);
    e_c = l_c - llr_t'(la_d[3]) - llr_t'(ls_d[3]);
  end

  always_ff @(posedge clk) begin
    llr   <= l_c;
    out_k <= k_d[3];
    hard  <= (l_c > 0);
    if (e_c > llr_t'(E_MAX))       le <= ext_t'(E_MAX);
    else if (e_c < -llr_t'(E_MAX)) le <= ext_t'(-E_MAX);
    else                           le <= ext_t'(e_c);
  end

  assign out_valid = vld[4];

endmodule
