// siso_decoder - block-interleaved pipelined sliding-window Log-MAP decoder
// for one constituent code, with warm-up-free backward recursion.
//
// The frame of N trellis steps is cut into M = 4 sub-blocks of S = N/M steps,
// and each sub-block into W = S/L windows of L steps. The four-stage ACSO
// kernels of the alpha and beta units are shared by the four sub-blocks in
// strict rotation (cycle c serves sub-block c mod 4), so each unit completes
// one trellis step per cycle although a single step takes four cycles.
//
// Schedule of one half-iteration, in phases of D = M*L cycles:
//   phase p (0..W-1) : beta unit runs window p of every sub-block backwards,
//                      starting from the vector stored for that window
//                      (next iteration initialisation, no warm-up); input
//                      samples and the beta vectors go into two LIFOs.
//   phase p+1        : alpha unit runs window p forwards from the LIFOs while
//                      the beta unit already works on window p+1; the LLR
//                      unit turns alpha+gamma+beta into LLR and extrinsic
//                      values, one per cycle.
// The alpha recursion runs on across windows of a sub-block; at the start of
// a sub-block it takes the vector stored at the end of the previous
// sub-block in the previous iteration (sub-block 0: encoder state 0). The
// beta vector reached at the lower border of window p is stored as the start
// of window p-1, or, at a sub-block start, of the previous sub-block's last
// window (committed at the end of the pass); the frame's last window always
// starts from the zero vector (unterminated trellis). Every stored vector is
// thus used in the next pass of the same code.
// All stored vectors read as zero after clear_init (first iteration).
// A half-iteration takes (W+1)*D issue cycles plus a 9-cycle drain.
// The phase schedule, LIFO addressing and the interface are this design's
// choices; the pipelining, window structure, units and memories
// follow the design.
//
// Interface: pulse start (with cid and optionally clear_init) while idle.
// The decoder then requests Ls, Lp, La of trellis step rd_k (in the
// constituent code's own order) with rd_en and expects them on rd_* one
// cycle later. Results come out on wr_* (trellis step, extrinsic value,
// LLR, hard decision). done pulses once after the last result.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int N = 512,
  parameter int M = 4,
  parameter int L = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  cid,
  input  logic                  clear_init,
  output logic                  busy,
  output logic                  done,
  output logic                  rd_en,
  output logic [$clog2(N)-1:0]  rd_k,
  input  chan_t                 rd_ls,
  input  chan_t                 rd_lp,
  input  ext_t                  rd_la,
  output logic                  wr_en,
  output logic [$clog2(N)-1:0]  wr_k,
  output ext_t                  wr_le,
  output llr_t                  wr_llr,
  output logic                  wr_hard
);

  localparam int S     = N / M;            // sub-block length
  localparam int W     = S / L;            // windows per sub-block
  localparam int D     = M * L;            // phase length = LIFO depth
  localparam int KW    = $clog2(N);
  localparam int CW    = $clog2(D);
  localparam int PW    = $clog2(W + 1);
  localparam int BW    = (M > 1) ? $clog2(M) : 1;
  localparam int WW    = (W > 1) ? $clog2(W) : 1;
  localparam int DRAIN = 9;
  localparam int BST   = 2 * M * W;         // beta_in RAM entries
  localparam int AST   = 2 * M;             // sub-block border entries

  // ---------------------------------------------------------------- control
  logic          cid_r, drain;
  logic [PW-1:0] ph;
  logic [CW-1:0] c;
  logic [3:0]    dcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; drain <= 1'b0; done <= 1'b0;
      ph <= '0; c <= '0; dcnt <= '0; cid_r <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; drain <= 1'b0; cid_r <= cid;
          ph <= '0; c <= '0; dcnt <= '0;
        end
      end else if (!drain) begin
        if (c == CW'(D - 1)) begin
          c <= '0;
          if (ph == PW'(W)) drain <= 1'b1;
          else              ph <= ph + 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end else begin
        dcnt <= dcnt + 1'b1;
        if (dcnt == 4'(DRAIN - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  logic          issue, beta_act, alpha_act;
  logic [BW-1:0] b_i;
  logic [CW-1:0] j_i;
  assign issue     = busy && !drain;
  assign beta_act  = issue && (ph < PW'(W));
  assign alpha_act = issue && (ph != '0);
  assign b_i       = BW'(c % CW'(M));
  assign j_i       = c / CW'(M);

  // trellis steps visited by the two sides in this cycle
  logic [KW-1:0] k_beta, k_alpha;
  assign k_beta  = KW'(b_i) * KW'(S) + KW'(ph) * KW'(L) + KW'(L - 1) - KW'(j_i);
  assign k_alpha = KW'(b_i) * KW'(S) + (KW'(ph) - KW'(1)) * KW'(L) + KW'(j_i);

  assign rd_en = beta_act;
  assign rd_k  = k_beta;

  // pipeline tags
  typedef struct packed {
    logic          v;
    logic [CW-1:0] c;
    logic [PW-1:0] ph;
    logic [KW-1:0] k;
  } tag_t;

  tag_t bt [1:6];   // beta side, index = cycles after issue
  tag_t at [1:6];   // alpha side

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 6; i++) begin bt[i] <= '0; at[i] <= '0; end
    end else begin
      bt[1] <= '{v: beta_act,  c: c, ph: ph, k: k_beta};
      at[1] <= '{v: alpha_act, c: c, ph: ph, k: k_alpha};
      for (int i = 2; i <= 6; i++) begin bt[i] <= bt[i-1]; at[i] <= at[i-1]; end
    end
  end

  function automatic logic [BW-1:0] sub_of(input logic [CW-1:0] cc);
    return BW'(cc % CW'(M));
  endfunction
  function automatic logic [CW-1:0] step_of(input logic [CW-1:0] cc);
    return cc / CW'(M);
  endfunction

  // ---------------------------------------------------------------- beta side
  typedef struct packed {
    chan_t ls;
    chan_t lp;
    ext_t  la;
  } in_t;

  in_t    in_b, in_a;
  gamma_t gam_b, gam_a;
  assign in_b = '{ls: rd_ls, lp: rd_lp, la: rd_la};

  bmu u_bmu_beta (.clk(clk), .ls(rd_ls), .lp(rd_lp), .la(rd_la), .gamma(gam_b));

  // input LIFO: written one cycle after issue on the beta side, read at
  // issue on the alpha side
  lifo_ram #(.DEPTH(D), .M(M), .WIDTH($bits(in_t))) u_in_lifo (
    .clk(clk),
    .we(bt[1].v), .widx(bt[1].c), .wdir(bt[1].ph[0]), .wdata(in_b),
    .re(alpha_act), .ridx(c), .rdir(~ph[0]), .rdata(in_a)
  );

  // beta unit
  metric_vec_t beta_init, beta_cur, beta_out;
  branch_sums_t beta_sums_unused;
  logic        beta_rescaled, beta_load;
  assign beta_load = (step_of(bt[2].c) == '0);

  sm_unit #(.BACKWARD(1'b1)) u_beta (
    .clk(clk), .load(beta_load), .init_vec(beta_init), .gamma(gam_b),
    .cur_vec(beta_cur), .out_vec(beta_out), .sums(beta_sums_unused),
    .rescaled(beta_rescaled)
  );

  // beta_in RAM: index {cid, sub-block, window}
  function automatic logic [$clog2(BST)-1:0] bidx(input logic cc, input logic [BW-1:0] b,
                                                   input logic [WW-1:0] w);
    return $clog2(BST)'(int'(cc) * M * W + int'(b) * W + int'(w));
  endfunction

  logic                      bst_we;
  logic [$clog2(BST)-1:0]    bst_waddr;
  metric_vec_t               bst_wdata;
  logic [BW-1:0]             b6;
  assign b6 = sub_of(bt[6].c);

  // Vectors found at the start of sub-blocks 1..M-1 start the previous
  // sub-block's last window. They are held here and committed while the
  // pipeline drains, so that they are used in the next pass of this code.
  metric_vec_t pend [M];
  logic        pend_we, commit;
  assign pend_we = bt[6].v && step_of(bt[6].c) == CW'(L - 1) && bt[6].ph == '0 && b6 != '0;
  assign commit  = drain && (dcnt < 4'(M - 1));

  always_ff @(posedge clk)
    if (pend_we) pend[b6] <= beta_out;

  always_comb begin
    bst_we    = 1'b0;
    bst_waddr = '0;
    bst_wdata = beta_out;
    if (bt[6].v && step_of(bt[6].c) == CW'(L - 1) && bt[6].ph != '0) begin
      bst_we    = 1'b1;
      bst_waddr = bidx(cid_r, b6, WW'(bt[6].ph - 1'b1));
    end else if (commit) begin
      bst_we    = 1'b1;
      bst_waddr = bidx(cid_r, BW'(dcnt), WW'(W - 1));
      bst_wdata = pend[BW'(dcnt) + 1'b1];
    end
  end

  metric_store #(.DEPTH(BST)) u_beta_in_ram (
    .clk(clk), .rst_n(rst_n), .clear(start && !busy && clear_init),
    .we(bst_we), .waddr(bst_waddr), .wdata(bst_wdata),
    .raddr(bidx(cid_r, sub_of(bt[2].c), WW'(bt[2].ph))), .rdata(beta_init)
  );

  // beta LIFO: the vector entering each backward step is beta_{k+1}
  metric_vec_t beta_llr;
  lifo_ram #(.DEPTH(D), .M(M), .WIDTH($bits(metric_vec_t))) u_beta_lifo (
    .clk(clk),
    .we(bt[2].v), .widx(bt[2].c), .wdir(bt[2].ph[0]), .wdata(beta_cur),
    .re(at[2].v), .ridx(at[2].c), .rdir(~at[2].ph[0]), .rdata(beta_llr)
  );

  // --------------------------------------------------------------- alpha side
  bmu u_bmu_alpha (.clk(clk), .ls(in_a.ls), .lp(in_a.lp), .la(in_a.la), .gamma(gam_a));

  in_t in_a2, in_a3;
  always_ff @(posedge clk) begin
    in_a2 <= in_a;
    in_a3 <= in_a2;
  end

  metric_vec_t  alpha_init, alpha_border, alpha_cur, alpha_out;
  branch_sums_t alpha_sums;
  logic         alpha_rescaled, alpha_load;
  logic [BW-1:0] a2b, a6b;
  assign a2b        = sub_of(at[2].c);
  assign a6b        = sub_of(at[6].c);
  assign alpha_load = (at[2].ph == PW'(1)) && (step_of(at[2].c) == '0);

  always_comb begin
    alpha_init = alpha_border;
    if (a2b == '0) begin
      alpha_init    = '0;
      alpha_init[0] = START_W;
    end
  end

  sm_unit #(.BACKWARD(1'b0)) u_alpha (
    .clk(clk), .load(alpha_load), .init_vec(alpha_init), .gamma(gam_a),
    .cur_vec(alpha_cur), .out_vec(alpha_out), .sums(alpha_sums),
    .rescaled(alpha_rescaled)
  );

  // forward metrics at sub-block ends: index {cid, sub-block}
  logic ast_we;
  assign ast_we = at[6].v && (at[6].ph == PW'(W)) && (step_of(at[6].c) == CW'(L - 1))
               && (a6b != BW'(M - 1));

  metric_store #(.DEPTH(AST)) u_alpha_border (
    .clk(clk), .rst_n(rst_n), .clear(start && !busy && clear_init),
    .we(ast_we), .waddr($clog2(AST)'(int'(cid_r) * M + int'(a6b) + 1)), .wdata(alpha_out),
    .raddr($clog2(AST)'(int'(cid_r) * M + int'(a2b))), .rdata(alpha_border)
  );

  // ---------------------------------------------------------------- LLR unit
  llr_unit #(.KW(KW)) u_llr (
    .clk(clk), .rst_n(rst_n), .in_valid(at[3].v), .sums(alpha_sums), .beta(beta_llr),
    .la(in_a3.la), .ls(in_a3.ls), .k(at[3].k),
    .out_valid(wr_en), .out_k(wr_k), .llr(wr_llr), .le(wr_le), .hard(wr_hard)
  );

  // ---------------------------------------------------------------- checks
  // the kernel pipeline depth must equal the number of interleaved sub-blocks
  initial assert (M == PIPE) else $error("M must equal the ACSO pipeline depth");
  initial assert (N % (M * L) == 0) else $error("N must be a multiple of M*L");
  // requests and results only while a half-iteration is running
  a_rd_busy: assert property (@(posedge clk) rd_en |-> busy);
  a_wr_busy: assert property (@(posedge clk) wr_en |-> busy);
  a_done:    assert property (@(posedge clk) done |-> !busy);
  initial assert (M - 1 <= DRAIN) else $error("border vectors must be committed within the drain");

endmodule
