// sm_unit - state metric recursion unit: the alpha unit (BACKWARD = 0) or
// the beta unit (BACKWARD = 1) of the SISO decoder.
//
// NS pipelined ACSO kernels update a whole metric vector per step:
//   forward : alpha_{k+1}(s)  = max*_{s'} [alpha_k(s') + gamma_k(s',s)]
//   backward: beta_k(s')      = max*_{s}  [beta_{k+1}(s) + gamma_k(s',s)]
// The trellis wiring comes from turbo_pkg. The vector entering a step,
// cur_vec, is either init_vec (load = 1: start of a window or sub-block) or
// the kernels' outputs fed back from the fourth register stage. Because the
// kernels have PIPE = 4 register stages, the result of a step arrives
// exactly when the same sub-block's next step is due if four sub-blocks are
// presented in strict rotation, one per cycle: that is block-interleaved
// pipelining, and it needs no control here beyond `load`. The re-scaling
// decision (any metric > 2^(q-2)) is shared by all kernels of the unit.
// Interface: gamma and load/init_vec belong to the same step; out_vec is
// that step's result 4 cycles later; sums (stage-1 registers, alpha+gamma
// per incoming branch [state][predecessor x]) is valid 1 cycle later and is
// what the alpha unit hands to the LLR unit. `rescaled` marks a cycle in
// which the vector in stage 4 is being re-scaled.
module sm_unit
  import turbo_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  logic         clk,
  input  logic         load,
  input  metric_vec_t  init_vec,
  input  gamma_t       gamma,
  output metric_vec_t  cur_vec,
  output metric_vec_t  out_vec,
  output branch_sums_t sums,
  output logic         rescaled
);

  metric_t [NS-1:0][1:0] km;
  bm_t     [NS-1:0][1:0] kg;
  logic    [NS-1:0]      over;

  assign cur_vec  = load ? init_vec : out_vec;
  assign rescaled = |over;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      for (int x = 0; x < 2; x++) begin
        logic [K-2:0] sp, sn;
        logic         u;
        sp = BACKWARD ? (K-1)'(s) : pred_state((K-1)'(s), x[0]);
        u  = BACKWARD ? x[0] : pred_u((K-1)'(s), x[0]);
        sn = BACKWARD ? next_state((K-1)'(s), x[0]) : pred_state((K-1)'(s), x[0]);
        km[s][x] = cur_vec[sn];
        kg[s][x] = gamma[{u, parity(sp, u)}];
      end
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_kernel
    acso u_acso (
      .clk     (clk),
      .m       (km[s]),
      .g       (kg[s]),
      .rescale (rescaled),
      .over    (over[s]),
      .sum     (sums[s]),
      .m_out   (out_vec[s])
    );
  end

endmodule
