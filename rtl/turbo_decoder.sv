// turbo_decoder - iterative turbo decoder built around one block-interleaved
// pipelined Log-MAP SISO decoder.
//
// A parallel-concatenated turbo code sends every information bit once
// (systematic) and two parity streams, one from an encoder fed in natural
// order and one fed through the interleaver. Decoding alternates between
// the two constituent codes, each pass (half-iteration) turning channel
// values plus the other code's extrinsic information into new extrinsic
// information. Here a single SISO decoder is time-shared by both codes:
//   code 1: reads sys[k], p1[k], E[k];        writes E[k]
//   code 2: reads sys[pi(k)], p2[k], E[pi(k)]; writes E[pi(k)]
// where E is the interleaver/de-interleaver memory, so interleaving and
// de-interleaving happen through addresses only. The first half-iteration
// uses zero a-priori values and clears the SISO's stored border metrics;
// the hard decisions of the last code-2 pass are stored in natural order.
// One SISO instead of the two drawn in the block diagram, the QPP
// interleaver law and the port protocol are this design's choices.
//
// Interface: load the frame with ld_en/ld_addr/ld_* (one step per cycle),
// pulse start with n_iter >= 1 full iterations, wait for done, then read
// decoded bit out_addr on out_bit one cycle later. A full iteration takes
// 2 * ((N/(M*L)+1)*M*L + 11) cycles (1302 at the default sizes).
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int N  = 512,
  parameter int M  = 4,
  parameter int L  = 32,
  parameter int F1 = 31,
  parameter int F2 = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld_en,
  input  logic [$clog2(N)-1:0]  ld_addr,
  input  chan_t                 ld_sys,
  input  chan_t                 ld_p1,
  input  chan_t                 ld_p2,
  input  logic                  start,
  input  logic [3:0]            n_iter,
  output logic                  busy,
  output logic                  done,
  input  logic [$clog2(N)-1:0]  out_addr,
  output logic                  out_bit
);

  localparam int KW = $clog2(N);

  // ------------------------------------------------------- iteration control
  typedef enum logic [1:0] {IDLE, LAUNCH, RUN} state_t;
  state_t     state;
  logic [3:0] iter, n_iter_r;
  logic       hcid, first, siso_start, clear_init, siso_busy, siso_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; iter <= '0; n_iter_r <= '0; hcid <= 1'b0;
      first <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start && n_iter != '0) begin
          n_iter_r <= n_iter; iter <= '0; hcid <= 1'b0; first <= 1'b1;
          state <= LAUNCH;
        end
        LAUNCH: state <= RUN;
        RUN: if (siso_done) begin
          first <= 1'b0;
          if (!hcid) begin
            hcid <= 1'b1; state <= LAUNCH;
          end else if (iter == n_iter_r - 1'b1) begin
            state <= IDLE; done <= 1'b1;
          end else begin
            iter <= iter + 1'b1; hcid <= 1'b0; state <= LAUNCH;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy       = (state != IDLE);
  assign siso_start = (state == LAUNCH);
  assign clear_init = first;

  // ------------------------------------------------------------- SISO
  logic          rd_en, wr_en, wr_hard;
  logic [KW-1:0] rd_k, wr_k;
  chan_t         sys_q, par_q;
  ext_t          la_q, wr_le;
  llr_t          wr_llr;

  siso_decoder #(.N(N), .M(M), .L(L)) u_siso (
    .clk(clk), .rst_n(rst_n), .start(siso_start), .cid(hcid), .clear_init(clear_init),
    .busy(siso_busy), .done(siso_done),
    .rd_en(rd_en), .rd_k(rd_k), .rd_ls(sys_q), .rd_lp(par_q), .rd_la(first ? ext_t'(0) : la_q),
    .wr_en(wr_en), .wr_k(wr_k), .wr_le(wr_le), .wr_llr(wr_llr), .wr_hard(wr_hard)
  );

  // ------------------------------------------------ interleaved addressing
  logic [KW-1:0] pi_rd, pi_wr, rd_addr, wr_addr;
  qpp_interleaver #(.N(N), .F1(F1), .F2(F2)) u_pi_rd (.k(rd_k), .pi(pi_rd));
  qpp_interleaver #(.N(N), .F1(F1), .F2(F2)) u_pi_wr (.k(wr_k), .pi(pi_wr));
  assign rd_addr = hcid ? pi_rd : rd_k;
  assign wr_addr = hcid ? pi_wr : wr_k;

  input_buffer #(.N(N)) u_input_buffer (
    .clk(clk), .ld_en(ld_en), .ld_addr(ld_addr), .ld_sys(ld_sys), .ld_p1(ld_p1), .ld_p2(ld_p2),
    .rd_sys_addr(rd_addr), .rd_par_addr(rd_k), .rd_par_sel(hcid), .sys(sys_q), .par(par_q)
  );

  extrinsic_mem #(.N(N)) u_extrinsic_mem (
    .clk(clk), .we(wr_en), .waddr(wr_addr), .wdata(wr_le), .raddr(rd_addr), .rdata(la_q)
  );

  // ------------------------------------------------------- decision buffer
  logic dec_mem [N];
  logic last_pass;
  assign last_pass = hcid && (iter == n_iter_r - 1'b1);

  always_ff @(posedge clk) begin
    if (wr_en && last_pass) dec_mem[wr_addr] <= wr_hard;
    out_bit <= dec_mem[out_addr];
  end

endmodule
