// metric_store - small register file of state metric vectors with per-entry
// valid bits.
//
// Used twice in the SISO decoder: as the beta_in RAM, which keeps the
// backward metric vector found at each window border so that the next
// iteration can start that window's backward recursion without a warm-up
// (next iteration initialisation), and as the store of forward metric
// vectors at sub-block borders, which start the next sub-block's forward
// recursion in the next iteration. Entries are indexed by constituent code
// and window (or sub-block). `clear` invalidates every entry; an invalid
// entry reads as the all-zero vector, which is the starting value the design
// uses in the first iteration. Storing a full vector per entry and the
// valid-bit mechanism are this design's choices.
// Timing: write at the clock edge; read is combinational (a write and a
// read of the same entry in one cycle return the old vector).
module metric_store
  import turbo_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  metric_vec_t               wdata,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output metric_vec_t               rdata
);

  metric_vec_t        mem [DEPTH];
  logic [DEPTH-1:0]   valid;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid <= '0;
    else if (clear) valid <= '0;
    else if (we)    valid[waddr] <= 1'b1;
  end

  assign rdata = valid[raddr] ? mem[raddr] : '0;

endmodule
