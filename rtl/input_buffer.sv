// input_buffer - frame store for the received channel values.
//
// Holds the systematic LLRs and the parity LLRs of both constituent codes
// for one N-bit frame, loaded one trellis step per cycle through the load
// port. The SISO decoder reads the systematic value and one parity value per
// cycle: for the interleaved code the systematic address is the interleaved
// one while the parity address is natural, hence two read addresses.
// Organisation (three arrays, single frame, registered reads) is this
// design's choice; the design only names the block.
// Timing: sys/par are registered, one cycle after the addresses.
module input_buffer
  import turbo_pkg::*;
#(
  parameter int N = 512
) (
  input  logic                  clk,
  input  logic                  ld_en,
  input  logic [$clog2(N)-1:0]  ld_addr,
  input  chan_t                 ld_sys,
  input  chan_t                 ld_p1,
  input  chan_t                 ld_p2,
  input  logic [$clog2(N)-1:0]  rd_sys_addr,
  input  logic [$clog2(N)-1:0]  rd_par_addr,
  input  logic                  rd_par_sel,   // 0: parity of code 1, 1: code 2
  output chan_t                 sys,
  output chan_t                 par
);

  chan_t mem_sys [N];
  chan_t mem_p1  [N];
  chan_t mem_p2  [N];

  always_ff @(posedge clk) begin
    if (ld_en) begin
      mem_sys[ld_addr] <= ld_sys;
      mem_p1[ld_addr]  <= ld_p1;
      mem_p2[ld_addr]  <= ld_p2;
    end
    sys <= mem_sys[rd_sys_addr];
    par <= rd_par_sel ? mem_p2[rd_par_addr] : mem_p1[rd_par_addr];
  end

endmodule
