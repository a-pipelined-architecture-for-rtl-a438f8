// extrinsic_mem - interleaver/de-interleaver memory.
//
// Holds one extrinsic LLR per trellis step of the frame. The first
// constituent decoding reads and writes it at natural addresses k; the
// second reads and writes it at interleaved addresses pi(k), which
// interleaves the values on the way in and de-interleaves them on the way
// out, so a single array serves both directions. Each address is read in a
// half-iteration before it is rewritten in the same half-iteration.
// Timing: simple dual port, write at the clock edge, registered read one
// cycle after raddr (old data when both touch one address).
module extrinsic_mem
  import turbo_pkg::*;
#(
  parameter int N = 512
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [$clog2(N)-1:0]  waddr,
  input  ext_t                  wdata,
  input  logic [$clog2(N)-1:0]  raddr,
  output ext_t                  rdata
);

  ext_t mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
