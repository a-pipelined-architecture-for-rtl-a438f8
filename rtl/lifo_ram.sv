// lifo_ram - window-reversing LIFO buffer for block-interleaved data.
//
// The beta unit visits each window of a sub-block backwards in time, the
// alpha unit forwards, so everything the alpha side needs from the beta side
// (the input samples, and the beta vectors themselves) must be reversed one
// window at a time. With M sub-blocks interleaved cycle by cycle, entry
// idx = M*j + b is step j of sub-block b; reversing a window means mapping
// it to M*(DEPTH/M-1-j) + b. The buffer is one DEPTH-entry array
// (DEPTH = M*L). A phase's data is written with direction wdir (identity or
// reversed map) and read in the next phase with rdir equal to that same
// direction, which applies the other map. Alternating the direction every
// phase makes the write of step idx in phase p+1 land on exactly the entry
// that the read of step idx of phase p's data uses, so one window is read
// while the next is written into the same array. This addressing is this
// design's own; the buffer sizes (4L entries) follow the design.
// Timing: rdata is registered, one cycle after re; a read and a write of the
// same entry in one cycle return the old data.
module lifo_ram #(
  parameter int DEPTH = 128,
  parameter int M     = 4,
  parameter int WIDTH = 19
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  widx,
  input  logic                      wdir,
  input  logic [WIDTH-1:0]          wdata,
  input  logic                      re,
  input  logic [$clog2(DEPTH)-1:0]  ridx,
  input  logic                      rdir,
  output logic [WIDTH-1:0]          rdata
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  function automatic logic [AW-1:0] rev(input logic [AW-1:0] idx);
    return AW'(DEPTH - M) - AW'((idx / AW'(M)) * AW'(M)) + AW'(idx % AW'(M));
  endfunction

  logic [AW-1:0] waddr, raddr;
  assign waddr = wdir ? rev(widx) : widx;
  assign raddr = rdir ? ridx : rev(ridx);

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
