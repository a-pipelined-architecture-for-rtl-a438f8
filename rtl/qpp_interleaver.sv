// qpp_interleaver - interleaver address generator.
//
// Maps a natural-order index k of the N-bit frame to its interleaved
// position pi(k) = (F1*k + F2*k^2) mod N, a quadratic permutation
// polynomial. The design uses a 512-bit interleaver but does not state its
// law; the polynomial with F1 = 31, F2 = 64 (the LTE one for 512 bits) is
// this design's choice. Computing the address instead of storing a table
// keeps the interleaver memory to the extrinsic values only.
// Timing: purely combinational.
module qpp_interleaver #(
  parameter int N  = 512,
  parameter int F1 = 31,
  parameter int F2 = 64
) (
  input  logic [$clog2(N)-1:0] k,
  output logic [$clog2(N)-1:0] pi
);

  localparam int AW = $clog2(N);

  logic [2*AW+8:0] kk, acc;

  always_comb begin
    kk  = (2*AW+9)'(k) * (2*AW+9)'(k);
    acc = (2*AW+9)'(F1) * (2*AW+9)'(k) + (2*AW+9)'(F2) * kk;
    pi  = AW'(acc % (2*AW+9)'(N));
  end

endmodule
