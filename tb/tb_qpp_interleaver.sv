// tb_qpp_interleaver - checks every address of the 512-bit interleaver
// against a recursive evaluation of the polynomial (pi(k+1) = pi(k) + g(k),
// g(k+1) = g(k) + 2*F2, all mod N) and that the mapping is a permutation.
`timescale 1ns/1ps
module tb_qpp_interleaver;
  localparam int N = 512, F1 = 31, F2 = 64;
  logic [8:0] k, pi;
  qpp_interleaver dut (.*);

  int checks = 0, failures = 0;
  bit used [N];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, g;
    p = 0; g = (F1 + F2) % N;
    for (int i = 0; i < N; i++) begin
      k = 9'(i);
      #1;
      checks++;
      if (int'(pi) != p) begin
        failures++;
        if (failures < 10) $display("k=%0d pi=%0d expected %0d", i, pi, p);
      end
      if (used[pi]) failures++;
      used[pi] = 1;
      p = (p + g) % N;
      g = (g + 2 * F2) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
