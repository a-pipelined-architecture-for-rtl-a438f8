// tb_input_buffer - loads a random frame and reads it back through both read
// ports with independent addresses, parity of either code, checking the
// registered one-cycle read.
`timescale 1ns/1ps
module tb_input_buffer;
  import turbo_pkg::*;
  localparam int N = 512;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ld_en = 0, rd_par_sel = 0;
  logic [8:0] ld_addr = 0, rd_sys_addr = 0, rd_par_addr = 0;
  chan_t ld_sys = 0, ld_p1 = 0, ld_p2 = 0, sys, par;

  input_buffer dut (.*);

  int s [N], p1 [N], p2 [N];
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      s[k] = int'($urandom_range(63, 0)) - 32;
      p1[k] = int'($urandom_range(63, 0)) - 32;
      p2[k] = int'($urandom_range(63, 0)) - 32;
      ld_en = 1; ld_addr = 9'(k); ld_sys = chan_t'(s[k]); ld_p1 = chan_t'(p1[k]); ld_p2 = chan_t'(p2[k]);
    end
    @(negedge clk);
    ld_en = 0;
    for (int t = 0; t < 1500; t++) begin
      int a, b, sel;
      a = $urandom_range(N - 1, 0); b = $urandom_range(N - 1, 0); sel = $urandom_range(1, 0);
      rd_sys_addr = 9'(a); rd_par_addr = 9'(b); rd_par_sel = sel[0];
      @(posedge clk); #1;
      checks++;
      if (int'(sys) != s[a] || int'(par) != (sel != 0 ? p2[b] : p1[b])) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
