// tb_extrinsic_mem - writes random extrinsic values at random addresses
// while reading others, and checks the registered read against a shadow
// copy, including read-during-write of one address (old value).
`timescale 1ns/1ps
module tb_extrinsic_mem;
  import turbo_pkg::*;
  localparam int N = 512;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [8:0] waddr = 0, raddr = 0;
  ext_t wdata = 0, rdata;

  extrinsic_mem dut (.*);

  int shadow [N];
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
      shadow[k] = int'($urandom_range(127, 0)) - 64;
      we = 1; waddr = 9'(k); wdata = ext_t'(shadow[k]);
    end
    for (int t = 0; t < 2000; t++) begin
      int a, r, v;
      @(negedge clk);
      a = $urandom_range(N - 1, 0);
      r = (t % 5 == 0) ? a : int'($urandom_range(N - 1, 0));
      v = int'($urandom_range(127, 0)) - 64;
      we = 1; waddr = 9'(a); wdata = ext_t'(v); raddr = 9'(r);
      @(posedge clk); #1;
      checks++;
      if (int'(rdata) != shadow[r]) failures++;
      shadow[a] = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
