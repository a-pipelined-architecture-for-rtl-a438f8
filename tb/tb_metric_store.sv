// tb_metric_store - checks that entries read as zero vectors after reset and
// after clear, return what was written otherwise, and that a read in the
// cycle of a write to the same entry returns the old contents.
`timescale 1ns/1ps
module tb_metric_store;
  import turbo_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, we = 0;
  logic [4:0] waddr = 0, raddr = 0;
  metric_vec_t wdata = '0, rdata;

  metric_store #(.DEPTH(DEPTH)) dut (.*);

  metric_vec_t shadow [DEPTH];
  bit          valid [DEPTH];
  int checks = 0, failures = 0;

  function automatic metric_vec_t rnd();
    metric_vec_t v;
    for (int s = 0; s < NS; s++) v[s] = 9'($urandom_range(511, 1));
    return v;
  endfunction

  task automatic check_all();
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 5'(a);
      #1;
      checks++;
      if (rdata != (valid[a] ? shadow[a] : '0)) failures++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      @(negedge clk);
      check_all();
      for (int t = 0; t < 40; t++) begin
        int a;
        @(negedge clk);
        a = $urandom_range(DEPTH - 1, 0);
        we = 1; waddr = 5'(a); wdata = rnd(); raddr = 5'(a);
        #1;
        checks++;
        if (rdata != (valid[a] ? shadow[a] : '0)) failures++;
        @(posedge clk); #1;
        we = 0;
        shadow[a] = wdata; valid[a] = 1;
      end
      @(negedge clk);
      check_all();
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int a = 0; a < DEPTH; a++) valid[a] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
