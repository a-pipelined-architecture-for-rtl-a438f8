// tb_lifo_ram - checks the window-reversing LIFO in the way the SISO uses
// it: in each phase one window per sub-block (M interleaved streams) is
// written while the previous phase's data is read back at the same index,
// with alternating direction. Read data must be the previous phase's entry
// of the same sub-block at the mirrored step, one cycle after the read.
`timescale 1ns/1ps
module tb_lifo_ram;
  localparam int DEPTH = 128, M = 4, WIDTH = 19, L = DEPTH / M, PH = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0, re = 0, wdir = 0, rdir = 0;
  logic [6:0] widx = 0, ridx = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;

  lifo_ram #(.DEPTH(DEPTH), .M(M), .WIDTH(WIDTH)) dut (.*);

  int data [PH][DEPTH];
  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ph = 0; ph < PH; ph++) begin
      for (int c = 0; c < DEPTH; c++) begin
        @(negedge clk);
        data[ph][c] = $urandom_range((1 << WIDTH) - 1, 0);
        we = (ph < PH - 1); widx = 7'(c); wdir = ph[0]; wdata = WIDTH'(data[ph][c]);
        re = (ph > 0); ridx = 7'(c); rdir = ~ph[0];
        @(posedge clk); #1;
        if (ph > 0) begin
          int b, j;
          b = c % M; j = c / M;
          checks++;
          if (int'(rdata) != data[ph-1][M * (L - 1 - j) + b]) begin
            failures++;
            if (failures < 10) $display("ph=%0d c=%0d got %0h", ph, c, rdata);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
