// tb_sync_2ff: a level change on d must appear on q after exactly two
// destination clock edges, and not earlier.
// Two flip-flop stages follow the original design.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sync_2ff;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, d = 0, q;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000)
  sync_2ff dut (.clk, .rst_n, .d, .q);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      automatic logic v = ~d;
      @(negedge clk); d = v;
      @(posedge clk); #1;
      `CHECK(q != v, "q changed after one edge")
      @(posedge clk); #1;
      `CHECK(q == v, "q follows after two edges")
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    `TB_DONE
  end
endmodule
