// tb_ctx_ram: context memory behaviour: unwritten entries read as zero,
// written entries read back one cycle later, a same-cycle write and read
// of one address returns the new word, and clear returns all to zero.
// Bypass and clear behaviour are this design's choices.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_ctx_ram;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, clear = 0, we = 0, re = 0;
  logic [2:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] ref_mem [8];
  logic [7:0]  written = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  ctx_ram #(.W(16), .DEPTH(8)) dut (.clk, .rst_n, .clear, .we, .waddr, .wdata, .re, .raddr, .rdata);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      automatic int a = $urandom_range(0, 7);
      automatic logic [15:0] exp;
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1); waddr = 3'($urandom_range(0, 7)); wdata = 16'($urandom);
      if (i % 3 == 0) a = waddr;
      re = 1; raddr = 3'(a);
      exp = (we && waddr == raddr) ? wdata : (written[a] ? ref_mem[a] : 16'h0);
      if (we) begin ref_mem[waddr] = wdata; written[waddr] = 1; end
      @(posedge clk); #1;
      `CHECK(rdata == exp, $sformatf("read %0d got %h exp %h", a, rdata, exp))
      if (i == 200) begin
        @(negedge clk); we = 0; re = 0; clear = 1; written = 0;
        @(negedge clk); clear = 0;
      end
    end
    `TB_DONE
  end
endmodule
