// tb_dp_bram: random writes on one clock, reads on an unrelated clock,
// compared with a reference array; checks the one-cycle read latency.
// Generic RAM test; nothing here is specific to the original design.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_dp_bram;
  `TB_COUNTERS
  logic wclk = 0, rclk = 0, we = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem [1024];
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  `WATCHDOG(wclk, 100000)
  dp_bram #(.W(8), .DEPTH(1024)) dut (.wclk, .we, .waddr, .wdata, .rclk, .raddr, .rdata);
  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge wclk); we = 1; waddr = 10'(i); wdata = 8'($urandom); ref_mem[i] = wdata;
    end
    @(negedge wclk); we = 0;
    for (int i = 0; i < 300; i++) begin
      automatic int a = $urandom_range(0, 1023);
      @(negedge rclk); raddr = 10'(a);
      @(posedge rclk); #1;
      `CHECK(rdata == ref_mem[a], $sformatf("addr %0d got %h", a, rdata))
    end
    `TB_DONE
  end
endmodule
