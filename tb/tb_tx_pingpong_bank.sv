// tb_tx_pingpong_bank: writes random samples into every channel's RAM from
// the BBPU clock and reads them back on all channels in parallel from an
// unrelated RF clock; a write to one channel must not touch the others.
// The 512 x 4 geometry follows the original design.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_tx_pingpong_bank;
  `TB_COUNTERS
  localparam int N = 4;
  logic wclk = 0, rclk = 0, we = 0;
  logic [1:0] wch = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [3:0] wdata = 0;
  logic [3:0] rdata [N];
  logic [3:0] ref_mem [N][512];
  always #5 wclk = ~wclk;
  always #8 rclk = ~rclk;
  `WATCHDOG(wclk, 200000)
  tx_pingpong_bank #(.N_CH(N)) dut (.*);
  initial begin
    for (int c = 0; c < N; c++) for (int a = 0; a < 512; a++) begin
      @(negedge wclk); we = 1; wch = 2'(c); waddr = 9'(a); wdata = 4'($urandom); ref_mem[c][a] = wdata;
    end
    @(negedge wclk); we = 0;
    for (int i = 0; i < 300; i++) begin
      automatic int a = $urandom_range(0, 511);
      @(negedge rclk); raddr = 9'(a);
      @(posedge rclk); #1;
      for (int c = 0; c < N; c++)
        `CHECK(rdata[c] == ref_mem[c][a], $sformatf("ch%0d addr %0d", c, a))
    end
    `TB_DONE
  end
endmodule
