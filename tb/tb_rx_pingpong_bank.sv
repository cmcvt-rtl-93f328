// tb_rx_pingpong_bank: writes random 12-bit samples into all channels at
// once from the RF clock and reads them back channel by channel from an
// unrelated BBPU clock, checking the one-cycle read latency and that the
// channel select follows the address by one clock.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_rx_pingpong_bank;
  `TB_COUNTERS
  localparam int N = 8;
  logic wclk = 0, rclk = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [11:0] wdata [N];
  logic [2:0] rch = 0;
  logic [11:0] rdata;
  logic [11:0] ref_mem [N][16];
  always #8 wclk = ~wclk;
  always #3 rclk = ~rclk;
  `WATCHDOG(wclk, 100000)
  rx_pingpong_bank #(.N_CH(N)) dut (.*);
  initial begin
    for (int c = 0; c < N; c++) wdata[c] = '0;
    for (int round = 0; round < 20; round++) begin
      for (int a = 0; a < 16; a++) begin
        @(negedge wclk); we = 1; waddr = 4'(a);
        for (int c = 0; c < N; c++) begin
          wdata[c] = 12'($urandom); ref_mem[c][a] = wdata[c];
        end
      end
      @(negedge wclk); we = 0;
      // back-to-back reads as the BBPU does them: a new channel and address
      // are presented right after every edge, the data of the previous pair
      // arrives one clock later
      @(negedge rclk);
      rch = 3'($urandom); raddr = 4'($urandom);
      for (int i = 0; i <= 64; i++) begin
        automatic int pc = int'(rch), pa = int'(raddr);
        @(posedge rclk); #0.2;
        rch = 3'($urandom); raddr = 4'($urandom);
        #0.3;
        `CHECK(rdata == ref_mem[pc][pa], $sformatf("ch%0d addr %0d", pc, pa))
      end
    end
    `TB_DONE
  end
endmodule
