// tb_serial_to_parallel: three channels interleaved in ticks of 8 bits; the
// parallel word of each item must be that channel's last 128 bits, newest
// in bit 0, continuing across context switches.
// The 128-bit history length is this design's choice.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
`include "tb/tb_rx_stage_drv.svh"
module tb_serial_to_parallel;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, ctx_clear = 0, in_bit;
  logic [127:0] out_hist, exp_h;
  logic [127:0] h [3];
  tag_t out_tag;
  logic have = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  `RX_TAGS(3)
  serial_to_parallel #(.N_CH(3)) dut (.*);
  always_ff @(posedge clk) in_bit <= 1'($urandom);
  always @(posedge clk) if (rst_n) begin
    if (have) `CHECK(out_hist == exp_h, "history word")
    have = in_tag.occ;
    if (in_tag.occ) begin
      h[in_tag.ch] = {h[in_tag.ch][126:0], in_bit};
      exp_h = h[in_tag.ch];
    end
  end
  initial begin
    h = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    `TB_DONE
  end
endmodule
