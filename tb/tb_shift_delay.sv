// tb_shift_delay: three channels interleaved in ticks of 8 samples. For
// every item the delayed output must be the sample of the same channel four
// samples earlier (zero before the first ones), across context switches.
// The 4-sample delay is this design's reading of the original shift delay.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
`include "tb/tb_rx_stage_drv.svh"
module tb_shift_delay;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, ctx_clear = 0;
  rx_sample_t in_smp, out_now, out_del;
  tag_t out_tag;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  `RX_TAGS(3)
  shift_delay #(.N_CH(3)) dut (.*);
  rx_sample_t hist [3][$];
  rx_sample_t exp_now, exp_del;
  logic have = 0;
  always_ff @(posedge clk) in_smp <= rx_sample_t'($urandom);
  always @(posedge clk) if (rst_n) begin
    if (have) `CHECK(out_del == exp_del && out_now == exp_now, "delayed sample")
    have = in_tag.occ;
    if (in_tag.occ) begin
      exp_now = in_smp;
      exp_del = hist[in_tag.ch].pop_front();
      hist[in_tag.ch].push_back(in_smp);
    end
  end
  initial begin
    for (int c = 0; c < 3; c++) repeat (4) hist[c].push_back('0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    `TB_DONE
  end
endmodule
