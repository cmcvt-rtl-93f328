// tb_chip_to_sample: two channels served alternately, random chips and
// on-air flags. Every tick's 256 written samples are compared with an
// O-QPSK reference: I = chip 2*(j/8), Q = chip 2*((j-4)/8)+1, and the first
// four Q samples carry the last chip of the same channel's previous byte
// (the stage's context). Also checks addresses, halves and the write count.
// The even-I / odd-Q split and half-chip Q delay follow IEEE 802.15.4
// O-QPSK; the 4-bit sample encoding is this design's.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_chip_to_sample;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, run = 0, ctx_clear = 1, tick_start = 0, tick_last = 0, half_in = 0;
  logic [7:0] tick_cnt = 0;
  tag_t in_tag = '0;
  logic in_valid = 0;
  logic [63:0] in_chips = 0;
  logic wr_en;
  logic [0:0] wr_ch;
  logic [8:0] wr_addr;
  tx_sample_t wr_data;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)
  chip_to_sample #(.N_CH(2)) dut (.*);

  tx_sample_t mem [2][512];
  int nwr [2];
  logic [63:0] chips_t [40];
  logic        valid_t [40];
  always @(posedge clk) if (wr_en) begin
    mem[wr_ch][wr_addr] <= wr_data;
    nwr[wr_ch]++;
  end

  initial begin
    logic pv [2], pc [2];
    pv = '{0, 0}; pc = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); run = 1; ctx_clear = 0;
    for (int t = 0; t < 40; t++) begin
      chips_t[t] = {32'($urandom), 32'($urandom)};
      valid_t[t] = ($urandom_range(0, 3) != 0);
    end
    // item 0 presented before the first tick
    in_tag = '{occ: 1'b1, first: 1'b1, last: 1'b1, ch: 8'd0};
    in_chips = chips_t[0]; in_valid = valid_t[0];
    for (int t = 0; t < 40; t++) begin
      for (int c = 0; c < 256; c++) begin
        @(negedge clk);
        tick_cnt = 8'(c); tick_start = (c == 0); tick_last = (c == 255);
        half_in = t[1];
        if (c == 1 && t < 39) begin
          in_tag.ch = 8'((t + 1) % 2);
          in_chips = chips_t[t + 1]; in_valid = valid_t[t + 1];
        end
        if (c == 1 && t > 0) begin
          // all samples of item t-1 are now written
          automatic int ch = (t - 1) % 2;
          automatic int h = (t - 1) / 2 % 2;
          automatic int bad = 0;
          for (int j = 0; j < 256; j++) begin
            automatic tx_sample_t e;
            e.i_on = valid_t[t-1];
            e.i_chip = chips_t[t-1][2 * (j / 8)];
            if (j < 4) begin e.q_on = pv[ch]; e.q_chip = pc[ch]; end
            else begin e.q_on = valid_t[t-1]; e.q_chip = chips_t[t-1][2 * ((j - 4) / 8) + 1]; end
            if (mem[ch][h * 256 + j] != e) bad++;
          end
          `CHECK(bad == 0, $sformatf("item %0d: %0d wrong samples", t - 1, bad))
          pv[ch] = valid_t[t-1]; pc[ch] = chips_t[t-1][63];
        end
      end
    end
    @(posedge clk); #1;
    `CHECK(nwr[0] + nwr[1] == 39 * 256 + 255, $sformatf("%0d samples written", nwr[0] + nwr[1]))
    `TB_DONE
  end
endmodule
