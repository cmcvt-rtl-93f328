// tb_ddc_bank: plays a complex tone, computed with real arithmetic, at the
// centre frequency of one channel at a time into the eight-channel DDC
// bank. After the filter has settled, that channel must carry a steady
// sample of the tone's amplitude (gain shift undone), and every other
// channel must be far weaker (the channel filter's stop band). The write
// strobe must come every 8 RF clocks with addresses 0..7 in alternating
// halves.
// The 5 MHz channel spacing follows IEEE 802.15.4; the 30x (29.5 dB)
// rejection limit is this testbench's choice, below the original's 33 dB
// figure because of the 8-bit coefficients and NCO spurs.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_ddc_bank;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  localparam int N = 8;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] rx_i = 0, rx_q = 0;
  logic pp_we, wr_half;
  logic [3:0] pp_waddr;
  logic [11:0] pp_wdata [N];
  logic [2:0] agc_shift [N];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)
  ddc_bank #(.N_CH(N)) dut (.*);

  int tone = 0;
  real amp = 1000.0;
  longint n = 0;
  always @(negedge clk) begin
    automatic int inc = int'(nco_inc(tone));
    automatic real ph = 2.0 * PI * real'((longint'(inc) * n) % 128) / 128.0;
    rx_i = 12'($rtoi(amp * $cos(ph) + 1000.5) - 1000);
    rx_q = 12'($rtoi(amp * $sin(ph) + 1000.5) - 1000);
    n++;
  end

  // write schedule
  int last_we = -1, cyc = 0, nwe = 0;
  logic [3:0] exp_a = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pp_we) begin
      if (last_we >= 0) `CHECK(cyc - last_we == 8, "write every 8 clocks")
      `CHECK(pp_waddr == exp_a, $sformatf("write address %0d exp %0d", pp_waddr, exp_a))
      exp_a = exp_a + 4'd1;
      last_we = cyc;
      nwe++;
    end
  end

  real mag [N];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < N; t++) begin
      tone = t;
      amp = (t % 2) ? 1000.0 : 1900.0;
      // settle: filter plus two AGC blocks of 64 outputs
      repeat (8 * 64 * 3) @(posedge clk);
      for (int c = 0; c < N; c++) mag[c] = 0.0;
      for (int k = 0; k < 64; k++) begin
        @(posedge clk iff pp_we); #1;
        for (int c = 0; c < N; c++) begin
          automatic int si = int'($signed(pp_wdata[c][11:6])) << agc_shift[c];
          automatic int sq = int'($signed(pp_wdata[c][5:0])) << agc_shift[c];
          mag[c] += $sqrt(real'(si * si + sq * sq)) / 64.0;
        end
      end
      `CHECK(mag[t] > 0.8 * amp && mag[t] < 1.2 * amp,
             $sformatf("tone in ch%0d: magnitude %f exp %f", t, mag[t], amp))
      for (int c = 0; c < N; c++) if (c != t)
        `CHECK(mag[c] < mag[t] / 30.0,
               $sformatf("tone in ch%0d leaks into ch%0d: %f vs %f", t, c, mag[c], mag[t]))
    end
    `CHECK(nwe > 1000, "writes seen")
    `TB_DONE
  end
endmodule
