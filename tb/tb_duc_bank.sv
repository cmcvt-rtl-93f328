// tb_duc_bank: two of eight channels are enabled and their ping-pong RAMs
// (modelled here, one-clock registered read) hold random ternary samples.
// The expected output is computed with real arithmetic: for each channel the
// I pulse value is +-127*sin(pi*p/64) with p the position within the
// 8-sample chip period, the Q pulse is the same half a chip later, and the
// complex baseband is rotated by the channel's carrier offset. Checks: zero
// output before the first half swap after enable, the output against the
// model within a few LSB, the read address sequence and the half swap
// every 2048 RF clocks (256 samples at 8 MHz).
// Half-sine O-QPSK shaping follows IEEE 802.15.4; channel offsets follow the
// original spectrum plot.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_duc_bank;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  localparam int N = 8;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ch_en = '0;
  logic [8:0] raddr;
  logic [3:0] rdata [N];
  logic rd_half;
  logic signed [11:0] tx_i, tx_q;
  logic [3:0] mem [N][512];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  duc_bank #(.N_CH(N)) dut (.*);

  always_ff @(posedge clk) for (int c = 0; c < N; c++) rdata[c] <= mem[c][raddr];

  // history of the read address, indexed by clock count since reset
  int t = 0;
  logic [8:0] ahist [int];
  int ena_t = -1, first_swap = -1, nswap = 0, last_swap = -1;
  logic rd_half_q = 0;
  int a = 0, b = 0;  // enabled channels

  function automatic real pulse(logic on, logic chip, int p);
    real v;
    if (!on) return 0.0;
    v = 127.0 * $sin(PI * real'(p % 64) / 64.0);
    return chip ? v : -v;
  endfunction

  // all values are sampled just after the clock edge; t counts edges
  always @(posedge clk) if (rst_n) begin
    #1;
    t++;
    ahist[t] = raddr;
    if (rd_half != rd_half_q) begin
      if (last_swap >= 0) `CHECK(t - last_swap == 2048, "half swap every 2048 clocks")
      last_swap = t;
      nswap++;
      if (ena_t >= 0 && first_swap < 0) first_swap = t;
    end
    rd_half_q = rd_half;
    if (t > 1) `CHECK(raddr == 9'(ahist[t-1] + ((t % 8 == 0) ? 1 : 0)), "read address sequence")
    // the output now holds the sample addressed at t-3, rotated by the
    // carrier phase of t-2
    if (t >= 4) begin
      if (first_swap < 0 || t < first_swap + 3) begin
        `CHECK(tx_i == 0 && tx_q == 0, $sformatf("silent before start, t=%0d", t))
      end else begin
        automatic real ei = 0.0, eq = 0.0;
        automatic int ad = int'(ahist[t-3]);
        automatic int p = (ad % 8) * 8 + ((t - 3) % 8);
        for (int k = 0; k < 2; k++) begin
          automatic int c = k ? b : a;
          automatic tx_sample_t s = mem[c][ad];
          automatic real bi = pulse(s.i_on, s.i_chip, p);
          automatic real bq = pulse(s.q_on, s.q_chip, p + 32);
          automatic real th = 2.0 * PI * real'(int'(nco_inc(c)) * (t - 2) % 128) / 128.0;
          ei += (bi * $cos(th) - bq * $sin(th)) * 127.0 / 128.0;
          eq += (bi * $sin(th) + bq * $cos(th)) * 127.0 / 128.0;
        end
        `CHECK((real'(tx_i) - ei) ** 2 < 16.0 && (real'(tx_q) - eq) ** 2 < 16.0,
               $sformatf("t=%0d out %0d,%0d exp %f,%f", t, tx_i, tx_q, ei, eq))
      end
    end
  end

  initial begin
    a = 2; b = 7;
    for (int c = 0; c < N; c++) for (int i = 0; i < 512; i++) mem[c][i] = 4'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (1000) @(posedge clk);
    ch_en[a] = 1; ch_en[b] = 1; ena_t = t;
    repeat (3 * 2048 + 500) @(posedge clk);
    `CHECK(nswap >= 3 && first_swap > ena_t, "swaps seen")
    `TB_DONE
  end
endmodule
