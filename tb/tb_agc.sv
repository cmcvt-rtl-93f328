// tb_agc: feeds blocks of 64 random complex samples, each block with its own
// peak amplitude (from a few LSB up to the full 13-bit range). The expected
// gain shift for a block is worked out from the previous block's peak, and
// every output sample is checked against the shifted, saturated input.
// The AGC rule checked here is this design's own (the original only asks for
// a per-channel digital AGC).
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_agc;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, in_stb = 0;
  logic signed [12:0] in_i = 0, in_q = 0;
  logic out_stb;
  logic signed [5:0] out_i, out_q;
  logic [2:0] shift;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  agc #(.BLOCK(64)) dut (.*);

  function automatic int sat(int x);
    return x > 31 ? 31 : x < -32 ? -32 : x;
  endfunction

  initial begin
    int exp_s = 7, nchg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      automatic int amp = 1 << $urandom_range(1, 12);
      automatic int pk = 0, ns;
      amp = amp - 1 + $urandom_range(0, 1);
      `CHECK(shift == 3'(exp_s), $sformatf("block %0d shift %0d exp %0d", b, shift, exp_s))
      for (int n = 0; n < 64; n++) begin
        automatic int vi = $urandom_range(0, 2 * amp) - amp;
        automatic int vq = $urandom_range(0, 2 * amp) - amp;
        if (vi > 4095) vi = 4095;
        if (vq > 4095) vq = 4095;
        if (vi < -4095) vi = -4095;
        if (vq < -4095) vq = -4095;
        pk = (vi < 0 ? -vi : vi) > pk ? (vi < 0 ? -vi : vi) : pk;
        pk = (vq < 0 ? -vq : vq) > pk ? (vq < 0 ? -vq : vq) : pk;
        @(negedge clk); in_stb = 1; in_i = 13'(vi); in_q = 13'(vq);
        @(posedge clk); #1;
        `CHECK(out_stb && out_i == 6'(sat(vi >>> exp_s)) && out_q == 6'(sat(vq >>> exp_s)),
               $sformatf("sample %0d/%0d out %0d,%0d in %0d,%0d s%0d", b, n, out_i, out_q, vi, vq, exp_s))
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk); in_stb = 0;
          @(posedge clk); #1;
          `CHECK(!out_stb, "no strobe without input")
        end
      end
      ns = 7;
      for (int s = 6; s >= 0; s--) if ((pk >> s) <= 31) ns = s;
      if (ns != exp_s) nchg++;
      exp_s = ns;
    end
    `CHECK(nchg > 10, "gain changed during the test")
    `TB_DONE
  end
endmodule
