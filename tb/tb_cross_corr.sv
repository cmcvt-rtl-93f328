// tb_cross_corr: builds chip histories from the 802.15.4 chip table (given
// here as text) with the differential rule d_k = c_k xor c_(k-1) xor (k odd)
// for a random symbol, flips up to 5 of its chips and fills the other bits
// at random; the correlator must return that symbol and 31 minus the number
// of flipped chips.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_cross_corr;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0;
  tag_t in_tag = '0, out_tag;
  logic [127:0] in_hist;
  logic [3:0] out_sym;
  logic [4:0] out_score;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  cross_corr dut (.*);
  string tab [16] = '{
    "11011001110000110101001000101110", "11101101100111000011010100100010",
    "00101110110110011100001101010010", "00100010111011011001110000110101",
    "01010010001011101101100111000011", "00110101001000101110110110011100",
    "11000011010100100010111011011001", "10011100001101010010001011101101",
    "10001100100101100000011101111011", "10111000110010010110000001110111",
    "01111011100011001001011000000111", "01110111101110001100100101100000",
    "00000111011110111000110010010110", "01100000011101111011100011001001",
    "10010110000001110111101110001100", "11001001011000000111011110111000"};
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (500) begin
      automatic int s = $urandom_range(0, 15);
      automatic int nerr = $urandom_range(0, 5);
      automatic logic [31:0] flip = 0;
      while ($countones(flip) < nerr) flip[$urandom_range(1, 31)] = 1'b1;
      @(negedge clk);
      in_hist = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 1; k < 32; k++) begin
        automatic logic d = (tab[s][k] != tab[s][k-1]) ^ (k % 2 == 1);
        in_hist[4 * (31 - k)] = d ^ flip[k];
      end
      @(negedge clk);
      `CHECK(out_sym == 4'(s) && out_score == 5'(31 - nerr),
             $sformatf("sym %0d err %0d -> %0d score %0d", s, nerr, out_sym, out_score))
    end
    `TB_DONE
  end
endmodule
