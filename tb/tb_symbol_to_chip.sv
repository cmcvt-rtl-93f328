// tb_symbol_to_chip: the chip words against the IEEE 802.15.4 2.4 GHz chip
// table written out here symbol by symbol (c0 first).
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_symbol_to_chip;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, run = 1, tick_start = 0, in_valid = 1, out_valid;
  tag_t in_tag = '0, out_tag;
  logic [3:0] in_sym0 = 0, in_sym1 = 0;
  logic [63:0] out_chips;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  symbol_to_chip dut (.*);
  string tab [16] = '{
    "11011001110000110101001000101110", "11101101100111000011010100100010",
    "00101110110110011100001101010010", "00100010111011011001110000110101",
    "01010010001011101101100111000011", "00110101001000101110110110011100",
    "11000011010100100010111011011001", "10011100001101010010001011101101",
    "10001100100101100000011101111011", "10111000110010010110000001110111",
    "01111011100011001001011000000111", "01110111101110001100100101100000",
    "00000111011110111000110010010110", "01100000011101111011100011001001",
    "10010110000001110111101110001100", "11001001011000000111011110111000"};
  function automatic logic [31:0] ref_chips(input int s);
    logic [31:0] r;
    for (int k = 0; k < 32; k++) r[k] = (tab[s][k] == "1");
    return r;
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 16; a++) for (int b = 0; b < 16; b += 5) begin
      @(negedge clk); in_sym0 = 4'(a); in_sym1 = 4'(b); tick_start = 1;
      @(negedge clk); tick_start = 0;
      `CHECK(out_chips[31:0] == ref_chips(a) && out_chips[63:32] == ref_chips(b),
             $sformatf("symbols %0d %0d", a, b))
    end
    `TB_DONE
  end
endmodule
