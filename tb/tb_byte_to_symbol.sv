// tb_byte_to_symbol: at each tick the stage outputs the low nibble as the
// first symbol and the high nibble as the second, with tag and valid flag;
// between ticks the outputs hold.
// Low nibble first follows IEEE 802.15.4.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_byte_to_symbol;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, run = 1, tick_start = 0, in_valid = 0, out_valid;
  tag_t in_tag = '0, out_tag;
  logic [7:0] in_byte = 0;
  logic [3:0] out_sym0, out_sym1;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  byte_to_symbol dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic logic v = 1'($urandom);
      automatic logic [7:0] c = 8'($urandom_range(0, 7));
      @(negedge clk);
      in_byte = b; in_valid = v; in_tag = '{occ: 1'b1, first: 1'b1, last: 1'b1, ch: c};
      tick_start = 1;
      @(negedge clk);
      tick_start = 0; in_byte = ~b;
      `CHECK(out_sym0 == b[3:0] && out_sym1 == b[7:4], $sformatf("byte %h -> %h %h", b, out_sym0, out_sym1))
      `CHECK(out_valid == v && out_tag.ch == c, "tag and valid")
      @(negedge clk);
      `CHECK(out_sym0 == b[3:0], "holds between ticks")
    end
    `TB_DONE
  end
endmodule
