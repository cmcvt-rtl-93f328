// tb_complex_mult: random sample pairs; the real and imaginary parts of
// now * conj(delayed) and the differential chip bit (Im > 0) are checked
// one cycle later.
// Expected products are computed here from the sample values.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_complex_mult;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, out_bit;
  tag_t in_tag = '0, out_tag;
  rx_sample_t in_now, in_del;
  logic signed [12:0] out_re, out_im;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  complex_mult dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (1000) begin
      automatic int a, b, c, d;
      @(negedge clk);
      in_now = rx_sample_t'($urandom); in_del = rx_sample_t'($urandom);
      in_tag = tag_t'($urandom);
      a = in_now.i; b = in_now.q; c = in_del.i; d = in_del.q;
      @(negedge clk);
      `CHECK(out_re == 13'(a * c + b * d) && out_im == 13'(b * c - a * d), "product")
      `CHECK(out_bit == (b * c - a * d > 0) && out_tag == in_tag, "bit and tag")
    end
    `TB_DONE
  end
endmodule
