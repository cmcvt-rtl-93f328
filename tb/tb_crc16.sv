// tb_crc16: checks the byte-wise FCS update against a bit-serial reference
// (LFSR with x^16+x^12+x^5+1, LSB first) for random data, and against the
// published FCS bytes of the eight demonstration frames.
// The reference is a bitwise model of the IEEE 802.15.4 FCS.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_crc16;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  logic [15:0] cin, cout;
  logic [7:0]  d;
  crc16 dut (.crc_in(cin), .data(d), .crc_out(cout));

  function automatic logic [15:0] ref_byte(input logic [15:0] c, input logic [7:0] b);
    for (int k = 0; k < 8; k++) begin
      automatic logic fb = c[0] ^ b[k];
      c = {1'b0, c[15:1]};
      if (fb) begin c[15] ^= 1'b1; c[10] ^= 1'b1; c[3] ^= 1'b1; end
    end
    return c;
  endfunction

  logic [15:0] pub [8] = '{16'h9bed, 16'hc594, 16'h6af4, 16'h7474,
                           16'hae47, 16'ha78c, 16'h87a2, 16'h42b5};
  initial begin
    for (int i = 0; i < 500; i++) begin
      cin = 16'($urandom); d = 8'($urandom); #1;
      `CHECK(cout == ref_byte(cin, d), $sformatf("crc %h %h -> %h", cin, d, cout))
    end
    for (int c = 0; c < 8; c++) begin
      automatic logic [15:0] acc = 0;
      for (int i = 0; i < 6 + 4 * c; i++) begin
        cin = acc; d = 8'(c + i); #1; acc = cout;
      end
      `CHECK({acc[7:0], acc[15:8]} == pub[c], $sformatf("frame %0d fcs %h", c, acc))
    end
    `TB_DONE
  end
endmodule
