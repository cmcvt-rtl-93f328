// complex_mult: differential detector of the virtual receiver's BBPU. It
// multiplies the current sample by the conjugate of the sample one chip
// earlier, z = r[n] * conj(r[n-4]). For the O-QPSK (MSK-like) signal the
// phase turns by +/-90 degrees per chip, so the sign of Im(z) is the
// differential chip value; out_bit = Im(z) > 0. No state: no context.
// Timing: one register stage; the pipeline tag passes through.
// Origin: the block and its place after the shift delay follow the original
// receiver; widths and the sign rule are this design's.
module complex_mult
  import cmcvt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  tag_t               in_tag,
  input  rx_sample_t         in_now,
  input  rx_sample_t         in_del,
  output tag_t               out_tag,
  output logic signed [12:0] out_re,
  output logic signed [12:0] out_im,
  output logic               out_bit
);
  logic signed [12:0] a, b, c, d, re, im;
  assign a  = 13'(in_now.i);
  assign b  = 13'(in_now.q);
  assign c  = 13'(in_del.i);
  assign d  = 13'(in_del.q);
  assign re = a * c + b * d;
  assign im = b * c - a * d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag <= '0;
      out_re  <= '0;
      out_im  <= '0;
      out_bit <= 1'b0;
    end else begin
      out_tag <= in_tag;
      out_re  <= re;
      out_im  <= im;
      out_bit <= (im > 13'sd0);
    end
  end
endmodule
