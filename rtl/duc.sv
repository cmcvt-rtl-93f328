// duc: digital up-converter of one transmit channel. It turns the 8 MHz
// ternary chip samples of the ping-pong RAM into a 64 MHz complex signal at
// the channel's frequency offset.
// Interpolation: the half-sine pulse is evaluated directly at 64 MHz. A
// pulse spans 8 stored samples = 64 output samples, so the I pulse phase is
// {sample_addr[2:0], sub}, and the Q phase is the same advanced by half a
// pulse; the value is 127*sin(pi*phase/64) with the sign of the chip, or 0
// when the branch is off. This reproduces the O-QPSK half-sine shaping
// without an interpolation filter (own choice).
// Mixing: multiplication by exp(j*2*pi*INC*n/128) from a 7-bit NCO; with a
// 64 MHz sample clock a step of INC=5 is 2.5 MHz. Output scaled by 1/128.
// Timing: one register stage; the NCO advances every clock while enabled.
module duc
  import cmcvt_pkg::*;
#(
  parameter logic [6:0] INC = 7'd5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  tx_sample_t        smp,
  input  logic [2:0]        pos,    // sample address modulo 8
  input  logic [2:0]        sub,    // 64 MHz step within the 8 MHz sample
  output logic signed [9:0] y_i,
  output logic signed [9:0] y_q
);
  logic [6:0]         ph;
  logic signed [17:0] bi, bq, c, s;
  logic signed [7:0]  si, sq;
  logic signed [17:0] pi_, pq_;

  assign si = sin128({1'b0, pos, sub});
  assign sq = sin128({1'b0, 3'(pos + 3'd4), sub});
  assign bi = !smp.i_on ? 18'sd0 : (smp.i_chip ? 18'(si) : -18'(si));
  assign bq = !smp.q_on ? 18'sd0 : (smp.q_chip ? 18'(sq) : -18'(sq));
  assign c  = 18'(cos128(ph));
  assign s  = 18'(sin128(ph));
  assign pi_ = bi * c - bq * s;
  assign pq_ = bi * s + bq * c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph  <= '0;
      y_i <= '0;
      y_q <= '0;
    end else begin
      ph  <= ph + INC;
      y_i <= en ? 10'(pi_ >>> 7) : 10'sd0;
      y_q <= en ? 10'(pq_ >>> 7) : 10'sd0;
    end
  end
endmodule
