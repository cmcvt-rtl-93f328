// ddc: digital down-converter of one receive channel. The 64 MHz wideband
// complex signal is multiplied by exp(-j*2*pi*INC*n/128) to bring the
// channel to 0 Hz, low-pass filtered by a 40-tap FIR (Hamming-windowed
// sinc, cutoff 2.5 MHz, more than 33 dB down beyond 5 MHz, the spacing of
// the channels) and decimated by 8 to the 8 MHz sample rate of the BBPU.
// The FIR coefficients sum to 1026, the output is scaled by 1/1024.
// Timing: the mixer is registered; dec_stb (common to all channels) marks
// the input cycles at which an output is formed; out_stb follows one clock
// later with the filtered sample.
module ddc
  import cmcvt_pkg::*;
#(
  parameter logic [6:0] INC = 7'd123
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [11:0] rf_i,
  input  logic signed [11:0] rf_q,
  input  logic               dec_stb,
  output logic               out_stb,
  output logic signed [12:0] out_i,
  output logic signed [12:0] out_q
);
  logic [6:0] ph;
  logic signed [20:0] ri, rq, c, s, mi, mq;
  logic signed [12:0] xi [FIR_TAPS];
  logic signed [12:0] xq [FIR_TAPS];

  assign ri = 21'(rf_i);
  assign rq = 21'(rf_q);
  assign c  = 21'(cos128(ph));
  assign s  = 21'(sin128(ph));
  assign mi = (ri * c + rq * s) >>> 7;
  assign mq = (rq * c - ri * s) >>> 7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0;
      for (int k = 0; k < FIR_TAPS; k++) begin
        xi[k] <= '0;
        xq[k] <= '0;
      end
    end else begin
      ph    <= ph + INC;
      xi[0] <= 13'(mi);
      xq[0] <= 13'(mq);
      for (int k = 1; k < FIR_TAPS; k++) begin
        xi[k] <= xi[k-1];
        xq[k] <= xq[k-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_stb <= 1'b0;
      out_i   <= '0;
      out_q   <= '0;
    end else begin
      out_stb <= dec_stb;
      if (dec_stb) begin
        logic signed [25:0] ai, aq;
        ai = '0;
        aq = '0;
        for (int k = 0; k < FIR_TAPS; k++) begin
          ai += 26'(fir_coef(k)) * 26'(xi[k]);
          aq += 26'(fir_coef(k)) * 26'(xq[k]);
        end
        out_i <= 13'(ai >>> 10);
        out_q <= 13'(aq >>> 10);
      end
    end
  end
endmodule
