// agc: digital automatic gain control of one receive channel. The analog
// AGC of the RF front-end acts on the whole wideband signal, so each
// channel needs its own gain stage after down-conversion to bring its
// samples into the 6-bit range that the baseband processing unit works on.
// Method (own choice, simplest form): the peak of max(|I|,|Q|) is measured
// over blocks of BLOCK samples; at the end of a block the gain for the next
// block is set to a right shift s (0..7), the smallest for which the peak
// fits in 5 magnitude bits. Samples are shifted and saturated to 6 bits.
// Timing: one register stage; out_stb follows in_stb by one clock.
module agc #(
  parameter int unsigned BLOCK = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_stb,
  input  logic signed [12:0] in_i,
  input  logic signed [12:0] in_q,
  output logic               out_stb,
  output logic signed [5:0]  out_i,
  output logic signed [5:0]  out_q,
  output logic [2:0]         shift
);
  localparam int unsigned BW = $clog2(BLOCK);
  logic [BW-1:0] cnt;
  logic [11:0]   peak, mag, ai, aq, pk_nx;

  function automatic logic signed [5:0] sat6(input logic signed [12:0] x);
    if (x > 13'sd31)  return 6'sd31;
    if (x < -13'sd32) return -6'sd32;
    return 6'(x);
  endfunction

  function automatic logic [2:0] pick_shift(input logic [11:0] p);
    for (int s = 0; s < 7; s++) if ((p >> s) <= 12'd31) return 3'(s);
    return 3'd7;
  endfunction

  assign ai    = in_i[12] ? 12'(-in_i) : 12'(in_i);
  assign aq    = in_q[12] ? 12'(-in_q) : 12'(in_q);
  assign mag   = (ai > aq) ? ai : aq;
  assign pk_nx = (mag > peak) ? mag : peak;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      peak    <= '0;
      shift   <= 3'd7;
      out_stb <= 1'b0;
      out_i   <= '0;
      out_q   <= '0;
    end else begin
      out_stb <= in_stb;
      if (in_stb) begin
        out_i <= sat6(in_i >>> shift);
        out_q <= sat6(in_q >>> shift);
        cnt   <= cnt + 1'b1;
        if (cnt == BW'(BLOCK - 1)) begin
          shift <= pick_shift(pk_nx);
          peak  <= '0;
        end else begin
          peak  <= pk_nx;
        end
      end
    end
  end
endmodule
