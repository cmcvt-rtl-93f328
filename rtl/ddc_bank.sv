// ddc_bank: the receive DDC bank. One DDC and one digital AGC per channel,
// all decimating at the same instants, and the RF-side write schedule of the
// RX ping-pong RAMs: every 8 MHz output sample of every channel is written
// at address {wr_half, idx}; idx counts 0..7 and wr_half swaps every 8
// samples (1 us). wr_half is exported so the BBPU can read the other half.
// Channel c sits at the frequency offset of transmit channel c (CH0 -2.5,
// CH1 +2.5, CH2 -7.5 MHz, ...).
// Timing: clk_rf (64 MHz); the write strobe pp_we is high one clock in 8.
// Origin: mix, filter, decimate and a per-channel digital AGC follow the
// original design; the FIR, the AGC method and the write schedule are this
// design's own choices.
module ddc_bank
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [11:0] rx_i,
  input  logic signed [11:0] rx_q,
  output logic               pp_we,
  output logic [3:0]         pp_waddr,
  output logic [11:0]        pp_wdata [N_CH],
  output logic               wr_half,
  output logic [2:0]         agc_shift [N_CH]
);
  logic [2:0] dec, idx;
  logic       stb;
  logic [N_CH-1:0] dstb, astb;
  logic signed [12:0] di [N_CH];
  logic signed [12:0] dq [N_CH];
  logic signed [5:0]  ai [N_CH];
  logic signed [5:0]  aq [N_CH];

  assign stb = (dec == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec     <= '0;
      idx     <= '0;
      wr_half <= 1'b0;
    end else begin
      dec <= dec + 3'd1;
      if (astb[0]) begin
        idx <= idx + 3'd1;
        if (idx == 3'd7) wr_half <= ~wr_half;
      end
    end
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    ddc #(.INC(nco_inc(c))) u_ddc (
      .clk, .rst_n, .rf_i(rx_i), .rf_q(rx_q), .dec_stb(stb),
      .out_stb(dstb[c]), .out_i(di[c]), .out_q(dq[c])
    );
    agc #(.BLOCK(64)) u_agc (
      .clk, .rst_n, .in_stb(dstb[c]), .in_i(di[c]), .in_q(dq[c]),
      .out_stb(astb[c]), .out_i(ai[c]), .out_q(aq[c]), .shift(agc_shift[c])
    );
    assign pp_wdata[c] = {ai[c], aq[c]};
  end

  assign pp_we    = astb[0];
  assign pp_waddr = {wr_half, idx};
endmodule
