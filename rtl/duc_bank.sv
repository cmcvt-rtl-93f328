// duc_bank: the transmit DUC bank. It owns the RF-side (64 MHz) read
// schedule of the TX ping-pong RAMs and one DUC per channel, and adds the
// channels into the single complex sample stream for the RF front-end.
// Read schedule: a 3-bit step counter divides the 64 MHz clock down to the
// 8 MHz sample rate, an 8-bit sample address walks one 256-sample half, and
// the half bit `rd_half` swaps every 32 us. rd_half is exported so that the
// BBPU can align its rounds and write the other half.
// Start-up: ch_en[c] tells that the BBPU has written samples of channel c.
// The channel's DUC outputs zero until the first half swap after ch_en[c]
// rose, so that a RAM half is only played after the BBPU has filled it
// (own choice).
// The sum is saturated to the 12-bit DAC range.
module duc_bank
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8
) (
  input  logic               clk,        // RF sample clock, 64 MHz
  input  logic               rst_n,
  input  logic [N_CH-1:0]    ch_en,      // channel has samples in the RAM, synchronised to clk
  output logic [8:0]         raddr,      // to the ping-pong bank
  input  logic [3:0]         rdata [N_CH],
  output logic               rd_half,
  output logic signed [11:0] tx_i,
  output logic signed [11:0] tx_q
);
  logic [2:0] sub, sub_d;
  logic [7:0] addr, addr_d;
  logic [N_CH-1:0] armed, play;
  logic signed [9:0] yi [N_CH];
  logic signed [9:0] yq [N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub     <= '0;
      addr    <= '0;
      rd_half <= 1'b0;
      sub_d   <= '0;
      addr_d  <= '0;
    end else begin
      sub <= sub + 3'd1;
      if (sub == 3'd7) begin
        addr <= addr + 8'd1;
        if (addr == 8'd255) rd_half <= ~rd_half;
      end
      sub_d  <= sub;
      addr_d <= addr;
    end
  end

  assign raddr = {rd_half, addr};

  for (genvar c = 0; c < N_CH; c++) begin : g_duc
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) armed[c] <= 1'b0;
      else if (!ch_en[c]) armed[c] <= 1'b0;
      else if (sub == 3'd7 && addr == 8'd255) armed[c] <= 1'b1;
    end
    // play is armed aligned with addr_d/sub_d, so the first sample played
    // is sample 0 of the freshly swapped half
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) play[c] <= 1'b0;
      else        play[c] <= armed[c];
    end
    duc #(.INC(nco_inc(c))) u_duc (
      .clk, .rst_n, .en(play[c]), .smp(rdata[c]),
      .pos(addr_d[2:0]), .sub(sub_d), .y_i(yi[c]), .y_q(yq[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_i <= '0;
      tx_q <= '0;
    end else begin
      logic signed [15:0] ai, aq;
      ai = '0;
      aq = '0;
      for (int c = 0; c < N_CH; c++) begin
        ai += 16'(yi[c]);
        aq += 16'(yq[c]);
      end
      tx_i <= (ai > 16'sd2047) ? 12'sd2047 : (ai < -16'sd2048) ? -12'sd2048 : 12'(ai);
      tx_q <= (aq > 16'sd2047) ? 12'sd2047 : (aq < -16'sd2048) ? -12'sd2048 : 12'(aq);
    end
  end
endmodule
