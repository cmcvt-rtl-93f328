// mcvr: multi-channel virtual receiver PHY. The 64 MHz wideband signal from
// the RF front-end is split into N channels by a DDC bank with a digital AGC
// per channel; one time-shared baseband processing unit decodes all of them
// and stores every received frame, prefixed with its channel number, in the
// Rx data RAM for the host.
// Clock domains: clk_rf (64 MHz) for the DDC bank, clk_bbpu (N x 8 MHz) for
// the BBPU, clk_ctrl (100 MHz) for the host. Single bits cross through
// two-flop synchronisers, samples and frames through dual-port RAMs.
// Host interface (own choice): cfg_enable, cfg_num_ch (stable while
// enabled); rx_pkt[c] toggles when a frame of channel c has been stored and
// irq pulses for one clk_ctrl cycle on any toggle; frames are read through
// mem_raddr/mem_rdata (one clk_ctrl cycle latency) from channel c's region
// at c*256: channel number, length L, then L bytes.
module mcvr
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic               clk_ctrl,
  input  logic               clk_bbpu,
  input  logic               clk_rf,
  input  logic               rst_n,
  input  logic               cfg_enable,
  input  logic [7:0]         cfg_num_ch,
  input  logic signed [11:0] rx_i,
  input  logic signed [11:0] rx_q,
  input  logic [CW+7:0]      mem_raddr,
  output logic [7:0]         mem_rdata,
  output logic [N_CH-1:0]    rx_pkt,
  output logic               irq
);
  logic            en_b, half_b, pp_we, wr_half, mem_we;
  logic [3:0]      pp_waddr, pp_raddr;
  logic [11:0]     pp_wdata [N_CH];
  logic [11:0]     pp_rdata;
  logic [CW-1:0]   pp_rch;
  logic [CW+7:0]   mem_waddr;
  logic [7:0]      mem_wdata;
  logic [N_CH-1:0] pkt_b, pkt_prev;
  logic [2:0]      agc_shift [N_CH];
  logic            sync_evt, frame_evt, tick_start;

  sync_2ff u_sync_en (.clk(clk_bbpu), .rst_n, .d(cfg_enable), .q(en_b));
  sync_2ff u_sync_half (.clk(clk_bbpu), .rst_n, .d(wr_half), .q(half_b));
  for (genvar c = 0; c < N_CH; c++) begin : g_sync
    sync_2ff u_pkt (.clk(clk_ctrl), .rst_n, .d(pkt_b[c]), .q(rx_pkt[c]));
  end

  always_ff @(posedge clk_ctrl or negedge rst_n) begin
    if (!rst_n) begin
      pkt_prev <= '0;
      irq      <= 1'b0;
    end else begin
      pkt_prev <= rx_pkt;
      irq      <= |(rx_pkt ^ pkt_prev);
    end
  end

  ddc_bank #(.N_CH(N_CH)) u_ddc (
    .clk(clk_rf), .rst_n, .rx_i, .rx_q, .pp_we, .pp_waddr, .pp_wdata, .wr_half,
    .agc_shift
  );

  rx_pingpong_bank #(.N_CH(N_CH)) u_pp (
    .wclk(clk_rf), .we(pp_we), .waddr(pp_waddr), .wdata(pp_wdata),
    .rclk(clk_bbpu), .rch(pp_rch), .raddr(pp_raddr), .rdata(pp_rdata)
  );

  mcvr_bbpu #(.N_CH(N_CH)) u_bbpu (
    .clk(clk_bbpu), .rst_n, .enable(en_b), .num_ch(cfg_num_ch),
    .wr_half_sync(half_b), .pp_rch, .pp_raddr, .pp_rdata, .mem_we, .mem_waddr,
    .mem_wdata, .rx_pkt(pkt_b), .sync_evt, .frame_evt, .tick_start
  );

  dp_bram #(.W(8), .DEPTH(N_CH * 256)) u_rxmem (
    .wclk(clk_bbpu), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .rclk(clk_ctrl), .raddr(mem_raddr), .rdata(mem_rdata)
  );
endmodule
