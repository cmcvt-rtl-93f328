// mcvt: multi-channel virtual transmitter PHY. N channels of IEEE 802.15.4
// O-QPSK (250 kb/s, 2 Mchip/s) are produced by a single time-shared
// baseband processing unit and played on N frequency offsets by a DUC bank.
// Clock domains: clk_ctrl (100 MHz) for the host control and data paths,
// clk_bbpu (N x 8 MHz) for the BBPU, clk_rf (64 MHz) for the DUC bank, which
// reads the ping-pong RAMs at the 8 MHz sample rate. Single-bit signals cross
// through two-flop synchronisers; frames and samples cross through
// dual-port RAMs.
// Host interface (own choice of register layout): cfg_enable starts the BBPU;
// cfg_num_ch (1..N) must be stable while enabled; frames are written into
// the Tx data RAM (channel c at c*128: byte 0 = PHR length L, bytes 1..L-2
// payload); raising tx_go[c] sends channel c's frame; tx_done[c] reports its
// end and irq pulses for one clk_ctrl cycle when any tx_done bit rises; the
// host then drops tx_go[c], after which tx_done[c] falls.
// RF interface: complex 12-bit samples at 64 MHz for the DAC.
module mcvt
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
  input  logic [N_CH-1:0]    tx_go,
  input  logic               mem_we,
  input  logic [CW+6:0]      mem_waddr,
  input  logic [7:0]         mem_wdata,
  output logic [N_CH-1:0]    tx_done,
  output logic               irq,
  output logic signed [11:0] tx_i,
  output logic signed [11:0] tx_q
);
  logic              en_b, half_b, rd_half, pp_we;
  logic [N_CH-1:0]   go_b, done_b, ch_live, ch_en, done_prev;
  logic [CW+6:0]     mem_raddr;
  logic [7:0]        mem_rdata;
  logic [CW-1:0]     pp_wch;
  logic [8:0]        pp_waddr, pp_raddr;
  logic [3:0]        pp_wdata;
  logic [3:0]        pp_rdata [N_CH];
  logic              tick_start_unused;
  logic [7:0]        cur_ch_unused;

  sync_2ff u_sync_en (.clk(clk_bbpu), .rst_n, .d(cfg_enable), .q(en_b));
  sync_2ff u_sync_half (.clk(clk_bbpu), .rst_n, .d(rd_half), .q(half_b));
  for (genvar c = 0; c < N_CH; c++) begin : g_sync
    sync_2ff u_go (.clk(clk_bbpu), .rst_n, .d(tx_go[c]), .q(go_b[c]));
    sync_2ff u_done (.clk(clk_ctrl), .rst_n, .d(done_b[c]), .q(tx_done[c]));
    sync_2ff u_live (.clk(clk_rf), .rst_n, .d(ch_live[c]), .q(ch_en[c]));
  end

  always_ff @(posedge clk_ctrl or negedge rst_n) begin
    if (!rst_n) begin
      done_prev <= '0;
      irq       <= 1'b0;
    end else begin
      done_prev <= tx_done;
      irq       <= |(tx_done & ~done_prev);
    end
  end

  dp_bram #(.W(8), .DEPTH(N_CH * 128)) u_txmem (
    .wclk(clk_ctrl), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .rclk(clk_bbpu), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  mcvt_bbpu #(.N_CH(N_CH)) u_bbpu (
    .clk(clk_bbpu), .rst_n, .enable(en_b), .num_ch(cfg_num_ch), .go(go_b),
    .done(done_b), .rd_half_sync(half_b), .ch_live, .mem_raddr, .mem_rdata,
    .pp_we, .pp_wch, .pp_waddr, .pp_wdata, .tick_start(tick_start_unused),
    .cur_ch(cur_ch_unused)
  );

  tx_pingpong_bank #(.N_CH(N_CH), .DEPTH(512), .W(4)) u_pp (
    .wclk(clk_bbpu), .we(pp_we), .wch(pp_wch), .waddr(pp_waddr), .wdata(pp_wdata),
    .rclk(clk_rf), .raddr(pp_raddr), .rdata(pp_rdata)
  );

  duc_bank #(.N_CH(N_CH)) u_duc (
    .clk(clk_rf), .rst_n, .ch_en, .raddr(pp_raddr), .rdata(pp_rdata),
    .rd_half, .tx_i, .tx_q
  );
endmodule
