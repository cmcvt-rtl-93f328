// mcvr_bbpu: baseband processing unit of the multi-channel virtual
// receiver. One single-channel non-coherent O-QPSK receive chain is shared
// by all channels in time. It runs at N x 8 MHz; a tick is 8 cycles, in
// which the sample reading multiplexer feeds the 8 samples (1 us) of one
// channel from the ping-pong RAMs, so every channel is served once per
// microsecond, its real-time rate.
// Pipeline, one cycle per stage, every item tagged with its channel:
//   read -> shift_delay -> complex_mult -> serial_to_parallel -> cross_corr
//   -> fsm_dec -> Rx data RAM
// shift_delay, serial_to_parallel and fsm_dec have per-channel state. Each
// restores its context from its own context RAM when the first sample of a
// channel's tick reaches it and saves it with the tick's last sample, so
// neighbouring stages can work on different channels in the same cycle and
// no cycles are lost to context switching.
// Ping-pong alignment: the first round starts after a half swap of the DDC
// side is seen (wr_half_sync toggles); each round reads the half written
// during the previous microsecond.
// Origin: the stage list, the 8-sample tick and context switching follow the
// original receiver; the start-up alignment and the tag-driven context
// handling are this design's.
module mcvr_bbpu
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic [7:0]      num_ch,
  input  logic            wr_half_sync,
  output logic [CW-1:0]   pp_rch,
  output logic [3:0]      pp_raddr,
  input  logic [11:0]     pp_rdata,
  output logic            mem_we,
  output logic [CW+7:0]   mem_waddr,
  output logic [7:0]      mem_wdata,
  output logic [N_CH-1:0] rx_pkt,
  output logic            sync_evt,
  output logic            frame_evt,
  output logic            tick_start
);
  logic       half_prev, rd_half, run;
  logic [1:0] cs_state;
  logic [7:0] ch, ctx_rd_ch, nch;
  logic [2:0] tick_cnt;
  logic       tick_last, round_start, ctx_rd_en, ctx_clear;
  tag_t       t0, t1, t2, t3, t4, t5;
  rx_sample_t r_now, r_del;
  logic       dbit;
  logic signed [12:0] z_re, z_im;
  logic [127:0] hist;
  logic [3:0] sym;
  logic [4:0] score;

  assign nch = (num_ch > 8'(N_CH)) ? 8'(N_CH) : num_ch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_prev <= 1'b0;
      run       <= 1'b0;
      rd_half   <= 1'b0;
    end else begin
      half_prev <= wr_half_sync;
      if (!enable) begin
        run <= 1'b0;
      end else if (!run) begin
        if (wr_half_sync != half_prev) begin
          run     <= 1'b1;
          rd_half <= ~wr_half_sync;
        end
      end else if (tick_last && ch == nch - 8'd1) begin
        rd_half <= ~rd_half;
      end
    end
  end

  cs_fsm #(.TICK_LEN(8)) u_cs (
    .clk, .rst_n, .enable(run), .num_ch(nch), .state(cs_state), .ch,
    .tick_cnt, .tick_start, .tick_last, .round_start, .ctx_rd_en, .ctx_rd_ch,
    .ctx_clear
  );

  // sample reading multiplexer
  assign t0       = '{occ: (cs_state != 2'd0), first: tick_start, last: tick_last, ch: ch};
  assign pp_rch   = CW'(ch);
  assign pp_raddr = {rd_half, tick_cnt};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t1 <= '0;
    else        t1 <= t0;
  end

  shift_delay #(.N_CH(N_CH)) u_sd (
    .clk, .rst_n, .ctx_clear, .pre_tag(t0), .in_tag(t1), .in_smp(pp_rdata),
    .out_tag(t2), .out_now(r_now), .out_del(r_del)
  );

  complex_mult u_cm (
    .clk, .rst_n, .in_tag(t2), .in_now(r_now), .in_del(r_del),
    .out_tag(t3), .out_re(z_re), .out_im(z_im), .out_bit(dbit)
  );

  serial_to_parallel #(.N_CH(N_CH)) u_sp (
    .clk, .rst_n, .ctx_clear, .pre_tag(t2), .in_tag(t3), .in_bit(dbit),
    .out_tag(t4), .out_hist(hist)
  );

  cross_corr u_cc (
    .clk, .rst_n, .in_tag(t4), .in_hist(hist), .out_tag(t5), .out_sym(sym),
    .out_score(score)
  );

  fsm_dec #(.N_CH(N_CH)) u_dec (
    .clk, .rst_n, .ctx_clear, .pre_tag(t4), .in_tag(t5), .in_sym(sym),
    .in_score(score), .mem_we, .mem_waddr, .mem_wdata, .rx_pkt, .sync_evt,
    .frame_evt
  );
endmodule
