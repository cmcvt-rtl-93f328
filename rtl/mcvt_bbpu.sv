// mcvt_bbpu: baseband processing unit of the multi-channel virtual
// transmitter. One single-channel IEEE 802.15.4 O-QPSK transmit chain is
// shared by all channels in time: the BBPU runs at N x 8 MHz and gives every
// channel one tick of 256 cycles in turn, during which the chain produces
// that channel's next 256 samples (one byte, 32 us). A round of N ticks
// therefore takes 32 us for any N, the real-time rate of every channel.
// The chain is pipelined in four stages, each working on a different channel
// in the same tick: M0 data FSM + CRC + MUX (tx_data_fsm), M1 byte to symbol,
// M2 symbol to chip, M3 chip to sample. A byte of channel c passes M0 in the
// tick of c and M3 three ticks later. M0 and M3 hold per-channel state,
// saved and restored through context RAMs under control of the context
// switching FSM (cs_fsm) without spending extra cycles.
// Ping-pong alignment: the BBPU starts its first round right after it sees
// the RF side swap halves (rd_half_sync toggles) and writes, during each
// round, the half that the DUCs will play in the next 32 us window.
// Interface: enable/num_ch/go already in this clock domain; done per channel;
// a read port to the Tx data RAM; a write port to the TX ping-pong bank.
module mcvt_bbpu
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [7:0]    num_ch,
  input  logic [N_CH-1:0] go,
  output logic [N_CH-1:0] done,
  input  logic          rd_half_sync,
  output logic [N_CH-1:0] ch_live,   // channel's samples are in the ping-pong RAM
  output logic [CW+6:0] mem_raddr,
  input  logic [7:0]    mem_rdata,
  output logic          pp_we,
  output logic [CW-1:0] pp_wch,
  output logic [8:0]    pp_waddr,
  output logic [3:0]    pp_wdata,
  output logic          tick_start,
  output logic [7:0]    cur_ch
);
  logic       half_prev, wr_half, run;
  logic [1:0] cs_state;
  logic [7:0] ch, tick_cnt, ctx_rd_ch;
  logic       tick_last, round_start, ctx_rd_en, ctx_clear;
  tag_t       t0, t1, t2;
  logic       v0, v1, v2;
  logic [7:0] b0;
  logic [3:0] s0, s1;
  logic [63:0] chips;
  logic [7:0]  nch;

  assign nch = (num_ch > 8'(N_CH)) ? 8'(N_CH) : num_ch;

  // start on a half swap of the RF side, then alternate halves every round
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_prev <= 1'b0;
      run       <= 1'b0;
      wr_half   <= 1'b0;
    end else begin
      half_prev <= rd_half_sync;
      if (!enable) begin
        run <= 1'b0;
      end else if (!run) begin
        if (rd_half_sync != half_prev) begin
          run     <= 1'b1;
          wr_half <= ~rd_half_sync;
        end
      end else if (tick_last && ch == nch - 8'd1) begin
        wr_half <= ~wr_half;
      end
    end
  end

  // a channel is live once M3 has written its first sample since the BBPU
  // started; the DUC bank starts playing it at the next half swap, so a
  // half that the pipeline has not yet filled is never played
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ch_live <= '0;
    else if (!run)      ch_live <= '0;
    else if (pp_we)     ch_live[pp_wch] <= 1'b1;
  end
  assign cur_ch  = ch;

  cs_fsm #(.TICK_LEN(256)) u_cs (
    .clk, .rst_n, .enable(run), .num_ch(nch), .state(cs_state), .ch,
    .tick_cnt, .tick_start, .tick_last, .round_start, .ctx_rd_en, .ctx_rd_ch,
    .ctx_clear
  );

  wire active = (cs_state != 2'd0);

  tx_data_fsm #(.N_CH(N_CH), .TW(8)) u_m0 (
    .clk, .rst_n, .run(active), .ctx_clear, .ctx_rd_en, .ctx_rd_ch,
    .tick_cnt, .ch, .go, .done, .mem_raddr, .mem_rdata,
    .out_tag(t0), .out_valid(v0), .out_byte(b0)
  );

  byte_to_symbol u_m1 (
    .clk, .rst_n, .run(active), .tick_start, .in_tag(t0), .in_valid(v0),
    .in_byte(b0), .out_tag(t1), .out_valid(v1), .out_sym0(s0), .out_sym1(s1)
  );

  symbol_to_chip u_m2 (
    .clk, .rst_n, .run(active), .tick_start, .in_tag(t1), .in_valid(v1),
    .in_sym0(s0), .in_sym1(s1), .out_tag(t2), .out_valid(v2), .out_chips(chips)
  );

  tx_sample_t wd;
  chip_to_sample #(.N_CH(N_CH)) u_m3 (
    .clk, .rst_n, .run(active), .ctx_clear, .tick_start, .tick_last, .tick_cnt,
    .half_in(wr_half), .in_tag(t2), .in_valid(v2), .in_chips(chips),
    .wr_en(pp_we), .wr_ch(pp_wch), .wr_addr(pp_waddr), .wr_data(wd)
  );
  assign pp_wdata = wd;
endmodule
