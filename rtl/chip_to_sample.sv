// chip_to_sample: stage M3 of the virtual transmitter. It turns the 64 chips
// of one byte into the 256 samples (8 MHz, 32 us) of that byte's O-QPSK
// waveform and writes them, one per clock, into the channel's half of the
// ping-pong sample RAM.
// O-QPSK timing at 8 samples per microsecond: even chips go on I, odd chips
// on Q; each chip is a half-sine pulse 8 samples long and the Q branch is
// delayed by half a pulse (4 samples). Sample j of the byte therefore carries
// I chip 2*(j/8) and, for j >= 4, Q chip 2*((j-4)/8)+1; samples 0..3 of the Q
// branch still carry the last Q chip of the previous byte of the same
// channel. That chip and whether the previous byte was on the air are this
// stage's context (2 bits), kept per channel in a context RAM.
// A stored sample is 4 bits: per branch an on flag and the chip value. The
// pulse shape itself is applied by the DUC, which knows the position of each
// sample within its pulse from the RAM address (own choice of encoding; the
// 512x4 RAM geometry follows the design).
// Timing: the item is taken on tick_start; sample j is written in cycle j+1
// of the tick, sample 255 in cycle 0 of the following tick. The context of
// the next item is read on tick_last and written on tick_start.
module chip_to_sample
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          ctx_clear,
  input  logic          tick_start,
  input  logic          tick_last,
  input  logic [7:0]    tick_cnt,
  input  logic          half_in,     // ping-pong half of the current round
  input  tag_t          in_tag,
  input  logic          in_valid,
  input  logic [63:0]   in_chips,
  output logic          wr_en,
  output logic [CW-1:0] wr_ch,
  output logic [8:0]    wr_addr,
  output tx_sample_t    wr_data
);
  typedef struct packed {
    logic valid;
    logic q_chip;
  } m3_ctx_t;

  m3_ctx_t     ctx_rd, prev_q;
  tag_t        tag_q;
  logic        valid_q, half_q;
  logic [63:0] chips_q;
  logic [7:0]  j, jq;
  logic [5:0]  qi;

  ctx_ram #(.W(2), .DEPTH(N_CH)) u_ctx (
    .clk, .rst_n, .clear(ctx_clear),
    .we(run && tick_start && in_tag.occ), .waddr(CW'(in_tag.ch)),
    .wdata({in_valid, in_chips[63]}),
    .re(run && tick_last), .raddr(CW'(in_tag.ch)), .rdata(ctx_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_q   <= '0;
      valid_q <= 1'b0;
      half_q  <= 1'b0;
      chips_q <= '0;
      prev_q  <= '0;
    end else if (!run) begin
      tag_q   <= '0;
      valid_q <= 1'b0;
    end else if (tick_start) begin
      tag_q   <= in_tag;
      valid_q <= in_valid;
      half_q  <= half_in;
      chips_q <= in_chips;
      prev_q  <= ctx_rd;
    end
  end

  assign j  = tick_cnt - 8'd1;
  assign jq = j - 8'd4;
  assign qi = {jq[7:3], 1'b1};

  always_comb begin
    wr_en   = run && tag_q.occ;
    wr_ch   = CW'(tag_q.ch);
    wr_addr = {half_q, j};
    wr_data.i_on   = valid_q;
    wr_data.i_chip = chips_q[{j[7:3], 1'b0}];
    if (j < 8'd4) begin
      wr_data.q_on   = prev_q.valid;
      wr_data.q_chip = prev_q.q_chip;
    end else begin
      wr_data.q_on   = valid_q;
      wr_data.q_chip = chips_q[qi];
    end
  end
endmodule
