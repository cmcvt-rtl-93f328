// shift_delay: first stage of the virtual receiver's BBPU. It delays the
// sample stream of each channel by one chip period, 4 samples at 8 MHz, and
// presents the current sample together with the delayed one to the complex
// multiplier. The 4-sample delay line is the stage's context: it is restored
// from the context RAM when a channel's tick begins and saved on its last
// sample, so each channel sees a continuous delay line although the stage
// serves all channels in turn.
// Timing: one register stage. The context read is issued from the tag of
// the item one cycle upstream (pre_tag), so it is ready when the item
// arrives.
// Origin: the block is named in the original receiver; the one-chip delay
// and its use as context are this design's reading.
module shift_delay
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ctx_clear,
  input  tag_t        pre_tag,
  input  tag_t        in_tag,
  input  rx_sample_t  in_smp,
  output tag_t        out_tag,
  output rx_sample_t  out_now,
  output rx_sample_t  out_del
);
  logic [47:0] ctx_rd, st_q, st, st_nx;

  ctx_ram #(.W(48), .DEPTH(N_CH)) u_ctx (
    .clk, .rst_n, .clear(ctx_clear),
    .we(in_tag.occ && in_tag.last), .waddr(CW'(in_tag.ch)), .wdata(st_nx),
    .re(pre_tag.occ && pre_tag.first), .raddr(CW'(pre_tag.ch)), .rdata(ctx_rd)
  );

  assign st    = in_tag.first ? ctx_rd : st_q;
  assign st_nx = {st[35:0], in_smp};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= '0;
      out_tag <= '0;
      out_now <= '0;
      out_del <= '0;
    end else begin
      out_tag <= in_tag;
      if (in_tag.occ) begin
        st_q    <= st_nx;
        out_now <= in_smp;
        out_del <= st[47:36];
      end
    end
  end
endmodule
