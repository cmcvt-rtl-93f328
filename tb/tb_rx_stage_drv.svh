// Drives the pipeline tags of the receiver's time-shared stages the way the
// BBPU does: NCH channels in turn, ticks of 8 items; pre_tag is the tag that
// reaches the stage input one cycle later.
// The 8-cycle tick follows the original receiver.
`ifndef TB_RX_STAGE_DRV_SVH
`define TB_RX_STAGE_DRV_SVH
`define RX_TAGS(NCH) \
  int cyc = 0; \
  tag_t pre_tag, in_tag; \
  always_comb pre_tag = '{occ: 1'b1, first: (cyc % 8 == 0), last: (cyc % 8 == 7), ch: 8'((cyc / 8) % NCH)}; \
  always_ff @(posedge clk or negedge rst_n) if (!rst_n) in_tag <= '0; else begin in_tag <= pre_tag; cyc <= cyc + 1; end
`endif
