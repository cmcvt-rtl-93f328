// serial_to_parallel: collects the differential chip decisions of a channel
// into a 128-bit word, the last 32 chip periods at 4 samples per chip
// (bit 0 newest). The cross-correlator reads every 4th bit of it, so a
// symbol can be found at any sample phase. The 128-bit register is the
// stage's context, restored and saved per channel like the delay line.
// Timing: one register stage; context read issued from pre_tag.
// Origin: the block is named in the original receiver; its 128-bit length is
// this design's choice.
module serial_to_parallel
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ctx_clear,
  input  tag_t          pre_tag,
  input  tag_t          in_tag,
  input  logic          in_bit,
  output tag_t          out_tag,
  output logic [127:0]  out_hist
);
  logic [127:0] ctx_rd, st_q, st, st_nx;

  ctx_ram #(.W(128), .DEPTH(N_CH)) u_ctx (
    .clk, .rst_n, .clear(ctx_clear),
    .we(in_tag.occ && in_tag.last), .waddr(CW'(in_tag.ch)), .wdata(st_nx),
    .re(pre_tag.occ && pre_tag.first), .raddr(CW'(pre_tag.ch)), .rdata(ctx_rd)
  );

  assign st    = in_tag.first ? ctx_rd : st_q;
  assign st_nx = {st[126:0], in_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= '0;
      out_tag  <= '0;
      out_hist <= '0;
    end else begin
      out_tag <= in_tag;
      if (in_tag.occ) begin
        st_q     <= st_nx;
        out_hist <= st_nx;
      end
    end
  end
endmodule
