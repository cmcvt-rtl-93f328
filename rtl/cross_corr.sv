// cross_corr: symbol correlator of the virtual receiver's BBPU. It compares
// the chip history with the differential chip sequences of the 16 IEEE
// 802.15.4 symbols (chips 1..31; chip 0 depends on the previous symbol) and
// reports the best symbol and its score, the number of matching chips
// (0..31). Chip k of the candidate symbol is history bit 4*(31-k). Ties go
// to the lower symbol. No state: no context.
// Timing: one register stage; the pipeline tag passes through.
module cross_corr
  import cmcvt_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  tag_t          in_tag,
  input  logic [127:0]  in_hist,
  output tag_t          out_tag,
  output logic [3:0]    out_sym,
  output logic [4:0]    out_score
);
  logic [31:0] chips;
  logic [3:0]  bsym;
  logic [4:0]  bscore;

  always_comb begin
    for (int k = 0; k < 32; k++) chips[k] = in_hist[4 * (31 - k)];
  end

  always_comb begin
    logic [4:0]  sc;
    logic [31:0] m;
    bsym   = '0;
    bscore = '0;
    for (int s = 0; s < 16; s++) begin
      m  = ~(chips ^ diff_template(4'(s)));
      sc = '0;
      for (int k = 1; k < 32; k++) sc += 5'(m[k]);
      if (sc > bscore || s == 0) begin
        bscore = sc;
        bsym   = 4'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag   <= '0;
      out_sym   <= '0;
      out_score <= '0;
    end else begin
      out_tag   <= in_tag;
      out_sym   <= bsym;
      out_score <= bscore;
    end
  end
endmodule
