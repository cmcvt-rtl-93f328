// symbol_to_chip: stage M2 of the virtual transmitter. At each tick it maps
// the two symbols of one byte to their 32-chip IEEE 802.15.4 PN sequences,
// giving 64 chips (bit k = chip k, chips 0..31 from the first symbol).
// Stateless across ticks: no context memory.
// Timing: registers on tick_start.
module symbol_to_chip
  import cmcvt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        tick_start,
  input  tag_t        in_tag,
  input  logic        in_valid,
  input  logic [3:0]  in_sym0,
  input  logic [3:0]  in_sym1,
  output tag_t        out_tag,
  output logic        out_valid,
  output logic [63:0] out_chips
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag   <= '0;
      out_valid <= 1'b0;
      out_chips <= '0;
    end else if (!run) begin
      out_tag   <= '0;
      out_valid <= 1'b0;
    end else if (tick_start) begin
      out_tag   <= in_tag;
      out_valid <= in_valid;
      out_chips <= {pn_chips(in_sym1), pn_chips(in_sym0)};
    end
  end
endmodule
