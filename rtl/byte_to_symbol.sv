// byte_to_symbol: stage M1 of the virtual transmitter. At each tick it takes
// the byte that M0 produced in the previous tick (for the previous channel
// in the schedule) and splits it into two 4-bit data symbols; the low nibble
// is sent first, as IEEE 802.15.4 requires. The pipeline tag (channel,
// occupancy) and the on-air flag travel with it. The stage has no state that
// outlives a tick, so it needs no context memory.
// Timing: registers on the first cycle of every tick (tick_start).
module byte_to_symbol
  import cmcvt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic       tick_start,
  input  tag_t       in_tag,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output tag_t       out_tag,
  output logic       out_valid,
  output logic [3:0] out_sym0,   // sent first
  output logic [3:0] out_sym1
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag   <= '0;
      out_valid <= 1'b0;
      out_sym0  <= '0;
      out_sym1  <= '0;
    end else if (!run) begin
      out_tag   <= '0;
      out_valid <= 1'b0;
    end else if (tick_start) begin
      out_tag   <= in_tag;
      out_valid <= in_valid && in_tag.occ;
      out_sym0  <= in_byte[3:0];
      out_sym1  <= in_byte[7:4];
    end
  end
endmodule
