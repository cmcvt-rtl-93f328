// sync_2ff: two-flop synchroniser for single-bit signals that cross from one
// clock domain into another (control bits, flags, ping-pong half selects).
// The input is sampled by two flip-flops in the destination domain, so the
// output follows the input two to three destination clock edges later and a
// metastable first stage has a full cycle to settle. Multi-bit data crosses
// the domains through dual-port RAMs instead (see dp_bram).
// Interface: clk/rst_n of the destination domain, d from any domain, q.
// Reset value is RST_VAL.
module sync_2ff #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
