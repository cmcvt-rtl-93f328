// ctx_ram: context switch memory of one time-shared stage. It holds one
// context word (the registers a stage must keep per channel) for each
// channel. A stage writes the context of the channel it is leaving on the
// last cycle of that channel's tick and reads the context of the channel it
// is about to serve one cycle before the channel's first item arrives, so a
// context switch costs no extra clock cycles.
// Timing: registered read (re/raddr in cycle t, rdata valid in cycle t+1).
// A read of the address being written in the same cycle returns the new
// data, which makes a single-channel configuration behave like the original
// single-channel stage. Each entry has a valid bit that `clear` resets; an
// entry never written reads as zero, which every stage uses as its reset
// context.
module ctx_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0]     mem [DEPTH];
  logic [DEPTH-1:0] vld;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld   <= '0;
      rdata <= '0;
    end else begin
      if (clear) vld <= '0;
      else if (we) vld[waddr] <= 1'b1;
      if (re) begin
        if (we && waddr == raddr) rdata <= wdata;
        else if (!vld[raddr] || clear) rdata <= '0;
        else rdata <= mem[raddr];
      end
    end
  end
endmodule
