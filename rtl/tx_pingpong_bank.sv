// tx_pingpong_bank: the transmitter's BRAM bank used as ping-pong buffers.
// One 512 x 4-bit dual-clock RAM per channel. The BBPU (stage M3) writes a
// whole byte's 256 samples of one channel into one half of that channel's
// RAM while the channel's DUC reads the 256 samples of the other half; the
// halves swap every 32 us. This decouples the time-shared BBPU from the
// continuously running DUCs and carries the samples across the clock
// domains. All DUCs read in lockstep, so the read address is shared.
// Timing: write in the BBPU clock domain; registered read (one RF clock).
// Origin: 512 x 4 bits per channel and the half-swapping use follow the
// original design; the shared read address is this design's choice.
module tx_pingpong_bank #(
  parameter int unsigned N_CH  = 8,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 4,
  localparam int unsigned CW   = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [CW-1:0] wch,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata [N_CH]
);
  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    dp_bram #(.W(W), .DEPTH(DEPTH)) u_ram (
      .wclk, .we(we && wch == CW'(c)), .waddr, .wdata,
      .rclk, .raddr, .rdata(rdata[c])
    );
  end
endmodule
