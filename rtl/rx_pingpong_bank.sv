// rx_pingpong_bank: the receiver's BRAM bank used as ping-pong buffers, one
// 16 x 12-bit dual-clock RAM per channel, plus the sample reading
// multiplexer. The DDC bank writes 8 samples of every channel into one half
// while the BBPU reads the 8 samples of the other half, one channel after
// the other; the halves swap every microsecond. A 12-bit word holds one
// complex sample, I in bits 11:6 and Q in bits 5:0 (own choice of packing).
// Timing: write on wclk; on rclk the BBPU presents (rch, raddr) and gets the
// sample one clock later.
module rx_pingpong_bank #(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [3:0]    waddr,
  input  logic [11:0]   wdata [N_CH],
  input  logic          rclk,
  input  logic [CW-1:0] rch,
  input  logic [3:0]    raddr,
  output logic [11:0]   rdata
);
  logic [11:0]   q [N_CH];
  logic [CW-1:0] rch_q;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    dp_bram #(.W(12), .DEPTH(16)) u_ram (
      .wclk, .we, .waddr, .wdata(wdata[c]), .rclk, .raddr, .rdata(q[c])
    );
  end

  always_ff @(posedge rclk) rch_q <= rch;
  assign rdata = q[rch_q];
endmodule
