// dp_bram: simple dual-port, dual-clock block RAM (one write port, one read
// port). Used for the Tx and Rx data memories, between the 100 MHz host
// domain and the baseband domain, and for every ping-pong sample buffer,
// between the baseband domain and the RF sample domain. Passing multi-bit
// data through a dual-port RAM is how the design crosses clock domains.
// Timing: a write on wclk edge with we; the read data appears one rclk edge
// after raddr is presented (registered read, as in an FPGA block RAM).
// Contents are not reset; users only read what has been written.
// Origin: dual-port RAMs for the multi-bit clock crossings follow the
// original design; the registered read is this design's choice.
module dp_bram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end
endmodule
