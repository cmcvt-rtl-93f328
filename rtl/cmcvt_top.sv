// cmcvt_top: concurrent multi-channel virtual transceiver. A transmitter
// (mcvt) and a receiver (mcvr), each serving N_CH IEEE 802.15.4 channels
// with a single time-shared baseband processing unit, side by side. They
// share clocks and reset and work independently: the transmitter drives
// the 64 MHz complex sample stream to the RF front-end's DAC, the receiver
// takes the 64 MHz stream from its ADC. The RF front-end and the processor
// running the MAC are outside; their connections are the ports below.
// Clocks: clk_ctrl 100 MHz (host), clk_bbpu N_CH x 8 MHz (BBPUs), clk_rf
// 64 MHz (DUC/DDC banks). rst_n is asynchronous, active low.
module cmcvt_top
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic               clk_ctrl,
  input  logic               clk_bbpu,
  input  logic               clk_rf,
  input  logic               rst_n,
  // transmitter host side
  input  logic               tx_enable,
  input  logic [7:0]         tx_num_ch,
  input  logic [N_CH-1:0]    tx_go,
  input  logic               tx_mem_we,
  input  logic [CW+6:0]      tx_mem_waddr,
  input  logic [7:0]         tx_mem_wdata,
  output logic [N_CH-1:0]    tx_done,
  output logic               tx_irq,
  // receiver host side
  input  logic               rx_enable,
  input  logic [7:0]         rx_num_ch,
  input  logic [CW+7:0]      rx_mem_raddr,
  output logic [7:0]         rx_mem_rdata,
  output logic [N_CH-1:0]    rx_pkt,
  output logic               rx_irq,
  // RF front-end
  output logic signed [11:0] dac_i,
  output logic signed [11:0] dac_q,
  input  logic signed [11:0] adc_i,
  input  logic signed [11:0] adc_q
);
  mcvt #(.N_CH(N_CH)) u_tx (
    .clk_ctrl, .clk_bbpu, .clk_rf, .rst_n,
    .cfg_enable(tx_enable), .cfg_num_ch(tx_num_ch), .tx_go,
    .mem_we(tx_mem_we), .mem_waddr(tx_mem_waddr), .mem_wdata(tx_mem_wdata),
    .tx_done, .irq(tx_irq), .tx_i(dac_i), .tx_q(dac_q)
  );

  mcvr #(.N_CH(N_CH)) u_rx (
    .clk_ctrl, .clk_bbpu, .clk_rf, .rst_n,
    .cfg_enable(rx_enable), .cfg_num_ch(rx_num_ch), .rx_i(adc_i), .rx_q(adc_q),
    .mem_raddr(rx_mem_raddr), .mem_rdata(rx_mem_rdata), .rx_pkt, .irq(rx_irq)
  );
endmodule
