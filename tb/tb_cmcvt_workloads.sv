// tb_cmcvt_workloads: the transceiver at its default size (8 channels)
// configured for 1, 2 and 4 active channels, each time with the BBPU clock
// at (active channels) x 8 MHz as the virtualisation requires. Every active
// channel sends a 20-byte packet (the packet size of the sensitivity
// measurement) with a random payload; the DAC stream is looped back to the
// ADC. For each configuration the test checks the received frames byte by
// byte (channel, length, payload, FCS) and the round lengths: 256 x n BBPU
// cycles for the transmitter (32 us) and 8 x n for the receiver (1 us).
// The channel counts, clock rule and packet size follow the original
// evaluation; payloads and timing of the test are this testbench's choice.
`timescale 1ps/1ps
`include "tb/tb_check.svh"
module tb_cmcvt_workloads;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  localparam int N = 8;
  localparam int CW = 3;
  localparam int LEN = 20;

  logic clk_ctrl = 0, clk_bbpu = 0, clk_rf = 0, rst_n = 0;
  int   bbpu_half = 7812;
  always #5000 clk_ctrl = ~clk_ctrl;
  always #(bbpu_half) clk_bbpu = ~clk_bbpu;
  initial begin #3000; forever #7812 clk_rf = ~clk_rf; end

  logic          tx_enable = 0, rx_enable = 0, tx_mem_we = 0, tx_irq, rx_irq;
  logic [7:0]    tx_num_ch = 0, rx_num_ch = 0, tx_mem_wdata = 0, rx_mem_rdata;
  logic [N-1:0]  tx_go = 0, tx_done, rx_pkt;
  logic [CW+6:0] tx_mem_waddr = 0;
  logic [CW+7:0] rx_mem_raddr = 0;
  logic signed [11:0] dac_i, dac_q;

  cmcvt_top dut (
    .clk_ctrl, .clk_bbpu, .clk_rf, .rst_n,
    .tx_enable, .tx_num_ch, .tx_go, .tx_mem_we, .tx_mem_waddr, .tx_mem_wdata,
    .tx_done, .tx_irq, .rx_enable, .rx_num_ch, .rx_mem_raddr, .rx_mem_rdata,
    .rx_pkt, .rx_irq, .dac_i, .dac_q, .adc_i(dac_i), .adc_q(dac_q)
  );

  // round length monitors
  longint bcyc = 0, last_tx = -1, last_rx = -1;
  int n_tx_bad = 0, n_rx_bad = 0, n_tx_rounds = 0, n_rx_rounds = 0, nch = 1;
  always @(posedge clk_bbpu) if (rst_n) begin
    bcyc++;
    if (dut.u_tx.u_bbpu.tick_start && dut.u_tx.u_bbpu.cur_ch == 0) begin
      if (last_tx >= 0 && bcyc - last_tx != 256 * nch) n_tx_bad++;
      last_tx = bcyc; n_tx_rounds++;
    end
    if (dut.u_rx.u_bbpu.u_cs.round_start) begin
      if (last_rx >= 0 && bcyc - last_rx != 8 * nch) n_rx_bad++;
      last_rx = bcyc; n_rx_rounds++;
    end
  end

  initial begin
    #50_000_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    `TB_DONE
  end

  logic [7:0] pay [N][LEN];
  initial begin
    int cfg [3] = '{1, 2, 4};
    foreach (cfg[k]) begin
      automatic logic [N-1:0] pkt0;
      automatic logic [N-1:0] all;
      nch = cfg[k];
      all = N'((1 << nch) - 1);
      rst_n = 0;
      bbpu_half = 7812 * 8 / nch;
      tx_enable = 0; rx_enable = 0; tx_go = '0;
      bcyc = 0; last_tx = -1; last_rx = -1; n_tx_bad = 0; n_rx_bad = 0; n_tx_rounds = 0; n_rx_rounds = 0;
      repeat (10) @(posedge clk_ctrl);
      rst_n = 1;
      tx_num_ch = 8'(nch); rx_num_ch = 8'(nch);
      for (int c = 0; c < nch; c++) begin
        @(posedge clk_ctrl);
        tx_mem_we <= 1; tx_mem_waddr <= (CW+7)'(c * 128); tx_mem_wdata <= 8'(LEN);
        for (int i = 0; i < LEN - 2; i++) begin
          pay[c][i] = 8'($urandom);
          @(posedge clk_ctrl);
          tx_mem_waddr <= (CW+7)'(c * 128 + 1 + i); tx_mem_wdata <= pay[c][i];
        end
      end
      @(posedge clk_ctrl);
      tx_mem_we <= 0; rx_enable <= 1; tx_enable <= 1;
      pkt0 = rx_pkt;
      tx_go <= all;
      wait ((tx_done & all) == all);
      fork
        wait (((rx_pkt ^ pkt0) & all) == all);
        #400_000_000;
      join_any
      disable fork;
      `CHECK(((rx_pkt ^ pkt0) & all) == all && ((rx_pkt ^ pkt0) & ~all) == '0,
             $sformatf("%0d channels: a frame on every active channel and none elsewhere", nch))
      tx_go <= '0;
      for (int c = 0; c < nch; c++) begin
        automatic logic [15:0] crc = 0;
        logic [7:0] got [LEN + 2];
        for (int i = 0; i < LEN - 2; i++)
          for (int b = 0; b < 8; b++) begin
            automatic logic fb = crc[0] ^ pay[c][i][b];
            crc = crc >> 1;
            if (fb) crc = crc ^ 16'h8408;
          end
        for (int i = 0; i < LEN + 2; i++) begin
          @(posedge clk_ctrl); rx_mem_raddr <= (CW+8)'(c * 256 + i);
          @(posedge clk_ctrl); @(negedge clk_ctrl);
          got[i] = rx_mem_rdata;
        end
        `CHECK(got[0] == 8'(c) && got[1] == 8'(LEN), $sformatf("%0d ch: ch%0d header %h %h", nch, c, got[0], got[1]))
        for (int i = 0; i < LEN - 2; i++)
          `CHECK(got[2 + i] == pay[c][i], $sformatf("%0d ch: ch%0d payload[%0d]", nch, c, i))
        `CHECK(got[LEN] == crc[7:0] && got[LEN + 1] == crc[15:8], $sformatf("%0d ch: ch%0d FCS", nch, c))
      end
      `CHECK(n_tx_bad == 0 && n_tx_rounds > 10, $sformatf("%0d ch: TX round of %0d cycles", nch, 256 * nch))
      `CHECK(n_rx_bad == 0 && n_rx_rounds > 100, $sformatf("%0d ch: RX round of %0d cycles", nch, 8 * nch))
      $display("%0d channels: tx rounds %0d, rx rounds %0d", nch, n_tx_rounds, n_rx_rounds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
