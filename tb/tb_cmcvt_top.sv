// tb_cmcvt_top: end-to-end test of the transceiver with every parameter at
// its default (8 channels). The transmitter's DAC stream is looped back into
// the receiver's ADC. Each channel c sends one frame of length 8+4c whose
// payload is c, c+1, ..., the traffic of the decoded-packet example the
// design was demonstrated with; all 8 frames are on the air at the same
// time on 8 frequency offsets. The test reads every received frame back
// from the Rx data RAM and compares channel byte, length, payload and FCS
// with values computed here (the FCS also against the published bytes).
// It also checks the real-time schedule: one TX round of 8 ticks every
// 2048 BBPU cycles (32 us), one RX round every 64 cycles (1 us), and
// counts each mechanism: context switches, ping-pong swaps, preamble
// acquisitions, AGC gain changes, TX and RX interrupts.
// The traffic and the FCS bytes are those of the original demonstration;
// everything else is this testbench's choice.
`timescale 1ps/1ps
module tb_cmcvt_top;
  import cmcvt_pkg::*;
  localparam int N = 8;
  localparam int CW = 3;

  logic clk_ctrl = 0, clk_bbpu = 0, clk_rf = 0, rst_n = 0;
  always #5000 clk_ctrl = ~clk_ctrl;          // 100 MHz
  always #7812 clk_bbpu = ~clk_bbpu;          // ~64 MHz = 8 x 8 MHz
  initial begin #3000; forever #7812 clk_rf = ~clk_rf; end

  logic          tx_enable = 0, rx_enable = 0, tx_mem_we = 0, tx_irq, rx_irq;
  logic [7:0]    tx_num_ch = 8'(N), rx_num_ch = 8'(N), tx_mem_wdata = 0, rx_mem_rdata;
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

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] ref_crc(input int ch, input int len);
    logic [15:0] c = 0;
    for (int i = 0; i < len - 2; i++) begin
      automatic logic [7:0] b = 8'(ch + i);
      for (int k = 0; k < 8; k++) begin
        automatic logic fb = c[0] ^ b[k];
        c = c >> 1;
        if (fb) c = c ^ 16'h8408;
      end
    end
    return c;
  endfunction

  // FCS bytes of the demonstration frames, low byte first
  logic [15:0] fig_fcs [8] = '{16'h9bed, 16'hc594, 16'h6af4, 16'h7474,
                                16'hae47, 16'ha78c, 16'h87a2, 16'h42b5};

  // mechanism counters
  int n_tx_tick = 0, n_rx_tick = 0, n_tx_swap = 0, n_rx_swap = 0;
  int n_sync = 0, n_frame = 0, n_agc = 0, n_tx_irq = 0, n_rx_irq = 0;
  int n_tx_round_bad = 0, n_rx_round_bad = 0, n_tx_rounds = 0, n_rx_rounds = 0;
  longint bcyc = 0, last_tx_round = -1, last_rx_round = -1;
  logic prev_tx_half = 0, prev_rx_half = 0;
  logic [2:0] prev_shift0 = 0;

  // counters run only out of reset (registers hold random values before it)
  always @(posedge clk_bbpu) if (rst_n) begin
    bcyc++;
    if (dut.u_tx.u_bbpu.tick_start) n_tx_tick++;
    if (dut.u_rx.u_bbpu.tick_start) n_rx_tick++;
    if (dut.u_rx.u_bbpu.sync_evt) n_sync++;
    if (dut.u_rx.u_bbpu.frame_evt) n_frame++;
    if (dut.u_tx.u_bbpu.tick_start && dut.u_tx.u_bbpu.cur_ch == 0) begin
      if (last_tx_round >= 0 && bcyc - last_tx_round != 2048) n_tx_round_bad++;
      last_tx_round = bcyc; n_tx_rounds++;
    end
    if (dut.u_rx.u_bbpu.u_cs.round_start) begin
      if (last_rx_round >= 0 && bcyc - last_rx_round != 64) n_rx_round_bad++;
      last_rx_round = bcyc; n_rx_rounds++;
    end
  end
  always @(posedge clk_rf) if (rst_n) begin
    if (dut.u_tx.u_duc.rd_half != prev_tx_half) n_tx_swap++;
    if (dut.u_rx.u_ddc.wr_half != prev_rx_half) n_rx_swap++;
    if (dut.u_rx.u_ddc.agc_shift[0] != prev_shift0) n_agc++;
    prev_tx_half = dut.u_tx.u_duc.rd_half;
    prev_rx_half = dut.u_rx.u_ddc.wr_half;
    prev_shift0  = dut.u_rx.u_ddc.agc_shift[0];
  end
  always @(posedge clk_ctrl) if (rst_n) begin
    if (tx_irq) n_tx_irq++;
    if (rx_irq) n_rx_irq++;
  end

  // watchdog: 3 ms of simulated time
  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] rd;
  logic [N-1:0] pkt0;
  initial begin
    repeat (5) @(posedge clk_ctrl);
    rst_n = 1;
    // load the frames
    for (int c = 0; c < N; c++) begin
      automatic int len = 8 + 4 * c;
      for (int i = 0; i < len - 1; i++) begin
        @(posedge clk_ctrl);
        tx_mem_we    <= 1;
        tx_mem_waddr <= (CW+7)'(c * 128 + i);
        tx_mem_wdata <= (i == 0) ? 8'(len) : 8'(c + i - 1);
      end
    end
    @(posedge clk_ctrl);
    tx_mem_we <= 0;
    rx_enable <= 1;
    tx_enable <= 1;
    pkt0 = rx_pkt;
    tx_go <= '1;
    // wait for all transmissions and receptions
    wait (&tx_done);
    $display("all frames sent at %0t", $time);
    fork
      wait ((rx_pkt ^ pkt0) == '1);
      #200_000_000;
    join_any
    disable fork;
    check((rx_pkt ^ pkt0) == '1, "every channel received a frame");
    tx_go <= '0;
    wait (tx_done == '0);
    // read back
    for (int c = 0; c < N; c++) begin
      automatic int len = 8 + 4 * c;
      automatic logic [15:0] fcs = ref_crc(c, len);
      logic [7:0] got [64];
      for (int i = 0; i < len + 2; i++) begin
        @(posedge clk_ctrl);
        rx_mem_raddr <= (CW+8)'(c * 256 + i);
        @(posedge clk_ctrl);
        @(negedge clk_ctrl);
        got[i] = rx_mem_rdata;
      end
      check(got[0] == 8'(c), $sformatf("ch%0d channel byte %h", c, got[0]));
      check(got[1] == 8'(len), $sformatf("ch%0d length %h", c, got[1]));
      for (int i = 0; i < len - 2; i++)
        check(got[2 + i] == 8'(c + i), $sformatf("ch%0d payload[%0d] %h", c, i, got[2 + i]));
      check({got[len], got[len + 1]} == {fcs[7:0], fcs[15:8]},
            $sformatf("ch%0d FCS %h %h", c, got[len], got[len + 1]));
      check({got[len], got[len + 1]} == fig_fcs[c], $sformatf("ch%0d FCS vs published", c));
    end
    $display("ticks tx=%0d rx=%0d swaps tx=%0d rx=%0d sync=%0d frames=%0d agc=%0d irq tx=%0d rx=%0d rounds tx=%0d rx=%0d",
             n_tx_tick, n_rx_tick, n_tx_swap, n_rx_swap, n_sync, n_frame, n_agc, n_tx_irq, n_rx_irq,
             n_tx_rounds, n_rx_rounds);
    check(n_tx_round_bad == 0 && n_tx_rounds > 10, "TX round every 2048 BBPU cycles (32 us)");
    check(n_rx_round_bad == 0 && n_rx_rounds > 100, "RX round every 64 BBPU cycles (1 us)");
    check(n_tx_tick > 0, "TX context switches happened");
    check(n_rx_tick > 0, "RX context switches happened");
    check(n_tx_swap > 0 && n_rx_swap > 0, "ping-pong swaps happened");
    check(n_sync >= N, "preamble acquisitions happened");
    check(n_frame == N, "one frame completed per channel");
    check(n_agc > 0, "AGC gain changes happened");
    check(n_tx_irq > 0 && n_rx_irq > 0, "interrupts happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
