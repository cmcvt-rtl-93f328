// tb_mcvt: the virtual transmitter with two channels (BBPU clock 16 MHz).
// A frame is sent on channel 1, then another on channel 0. The DAC stream
// is demodulated here with real arithmetic: mixed down by the channel's
// carrier offset and differentially detected one chip (32 RF samples)
// apart, which does not depend on the carrier phase. The detected chip
// sequence must contain the whole frame (preamble, SFD, PHR, payload and
// FCS, spread with the 802.15.4 chip table written out below) without a
// single chip error. Also checked: the burst lasts one byte period
// (32 us) per frame byte, tx_done and one irq per frame, silence between
// frames.
`timescale 1ps/1ps
`include "tb/tb_check.svh"
module tb_mcvt;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  localparam int N = 2;
  localparam real PI = 3.14159265358979;
  logic clk_ctrl = 0, clk_bbpu = 0, clk_rf = 0, rst_n = 0;
  always #5000 clk_ctrl = ~clk_ctrl;
  always #31248 clk_bbpu = ~clk_bbpu;   // 2 x 8 MHz
  initial begin #1000; forever #7812 clk_rf = ~clk_rf; end
  `WATCHDOG(clk_rf, 200000)

  logic cfg_enable = 0, mem_we = 0, irq;
  logic [7:0] cfg_num_ch = 8'(N), mem_wdata = 0;
  logic [N-1:0] tx_go = 0, tx_done;
  logic [7:0] mem_waddr = 0;
  logic signed [11:0] tx_i, tx_q;
  mcvt #(.N_CH(N)) dut (.*);

  // 802.15.4 chip sequences, chip c0 first (leftmost)
  string pn [16] = '{
    "11011001110000110101001000101110", "11101101100111000011010100100010",
    "00101110110110011100001101010010", "00100010111011011001110000110101",
    "01010010001011101101100111000011", "00110101001000101110110110011100",
    "11000011010100100010111011011001", "10011100001101010010001011101101",
    "10001100100101100000011101111011", "10111000110010010110000001110111",
    "01111011100011001001011000000111", "01110111101110001100100101100000",
    "00000111011110111000110010010110", "01100000011101111011100011001001",
    "10010110000001110111101110001100", "11001001011000000111011110111000"};

  // demodulator state
  int dch = 1;
  longint n = 0;
  real bi_h [32], bq_h [32];
  bit   dbits [$];
  int   nz_first = -1, nz_last = -1;
  always @(posedge clk_rf) if (rst_n) begin
    automatic real th = -2.0 * PI * real'((longint'(nco_inc(dch)) * n) % 128) / 128.0;
    automatic real bi = real'(tx_i) * $cos(th) - real'(tx_q) * $sin(th);
    automatic real bq = real'(tx_i) * $sin(th) + real'(tx_q) * $cos(th);
    automatic real pi_ = bi_h[n % 32], pq_ = bq_h[n % 32];
    // Im(b[n] * conj(b[n-32]))
    dbits.push_back((bq * pi_ - bi * pq_) > 0.0);
    bi_h[n % 32] = bi;
    bq_h[n % 32] = bq;
    if (tx_i != 0 || tx_q != 0) begin
      if (nz_first < 0) nz_first = int'(n);
      nz_last = int'(n);
    end
    n++;
  end

  int nirq = 0;
  always @(posedge clk_ctrl) if (rst_n && irq) nirq++;

  task automatic send(input int c, input int len);
    logic [7:0] by [$];
    logic [15:0] crc = 0;
    bit chips [$];
    int nb, found = 0;
    for (int i = 0; i < 4; i++) by.push_back(8'h00);
    by.push_back(8'hA7);
    by.push_back(8'(len));
    @(posedge clk_ctrl); mem_we <= 1; mem_waddr <= 8'(c * 128); mem_wdata <= 8'(len);
    for (int i = 0; i < len - 2; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      by.push_back(b);
      for (int k = 0; k < 8; k++) begin
        automatic logic fb = crc[0] ^ b[k];
        crc = crc >> 1;
        if (fb) crc = crc ^ 16'h8408;
      end
      @(posedge clk_ctrl); mem_waddr <= 8'(c * 128 + 1 + i); mem_wdata <= b;
    end
    @(posedge clk_ctrl); mem_we <= 0;
    by.push_back(crc[7:0]);
    by.push_back(crc[15:8]);
    foreach (by[i]) for (int h = 0; h < 2; h++) begin
      automatic int s = h ? int'(by[i][7:4]) : int'(by[i][3:0]);
      for (int k = 0; k < 32; k++) chips.push_back(pn[s][k] == "1");
    end
    // start
    dch = c; dbits = {}; nz_first = -1; nz_last = -1;
    begin
      automatic int irq0 = nirq;
      @(posedge clk_ctrl); tx_go[c] <= 1;
      wait (tx_done[c]);
      repeat (20) @(posedge clk_ctrl);
      `CHECK(nirq == irq0 + 1, "one irq per frame")
    end
    // done is reported when the data FSM finishes; the last bytes are then
    // still in the pipeline and the ping-pong RAM
    repeat (14000) @(posedge clk_rf);
    tx_go[c] <= 0;
    wait (!tx_done[c]);
    // burst length: (frame bytes) x 32 us of 64 MHz samples, plus the half
    // chip (32 samples) by which the Q branch trails
    nb = by.size();
    `CHECK(nz_last - nz_first + 1 > nb * 2048 && nz_last - nz_first + 1 <= nb * 2048 + 32,
           $sformatf("ch%0d burst %0d samples for %0d bytes", c, nz_last - nz_first + 1, nb))
    // differential chips d_k = c_k ^ c_(k-1) ^ k[0], searched at every offset
    for (int o = 0; o + 32 * chips.size() < dbits.size() && !found; o++) begin
      automatic int ok = 1;
      for (int k = 1; k < chips.size() && ok; k++)
        if (dbits[o + 32 * k] != (chips[k] ^ chips[k-1] ^ k[0])) ok = 0;
      if (ok) found = 1;
    end
    `CHECK(found, $sformatf("ch%0d frame of %0d bytes demodulated", c, nb))
  endtask

  initial begin
    repeat (5) @(posedge clk_ctrl);
    rst_n = 1;
    @(posedge clk_ctrl); cfg_enable <= 1;
    repeat (3000) @(posedge clk_rf);
    `CHECK(nz_first < 0, "silent while idle")
    send(1, 12);
    send(0, 20);
    `TB_DONE
  end
endmodule
