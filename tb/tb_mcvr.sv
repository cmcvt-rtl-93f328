// tb_mcvr: the virtual receiver with two channels (BBPU clock 16 MHz). The
// ADC stream is synthesised here with real arithmetic: each channel is an
// 802.15.4 O-QPSK burst (half-sine chips, Q half a chip late) on its
// carrier offset, with its own start time, amplitude and carrier phase,
// plus uniform noise. Both channels carry frames at the same time; a second
// round sends new frames on both. For every frame the Rx data RAM must
// hold the channel number, the length, the payload and the FCS, rx_pkt
// must toggle and irq must pulse.
`timescale 1ps/1ps
`include "tb/tb_check.svh"
module tb_mcvr;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  localparam int N = 2;
  localparam real PI = 3.14159265358979;
  logic clk_ctrl = 0, clk_bbpu = 0, clk_rf = 0, rst_n = 0;
  always #5000 clk_ctrl = ~clk_ctrl;
  always #31248 clk_bbpu = ~clk_bbpu;   // 2 x 8 MHz
  initial begin #2200; forever #7812 clk_rf = ~clk_rf; end
  `WATCHDOG(clk_rf, 400000)

  logic cfg_enable = 0, irq;
  logic [7:0] cfg_num_ch = 8'(N), mem_rdata;
  logic [N-1:0] rx_pkt;
  logic [8:0] mem_raddr = 0;
  logic signed [11:0] rx_i = 0, rx_q = 0;
  mcvr #(.N_CH(N)) dut (.*);

  string pn [16] = '{
    "11011001110000110101001000101110", "11101101100111000011010100100010",
    "00101110110110011100001101010010", "00100010111011011001110000110101",
    "01010010001011101101100111000011", "00110101001000101110110110011100",
    "11000011010100100010111011011001", "10011100001101010010001011101101",
    "10001100100101100000011101111011", "10111000110010010110000001110111",
    "01111011100011001001011000000111", "01110111101110001100100101100000",
    "00000111011110111000110010010110", "01100000011101111011100011001001",
    "10010110000001110111101110001100", "11001001011000000111011110111000"};

  // per-channel burst being played
  bit   chips [N][$];
  longint t0 [N];
  real  amp [N], ph0 [N];
  logic [7:0] exp_b [N][$];
  longint n = 0;

  function automatic real pulse(int c, longint k, longint m);
    // chip k of channel c, m samples into its 64-sample pulse
    if (k < 0 || k >= chips[c].size() || m < 0 || m >= 64) return 0.0;
    return (chips[c][k] ? 1.0 : -1.0) * $sin(PI * real'(m) / 64.0);
  endfunction

  always @(negedge clk_rf) begin
    automatic real si = 0.0, sq = 0.0;
    for (int c = 0; c < N; c++) if (n >= t0[c]) begin
      automatic longint d = n - t0[c];
      automatic real bi = pulse(c, 2 * (d / 64), d % 64);
      automatic real bq = (d >= 32) ? pulse(c, 2 * ((d - 32) / 64) + 1, (d - 32) % 64) : 0.0;
      automatic real th = ph0[c] + 2.0 * PI * real'((longint'(nco_inc(c)) * n) % 128) / 128.0;
      si += amp[c] * (bi * $cos(th) - bq * $sin(th));
      sq += amp[c] * (bi * $sin(th) + bq * $cos(th));
    end
    si += real'($urandom_range(0, 40)) - 20.0;
    sq += real'($urandom_range(0, 40)) - 20.0;
    rx_i = 12'($rtoi(si + 4096.5) - 4096);
    rx_q = 12'($rtoi(sq + 4096.5) - 4096);
    n++;
  end

  int nirq = 0;
  always @(posedge clk_ctrl) if (rst_n && irq) nirq++;

  task automatic make_frame(input int c, input int len, input longint start);
    logic [7:0] by [$];
    logic [15:0] crc = 0;
    chips[c] = {};
    exp_b[c] = {};
    for (int i = 0; i < 4; i++) by.push_back(8'h00);
    by.push_back(8'hA7);
    by.push_back(8'(len));
    exp_b[c].push_back(8'(c));
    exp_b[c].push_back(8'(len));
    for (int i = 0; i < len - 2; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      by.push_back(b);
      exp_b[c].push_back(b);
      for (int k = 0; k < 8; k++) begin
        automatic logic fb = crc[0] ^ b[k];
        crc = crc >> 1;
        if (fb) crc = crc ^ 16'h8408;
      end
    end
    by.push_back(crc[7:0]);
    by.push_back(crc[15:8]);
    exp_b[c].push_back(crc[7:0]);
    exp_b[c].push_back(crc[15:8]);
    foreach (by[i]) for (int h = 0; h < 2; h++) begin
      automatic int s = h ? int'(by[i][7:4]) : int'(by[i][3:0]);
      for (int k = 0; k < 32; k++) chips[c].push_back(pn[s][k] == "1");
    end
    amp[c] = 300.0 + real'($urandom_range(0, 1200));
    ph0[c] = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    t0[c] = start;
  endtask

  task automatic check_ram(input int c);
    for (int i = 0; i < exp_b[c].size(); i++) begin
      @(posedge clk_ctrl); mem_raddr <= 9'(c * 256 + i);
      @(posedge clk_ctrl); @(negedge clk_ctrl);
      `CHECK(mem_rdata == exp_b[c][i], $sformatf("ch%0d byte %0d: %h exp %h", c, i, mem_rdata, exp_b[c][i]))
    end
  endtask

  initial begin
    for (int c = 0; c < N; c++) t0[c] = 64'h7fff_ffff_ffff;
    repeat (5) @(posedge clk_ctrl);
    rst_n = 1;
    @(posedge clk_ctrl); cfg_enable <= 1;
    for (int r = 0; r < 2; r++) begin
      automatic logic [N-1:0] p0 = rx_pkt;
      automatic int irq0 = nirq;
      automatic longint done_n = 0;
      for (int c = 0; c < N; c++) begin
        make_frame(c, 5 + $urandom_range(0, 15), n + 2000 + $urandom_range(0, 3000));
        if (t0[c] + 64 * chips[c].size() / 2 > done_n) done_n = t0[c] + 64 * chips[c].size() / 2;
      end
      wait (n > done_n + 3000);
      `CHECK((rx_pkt ^ p0) == '1, $sformatf("round %0d: rx_pkt toggled on every channel", r))
      `CHECK(nirq >= irq0 + 1, "irq pulsed")
      for (int c = 0; c < N; c++) check_ram(c);
    end
    `TB_DONE
  end
endmodule
