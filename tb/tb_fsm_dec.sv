// tb_fsm_dec: two channels interleaved in ticks of 8 samples. Each channel
// gets a correlator stream with a clean symbol (score 31) every 128 samples
// from a random start and low scores in between: preamble, SFD (7, A), PHR
// and a random payload. The RAM writes must be channel number, length and
// payload in order, rx_pkt must toggle once per frame, and a frame whose
// SFD is wrong must be dropped.
// Frame layout follows IEEE 802.15.4 and the original received-frame format
// (channel byte first).
`timescale 1ns/1ps
`include "tb/tb_check.svh"
`include "tb/tb_rx_stage_drv.svh"
module tb_fsm_dec;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, ctx_clear = 0;
  logic [3:0] in_sym;
  logic [4:0] in_score;
  logic mem_we, sync_evt, frame_evt;
  logic [8:0] mem_waddr;
  logic [7:0] mem_wdata;
  logic [1:0] rx_pkt;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)
  `RX_TAGS(2)
  fsm_dec #(.N_CH(2)) dut (.*);

  int start [2];
  logic [3:0] seq [2][$];
  logic [7:0] expw [2][$];
  int nsmp [2] = '{0, 0};
  int nfr = 0;

  // correlator model, one sample per item of the channel
  always_ff @(posedge clk) begin
    automatic int c = pre_tag.ch;
    automatic int n = nsmp[c];
    automatic int k = (n - start[c]) / 128;
    if (rst_n) begin
      if (n >= start[c] && (n - start[c]) % 128 == 0 && k < seq[c].size()) begin
        in_sym <= seq[c][k]; in_score <= 5'd31;
      end else begin
        in_sym <= 4'($urandom); in_score <= 5'($urandom_range(0, 15));
      end
      nsmp[c] <= n + 1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (mem_we) begin
      automatic int c = mem_waddr[8];
      if (expw[c].size() == 0) `CHECK(0, "unexpected write")
      else begin
        automatic logic [7:0] e = expw[c].pop_front();
        `CHECK(mem_wdata == e, $sformatf("ch%0d write %h exp %h", c, mem_wdata, e))
      end
    end
    if (frame_evt) nfr++;
  end

  initial begin
    int len [2] = '{9, 5};
    for (int c = 0; c < 2; c++) begin
      start[c] = 100 + 37 * c;
      repeat (8) seq[c].push_back(4'h0);
      seq[c].push_back(4'h7);
      seq[c].push_back(4'hA);
      seq[c].push_back(4'(len[c]));
      seq[c].push_back(4'(len[c] >> 4));
      expw[c].push_back(8'(c));
      expw[c].push_back(8'(len[c]));
      for (int i = 0; i < len[c]; i++) begin
        automatic logic [7:0] b = 8'($urandom);
        seq[c].push_back(b[3:0]); seq[c].push_back(b[7:4]);
        expw[c].push_back(b);
      end
    end
    // a second frame on channel 1 with a wrong SFD: must be ignored
    repeat (8) seq[1].push_back(4'h0);
    seq[1].push_back(4'h7); seq[1].push_back(4'h3);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2 * 8 * 128 * 50 / 8) @(posedge clk);
    `CHECK(expw[0].size() == 0 && expw[1].size() == 0, "all bytes written")
    `CHECK(rx_pkt == 2'b11 && nfr == 2, "one frame toggle per channel")
    `TB_DONE
  end
endmodule
