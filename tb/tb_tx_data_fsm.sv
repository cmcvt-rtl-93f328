// tb_tx_data_fsm: stage M0 driven by the context switching FSM with three
// channels (8-cycle ticks to keep it short) and a model of the Tx data RAM.
// Each channel's byte stream is compared with the frame built here:
// 4 x 00, A7, L, payload, FCS low, FCS high (bit-serial CRC reference);
// afterwards the channel must be silent and done must be set, and done
// must fall after go is withdrawn.
// Frame format follows IEEE 802.15.4; the memory layout is this design's.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_tx_data_fsm;
  import cmcvt_pkg::*;
  `TB_COUNTERS
  localparam int N = 4;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [1:0] state;
  logic [7:0] ch, ctx_rd_ch;
  logic [2:0] tick_cnt;
  logic tick_start, tick_last, round_start, ctx_rd_en, ctx_clear;
  logic [N-1:0] go = 0, done;
  logic [8:0] mem_raddr;
  logic [7:0] mem_rdata, out_byte;
  tag_t out_tag;
  logic out_valid;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  cs_fsm #(.TICK_LEN(8)) u_cs (.clk, .rst_n, .enable, .num_ch(8'd3), .state, .ch,
    .tick_cnt, .tick_start, .tick_last, .round_start, .ctx_rd_en, .ctx_rd_ch, .ctx_clear);
  tx_data_fsm #(.N_CH(N), .TW(3)) dut (.clk, .rst_n, .run(state != 0), .ctx_clear,
    .ctx_rd_en, .ctx_rd_ch, .tick_cnt, .ch, .go, .done, .mem_raddr, .mem_rdata,
    .out_tag, .out_valid, .out_byte);

  logic [7:0] ram [512];
  always @(posedge clk) mem_rdata <= ram[mem_raddr];

  function automatic logic [15:0] crc_bits(input logic [15:0] c, input logic [7:0] b);
    for (int k = 0; k < 8; k++) begin
      automatic logic fb = c[0] ^ b[k];
      c = c >> 1;
      if (fb) c ^= 16'h8408;
    end
    return c;
  endfunction

  logic [7:0] expq [3][$];
  int got [3];
  int lens [3] = '{5, 12, 3};
  // collect the output of each evaluation (visible from cycle 2 of a tick)
  always @(posedge clk) if (state != 0 && tick_cnt == 3'd2 && out_tag.occ) begin
    automatic int c = out_tag.ch;
    if (out_valid) begin
      if (expq[c].size() == 0) begin
        `CHECK(0, $sformatf("ch%0d extra byte %h", c, out_byte))
      end else begin
        automatic logic [7:0] e = expq[c].pop_front();
        `CHECK(out_byte == e, $sformatf("ch%0d byte %h exp %h", c, out_byte, e))
        got[c]++;
      end
    end
  end

  initial begin
    for (int c = 0; c < 3; c++) begin
      automatic logic [15:0] crc = 0;
      ram[c * 128] = 8'(lens[c]);
      for (int i = 0; i < 4; i++) expq[c].push_back(8'h00);
      expq[c].push_back(8'hA7);
      expq[c].push_back(8'(lens[c]));
      for (int i = 1; i <= lens[c] - 2; i++) begin
        ram[c * 128 + i] = 8'($urandom);
        expq[c].push_back(ram[c * 128 + i]);
        crc = crc_bits(crc, ram[c * 128 + i]);
      end
      expq[c].push_back(crc[7:0]);
      expq[c].push_back(crc[15:8]);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1; go = 4'b0111;
    repeat (3 * 8 * 25) @(posedge clk);
    for (int c = 0; c < 3; c++) begin
      `CHECK(expq[c].size() == 0, $sformatf("ch%0d frame incomplete", c))
      `CHECK(got[c] == lens[c] + 6, $sformatf("ch%0d sent %0d bytes", c, got[c]))
      `CHECK(done[c], "done set")
    end
    go = 0;
    repeat (3 * 8 * 2) @(posedge clk);
    `CHECK(done == 0, "done cleared after go withdrawn")
    `TB_DONE
  end
endmodule
