// tb_cs_fsm: the context switching FSM against a reference of its state
// diagram: Idle -> State 0 on enable, State 0 <-> State 1 on every tick,
// back to Idle on disable; the channel register advances once per tick and
// wraps after Max_Ch; tick strobes and context-read requests line up.
// The state sequence checked follows the original context switching FSM; the
// prefetch timing is this design's.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_cs_fsm;
  `TB_COUNTERS
  localparam int TL = 8;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [7:0] num_ch = 5, ch, ctx_rd_ch;
  logic [1:0] state;
  logic [2:0] tick_cnt;
  logic tick_start, tick_last, round_start, ctx_rd_en, ctx_clear;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  cs_fsm #(.TICK_LEN(TL)) dut (.*);

  int rst_ = 0, rch = 0, rcnt = 0, ticks = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(state == 0 && ctx_clear, "idle after reset")
    enable = 1; #1;
    `CHECK(ctx_rd_en && ctx_rd_ch == 0, "context of channel 0 requested on enable")
    @(posedge clk); #1;
    rst_ = 1; rch = 0; rcnt = 0;
    for (int cyc = 0; cyc < 40 * TL; cyc++) begin
      `CHECK(state == 2'(rst_), $sformatf("state %0d exp %0d", state, rst_))
      `CHECK(ch == 8'(rch) && tick_cnt == 3'(rcnt), "channel / tick counter")
      `CHECK(tick_start == (rcnt == 0) && tick_last == (rcnt == TL - 1), "tick strobes")
      `CHECK(round_start == (rcnt == 0 && rch == 0), "round start")
      if (rcnt == TL - 1)
        `CHECK(ctx_rd_en && ctx_rd_ch == 8'((rch + 1) % 5), "next context read")
      @(posedge clk); #1;
      if (rcnt == TL - 1) begin
        rcnt = 0; rch = (rch + 1) % 5; rst_ = (rst_ == 1) ? 2 : 1; ticks++;
      end else rcnt++;
    end
    `CHECK(ticks == 40, "one tick every TICK_LEN cycles")
    @(negedge clk); enable = 0;
    @(posedge clk); #1;
    `CHECK(state == 0 && ch == 0, "disable returns to idle")
    `TB_DONE
  end
endmodule
