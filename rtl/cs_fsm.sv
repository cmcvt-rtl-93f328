// cs_fsm: context switching FSM of a virtualised baseband processing unit.
// Three states, whatever the number of channels: Idle, State 0 and State 1.
// Reset leads to Idle; Enable moves Idle to State 0; at every tick the FSM
// moves between State 0 and State 1 and advances the 8-bit channel register
// ch, wrapping from Max_Ch (num_ch-1) to 0; Disable returns to Idle from
// either state. A tick is TICK_LEN clock cycles: 256 samples in the
// transmitter, 8 samples in the receiver.
// Outputs, all in the BBPU clock domain:
//   tick_cnt     cycle within the tick (0 .. TICK_LEN-1)
//   tick_start   first cycle of a tick, tick_last its last cycle
//   round_start  first cycle of the tick of channel 0
//   ctx_rd_en / ctx_rd_ch   issue the context read of the channel that the
//                first stage serves next, one cycle ahead (on Enable for
//                channel 0, then on every tick_last)
//   ctx_clear    high in Idle: context memories return to their reset value
// The channel count is read only in Idle and while enabled must be stable.
// Origin: the three states, the 8-bit channel register and the wrap at
// Max_Ch follow the original design; the one-cycle-early context read is
// this design's way of switching without lost cycles.
module cs_fsm #(
  parameter int unsigned TICK_LEN = 256,
  localparam int unsigned TW = (TICK_LEN > 1) ? $clog2(TICK_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [7:0]    num_ch,     // number of channels served, 1..255
  output logic [1:0]    state,      // 0 Idle, 1 State 0, 2 State 1
  output logic [7:0]    ch,
  output logic [TW-1:0] tick_cnt,
  output logic          tick_start,
  output logic          tick_last,
  output logic          round_start,
  output logic          ctx_rd_en,
  output logic [7:0]    ctx_rd_ch,
  output logic          ctx_clear
);
  typedef enum logic [1:0] {IDLE = 2'd0, ST0 = 2'd1, ST1 = 2'd2} cs_state_e;
  cs_state_e st;
  logic [7:0] max_ch, ch_next;

  assign max_ch  = (num_ch == 8'd0) ? 8'd0 : num_ch - 8'd1;
  assign ch_next = (ch >= max_ch) ? 8'd0 : ch + 8'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= IDLE;
      ch       <= '0;
      tick_cnt <= '0;
    end else begin
      unique case (st)
        IDLE: begin
          ch       <= '0;
          tick_cnt <= '0;
          if (enable) st <= ST0;
        end
        ST0, ST1: begin
          if (!enable) begin
            st <= IDLE;
          end else if (tick_cnt == TW'(TICK_LEN - 1)) begin
            tick_cnt <= '0;
            ch       <= ch_next;
            st       <= (st == ST0) ? ST1 : ST0;
          end else begin
            tick_cnt <= tick_cnt + 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign state       = st;
  assign tick_start  = (st != IDLE) && (tick_cnt == '0);
  assign tick_last   = (st != IDLE) && (tick_cnt == TW'(TICK_LEN - 1));
  assign round_start = tick_start && (ch == 8'd0);
  assign ctx_clear   = (st == IDLE);
  assign ctx_rd_en   = (st == IDLE) ? enable : (tick_last && enable);
  assign ctx_rd_ch   = (st == IDLE) ? 8'd0 : ch_next;
endmodule
