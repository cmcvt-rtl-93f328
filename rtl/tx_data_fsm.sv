// tx_data_fsm: stage M0 of the virtual transmitter (data FSM, CRC and output
// multiplexer). Once per tick it produces the next byte of the frame of the
// channel it serves: 4 preamble bytes 0x00, the SFD 0xA7, the PHR (frame
// length), the payload read from the Tx data RAM and the two FCS bytes, low
// byte first. The FSM state, byte counter, length and running CRC of each
// channel are its context: they are restored from the context RAM at the
// start of the channel's tick and saved at the end of the evaluation cycle.
// Frame memory layout (own choice): the region of channel c starts at
// c*128; byte 0 holds the PHR length L (payload + 2 FCS bytes) and bytes
// 1..L-2 the payload. The FCS is computed here.
// Handshake with the host, per channel (own choice): a frame is sent when
// go[c] is high and done[c] low; done[c] rises after the last FCS byte and
// falls once go[c] has been taken low.
// Timing within a tick: cycle 0 the restored context addresses the Tx data
// RAM, cycle 1 the byte is formed, the context written back and the output
// registered; the next stage takes it at the next tick_start. An output item
// is produced every tick (out_valid low while the channel is silent).
module tx_data_fsm
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH = 8,
  parameter int unsigned TW   = 8,
  localparam int unsigned CW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,           // context FSM not idle
  input  logic              ctx_clear,
  input  logic              ctx_rd_en,
  input  logic [7:0]        ctx_rd_ch,
  input  logic [TW-1:0]     tick_cnt,
  input  logic [7:0]        ch,
  input  logic [N_CH-1:0]   go,
  output logic [N_CH-1:0]   done,
  output logic [CW+6:0]     mem_raddr,
  input  logic [7:0]        mem_rdata,
  output tag_t              out_tag,
  output logic              out_valid,
  output logic [7:0]        out_byte
);
  typedef enum logic [2:0] {
    S_IDLE = 3'd0, S_PRE = 3'd1, S_SFD = 3'd2, S_PHR = 3'd3,
    S_PAY = 3'd4, S_FCS_LO = 3'd5, S_FCS_HI = 3'd6
  } tx_state_e;

  typedef struct packed {
    tx_state_e   st;
    logic [6:0]  cnt;
    logic [6:0]  len;
    logic [15:0] crc;
  } m0_ctx_t;

  m0_ctx_t ctx_rd, ctx_q, ctx_nx;
  logic [15:0] crc_upd;
  logic        eval;
  logic [7:0]  byte_nx;
  logic        valid_nx, set_done, clr_done;
  logic [6:0]  rd_idx;

  ctx_ram #(.W($bits(m0_ctx_t)), .DEPTH(N_CH)) u_ctx (
    .clk, .rst_n, .clear(ctx_clear),
    .we(eval), .waddr(CW'(ch)), .wdata(ctx_nx),
    .re(ctx_rd_en), .raddr(CW'(ctx_rd_ch)), .rdata(ctx_rd)
  );

  // cycle 0: address the frame memory from the restored context
  assign rd_idx    = (ctx_rd.st == S_PHR) ? 7'd0 : ctx_rd.cnt + 7'd1;
  assign mem_raddr = {CW'(ch), rd_idx};

  always_ff @(posedge clk) begin
    if (run && tick_cnt == TW'(0)) ctx_q <= ctx_rd;
  end

  crc16 u_crc (.crc_in(ctx_q.crc), .data(mem_rdata), .crc_out(crc_upd));

  assign eval = run && (tick_cnt == TW'(1));

  // cycle 1: form the byte and the next context
  always_comb begin
    ctx_nx   = ctx_q;
    byte_nx  = 8'h00;
    valid_nx = 1'b1;
    set_done = 1'b0;
    clr_done = 1'b0;
    unique case (ctx_q.st)
      S_IDLE: begin
        if (go[ch[CW-1:0]] && !done[ch[CW-1:0]]) begin
          ctx_nx.st  = S_PRE;
          ctx_nx.cnt = 7'd1;
          ctx_nx.crc = '0;
        end else begin
          valid_nx = 1'b0;
          clr_done = !go[ch[CW-1:0]];
        end
      end
      S_PRE: begin
        ctx_nx.cnt = ctx_q.cnt + 7'd1;
        if (ctx_q.cnt == 7'(PREAMBLE_BYTES - 1)) ctx_nx.st = S_SFD;
      end
      S_SFD: begin
        byte_nx   = SFD_BYTE;
        ctx_nx.st = S_PHR;
      end
      S_PHR: begin
        byte_nx    = {1'b0, mem_rdata[6:0]};
        ctx_nx.len = mem_rdata[6:0];
        ctx_nx.cnt = '0;
        ctx_nx.st  = (mem_rdata[6:0] > 7'd2) ? S_PAY : S_FCS_LO;
      end
      S_PAY: begin
        byte_nx    = mem_rdata;
        ctx_nx.crc = crc_upd;
        ctx_nx.cnt = ctx_q.cnt + 7'd1;
        if (ctx_q.cnt + 7'd1 >= ctx_q.len - 7'd2) ctx_nx.st = S_FCS_LO;
      end
      S_FCS_LO: begin
        byte_nx   = ctx_q.crc[7:0];
        ctx_nx.st = S_FCS_HI;
      end
      S_FCS_HI: begin
        byte_nx   = ctx_q.crc[15:8];
        ctx_nx.st = S_IDLE;
        set_done  = 1'b1;
      end
      default: begin
        ctx_nx.st = S_IDLE;
        valid_nx  = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag   <= '0;
      out_valid <= 1'b0;
      out_byte  <= '0;
      done      <= '0;
    end else if (!run) begin
      out_tag   <= '0;
      out_valid <= 1'b0;
    end else if (eval) begin
      out_tag   <= '{occ: 1'b1, first: 1'b1, last: 1'b1, ch: ch};
      out_valid <= valid_nx;
      out_byte  <= byte_nx;
      if (set_done) done[ch[CW-1:0]] <= 1'b1;
      if (clr_done) done[ch[CW-1:0]] <= 1'b0;
    end
  end
endmodule
