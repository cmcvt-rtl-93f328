// fsm_dec: decoding FSM of the virtual receiver's BBPU, one context per
// channel. It runs on every sample of its channel with the correlator's best
// symbol and score:
//   SEARCH  wait for symbol 0 with score >= TH_ACQ (preamble)
//   PEAK    follow the score for up to 3 more samples and keep the best
//           sample as symbol timing
//   PRE     every 128 samples (one symbol, 16 us) decide a symbol: 0 stays
//           in the preamble, 7 is the first SFD symbol
//   SFD2    expect 0xA (SFD 0xA7 complete); write the channel number
//   PHR_LO/PHR_HI   frame length (7 bits), written after the channel number
//   PAY_LO/PAY_HI   payload bytes, low nibble first, written in order
// A decision with a score below TH_TRK, or an unexpected symbol, returns to
// SEARCH. At the end of a frame the channel's rx_pkt bit toggles.
// Rx data RAM layout: channel c at c*256; byte 0 channel number, byte 1
// length L, bytes 2..L+1 the PSDU including the two FCS bytes (the layout
// of the decoded packets follows the design; the per-channel regions are
// own choice). The FCS is passed on, not checked.
// Timing: one register stage; context read issued from pre_tag.
module fsm_dec
  import cmcvt_pkg::*;
#(
  parameter int unsigned N_CH    = 8,
  parameter int unsigned TH_ACQ  = 26,
  parameter int unsigned TH_TRK  = 20,
  localparam int unsigned CW     = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ctx_clear,
  input  tag_t            pre_tag,
  input  tag_t            in_tag,
  input  logic [3:0]      in_sym,
  input  logic [4:0]      in_score,
  output logic            mem_we,
  output logic [CW+7:0]   mem_waddr,
  output logic [7:0]      mem_wdata,
  output logic [N_CH-1:0] rx_pkt,
  output logic            sync_evt,   // a preamble was acquired
  output logic            frame_evt   // a frame was completed
);
  typedef enum logic [2:0] {
    D_SEARCH = 3'd0, D_PEAK = 3'd1, D_PRE = 3'd2, D_SFD2 = 3'd3,
    D_PHR_LO = 3'd4, D_PHR_HI = 3'd5, D_PAY_LO = 3'd6, D_PAY_HI = 3'd7
  } dec_state_e;

  typedef struct packed {
    dec_state_e st;
    logic [6:0] scnt;
    logic [4:0] bscore;
    logic [3:0] nib;
    logic [6:0] len;
    logic [6:0] bcnt;
  } dec_ctx_t;

  dec_ctx_t ctx_rd, st_q, cur, nx;
  logic          we_nx, tog_nx, sync_nx;
  logic [7:0]    idx_nx, dat_nx;
  logic [6:0]    scnt1;
  logic          decide, good;
  logic [CW-1:0] chn;

  ctx_ram #(.W($bits(dec_ctx_t)), .DEPTH(N_CH)) u_ctx (
    .clk, .rst_n, .clear(ctx_clear),
    .we(in_tag.occ && in_tag.last), .waddr(CW'(in_tag.ch)), .wdata(nx),
    .re(pre_tag.occ && pre_tag.first), .raddr(CW'(pre_tag.ch)), .rdata(ctx_rd)
  );

  assign chn    = CW'(in_tag.ch);
  assign cur    = in_tag.first ? ctx_rd : st_q;
  assign scnt1  = cur.scnt + 7'd1;
  assign decide = (scnt1 == 7'd0);
  assign good   = (in_score >= 5'(TH_TRK));

  always_comb begin
    nx      = cur;
    we_nx   = 1'b0;
    tog_nx  = 1'b0;
    sync_nx = 1'b0;
    idx_nx  = '0;
    dat_nx  = '0;
    nx.scnt = scnt1;
    unique case (cur.st)
      D_SEARCH: begin
        if (in_sym == 4'd0 && in_score >= 5'(TH_ACQ)) begin
          nx.st     = D_PEAK;
          nx.scnt   = '0;
          nx.bscore = in_score;
        end
      end
      D_PEAK: begin
        if (in_sym == 4'd0 && in_score > cur.bscore) begin
          nx.bscore = in_score;
          nx.scnt   = '0;
        end else if (scnt1 >= 7'd3) begin
          nx.st   = D_PRE;
          sync_nx = 1'b1;
        end
      end
      default: begin
        if (decide) begin
          if (!good) begin
            nx.st = D_SEARCH;
          end else begin
            unique case (cur.st)
              D_PRE: begin
                if (in_sym == 4'h7)      nx.st = D_SFD2;
                else if (in_sym != 4'h0) nx.st = D_SEARCH;
              end
              D_SFD2: begin
                if (in_sym == 4'hA) begin
                  nx.st  = D_PHR_LO;
                  we_nx  = 1'b1;
                  idx_nx = 8'd0;
                  dat_nx = in_tag.ch;
                end else begin
                  nx.st = D_SEARCH;
                end
              end
              D_PHR_LO: begin
                nx.nib = in_sym;
                nx.st  = D_PHR_HI;
              end
              D_PHR_HI: begin
                nx.len  = {in_sym[2:0], cur.nib};
                nx.bcnt = '0;
                if ({in_sym[2:0], cur.nib} == 7'd0) begin
                  nx.st = D_SEARCH;
                end else begin
                  nx.st  = D_PAY_LO;
                  we_nx  = 1'b1;
                  idx_nx = 8'd1;
                  dat_nx = {1'b0, in_sym[2:0], cur.nib};
                end
              end
              D_PAY_LO: begin
                nx.nib = in_sym;
                nx.st  = D_PAY_HI;
              end
              D_PAY_HI: begin
                we_nx   = 1'b1;
                idx_nx  = 8'd2 + {1'b0, cur.bcnt};
                dat_nx  = {in_sym, cur.nib};
                nx.bcnt = cur.bcnt + 7'd1;
                if (cur.bcnt + 7'd1 == cur.len) begin
                  nx.st  = D_SEARCH;
                  tog_nx = 1'b1;
                end else begin
                  nx.st = D_PAY_LO;
                end
              end
              default: nx.st = D_SEARCH;
            endcase
          end
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= '0;
      mem_we    <= 1'b0;
      mem_waddr <= '0;
      mem_wdata <= '0;
      rx_pkt    <= '0;
      sync_evt  <= 1'b0;
      frame_evt <= 1'b0;
    end else begin
      mem_we    <= in_tag.occ && we_nx;
      mem_waddr <= {chn, idx_nx};
      mem_wdata <= dat_nx;
      sync_evt  <= in_tag.occ && sync_nx;
      frame_evt <= in_tag.occ && tog_nx;
      if (in_tag.occ) begin
        st_q <= nx;
        if (tog_nx) rx_pkt[chn] <= ~rx_pkt[chn];
      end
    end
  end
endmodule
