// cmcvt_pkg: types, constants and table functions shared by the virtual
// transmitter and receiver.
//
// - IEEE 802.15.4 2.4 GHz O-QPSK spreading: 16 symbols of 32 chips. Symbols
//   1..7 are symbol 0 cyclically delayed by 4*k chips, symbols 8..15 are
//   symbols 0..7 with every odd-indexed chip inverted (standard construction).
// - Differential chip templates for the receiver. With one-chip delayed
//   conjugate multiplication of an O-QPSK (MSK-equivalent) signal, the sign of
//   the imaginary part at chip k is d_k = c_k ^ c_(k-1) ^ k[0].
// - A quarter-wave sine table, amplitude 127, for a 128-step period:
//   QSIN[n] = round(127 * sin(2*pi*n/128)), n = 0..32. The same table gives
//   the half-sine pulse (64 steps per pulse at 64 MHz) and the NCOs.
// - 40-tap low-pass FIR for the DDC: Hamming-windowed sinc, cutoff 2.5 MHz at
//   64 MHz, h[n] = round(1024 * w[n]*sinc(2*2.5/64*(n-19.5)) / sum), symmetric.
// Bit k of a chip word is chip c_k; c_0 is sent first.
package cmcvt_pkg;

  // Pipeline tag that travels with each item through the time-shared stages.
  typedef struct packed {
    logic       occ;    // slot holds an item
    logic       first;  // first item of this channel's tick
    logic       last;   // last item of this channel's tick
    logic [7:0] ch;     // channel the item belongs to
  } tag_t;

  // One transmit sample as stored in the TX ping-pong RAM (4 bits):
  // each branch is a ternary pulse amplitude, off / +1 / -1.
  typedef struct packed {
    logic i_on;
    logic i_chip;
    logic q_on;
    logic q_chip;
  } tx_sample_t;

  // One receive sample as stored in the RX ping-pong RAM (12 bits).
  typedef struct packed {
    logic signed [5:0] i;
    logic signed [5:0] q;
  } rx_sample_t;

  localparam logic [31:0] PN_SYM0 = 32'b0111_0100_0100_1010_1100_0011_1001_1011;
  // bit k = c_k of 1101 1001 1100 0011 0101 0010 0010 1110 (c_0 first)

  localparam logic [31:0] ODD_CHIPS = 32'hAAAA_AAAA;

  localparam logic [7:0] SFD_BYTE = 8'hA7;
  localparam int unsigned PREAMBLE_BYTES = 4;

  function automatic logic [31:0] pn_chips(input logic [3:0] sym);
    logic [31:0] base;
    // delay by 4*k chips: c'_j = c_(j-4k)
    base = (PN_SYM0 << (4 * sym[2:0])) | (PN_SYM0 >> (32 - 4 * sym[2:0]));
    if (sym[2:0] == 3'd0) base = PN_SYM0;
    return sym[3] ? (base ^ ODD_CHIPS) : base;
  endfunction

  function automatic logic [31:0] diff_template(input logic [3:0] sym);
    logic [31:0] c, d;
    c = pn_chips(sym);
    d = '0;
    for (int k = 1; k < 32; k++) d[k] = c[k] ^ c[k-1] ^ k[0];
    return d;
  endfunction

  function automatic logic signed [7:0] qsin(input logic [5:0] n);
    case (n)
      6'd0:  return 8'sd0;    6'd1:  return 8'sd6;    6'd2:  return 8'sd12;
      6'd3:  return 8'sd19;   6'd4:  return 8'sd25;   6'd5:  return 8'sd31;
      6'd6:  return 8'sd37;   6'd7:  return 8'sd43;   6'd8:  return 8'sd49;
      6'd9:  return 8'sd54;   6'd10: return 8'sd60;   6'd11: return 8'sd65;
      6'd12: return 8'sd71;   6'd13: return 8'sd76;   6'd14: return 8'sd81;
      6'd15: return 8'sd85;   6'd16: return 8'sd90;   6'd17: return 8'sd94;
      6'd18: return 8'sd98;   6'd19: return 8'sd102;  6'd20: return 8'sd106;
      6'd21: return 8'sd109;  6'd22: return 8'sd112;  6'd23: return 8'sd115;
      6'd24: return 8'sd117;  6'd25: return 8'sd120;  6'd26: return 8'sd122;
      6'd27: return 8'sd123;  6'd28: return 8'sd125;  6'd29: return 8'sd126;
      6'd30: return 8'sd126;  default: return 8'sd127;
    endcase
  endfunction

  // sin(2*pi*n/128) * 127
  function automatic logic signed [7:0] sin128(input logic [6:0] n);
    logic [5:0] m;
    m = n[5] ? 6'(7'd64 - {1'b0, n[5:0]}) : {1'b0, n[4:0]};
    if (n[5] && n[4:0] == 5'd0) m = 6'd32;
    return n[6] ? -qsin(m) : qsin(m);
  endfunction

  function automatic logic signed [7:0] cos128(input logic [6:0] n);
    return sin128(7'(n + 7'd32));
  endfunction

  localparam int FIR_TAPS = 40;
  function automatic logic signed [7:0] fir_coef(input int unsigned k);
    int unsigned j;
    j = (k < 20) ? k : 39 - k;
    case (j)
      0: return -8'sd1;  1: return -8'sd2;  2: return -8'sd2;  3: return -8'sd2;
      4: return -8'sd2;  5: return -8'sd2;  6: return -8'sd1;  7: return 8'sd1;
      8: return 8'sd4;   9: return 8'sd8;   10: return 8'sd14; 11: return 8'sd21;
      12: return 8'sd30; 13: return 8'sd39; 14: return 8'sd49; 15: return 8'sd58;
      16: return 8'sd67; 17: return 8'sd74; 18: return 8'sd79; default: return 8'sd81;
    endcase
  endfunction

  // 7-bit NCO increment for each channel: offset/64 MHz * 128. Channel order
  // on the spectrum: CH0 -2.5, CH1 +2.5, CH2 -7.5, CH3 +7.5 ... CH7 +17.5 MHz.
  function automatic logic [6:0] nco_inc(input int unsigned ch);
    int unsigned mag;
    mag = 5 + 10 * (ch / 2);
    return ch[0] ? 7'(mag) : 7'(128 - mag);
  endfunction

endpackage
