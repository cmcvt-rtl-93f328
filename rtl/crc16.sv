// crc16: one-byte update of the IEEE 802.15.4 frame check sequence, the
// ITU-T CRC-16 (x^16 + x^12 + x^5 + 1), initial value 0, data bits taken
// least significant first. The register is kept in reflected form, so the
// FCS is sent as crc[7:0] followed by crc[15:8]. For the payload
// 00 01 02 03 04 05 the FCS bytes are 9b ed.
// Purely combinational; the transmit data FSM keeps the running CRC of each
// channel in its context word.
module crc16 (
  input  logic [15:0] crc_in,
  input  logic [7:0]  data,
  output logic [15:0] crc_out
);
  always_comb begin
    logic [15:0] c;
    c = crc_in;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ data[i]) c = (c >> 1) ^ 16'h8408;
      else                c = c >> 1;
    end
    crc_out = c;
  end
endmodule
