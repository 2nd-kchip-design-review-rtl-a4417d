// crc16_ccitt: one 16-bit word step of the CRC-CCITT checksum.
//
// Generator polynomial x^16 + x^12 + x^5 + 1 (0x1021), as used by the link
// layer to protect every data packet. The word is processed most significant
// bit first, without bit reflection and without final inversion; the register
// is preset to 0xFFFF by the user of this module. Purely combinational:
// crc_out is the CRC register after absorbing `data` into `crc_in`.
// The polynomial follows the chip; bit order and preset are this design's.
module crc16_ccitt
  import kchip_pkg::*;
(
  input  logic [15:0] crc_in,
  input  logic [15:0] data,
  output logic [15:0] crc_out
);
  always_comb begin
    logic [15:0] c;
    c = crc_in;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = {c[14:0], 1'b0} ^ CRC_POLY;
      else                 c = {c[14:0], 1'b0};
    end
    crc_out = c;
  end
endmodule
