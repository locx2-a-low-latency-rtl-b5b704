// CRC generator of the LOCic encoder: the 8-bit frame trailer.
//
// Computes, in one combinational step, the CRC-8 of the 112-bit payload
// (before scrambling), polynomial x^8+x^2+x+1 (0x07), initial value 0,
// payload bit 111 first. That the trailer is an 8-bit CRC of the payload
// follows LOCic; the polynomial, initial value and bit order are this
// design's choice. The encoder registers the result together with the frame.
module crc8
  import locx2_pkg::*;
(
  input  payload_t   data,
  output logic [7:0] crc
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    logic [7:0] c;
    c = '0;
    for (int i = PAYLOAD_BITS-1; i >= 0; i--) begin
      if (c[7] ^ data[i]) c = {c[6:0], 1'b0} ^ CRC8_POLY;
      else                c = {c[6:0], 1'b0};
    end
    crc = c;
  end
endmodule
