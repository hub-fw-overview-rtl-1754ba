// link_crc9: the 9-bit CRC carried in Word_3[31:23] of a HUB control-link
// message (Readout_CTRL and Combined_TTC/DATA).
//
// The link specification gives only the width of this field. This design
// protects every message bit except the comma byte and the CRC field itself,
// i.e. bits 118 down to 8, taken most significant bit first. The generator is
// x^9 + POLY (default x^9+x^8+x^4+x^3+x+1, POLY = 9'h11B), the register starts
// at INIT (all ones by default, so an all-zero message does not give an
// all-zero CRC) and the result is not inverted. Both are parameters so that
// the choice can be matched to the far end.
//
// Purely combinational: msg in, crc out in the same cycle. The loop unrolls
// into an XOR tree of about 111 levels of bit updates that synthesis flattens.
module link_crc9
  import hub_link_pkg::*;
#(
  parameter logic [CRC_W-1:0] POLY = 9'h11B,
  parameter logic [CRC_W-1:0] INIT = 9'h1FF
) (
  input  msg_t             msg,
  output logic [CRC_W-1:0] crc
);

  always_comb begin
    logic [CRC_W-1:0] r;
    logic             fb;
    r = INIT;
    for (int i = CRC_LSB - 1; i >= 8; i--) begin
      fb = r[CRC_W-1] ^ msg[i];
      r  = {r[CRC_W-2:0], 1'b0} ^ (fb ? POLY : '0);
    end
    crc = r;
  end

endmodule
