// rdctrl_decode: field decoder of the Readout_CTRL message (ROD -> HUB).
//
// The Readout_CTRL message mainly carries the initialisation controls of the
// FEX data links. This combinational block splits the 128-bit shadow
// registers into named fields, following the Readout_CTRL bit-definition
// table:
//   Word_0  7:0 comma, 11:8 version, 14 ROD XOFF (to all slots),
//           15 Global Link Reset, other bits 0
//   Word_1  link resets: bit s-3 is link 0 of slot s (slots 3-14); links
//           1-3 of slots 4, 5, 8, 9, 12, 13 sit in bits 13-15, 16-18, 19-21,
//           22-24, 25-27, 28-30
//   Word_2  channel-up bits, same layout as Word_1
//   Word_3  11:0 link enable of slots 3-14, 22:19 shelf, 31:23 CRC
// Slots with a single link (3, 6, 7, 10, 11, 14) decode links 1-3 as 0.
// The bit layout is the specification's; the rdctrl_t packing is this
// design's. No clock: output follows input in the same cycle.
module rdctrl_decode
  import hub_link_pkg::*;
(
  input  msg_t    msg,
  output rdctrl_t rd
);

  always_comb begin
    int b;
    rd                   = '0;
    rd.version           = msg[11:8];
    rd.rod_xoff          = msg[14];
    rd.global_link_reset = msg[15];
    for (int i = 0; i < N_FEX; i++) begin
      for (int l = 0; l < 4; l++) begin
        b = slot_link_bit(i, l);
        if (b >= 0) begin
          rd.link_reset[i][l] = msg[32 + b];
          rd.channel_up[i][l] = msg[64 + b];
        end
      end
      rd.link_enable[i] = msg[96 + i];
    end
    rd.shelf = msg[96+22 : 96+19];
  end

endmodule
