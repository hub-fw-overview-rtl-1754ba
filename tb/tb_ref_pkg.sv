// tb_ref_pkg: reference models used by the testbenches of the HUB control
// links. They are written from the bit-definition tables directly, without
// the design's package functions, so that the testbenches compare the RTL
// against an independent reading of the same tables.
package tb_ref_pkg;

  typedef logic [127:0] msg_t;

  localparam logic [9:0] GEN  = 10'h31B; // x^9 + x^8 + x^4 + x^3 + x + 1
  localparam logic [8:0] INIT = 9'h1FF;

  // CRC by polynomial long division over message bits 118..8.
  function automatic logic [8:0] ref_crc(msg_t m);
    logic [119:0] s;
    s = {m[118:8], 9'b0};
    s[119:111] ^= INIT;
    for (int i = 119; i >= 9; i--)
      if (s[i]) s[i -: 10] ^= GEN;
    return s[8:0];
  endfunction

  // Message as it goes on the wire: comma in Word_0[7:0], CRC in Word_3[31:23].
  function automatic msg_t ref_frame(msg_t m);
    msg_t f;
    f = m;
    f[7:0] = 8'hBC;
    f[127:119] = ref_crc(m);
    return f;
  endfunction

  // Readout_CTRL table: bit in Word_1/Word_2 of link l of slot s (3..14),
  // -1 where the slot has no such link. Transcribed row by row.
  function automatic int rd_bit(int s, int l);
    case (s)
      3:  return (l == 0) ? 0  : -1;
      4:  case (l) 0: return 1;  1: return 13; 2: return 14; default: return 15; endcase
      5:  case (l) 0: return 2;  1: return 16; 2: return 17; default: return 18; endcase
      6:  return (l == 0) ? 3  : -1;
      7:  return (l == 0) ? 4  : -1;
      8:  case (l) 0: return 5;  1: return 19; 2: return 20; default: return 21; endcase
      9:  case (l) 0: return 6;  1: return 22; 2: return 23; default: return 24; endcase
      10: return (l == 0) ? 7  : -1;
      11: return (l == 0) ? 8  : -1;
      12: case (l) 0: return 9;  1: return 25; 2: return 26; default: return 27; endcase
      13: case (l) 0: return 10; 1: return 28; 2: return 29; default: return 30; endcase
      default: return (l == 0) ? 11 : -1; // slot 14
    endcase
  endfunction

endpackage
