// hub_link_pkg: types and constants shared by the HUB control-link logic.
//
// The HUB exchanges two kinds of 128-bit control messages with the other
// modules in the shelf, one message per LHC clock: Readout_CTRL (ROD -> HUB)
// and Combined_TTC/DATA (HUB -> FEX slots 3-14, ROD, other HUB). Both are
// four 32-bit words, Word_0..Word_3, with the K28.5 comma (0xBC) in the low
// byte of Word_0 and a 9-bit CRC in Word_3[31:23]. A message is carried as
// a 128-bit vector with Word_n in bits [32n+31:32n].
//
// The field layouts follow the two bit-definition tables of the link
// specification. The CRC polynomial and coverage are this design's choice
// (see link_crc9).
package hub_link_pkg;

  localparam logic [7:0] K28_5     = 8'hBC;  // comma character
  localparam int         N_WORDS   = 4;      // words per message
  localparam int         MSG_W     = 128;    // message width
  localparam int         CRC_W     = 9;      // CRC field width
  localparam int         CRC_LSB   = 119;    // Word_3 bit 23
  localparam int         N_FEX     = 12;     // FEX slots 3..14
  localparam int         FIRST_SLOT = 3;     // slot number of FEX index 0
  localparam int         N_CTTC    = N_FEX + 2; // + this ROD, + other HUB
  localparam int         ROD_IDX   = N_FEX;     // destination index of the ROD
  localparam int         HUB_IDX   = N_FEX + 1; // destination index of the other HUB

  typedef logic [MSG_W-1:0] msg_t;

  // Decoded Readout_CTRL message. Index i of the per-slot arrays is slot
  // i+3; index l of the inner dimension is link l of that slot.
  typedef struct packed {
    logic [3:0]             version;
    logic                   rod_xoff;
    logic                   global_link_reset;
    logic [N_FEX-1:0][3:0]  link_reset;
    logic [N_FEX-1:0][3:0]  channel_up;
    logic [N_FEX-1:0]       link_enable;
    logic [3:0]             shelf;
  } rdctrl_t;

  // TTC information delivered by the GBT receiver from FELIX.
  typedef struct packed {
    logic        l1a;
    logic        bcr;
    logic        ecr;
    logic        privileged_readout;
    logic [11:0] felix_backpressure;
    logic [23:0] l1id;
    logic [7:0]  ecrid;
    logic [31:0] control_channel;
  } ttc_info_t;

  // Number of links a FEX slot has on the Readout_CTRL message:
  // slots 4, 5, 8, 9, 12 and 13 have four, the others one.
  function automatic int slot_links(int idx);
    case (idx + FIRST_SLOT)
      4, 5, 8, 9, 12, 13: return 4;
      default:            return 1;
    endcase
  endfunction

  // Bit position, inside Word_1 (link reset) or Word_2 (channel up), of
  // link l of FEX index idx; -1 if the slot has no such link. Link 0 of
  // slot s sits at bit s-3; links 1-3 of the four-link slots follow from
  // bit 13 upwards in slot order.
  function automatic int slot_link_bit(int idx, int l);
    int base;
    if (l == 0) return idx;
    if (l >= slot_links(idx)) return -1;
    case (idx + FIRST_SLOT)
      4:       base = 13;
      5:       base = 16;
      8:       base = 19;
      9:       base = 22;
      12:      base = 25;
      default: base = 28; // slot 13
    endcase
    return base + l - 1;
  endfunction

endpackage
