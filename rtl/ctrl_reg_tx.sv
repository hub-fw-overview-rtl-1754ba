// ctrl_reg_tx: control registers and transmitter of a HUB control link.
//
// The sending side of a Readout_CTRL or Combined_TTC/DATA link holds four
// 32-bit control registers, Word_0..Word_3, and sends their contents again
// and again, one 128-bit message per LHC clock, so that the receiver's
// shadow registers follow whatever is written here.
//
// How it works: at the start of a frame the four registers are copied into
// a frame buffer, with the K28.5 comma forced into Word_0[7:0] and the CRC
// of the copy (link_crc9) into Word_3[31:23]; the buffer is then sent one
// 32-bit word per clock, Word_0 first. Taking a copy keeps each message, and
// its CRC, consistent while the registers are being written.
//
// Interface: wr_en[n] writes Word_n from wr_data[32n+31:32n]; the comma and
// CRC bits of a write are ignored. ctrl_regs reads the registers back.
// tx_data/tx_charisk go to the transceiver's 8b10b encoder; tx_charisk is
// 4'b0001 on Word_0 (its low byte is the comma) and 0 otherwise.
//
// Timing: one word per clock, four clocks per LHC clock (6.4 Gbps line rate,
// 8b10b, 128 bits per 25 ns). A frame starts in the cycle after bc_strobe is
// seen, or right after Word_3 if no strobe comes, so the link runs on its
// own and re-aligns to the LHC clock whenever bc_strobe is given. A value
// written in a cycle is in the next message that starts after it. Outputs
// are registered. The four-register scheme, the comma and the CRC field are
// those of the link specification; the snapshot, the write port and the
// strobe handling are this design's choice. Assertions check that only
// Word_0 carries a K flag and that it is the comma.
module ctrl_reg_tx
  import hub_link_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        bc_strobe,
  input  logic [3:0]  wr_en,
  input  msg_t        wr_data,
  output msg_t        ctrl_regs,
  output logic [31:0] tx_data,
  output logic [3:0]  tx_charisk,
  output logic [1:0]  tx_word_idx
);

  msg_t             regs;
  msg_t             frame;
  msg_t             snap;
  logic [1:0]       idx;     // index of the word sent last
  logic [1:0]       idx_nxt;
  logic             start;
  logic [CRC_W-1:0] crc;

  assign ctrl_regs = regs;

  // Control registers.
  always_ff @(posedge clk) begin
    if (rst) regs <= '0;
    else
      for (int w = 0; w < N_WORDS; w++)
        if (wr_en[w]) regs[32*w +: 32] <= wr_data[32*w +: 32];
  end

  // Copy with comma and CRC in place.
  always_comb begin
    snap = regs;
    snap[7:0] = K28_5;
    snap[MSG_W-1 -: CRC_W] = crc;
  end

  msg_t crc_in;
  assign crc_in = regs;  // the CRC ignores the comma and CRC bits
  link_crc9 u_crc (.msg(crc_in), .crc(crc));

  assign start   = bc_strobe || (idx == 2'd3);
  assign idx_nxt = idx + 2'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx        <= 2'd3;
      frame      <= '0;
      tx_data    <= '0;
      tx_charisk <= '0;
    end else if (start) begin
      frame      <= snap;
      idx        <= 2'd0;
      tx_data    <= snap[31:0];
      tx_charisk <= 4'b0001;
    end else begin
      idx        <= idx_nxt;
      tx_data    <= frame[32*idx_nxt +: 32];
      tx_charisk <= 4'b0000;
    end
  end

  assign tx_word_idx = idx;

  // Link rules: only Word_0 carries a K character, and it is the comma.
  a_charisk_word0: assert property (@(posedge clk) disable iff (rst)
    (tx_charisk != 4'b0000) |-> (tx_charisk == 4'b0001) && (idx == 2'd0) && (tx_data[7:0] == K28_5));
  a_word0_marked: assert property (@(posedge clk) disable iff (rst)
    (idx == 2'd0) |-> (tx_charisk == 4'b0001));

endmodule
