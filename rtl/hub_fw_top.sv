// hub_fw_top: control-link firmware of the HUB module of an ATCA shelf.
//
// The HUB is the only module in the shelf that receives the Readout_CTRL
// link from the ROD, and it is responsible for distributing the TTC
// information (triggers, bunch/event counter resets, L1ID, back-pressure)
// through the shelf. This top wires the control path:
//
//   Readout_CTRL rx word --> shadow_reg_rx --> rdctrl_decode --+--> rdctrl (HUB's own use)
//                               |                              |
//                          link_monitor (diagnostic counters)  v
//   TTC from GBT receiver ---------------------------------> ttc_merger
//                                                              | one message per destination
//                                                              v
//                         14 x ctrl_reg_tx --> cttc_tx_data/charisk[0..13]
//
// Destinations 0-11 are FEX slots 3-14, 12 is this ROD, 13 the other HUB.
// The merger rewrites all four control registers of every Combined_TTC
// transmitter on every clock; each transmitter takes a snapshot at the start
// of its frame, so each LHC clock carries the latest merged content.
//
// Interface: everything runs on clk, the link word clock (four 32-bit words
// per 25 ns LHC clock, i.e. 160 MHz for the 6.4 Gbps links). The serial
// transceivers, the GBT receiver, IPbus and the Aurora data links are outside
// this module: the transceivers' parallel words, the decoded TTC fields and
// the decoded Readout_CTRL content are ports. bc_strobe marks the first word
// clock of each LHC clock and aligns all Combined_TTC frames to it.
//
// Timing: a Readout_CTRL message is in the shadow registers in the clock
// after its last word; the merged messages follow one clock later, are
// written into the transmitters' control registers one clock after that and
// go out in the next frame that starts. From the edge that samples the ROD's
// Word_3 to the edge that samples Word_3 of the Combined_TTC frame at a FEX
// is at most 9 word clocks. The block structure (receiver,
// merger, transmitters, diagnostics) follows the HUB firmware diagram; the
// common clock and the destination order are this design's choice.
module hub_fw_top
  import hub_link_pkg::*;
#(
  parameter logic [3:0] CTTC_VERSION = 4'd0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_strobe,
  // Readout_CTRL link from the ROD (transceiver parallel side)
  input  logic [31:0]              rdctrl_rx_data,
  input  logic [3:0]               rdctrl_rx_charisk,
  // TTC information from the GBT receiver
  input  ttc_info_t                ttc,
  // Combined_TTC/DATA links (transceiver parallel side)
  output logic [N_CTTC-1:0][31:0]  cttc_tx_data,
  output logic [N_CTTC-1:0][3:0]   cttc_tx_charisk,
  // Decoded Readout_CTRL content and link status
  output rdctrl_t                  rdctrl,
  output logic                     rdctrl_aligned,
  output logic                     rdctrl_valid,
  // Diagnostics
  input  logic                     diag_clear,
  output logic [15:0]              diag_frames,
  output logic [15:0]              diag_crc_errors,
  output logic [15:0]              diag_align_errors
);

  msg_t               rd_shadow;
  logic               rd_update, rd_crc_err, rd_align_err;
  msg_t [N_CTTC-1:0]  cttc_msg;

  shadow_reg_rx u_rdctrl_rx (
    .clk, .rst,
    .rx_data     (rdctrl_rx_data),
    .rx_charisk  (rdctrl_rx_charisk),
    .shadow      (rd_shadow),
    .shadow_valid(rdctrl_valid),
    .update      (rd_update),
    .aligned     (rdctrl_aligned),
    .crc_error   (rd_crc_err),
    .align_error (rd_align_err)
  );

  rdctrl_decode u_rdctrl_dec (.msg(rd_shadow), .rd(rdctrl));

  link_monitor #(.W(16)) u_diag (
    .clk, .rst,
    .clear       (diag_clear),
    .update      (rd_update),
    .crc_error   (rd_crc_err),
    .align_error (rd_align_err),
    .frames      (diag_frames),
    .crc_errors  (diag_crc_errors),
    .align_errors(diag_align_errors)
  );

  ttc_merger #(.CTTC_VERSION(CTTC_VERSION)) u_merger (
    .clk, .rst,
    .rd       (rdctrl),
    .rd_valid (rdctrl_valid),
    .ttc      (ttc),
    .msg      (cttc_msg)
  );

  for (genvar d = 0; d < N_CTTC; d++) begin : g_cttc
    ctrl_reg_tx u_tx (
      .clk, .rst,
      .bc_strobe  (bc_strobe),
      .wr_en      (4'b1111),
      .wr_data    (cttc_msg[d]),
      .ctrl_regs  (),
      .tx_data    (cttc_tx_data[d]),
      .tx_charisk (cttc_tx_charisk[d]),
      .tx_word_idx()
    );
  end

endmodule
