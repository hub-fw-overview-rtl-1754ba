// ttc_merger: builds the Combined_TTC/DATA message of every destination.
//
// The HUB distributes TTC information through the shelf. It takes the link
// resets from the Readout_CTRL stream sent by the ROD, merges them with the
// TTC information received from FELIX, and sends each destination its own
// message: FEX slots 3-14 (index 0-11), this ROD (index 12) and the other
// HUB (index 13).
//
// Message layout (Combined_TTC/DATA bit-definition table):
//   Word_0  7:0 comma (set by the transmitter), 11:8 version, 15:12 reserved,
//           16 L1A, 17 BCR, 18 ECR, 19 Privileged Readout,
//           31:20 felix_backpressure(11:0)
//   Word_1  23:0 L1ID, 31:24 ECRID
//   Word_2  control channel
//   Word_3  3:0 Link_reset(3:0), 7:4 Link_up(3:0), 10:8 Link Enable(2:0),
//           11 ROD XOFF, 18:12 reserved (0), 22:19 shelf, 31:23 CRC (set by
//           the transmitter)
// Word_0 to Word_2 are the same for all destinations. For FEX slot s, Word_3
// carries slot s's link resets (each ORed with the Global Link Reset),
// channel-up bits and, in Link Enable(0), its link-enable bit; ROD XOFF and
// shelf go to every destination. The ROD and other-HUB messages have no
// per-link fields. Until the Readout_CTRL message is valid (rd_valid low)
// every Readout_CTRL-derived bit is sent as 0. How the fields are merged
// per destination is this design's reading; the layout is the
// specification's. The Readout_CTRL version field is not forwarded (the
// Combined_TTC version is this HUB's own CTTC_VERSION), so those rd bits go
// unused here.
//
// Timing: msg is registered, one clock after its inputs.
module ttc_merger
  import hub_link_pkg::*;
#(
  parameter logic [3:0] CTTC_VERSION = 4'd0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  rdctrl_t              rd,
  input  logic                 rd_valid,
  input  ttc_info_t            ttc,
  output msg_t [N_CTTC-1:0]    msg
);

  rdctrl_t            r;
  msg_t [N_CTTC-1:0]  nxt;

  assign r = rd_valid ? rd : '0;

  always_comb begin
    logic [95:0] common;
    logic [31:0] w3;
    common = {
      ttc.control_channel,                        // Word_2
      ttc.ecrid, ttc.l1id,                        // Word_1
      ttc.felix_backpressure, ttc.privileged_readout,
      ttc.ecr, ttc.bcr, ttc.l1a, 4'b0000,
      CTTC_VERSION, 8'h00                         // Word_0
    };
    for (int d = 0; d < N_CTTC; d++) begin
      w3        = '0;
      w3[11]    = r.rod_xoff;
      w3[22:19] = r.shelf;
      if (d < N_FEX) begin
        w3[3:0] = r.link_reset[d] | {4{r.global_link_reset}};
        w3[7:4] = r.channel_up[d];
        w3[8]   = r.link_enable[d];
      end
      nxt[d] = {w3, common};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) msg <= '0;
    else     msg <= nxt;
  end

endmodule
