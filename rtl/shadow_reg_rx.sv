// shadow_reg_rx: receiver and shadow registers of a HUB control link.
//
// The receiving side of a Readout_CTRL or Combined_TTC/DATA link keeps a
// read-only copy, the shadow registers, of the four control registers at the
// sending side (see ctrl_reg_tx). This block finds the message boundary,
// collects the four words of each message, checks the CRC and copies a good
// message into the shadow registers.
//
// How it works: Word_0 is recognised by the K28.5 comma in its low byte
// (rx_charisk = 4'b0001, rx_data[7:0] = 0xBC). The block then expects
// Word_1, Word_2 and Word_3 on the next three clocks and Word_0 again right
// after. When Word_3 arrives, the CRC over the whole message (link_crc9) is
// compared with Word_3[31:23]: on a match all four shadow registers are
// written at once; on a mismatch they keep their old value and crc_error
// pulses. A comma where a data word is expected, or a missing comma where
// Word_0 is expected, pulses align_error; the block then drops alignment and
// waits for the next comma (a misplaced comma is taken as the new Word_0).
//
// Interface: rx_data/rx_charisk come from the transceiver after 8b10b
// decoding and comma alignment (comma in byte 0), already in this clock
// domain. shadow is Word_n in bits [32n+31:32n]; shadow_valid is set by the
// first good message; update pulses for each good message.
//
// Timing: the shadow registers are written on the clock edge that samples
// Word_3, so a message is readable in the clock after its last word;
// messages arrive every four clocks. The message format is the link specification's; the alignment
// rules and the handling of bad messages are this design's choice.
// Assertions check that a message is never both accepted and rejected.
module shadow_reg_rx
  import hub_link_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rx_data,
  input  logic [3:0]  rx_charisk,
  output msg_t        shadow,
  output logic        shadow_valid,
  output logic        update,
  output logic        aligned,
  output logic        crc_error,
  output logic        align_error
);

  logic [95:0]      words;    // Word_0..Word_2 of the message in progress
  logic [1:0]       expect_w; // index of the word expected next
  logic             is_comma;
  msg_t             full;
  logic [CRC_W-1:0] crc;

  assign is_comma = (rx_charisk == 4'b0001) && (rx_data[7:0] == K28_5);
  assign full     = {rx_data, words};

  link_crc9 u_crc (.msg(full), .crc(crc));

  always_ff @(posedge clk) begin
    if (rst) begin
      words        <= '0;
      expect_w     <= 2'd0;
      aligned      <= 1'b0;
      shadow       <= '0;
      shadow_valid <= 1'b0;
      update       <= 1'b0;
      crc_error    <= 1'b0;
      align_error  <= 1'b0;
    end else begin
      update      <= 1'b0;
      crc_error   <= 1'b0;
      align_error <= 1'b0;
      if (!aligned) begin
        // Hunting for Word_0.
        if (is_comma) begin
          words[31:0] <= rx_data;
          expect_w    <= 2'd1;
          aligned     <= 1'b1;
        end
      end else if (expect_w == 2'd0) begin
        if (is_comma) begin
          words[31:0] <= rx_data;
          expect_w    <= 2'd1;
        end else begin
          aligned     <= 1'b0;
          align_error <= 1'b1;
        end
      end else if (is_comma) begin
        // Comma in the middle of a message: restart from it.
        words[31:0] <= rx_data;
        expect_w    <= 2'd1;
        align_error <= 1'b1;
      end else if (expect_w != 2'd3) begin
        words[32*expect_w +: 32] <= rx_data;
        expect_w                 <= expect_w + 2'd1;
      end else begin
        expect_w <= 2'd0;
        if (crc == rx_data[31:32-CRC_W]) begin
          shadow       <= full;
          shadow_valid <= 1'b1;
          update       <= 1'b1;
        end else begin
          crc_error    <= 1'b1;
        end
      end
    end
  end

  // A message is either accepted or rejected, never both; an update needs
  // alignment.
  a_update_xor_error: assert property (@(posedge clk) disable iff (rst)
    !(update && crc_error));
  a_update_aligned: assert property (@(posedge clk) disable iff (rst)
    update |-> aligned && shadow_valid);

endmodule
