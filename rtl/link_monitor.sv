// link_monitor: diagnostic event counters of a HUB control-link receiver.
//
// Counts the good messages, CRC errors and alignment errors reported by
// shadow_reg_rx so that the health of a link can be read out. Each counter
// is W bits wide and saturates at its maximum instead of wrapping; clear
// sets all three to zero (clear wins over a simultaneous event).
//
// Interface: update, crc_error and align_error are one-clock event pulses;
// the counters are registered and include an event one clock after its
// pulse. The link specification only names control and diagnostic logic;
// the choice of counters is this design's own.
module link_monitor #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         update,
  input  logic         crc_error,
  input  logic         align_error,
  output logic [W-1:0] frames,
  output logic [W-1:0] crc_errors,
  output logic [W-1:0] align_errors
);

  function automatic logic [W-1:0] bump(logic [W-1:0] c, logic ev);
    return (ev && c != '1) ? c + 1'b1 : c;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      frames       <= '0;
      crc_errors   <= '0;
      align_errors <= '0;
    end else begin
      frames       <= bump(frames, update);
      crc_errors   <= bump(crc_errors, crc_error);
      align_errors <= bump(align_errors, align_error);
    end
  end

endmodule
