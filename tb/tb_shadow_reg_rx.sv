// tb_shadow_reg_rx: self-checking testbench of shadow_reg_rx.
//
// Drives the receiver with messages built by the reference model (comma,
// reference CRC) and with damaged streams: a wrong CRC, a missing comma, a
// comma in the middle of a message and idle words. Checked: shadow_valid
// stays low until the first good message; each good message appears in the
// shadow registers exactly one clock after its Word_3, with an update
// pulse; a bad CRC leaves the shadow registers unchanged and pulses
// crc_error; alignment errors pulse align_error, drop aligned and the
// receiver locks again on the next comma.
module tb_shadow_reg_rx;
  import tb_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic [31:0] rx_data = 0;
  logic [3:0]  rx_charisk = 0;
  msg_t        shadow;
  logic        shadow_valid, update, aligned, crc_error, align_error;
  int checks = 0, failures = 0;
  int n_upd = 0, n_crc = 0, n_align = 0;

  shadow_reg_rx dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    #1;
    n_upd   += int'(update);
    n_crc   += int'(crc_error);
    n_align += int'(align_error);
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send_word(logic [31:0] d, logic [3:0] k);
    @(negedge clk);
    rx_data    = d;
    rx_charisk = k;
  endtask

  // Sends a frame; returns after the edge that samples Word_3.
  task automatic send_frame(msg_t f);
    for (int w = 0; w < 4; w++) send_word(f[32*w +: 32], w == 0 ? 4'b0001 : 4'b0000);
    @(posedge clk);
  endtask

  task automatic idle();
    send_word(32'h0, 4'b0000);
  endtask

  msg_t m, last;
  int   bitpos;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    idle(); idle();
    @(posedge clk); #1;
    chk(!shadow_valid && !aligned, "nothing valid after reset");

    // A bad first frame must not validate.
    m = ref_frame({$urandom, $urandom, $urandom, $urandom});
    m[127] ^= 1'b1;
    send_frame(m); #1;
    chk(crc_error && !update && !shadow_valid, "bad first frame rejected");

    // Back-to-back good frames, latency one clock after Word_3.
    for (int n = 0; n < 200; n++) begin
      m = ref_frame({$urandom, $urandom, $urandom, $urandom});
      send_frame(m);
      #1;
      chk(update && shadow == m && shadow_valid && aligned, "good frame in shadow one clock after Word_3");
      last = m;
    end

    // Wrong CRC: shadow unchanged.
    for (int n = 0; n < 20; n++) begin
      m = ref_frame({$urandom, $urandom, $urandom, $urandom});
      bitpos = 8 + int'($urandom % 111);
      m[bitpos] = ~m[bitpos];
      send_frame(m); #1;
      chk(crc_error && !update && shadow == last, "corrupted frame rejected");
    end

    // Missing comma where Word_0 is expected.
    idle();
    @(posedge clk); #1;
    chk(align_error && !aligned, "missing comma drops alignment");
    idle(); idle();
    m = ref_frame({$urandom, $urandom, $urandom, $urandom});
    send_frame(m); #1;
    chk(update && shadow == m && aligned, "relock after missing comma");
    last = m;

    // Comma in the middle of a message: restart from it.
    m = ref_frame({$urandom, $urandom, $urandom, $urandom});
    send_word(m[31:0], 4'b0001);
    send_word(m[63:32], 4'b0000);
    m = ref_frame({$urandom, $urandom, $urandom, $urandom});
    send_word(m[31:0], 4'b0001);
    @(posedge clk); #1;
    chk(align_error && shadow == last, "misplaced comma flagged");
    for (int w = 1; w < 4; w++) send_word(m[32*w +: 32], 4'b0000);
    @(posedge clk); #1;
    chk(update && shadow == m, "frame after misplaced comma accepted");

    // (the last word stays on the bus: one more missing-comma error)
    // Words with a K flag but no comma do not start a frame.
    rst = 1; @(negedge clk); rst = 0;
    send_word(32'h0000_00BC, 4'b0010);
    @(posedge clk); #1;
    chk(!aligned, "K flag on wrong byte is no comma");

    chk(n_upd == 202 && n_crc == 21 && n_align == 3, $sformatf("event counts upd=%0d crc=%0d align=%0d", n_upd, n_crc, n_align));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
