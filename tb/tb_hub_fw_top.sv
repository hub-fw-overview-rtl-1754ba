// tb_hub_fw_top: end-to-end testbench of the HUB control-link firmware.
//
// The testbench plays the ROD, the GBT receiver and the 14 receiving modules.
// The ROD model sends Readout_CTRL messages built from a table transcription
// (comma, reference CRC) on its own word phase; the TTC fields are driven
// directly. Each Combined_TTC/DATA output is parsed like a receiver would do
// it: the comma must open each frame, the CRC must match the reference and
// the frame content must equal the message expected for that destination,
// assembled here from the two bit tables.
//
// The run goes through a sequence of phases, each holding one Readout_CTRL
// content and one TTC content. It checks, per phase: every destination's
// last frame, the HUB's own decoded Readout_CTRL port, and the latency from
// the ROD's Word_3 to the end of the first Combined_TTC frame carrying the
// new content (at most 9 word clocks: shadow update, merge, register write,
// wait for the next frame, four words). Mechanisms counted, each must occur:
// Readout_CTRL CRC error (rejected, counted by the diagnostics), loss of
// Readout_CTRL alignment and relock, Global Link Reset fan-out, ROD XOFF
// fan-out, a reset on link 1-3 of a four-link slot, TTC triggers (L1A, BCR,
// ECR), and Combined_TTC content before the first valid Readout_CTRL message.
// A last streaming phase changes the TTC fields every LHC clock and checks
// that every destination receives each of them exactly once (one message
// per LHC clock, nothing dropped or repeated).
// The top runs with its default parameters.
module tb_hub_fw_top;
  import hub_link_pkg::rdctrl_t;
  import hub_link_pkg::ttc_info_t;
  import tb_ref_pkg::*;

  localparam int ND = 14;
  localparam int MAX_LAT = 9;

  logic                  clk = 0, rst = 1, bc_strobe = 0;
  logic [31:0]           rdctrl_rx_data = 0;
  logic [3:0]            rdctrl_rx_charisk = 0;
  ttc_info_t             ttc = '0;
  logic [ND-1:0][31:0]   cttc_tx_data;
  logic [ND-1:0][3:0]    cttc_tx_charisk;
  rdctrl_t               rdctrl;
  logic                  rdctrl_aligned, rdctrl_valid;
  logic                  diag_clear = 0;
  logic [15:0]           diag_frames, diag_crc_errors, diag_align_errors;

  hub_fw_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- expected Combined_TTC message -----------------------
  function automatic msg_t expected(int d, msg_t rod, logic v, ttc_info_t t);
    msg_t e = '0;
    int   b;
    e[16] = t.l1a; e[17] = t.bcr; e[18] = t.ecr; e[19] = t.privileged_readout;
    e[31:20] = t.felix_backpressure;
    e[55:32] = t.l1id;
    e[63:56] = t.ecrid;
    e[95:64] = t.control_channel;
    if (v) begin
      e[96 + 11]     = rod[14];           // ROD XOFF
      e[118:115]     = rod[118:115];      // shelf
      if (d < 12) begin
        for (int l = 0; l < 4; l++) begin
          b = rd_bit(d + 3, l);
          if (b >= 0) begin
            e[96 + l]     = rod[32 + b] | rod[15];
            e[96 + 4 + l] = rod[64 + b];
          end else begin
            e[96 + l]     = rod[15];
          end
        end
        e[96 + 8] = rod[96 + d];
      end
    end
    return ref_frame(e);
  endfunction

  // ---------------- LHC clock -------------------------------------------
  always @(negedge clk) bc_strobe <= (cyc % 4 == 1);

  // ---------------- ROD model --------------------------------------------
  msg_t rod_regs = '0;      // content the ROD is sending
  logic rod_on = 0;
  int   corrupt_req = 0, drop_req = 0;   // pending fault injections
  logic drop_now = 0;
  msg_t rod_frame;
  int   rod_w = 0;
  int   rod_w3_cyc = -1;    // cycle in which a frame's Word_3 is sampled
  msg_t rod_w3_msg;

  always @(negedge clk) begin
    if (rod_on) begin
      drop_now = 0;
      if (rod_w == 0) begin
        rod_frame = ref_frame(rod_regs);
        if (corrupt_req > 0) begin
          rod_frame[70] = ~rod_frame[70];
          corrupt_req--;
        end
        if (drop_req > 0) begin
          drop_now = 1;
          drop_req--;
        end
      end
      rdctrl_rx_data    <= rod_frame[32*rod_w +: 32];
      rdctrl_rx_charisk <= (rod_w == 0 && !drop_now) ? 4'b0001 : 4'b0000;
      if (rod_w == 3) begin
        rod_w3_cyc <= cyc + 1;
        rod_w3_msg <= rod_frame;
      end
      rod_w = (rod_w + 1) % 4;
    end
  end

  // ---------------- receivers at the 14 destinations --------------------
  msg_t    rx_buf  [ND];
  int      rx_w    [ND];
  msg_t    rx_last [ND];
  int      rx_last_cyc [ND];
  int      frames_rx = 0;
  logic    streaming = 0;
  int      stream_prev [ND];   // L1ID of the previous frame while streaming
  int      stream_frames = 0;

  always @(posedge clk) begin
    cyc++;
    #1;
    if (!rst) begin
      for (int d = 0; d < ND; d++) begin
        if (cttc_tx_charisk[d] == 4'b0001) begin
          chk(cttc_tx_data[d][7:0] == 8'hBC, "comma byte");
          // the first frame after reset is cut short by the first strobe
          if (cyc > 8) chk(rx_w[d] == 3 || rx_w[d] == -1, "frame length");
          rx_w[d] = 0;
        end else if (rx_w[d] >= 0 && rx_w[d] < 3) begin
          rx_w[d]++;
          chk(cttc_tx_charisk[d] == 4'b0000, "no K flag on data words");
        end else begin
          if (rx_w[d] >= 0) chk(0, "missing comma");
          rx_w[d] = -1;
        end
        if (rx_w[d] >= 0) rx_buf[d][32*rx_w[d] +: 32] = cttc_tx_data[d];
        if (rx_w[d] == 3) begin
          chk(rx_buf[d][127:119] == ref_crc(rx_buf[d]), "Combined_TTC CRC");
          rx_last[d]     = rx_buf[d];
          rx_last_cyc[d] = cyc;
          frames_rx++;
          if (streaming) begin
            if (stream_prev[d] >= 0)
              chk(int'(rx_buf[d][55:32]) == stream_prev[d] + 1, $sformatf("one TTC update per LHC clock, destination %0d", d));
            stream_prev[d] = int'(rx_buf[d][55:32]);
            stream_frames++;
          end
        end
      end
    end
  end

  // ---------------- mechanisms -------------------------------------------
  int n_crc_inj = 0, n_align_loss = 0, n_glr = 0, n_xoff = 0, n_multi = 0;
  int n_trig = 0, n_invalid = 0, n_latency = 0, max_lat = 0;

  task automatic wait_cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  // Waits until a ROD frame with content m has completed, then follows the
  // destinations until each has received the expected frame.
  task automatic apply_and_check(msg_t m, ttc_info_t t, logic check_lat);
    int   start_cyc, done;
    msg_t exp [ND];
    logic seen [ND];
    @(negedge clk);
    rod_regs = m;
    ttc      = t;
    // wait for the ROD Word_3 of a frame that carries m
    while (!(rod_w3_cyc > cyc - 1 && rod_w3_msg[118:8] == ref_frame(m)[118:8] && cyc >= rod_w3_cyc))
      @(negedge clk);
    start_cyc = rod_w3_cyc;
    for (int d = 0; d < ND; d++) begin
      exp[d]  = expected(d, m, 1'b1, t);
      seen[d] = 0;
    end
    done = 0;
    while (done < ND && cyc - start_cyc < 40) begin
      @(posedge clk); #2;
      for (int d = 0; d < ND; d++)
        if (!seen[d] && rx_last_cyc[d] == cyc && rx_last[d] == exp[d]) begin
          seen[d] = 1;
          done++;
          if (check_lat) begin
            chk(cyc - start_cyc <= MAX_LAT, $sformatf("latency %0d to destination %0d", cyc - start_cyc, d));
            n_latency++;
            if (cyc - start_cyc > max_lat) max_lat = cyc - start_cyc;
          end
        end
    end
    for (int d = 0; d < ND; d++) chk(seen[d], $sformatf("destination %0d received its message", d));
    // the HUB's own view of Readout_CTRL
    chk(rdctrl.rod_xoff == m[14] && rdctrl.global_link_reset == m[15] && rdctrl.shelf == m[118:115]
        && rdctrl.version == m[11:8], "decoded Readout_CTRL port");
    chk(rdctrl_valid && rdctrl_aligned, "Readout_CTRL link up");
  endtask

  function automatic msg_t rand_rod();
    msg_t m = {$urandom, $urandom, $urandom, $urandom};
    m[13:12] = 0; m[31:16] = 0;                 // zero bits of Word_0
    m[32+12] = 0; m[32+31] = 0; m[64+12] = 0; m[64+31] = 0;
    m[114:108] = 0;                              // Word_3 bits 12-18
    m[15] = ($urandom % 6 == 0);                 // Global Link Reset, sometimes
    m[14] = ($urandom % 3 == 0);                 // ROD XOFF, sometimes
    return m;
  endfunction

  function automatic ttc_info_t rand_ttc();
    return ttc_info_t'({$urandom, $urandom, $urandom});
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t      m;
    ttc_info_t t;
    int        crc0, al0, fr0;
    for (int d = 0; d < ND; d++) begin rx_w[d] = -1; rx_last_cyc[d] = -1; end
    wait_cycles(4);
    rst = 0;

    // Before any Readout_CTRL: only TTC fields, no reset information.
    t = rand_ttc();
    ttc = t;
    wait_cycles(16);
    for (int d = 0; d < ND; d++)
      chk(rx_last[d] == expected(d, '1, 1'b0, t), "content before first Readout_CTRL");
    chk(!rdctrl_valid, "no valid Readout_CTRL yet");
    n_invalid++;

    rod_on = 1;
    wait_cycles(12);

    // Random phases.
    for (int p = 0; p < 60; p++) begin
      m = rand_rod();
      t = rand_ttc();
      if (p == 5) begin m = '0; m[32 + 13] = 1'b1; end   // slot 4 link 1 reset only
      if (p == 6) begin m = '0; m[15] = 1'b1; end         // Global Link Reset only
      apply_and_check(m, t, 1'b1);
      if (m[15]) n_glr++;
      if (m[14]) n_xoff++;
      if (|m[62:45] || |m[94:77]) n_multi++;
      if (t.l1a || t.bcr || t.ecr) n_trig++;
    end

    // CRC error on Readout_CTRL: the message is rejected.
    crc0 = diag_crc_errors;
    fr0  = diag_frames;
    @(negedge clk);
    corrupt_req = 1;
    m = rand_rod();
    rod_regs = m;
    wait_cycles(12);
    chk(diag_crc_errors == 16'(crc0 + 1), "CRC error counted");
    n_crc_inj++;
    apply_and_check(rand_rod(), rand_ttc(), 1'b1);
    chk(diag_frames > 16'(fr0), "good frames counted");

    // Alignment loss: one Word_0 without its comma.
    al0 = diag_align_errors;
    @(negedge clk);
    drop_req = 1;
    wait_cycles(10);
    chk(diag_align_errors > 16'(al0), "alignment loss counted");
    n_align_loss++;
    apply_and_check(rand_rod(), rand_ttc(), 1'b1);

    // Streaming: the TTC fields change every LHC clock (new L1ID, L1A on
    // every other bunch); each destination must see every value exactly once.
    for (int d = 0; d < ND; d++) stream_prev[d] = -1;
    while (cyc % 4 != 1) @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      t = rand_ttc();
      t.l1id = 24'(1000 + n);
      t.l1a  = n[0];
      ttc = t;
      if (n == 3) streaming = 1;
      wait_cycles(4);
    end
    streaming = 0;
    chk(stream_frames >= 90 * ND, $sformatf("streamed frames %0d", stream_frames));

    $display("largest latency: %0d word clocks", max_lat);
    $display("phases checked: latency=%0d glr=%0d xoff=%0d multi=%0d trig=%0d crc=%0d align=%0d invalid=%0d frames=%0d",
             n_latency, n_glr, n_xoff, n_multi, n_trig, n_crc_inj, n_align_loss, n_invalid, frames_rx);
    chk(n_glr > 0,        "Global Link Reset happened");
    chk(n_xoff > 0,       "ROD XOFF happened");
    chk(n_multi > 0,      "multi-link reset happened");
    chk(n_trig > 0,       "TTC triggers happened");
    chk(n_crc_inj > 0,    "CRC error happened");
    chk(n_align_loss > 0, "alignment loss happened");
    chk(n_invalid > 0,    "invalid Readout_CTRL case happened");
    chk(n_latency > 0,    "latency measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
