// tb_ctrl_reg_tx: self-checking testbench of ctrl_reg_tx.
//
// Writes random values into the four control registers (single words and
// all four at once, also in mid-frame) while bc_strobe comes every four
// clocks, then irregularly, then not at all. A model of the registers gives
// the message each frame must carry: the values before the clock edge that
// sends Word_0, with the comma and the reference CRC in place. Checked:
// every word, tx_charisk, the read-back, that Word_0 follows bc_strobe by
// one clock, and that frames repeat every four clocks without a strobe.
module tb_ctrl_reg_tx;
  import tb_ref_pkg::*;

  logic        clk = 0, rst = 1, bc_strobe = 0;
  logic [3:0]  wr_en = 0;
  msg_t        wr_data = 0, ctrl_regs;
  logic [31:0] tx_data;
  logic [3:0]  tx_charisk;
  logic [1:0]  tx_word_idx;
  int checks = 0, failures = 0;

  ctrl_reg_tx dut (.*);

  always #5 clk = ~clk;

  msg_t model = 0;      // control registers as the DUT should hold them
  msg_t exp_frame = 0;  // frame being sent
  int   widx = -1;      // index of the word expected on tx_data
  int   frames = 0;
  logic strobe_d = 0;   // bc_strobe as sampled by the DUT at this edge
  int   since_w0 = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Monitor: runs just after each rising edge.
  always @(posedge clk) begin
    msg_t prev_regs;
    prev_regs = model;
    strobe_d = bc_strobe;
    for (int w = 0; w < 4; w++) if (wr_en[w]) model[32*w +: 32] = wr_data[32*w +: 32];
    #1;
    if (!rst) begin
      if (tx_charisk == 4'b0001) begin
        if (widx != -1) chk(widx == 3 || strobe_d, "Word_0 only after Word_3 or a strobe");
        exp_frame = ref_frame(prev_regs);
        widx = 0;
        since_w0 = 0;
        frames++;
      end else if (widx >= 0) begin
        widx++;
        since_w0++;
        chk(!strobe_d, "a strobe must start a frame in the next clock");
      end
      if (widx >= 0) begin
        chk(tx_data == exp_frame[32*widx +: 32], $sformatf("word %0d", widx));
        chk(tx_charisk == (widx == 0 ? 4'b0001 : 4'b0000), "charisk");
        chk(tx_word_idx == widx[1:0], "word index");
      end
      chk(ctrl_regs == model, "read-back");
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // Phase 1: strobe every four clocks, random writes.
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      bc_strobe = (c % 4 == 0);
      wr_en     = ($urandom % 3 == 0) ? 4'($urandom) : 4'b0;
      wr_data   = {$urandom, $urandom, $urandom, $urandom};
    end
    // Phase 2: irregular strobes.
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      bc_strobe = ($urandom % 5 == 0);
      wr_en     = ($urandom % 2 == 0) ? 4'b1111 : 4'b0;
      wr_data   = {$urandom, $urandom, $urandom, $urandom};
    end
    // Phase 3: no strobes, frames must continue every four clocks.
    bc_strobe = 0;
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      wr_en   = 4'($urandom);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      chk(since_w0 <= 3, "free-running period");
    end
    @(negedge clk);
    wr_en = 0;
    repeat (8) @(negedge clk);
    chk(frames > 200, "enough frames seen");
    $display("frames=%0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
