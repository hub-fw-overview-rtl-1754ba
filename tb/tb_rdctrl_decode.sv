// tb_rdctrl_decode: self-checking testbench of rdctrl_decode.
//
// Each Readout_CTRL field is looked up in a transcription of the bit table
// (tb_ref_pkg::rd_bit) and compared with the decoder's output, for walking
// ones over all 128 bits and for random messages. Slots with one link must
// decode links 1-3 as 0.
module tb_rdctrl_decode;
  import hub_link_pkg::rdctrl_t;
  import tb_ref_pkg::*;

  msg_t    msg;
  rdctrl_t rd;
  int checks = 0, failures = 0;

  rdctrl_decode dut (.msg(msg), .rd(rd));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s msg=%h", what, msg);
    end
  endtask

  task automatic check(msg_t m);
    int b;
    msg = m;
    #1;
    chk(rd.version == m[11:8], "version");
    chk(rd.rod_xoff == m[14], "ROD XOFF");
    chk(rd.global_link_reset == m[15], "Global Link Reset");
    chk(rd.shelf == m[118:115], "shelf");
    for (int s = 3; s <= 14; s++) begin
      chk(rd.link_enable[s-3] == m[96 + s - 3], $sformatf("slot %0d link enable", s));
      for (int l = 0; l < 4; l++) begin
        b = rd_bit(s, l);
        chk(rd.link_reset[s-3][l] == (b < 0 ? 1'b0 : m[32 + b]), $sformatf("slot %0d link %0d reset", s, l));
        chk(rd.channel_up[s-3][l] == (b < 0 ? 1'b0 : m[64 + b]), $sformatf("slot %0d link %0d up", s, l));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) check(msg_t'(1) << i);
    check('0);
    check('1);
    for (int n = 0; n < 300; n++) check({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
