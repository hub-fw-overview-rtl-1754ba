// tb_ttc_merger: self-checking testbench of ttc_merger.
//
// Random Readout_CTRL contents and TTC fields are applied; the expected
// Combined_TTC/DATA message of every destination is assembled here bit by
// bit from the Combined_TTC bit table and compared, one clock later, with
// the merger's output. Global Link Reset, ROD XOFF and rd_valid low are
// forced on some cycles so that each case is seen; the number of times each
// happened is checked at the end.
module tb_ttc_merger;
  import hub_link_pkg::rdctrl_t;
  import hub_link_pkg::ttc_info_t;
  import tb_ref_pkg::*;

  localparam int ND = 14;
  localparam logic [3:0] VER = 4'hA;

  logic      clk = 0, rst = 1;
  rdctrl_t   rd;
  logic      rd_valid;
  ttc_info_t ttc;
  msg_t [ND-1:0] msg;
  int checks = 0, failures = 0;
  int n_glr = 0, n_xoff = 0, n_invalid = 0;

  ttc_merger #(.CTTC_VERSION(VER)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic msg_t expected(int d, rdctrl_t r, logic v, ttc_info_t t);
    msg_t e = '0;
    e[11:8]    = VER;
    e[16]      = t.l1a;
    e[17]      = t.bcr;
    e[18]      = t.ecr;
    e[19]      = t.privileged_readout;
    e[31:20]   = t.felix_backpressure;
    e[55:32]   = t.l1id;
    e[63:56]   = t.ecrid;
    e[95:64]   = t.control_channel;
    if (v) begin
      e[96 + 11]       = r.rod_xoff;
      e[96+22 : 96+19] = r.shelf;
      if (d < 12) begin
        for (int l = 0; l < 4; l++) begin
          e[96 + l]     = r.link_reset[d][l] | r.global_link_reset;
          e[96 + 4 + l] = r.channel_up[d][l];
        end
        e[96 + 8] = r.link_enable[d];
      end
    end
    return e;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rdctrl_t   r;
    ttc_info_t t;
    logic      v;
    rd = '0; rd_valid = 0; ttc = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      r = rdctrl_t'({$urandom, $urandom, $urandom, $urandom});
      t = ttc_info_t'({$urandom, $urandom, $urandom});
      r.global_link_reset = ($urandom % 4 == 0);
      r.rod_xoff          = ($urandom % 4 == 0);
      v = ($urandom % 8 != 0);
      rd = r; ttc = t; rd_valid = v;
      @(posedge clk); #1;
      if (v && r.global_link_reset) n_glr++;
      if (v && r.rod_xoff) n_xoff++;
      if (!v) n_invalid++;
      for (int d = 0; d < ND; d++)
        chk(msg[d] == expected(d, r, v, t), $sformatf("destination %0d", d));
    end
    chk(n_glr > 0 && n_xoff > 0 && n_invalid > 0, "every case exercised");
    $display("global link resets=%0d rod xoff=%0d invalid=%0d", n_glr, n_xoff, n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
