// tb_link_monitor: self-checking testbench of link_monitor.
//
// Random event pulses are counted in the testbench and compared with the
// three counters every clock. A 4-bit instance is used so that saturation
// is reached; clear is applied alone and together with events.
module tb_link_monitor;
  localparam int W = 4;

  logic         clk = 0, rst = 1, clear = 0;
  logic         update = 0, crc_error = 0, align_error = 0;
  logic [W-1:0] frames, crc_errors, align_errors;
  int checks = 0, failures = 0;
  int e_f = 0, e_c = 0, e_a = 0, n_sat = 0;

  link_monitor #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int sat(int c);
    return (c > 2**W - 1) ? 2**W - 1 : c;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      update      = ($urandom % 2 == 0);
      crc_error   = ($urandom % 5 == 0);
      align_error = ($urandom % 9 == 0);
      clear       = ($urandom % 97 == 0);
      @(posedge clk); #1;
      if (clear) begin
        e_f = 0; e_c = 0; e_a = 0;
      end else begin
        e_f += int'(update); e_c += int'(crc_error); e_a += int'(align_error);
      end
      if (e_f > 2**W - 1) n_sat++;
      chk(int'(frames) == sat(e_f), "frames");
      chk(int'(crc_errors) == sat(e_c), "crc errors");
      chk(int'(align_errors) == sat(e_a), "align errors");
    end
    chk(n_sat > 0, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
