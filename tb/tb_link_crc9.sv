// tb_link_crc9: checks link_crc9 against a polynomial long division.
//
// The reference takes the 111 protected bits (118 down to 8), XORs the
// initial value into the first nine of them, appends nine zeros and divides
// by the 10-bit generator; the remainder is the CRC. Fixed patterns and
// random messages are compared, and the bits outside the protected range
// are toggled to check they do not change the result.
module tb_link_crc9;
  import hub_link_pkg::*;

  localparam logic [9:0] GEN  = 10'h31B; // x^9 + x^8 + x^4 + x^3 + x + 1
  localparam logic [8:0] INIT = 9'h1FF;

  msg_t       msg;
  logic [8:0] crc;
  int         checks = 0, failures = 0;

  link_crc9 dut (.msg(msg), .crc(crc));

  function automatic logic [8:0] ref_crc(msg_t m);
    logic [119:0] s;  // 111 data bits + 9 zeros, MSB first
    s = {m[118:8], 9'b0};
    s[119:111] ^= INIT;
    for (int i = 119; i >= 9; i--)
      if (s[i]) s[i -: 10] ^= GEN;
    return s[8:0];
  endfunction

  task automatic check(msg_t m);
    logic [8:0] exp;
    msg = m;
    #1;
    exp = ref_crc(m);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL msg=%h crc=%h exp=%h", m, crc, exp);
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
    msg_t m;
    check('0);
    check('1);
    for (int b = 8; b < 119; b++) check(msg_t'(1) << b);
    for (int n = 0; n < 500; n++) begin
      m = {$urandom, $urandom, $urandom, $urandom};
      check(m);
    end
    // Bits outside 118:8 must not matter.
    m = {$urandom, $urandom, $urandom, $urandom};
    msg = m; #1;
    begin
      logic [8:0] c0;
      c0 = crc;
      msg = m ^ {9'h1FF, 111'b0, 8'hFF}; #1;
      checks++;
      if (crc !== c0) begin failures++; $display("FAIL: unprotected bits change the CRC"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
