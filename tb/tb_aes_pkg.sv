// tb_aes_pkg: checks the package helpers. xtime and inv_xtime must be
// multiplication and division by {02} in GF(2^8) (checked for all 256 bytes
// with the reference multiply, and as inverses of each other), and the
// generated S-box tables must match the reference S-box and invert each other.
module tb_aes_pkg;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  localparam logic [2047:0] SB  = aes_pkg::gen_sbox();
  localparam logic [2047:0] ISB = aes_pkg::gen_inv_sbox();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    init();
    for (int i = 0; i < 256; i++) begin
      u8 b;
      b = u8'(i);
      check(aes_pkg::xtime(b) == gmul(b, 8'h02), $sformatf("xtime %h", b));
      check(aes_pkg::xtime(aes_pkg::inv_xtime(b)) == b, $sformatf("inv_xtime %h", b));
      check(SB[8*i +: 8] == S[i], $sformatf("S-box %h", b));
      check(ISB[8*i +: 8] == IS[i], $sformatf("inverse S-box %h", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
