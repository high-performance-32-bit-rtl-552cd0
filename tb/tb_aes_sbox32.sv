// tb_aes_sbox32: checks the 32-bit SubBytes / InvSubBytes unit.
// Every byte value is sent through every lane in both directions and
// compared with the reference S-box of aes_ref_pkg (found by brute-force
// GF(2^8) inversion, independent of the RTL tables). Three FIPS-197 S-box
// entries are also checked as literals.
module tb_aes_sbox32;
  import aes_ref_pkg::*;

  logic [31:0] din, dout;
  logic        inv;
  int checks = 0, failures = 0;

  aes_sbox32 dut (.din_i(din), .inv_i(inv), .dout_o(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    init();
    check(S[8'h00] == 8'h63 && S[8'h53] == 8'hed && S[8'hff] == 8'h16, "reference table");
    for (int v = 0; v < 256; v++) begin
      for (int lane = 0; lane < 4; lane++) begin
        logic [7:0] other [4];
        for (int k = 0; k < 4; k++) other[k] = 8'($urandom);
        other[lane] = 8'(v);
        din = {other[0], other[1], other[2], other[3]};
        inv = 0;
        #1;
        check(dout[31-8*lane -: 8] == S[v], $sformatf("SubBytes lane %0d of %h", lane, v));
        inv = 1;
        #1;
        check(dout[31-8*lane -: 8] == IS[v], $sformatf("InvSubBytes lane %0d of %h", lane, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
