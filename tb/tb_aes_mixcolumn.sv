// tb_aes_mixcolumn: checks the two-part MixColumn / InvMixColumn unit.
// Random columns are applied; after the falling edge the registered part-1
// output must equal MixColumn of the input (FIPS-197 matrix 02 03 01 01,
// computed here with a plain GF(2^8) multiply), and part 2 of it must equal
// InvMixColumn of the input (matrix 0e 0b 0d 09). With bypass_i the column
// must pass part 1 unchanged. It also checks that the register moves on the
// falling edge and not on the rising one, and the FIPS-197 example column
// db 13 53 45 -> 8e 4d a1 bc.
module tb_aes_mixcolumn;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, bypass = 0;
  logic [31:0] a = 0, bq, c;
  int checks = 0, failures = 0;

  aes_mixcolumn dut (.clk(clk), .rst_n(rst_n), .a_i(a), .bypass_i(bypass), .b_q_o(bq), .c_o(c));

  function automatic logic [31:0] mat(input logic [31:0] x, input u8 m0, input u8 m1,
                                      input u8 m2, input u8 m3);
    u8 v [4];
    logic [31:0] y;
    for (int i = 0; i < 4; i++) v[i] = x[31-8*i -: 8];
    for (int i = 0; i < 4; i++)
      y[31-8*i -: 8] = gmul(v[i], m0) ^ gmul(v[(i+1)%4], m1) ^ gmul(v[(i+2)%4], m2) ^ gmul(v[(i+3)%4], m3);
    return y;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] prev_bq;
    #3 rst_n = 1;
    // FIPS-197 example column
    a = 32'hdb135345; bypass = 0;
    #5 clk = 1; #5 clk = 0; #1;
    check(bq == 32'h8e4da1bc, $sformatf("example column: %h", bq));
    check(c == mat(32'hdb135345, 8'h0e, 8'h0b, 8'h0d, 8'h09), "example column inverse");
    for (int i = 0; i < 300; i++) begin
      a = $urandom;
      bypass = (i % 7 == 3);
      prev_bq = bq;
      #4 clk = 1; #1;
      check(bq == prev_bq, "no change on the rising edge");
      #4 clk = 0; #1;
      if (bypass) begin
        check(bq == a, $sformatf("bypass: %h -> %h", a, bq));
      end else begin
        check(bq == mat(a, 8'h02, 8'h03, 8'h01, 8'h01), $sformatf("MixColumn %h -> %h", a, bq));
        check(c == mat(a, 8'h0e, 8'h0b, 8'h0d, 8'h09), $sformatf("InvMixColumn %h -> %h", a, c));
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
