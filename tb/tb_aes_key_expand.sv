// tb_aes_key_expand: checks the on-the-fly key schedule.
// For random keys (and the FIPS-197 appendix A.1 key) it loads the key,
// checks that preparation takes 40 cycles, then runs 44 steps in each
// direction: encrypting, word_o must walk through w[0..43] of the reference
// expansion; decrypting, through round keys 10, 9, ... 0, word by word.
// Several blocks are run per key in mixed order to check that each start
// reloads the right key.
module tb_aes_key_expand;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, key_load = 0, start = 0, dec = 0, step = 0, busy;
  logic [127:0] key = 0;
  logic [31:0]  word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  aes_key_expand dut (.clk(clk), .rst_n(rst_n), .key_load_i(key_load), .key_i(key),
                      .busy_o(busy), .start_i(start), .dec_i(dec), .step_i(step), .word_o(word));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [127:0] rk [11];
    int n;
    init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      key = (k == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      expand(key, rk);
      if (k == 0) check(rk[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "reference round key 10");
      key_load = 1; @(negedge clk); key_load = 0;
      n = 0;
      while (busy) begin n++; @(negedge clk); end
      check(n == 40, $sformatf("preparation %0d cycles", n));
      for (int b = 0; b < 3; b++) begin
        dec = (b == 1) ^ k[0];
        start = 1; @(negedge clk); start = 0;
        step = 1;
        for (int c = 0; c < 44; c++) begin
          logic [31:0] e;
          e = rk[dec ? 10 - c/4 : c/4][127 - 32*(c%4) -: 32];
          check(word == e, $sformatf("key %0d dec %0d word %0d: %h expected %h", k, dec, c, word, e));
          @(negedge clk);
        end
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
