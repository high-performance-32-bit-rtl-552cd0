// tb_aes_rcon: checks the round-constant generator. After a load in
// encryption mode the ten values must be 01 02 04 08 10 20 40 80 1b 36
// (FIPS-197); after a load in decryption mode the same ten in reverse.
// It also checks that the register holds without step_i and that the
// decryption run, started from the end of an encryption run without a
// load, returns to 01.
module tb_aes_rcon;
  logic clk = 0, rst_n = 0, load = 0, step = 0, dec = 0;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  localparam logic [7:0] RC [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                     8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  always #5 clk = ~clk;
  aes_rcon dut (.clk(clk), .rst_n(rst_n), .load_i(load), .step_i(step), .dec_i(dec), .rcon_o(rcon));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(rcon == 8'h01, "reset value");
    for (int pass = 0; pass < 2; pass++) begin
      dec = pass[0];
      load = 1; @(negedge clk); load = 0;
      for (int i = 0; i < 10; i++) begin
        check(rcon == RC[dec ? 9 - i : i], $sformatf("mode %0d step %0d: %h", dec, i, rcon));
        step = (i != 9);
        @(negedge clk);
        step = 0;
        if (i == 4) begin
          logic [7:0] h;
          h = rcon;
          repeat (2) @(negedge clk);
          check(rcon == h, "holds without step");
        end
      end
    end
    // forward to 36, then backward without a load
    dec = 0; load = 1; @(negedge clk); load = 0;
    step = 1; repeat (9) @(negedge clk);
    check(rcon == 8'h36, "forward run ends on 36");
    dec = 1; repeat (9) @(negedge clk);
    step = 0;
    check(rcon == 8'h01, "backward run returns to 01");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
