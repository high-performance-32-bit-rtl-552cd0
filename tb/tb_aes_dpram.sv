// tb_aes_dpram: checks the dual-port buffer memory. Random writes and reads
// run on both ports at once against a shadow array; a read returns the word
// one cycle after the address is sampled, holds while re_i is low, and a
// read of the address being written returns the old word.
module tb_aes_dpram;
  localparam int W = 32, D = 16;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] wa = 0, ra = 0;
  logic [W-1:0] wd = 0, rd;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  aes_dpram #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd),
                                         .re_i(re), .raddr_i(ra), .rdata_o(rd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] expect_q;
    bit pend;
    // fill
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; wa = 4'(i); wd = $urandom; shadow[i] = wd;
    end
    @(negedge clk); we = 0;
    pend = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (pend) check(rd == expect_q, $sformatf("read %0d: %h expected %h", i, rd, expect_q));
      we = bit'($urandom_range(0, 1)); wa = 4'($urandom); wd = $urandom;
      re = bit'($urandom_range(0, 1)); ra = (i % 5 == 0) ? wa : 4'($urandom);
      if (re) begin expect_q = shadow[ra]; pend = 1; end
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
