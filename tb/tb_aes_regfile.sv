// tb_aes_regfile: checks the register file's bus decoding.
// Key words write and read back; CTRL sets the mode and raises the key-load
// and error-clear strobes for exactly the write cycle; DATA writes raise a
// push with the data; DATA reads raise a pop and return the memory word one
// cycle later; STATUS packs the status inputs as in the register map; every
// read answers with rvalid_o one cycle after rd_i.
module tb_aes_regfile;
  logic clk = 0, rst_n = 0;
  logic [2:0] addr = 0;
  logic wr = 0, rd = 0;
  logic [31:0] wdata = 0, rdata, push_data, pop_data = 0;
  logic rvalid, mode_dec, key_load, err_clr, push, pop;
  logic [127:0] key;
  logic key_busy = 0, core_busy = 0, in_ovf = 0, out_unf = 0, stall = 0;
  logic [4:0] in_count = 0, out_count = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_regfile #(.CW(5)) dut (
    .clk(clk), .rst_n(rst_n), .addr_i(addr), .wr_i(wr), .wdata_i(wdata), .rd_i(rd),
    .rdata_o(rdata), .rvalid_o(rvalid), .key_o(key), .mode_dec_o(mode_dec),
    .key_load_o(key_load), .err_clr_o(err_clr), .push_o(push), .push_data_o(push_data),
    .pop_o(pop), .key_busy_i(key_busy), .core_busy_i(core_busy), .in_ovf_i(in_ovf),
    .out_unf_i(out_unf), .stall_i(stall), .in_count_i(in_count), .out_count_i(out_count),
    .pop_data_i(pop_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic bus_read(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1;
    @(negedge clk); rd = 0;
    check(rvalid, "rvalid one cycle after rd");
    d = rdata;
  endtask

  initial begin
    logic [31:0] kw [4];
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin kw[i] = $urandom; bus_write(3'(4 + i), kw[i]); end
    check(key == {kw[0], kw[1], kw[2], kw[3]}, "key output");
    for (int i = 0; i < 4; i++) begin bus_read(3'(4 + i), d); check(d == kw[i], "key read back"); end
    // strobes
    @(negedge clk); addr = 0; wdata = 32'h3; wr = 1; #1;
    check(key_load && !err_clr, "key load strobe");
    @(negedge clk); wr = 0; #1;
    check(!key_load && mode_dec, "strobe ends, mode set");
    @(negedge clk); addr = 0; wdata = 32'h4; wr = 1; #1;
    check(err_clr && !key_load, "error clear strobe");
    @(negedge clk); wr = 0;
    check(!mode_dec, "mode cleared");
    // data push
    @(negedge clk); addr = 2; wdata = 32'hcafef00d; wr = 1; #1;
    check(push && push_data == 32'hcafef00d && !pop, "push");
    @(negedge clk); wr = 0; #1;
    check(!push, "push is one cycle");
    // data pop: memory data valid the cycle after pop
    @(negedge clk); addr = 2; rd = 1; #1;
    check(pop, "pop");
    @(posedge clk); #1 pop_data = 32'h12345678;
    @(negedge clk); rd = 0;
    check(rvalid && rdata == 32'h12345678, "pop data returned");
    // status
    key_busy = 1; stall = 1; out_unf = 1; in_count = 5'd9; out_count = 5'd16;
    bus_read(3'd1, d);
    check(d == {8'd0, 8'd16, 8'd9, 3'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1}, $sformatf("status %h", d));
    key_busy = 0; stall = 0; out_unf = 0; in_ovf = 1; core_busy = 1; in_count = 0; out_count = 3;
    bus_read(3'd1, d);
    check(d == 32'h00030006, $sformatf("status %h", d));
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
