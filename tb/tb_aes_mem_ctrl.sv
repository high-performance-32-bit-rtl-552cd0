// tb_aes_mem_ctrl: checks the memory control with the real buffer memories
// and AES core around it. Blocks are pushed word by word, results popped
// and compared with the reference cipher. The test makes the output memory
// fill up so that the next block stalls, pushes into a full input memory
// (overflow flag), pops an empty output memory (underflow flag), switches
// mode between blocks and checks that queued blocks start every 44 cycles.
module tb_aes_mem_ctrl;
  import aes_ref_pkg::*;
  localparam int D = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push = 0, pop = 0, mode_dec = 0, err_clr = 0;
  logic [31:0] push_data = 0;
  logic [4:0] in_count, out_count;
  logic in_ovf, out_unf, stall;
  logic im_we, im_re, om_we, om_re;
  logic [3:0] im_wa, im_ra, om_wa, om_ra;
  logic [31:0] im_wd, im_rd, om_wd, om_rd;
  logic core_ready, din_req, dout_valid, core_start, core_dec, key_busy, done;
  logic [31:0] core_din, core_dout;
  logic key_load = 0;
  logic [127:0] key = 0;

  aes_mem_ctrl #(.DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .push_i(push), .push_data_i(push_data), .pop_i(pop),
    .mode_dec_i(mode_dec), .err_clr_i(err_clr), .in_count_o(in_count), .out_count_o(out_count),
    .in_ovf_o(in_ovf), .out_unf_o(out_unf), .stall_o(stall),
    .im_we_o(im_we), .im_waddr_o(im_wa), .im_wdata_o(im_wd), .im_re_o(im_re),
    .im_raddr_o(im_ra), .im_rdata_i(im_rd), .om_we_o(om_we), .om_waddr_o(om_wa),
    .om_wdata_o(om_wd), .om_re_o(om_re), .om_raddr_o(om_ra),
    .core_ready_i(core_ready), .core_din_req_i(din_req), .core_dout_valid_i(dout_valid),
    .core_dout_i(core_dout), .core_start_o(core_start), .core_dec_o(core_dec), .core_din_o(core_din));

  aes_dpram #(.WIDTH(32), .DEPTH(D)) u_im (.clk(clk), .we_i(im_we), .waddr_i(im_wa), .wdata_i(im_wd),
                                           .re_i(im_re), .raddr_i(im_ra), .rdata_o(im_rd));
  aes_dpram #(.WIDTH(32), .DEPTH(D)) u_om (.clk(clk), .we_i(om_we), .waddr_i(om_wa), .wdata_i(om_wd),
                                           .re_i(om_re), .raddr_i(om_ra), .rdata_o(om_rd));
  aes_core u_core (.clk(clk), .rst_n(rst_n), .key_load_i(key_load), .key_i(key), .key_busy_o(key_busy),
                   .start_i(core_start), .dec_i(core_dec), .ready_o(core_ready), .din_req_o(din_req),
                   .din_i(core_din), .dout_valid_o(dout_valid), .dout_o(core_dout), .done_o(done));

  int checks = 0, failures = 0;
  int cyc = 0, last_start = -1, n_stall = 0, n_b2b = 0, n_enc = 0, n_dec = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall) n_stall++;
    if (core_start) begin
      if (last_start >= 0 && cyc - last_start == 44) n_b2b++;
      last_start = cyc;
      if (core_dec) n_dec++; else n_enc++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic push_block(input logic [127:0] b);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); push = 1; push_data = b[127 - 32*i -: 32];
    end
    @(negedge clk); push = 0;
  endtask

  task automatic pop_block(output logic [127:0] b);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); pop = 1;
      @(negedge clk); pop = 0;
      b[127 - 32*i -: 32] = om_rd;
    end
  endtask

  logic [127:0] exp_q [$];

  initial begin
    logic [127:0] t, r;
    bit d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    key = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); key_load = 1; @(negedge clk); key_load = 0;
    while (key_busy) @(negedge clk);
    // underflow: pop with nothing there
    @(negedge clk); pop = 1; @(negedge clk); pop = 0;
    check(out_unf, "underflow flag");
    @(negedge clk); err_clr = 1; @(negedge clk); err_clr = 0;
    check(!out_unf, "flags cleared");
    // four blocks fill the input memory; the mode is set per block while it
    // waits, so only push one at a time when switching
    for (int b = 0; b < 6; b++) begin
      t = {$urandom, $urandom, $urandom, $urandom};
      d = b[1];
      mode_dec = d;
      // keep the mode stable until this block has started
      while (in_count >= 5'd4 && !(d == core_dec)) @(negedge clk);
      push_block(t);
      exp_q.push_back(cipher(t, key, d));
      if (b == 1 || b == 3) while (in_count != 0) @(negedge clk);
    end
    // the output memory holds 4 blocks: with no pops the 5th must stall
    repeat (400) @(negedge clk);
    check(out_count == 5'd16, $sformatf("output memory full: %0d", out_count));
    check(stall, "fifth block stalls");
    // overflow: input memory gets 2 waiting blocks + 2 more, then one word too many
    for (int b = 0; b < 2; b++) begin
      t = {$urandom, $urandom, $urandom, $urandom};
      push_block(t);
      exp_q.push_back(cipher(t, key, mode_dec));
    end
    check(in_count == 5'd16, $sformatf("input memory full: %0d", in_count));
    @(negedge clk); push = 1; push_data = 0; @(negedge clk); push = 0;
    check(in_ovf, "overflow flag");
    // drain everything
    while (exp_q.size() > 0) begin
      while (out_count < 5'd4) @(negedge clk);
      pop_block(r);
      t = exp_q.pop_front();
      check(r == t, $sformatf("result %h expected %h", r, t));
    end
    check(n_stall > 0, "stall happened");
    check(n_b2b > 0, $sformatf("back-to-back starts: %0d", n_b2b));
    check(n_enc > 0 && n_dec > 0, "both modes ran");
    $display("stalls %0d back-to-back %0d enc %0d dec %0d", n_stall, n_b2b, n_enc, n_dec);
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
