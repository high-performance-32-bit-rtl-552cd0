// tb_aes_core: self-checking test of the 32-bit AES-128 core.
//
// Checks the FIPS-197 example vectors (appendix B and C.1) in both
// directions, then random keys and texts against the reference model in
// aes_ref_pkg, including blocks started back to back and switches between
// encryption and decryption. It also checks the timing: 44 cycles from
// cycle 0 of a block to the end of its last output column, 40 cycles of key
// preparation, and no gap between back-to-back blocks.
module tb_aes_core;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         key_load, key_busy, start, dec, ready, din_req, dout_valid, done;
  logic [127:0] key;
  logic [31:0]  din, dout;

  aes_core dut (
    .clk(clk), .rst_n(rst_n), .key_load_i(key_load), .key_i(key), .key_busy_o(key_busy),
    .start_i(start), .dec_i(dec), .ready_o(ready), .din_req_o(din_req), .din_i(din),
    .dout_valid_o(dout_valid), .dout_o(dout), .done_o(done)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // text currently being fed, and blocks queued for checking
  logic [127:0] feed_q [$];
  logic [127:0] exp_q  [$];
  int           start_cycle_q [$];
  logic [127:0] cur_in;
  int           in_idx = 0;
  logic [127:0] out_acc;
  int           out_idx = 0;
  int           blocks_done = 0;

  // feed columns when the core asks for them
  always_comb din = cur_in[127 - 32*in_idx -: 32];
  always @(posedge clk) begin
    if (din_req) begin
      if (in_idx == 3) begin
        in_idx <= 0;
        if (feed_q.size() > 0) cur_in <= feed_q.pop_front();
      end else in_idx <= in_idx + 1;
    end
    if (dout_valid) begin
      out_acc[127 - 32*out_idx -: 32] = dout;
      if (out_idx == 3) begin
        logic [127:0] e;
        int st;
        out_idx = 0;
        e = exp_q.pop_front();
        st = start_cycle_q.pop_front();
        check(out_acc == e, $sformatf("block %0d: got %h expected %h", blocks_done, out_acc, e));
        check(done, "done_o with the last column");
        check(cycle - st + 1 == 44, $sformatf("latency %0d cycles, expected 44", cycle - st + 1));
        blocks_done++;
      end else out_idx++;
    end
  end

  task automatic load_key(input logic [127:0] k);
    int t0;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    t0 = cycle;
    check(key_busy, "key_busy after key load");
    while (key_busy) @(negedge clk);
    check(cycle - t0 == 40, $sformatf("key preparation took %0d cycles, expected 40", cycle - t0));
  endtask

  // run a list of blocks back to back with one key
  task automatic run_blocks(input logic [127:0] k, input logic [127:0] txt [], input bit d []);
    int n;
    n = txt.size();
    for (int i = 0; i < n; i++) begin
      exp_q.push_back(cipher(txt[i], k, d[i]));
    end
    for (int i = 1; i < n; i++) feed_q.push_back(txt[i]);
    cur_in = txt[0];
    in_idx = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      if (i > 0) check(done, "next block starts in the last cycle of the previous one");
      start = 1; dec = d[i];
      start_cycle_q.push_back(cycle + 1);
      @(negedge clk);
      start = 0;
    end
    while (blocks_done < checks_target) @(negedge clk);
  endtask

  int checks_target = 0;

  initial begin
    logic [127:0] txt [];
    bit d [];
    logic [127:0] k;
    key_load = 0; start = 0; dec = 0; key = '0; cur_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // known answers, checked against the published values as well
    check(cipher(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 0)
          == 128'h3925841d02dc09fbdc118597196a0b32, "reference model, FIPS-197 appendix B");
    check(cipher(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model, FIPS-197 C.1");

    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    txt = new[2]; d = new[2];
    txt[0] = 128'h3243f6a8885a308d313198a2e0370734; d[0] = 0;
    txt[1] = 128'h3925841d02dc09fbdc118597196a0b32; d[1] = 1;
    checks_target += 2;
    run_blocks(128'h2b7e151628aed2a6abf7158809cf4f3c, txt, d);

    load_key(128'h000102030405060708090a0b0c0d0e0f);
    txt[0] = 128'h00112233445566778899aabbccddeeff; d[0] = 0;
    txt[1] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a; d[1] = 1;
    checks_target += 2;
    run_blocks(128'h000102030405060708090a0b0c0d0e0f, txt, d);

    // random keys, random mixes of modes, back to back
    for (int r = 0; r < 6; r++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      txt = new[5]; d = new[5];
      for (int i = 0; i < 5; i++) begin
        txt[i] = {$urandom, $urandom, $urandom, $urandom};
        d[i] = $urandom_range(0, 1);
      end
      checks_target += 5;
      run_blocks(k, txt, d);
    end
    repeat (4) @(negedge clk);
    check(blocks_done == checks_target, "all blocks came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
