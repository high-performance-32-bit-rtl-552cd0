// tb_aes_router_chip: end-to-end test of the AES subsystem through its
// register bus, with every parameter at its default.
// The bus driver loads keys, sets the mode, writes text words to DATA,
// waits for irq_o and reads results back; results are compared with the
// FIPS-197 example vectors and with the reference cipher for random data.
// It makes each mechanism happen and counts it: key preparation, encryption,
// decryption, a mode switch, blocks started back to back (44 cycles apart),
// an output-memory stall, an input overflow and an output underflow (both
// seen in STATUS). A mechanism that never happened counts as a failure.
module tb_aes_router_chip;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] addr = 0;
  logic wr = 0, rd = 0, rvalid, irq;
  logic [31:0] wdata = 0, rdata;

  aes_router_chip dut (.clk(clk), .rst_n(rst_n), .addr_i(addr), .wr_i(wr), .wdata_i(wdata),
                       .rd_i(rd), .rdata_o(rdata), .rvalid_o(rvalid), .irq_o(irq));

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_keyprep = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_b2b = 0, n_stall = 0;
  int n_ovf = 0, n_unf = 0;
  int last_start = -1;
  logic last_mode = 0;
  bit started_any = 0;

  // observe the core's start strobe to count block starts and their spacing
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_core.go) begin
      if (last_start >= 0 && cyc - last_start == 44) n_b2b++;
      if (started_any && dut.u_core.dec_i != last_mode) n_switch++;
      if (dut.u_core.dec_i) n_dec++; else n_enc++;
      last_mode = dut.u_core.dec_i;
      started_any = 1;
      last_start = cyc;
    end
    if (dut.u_memctl.stall_o) n_stall++;
  end

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
    check(rvalid, "rvalid");
    d = rdata;
  endtask

  task automatic set_key(input logic [127:0] k, input bit dec);
    logic [31:0] s;
    int n;
    for (int i = 0; i < 4; i++) bus_write(3'(4 + i), k[127 - 32*i -: 32]);
    bus_write(3'd0, {30'b0, 1'b1, dec});
    n = 0;
    do begin bus_read(3'd1, s); n++; end while (s[0]);
    n_keyprep++;
    check(n > 1, "key preparation is visible in STATUS");
  endtask

  task automatic set_mode(input bit dec);
    bus_write(3'd0, {31'b0, dec});
  endtask

  task automatic push_block(input logic [127:0] b);
    for (int i = 0; i < 4; i++) bus_write(3'd2, b[127 - 32*i -: 32]);
  endtask

  task automatic pop_block(output logic [127:0] b);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) begin bus_read(3'd2, w); b[127 - 32*i -: 32] = w; end
  endtask

  task automatic wait_idle();
    logic [31:0] s;
    do bus_read(3'd1, s); while (s[15:8] != 0 || s[1]);
  endtask

  initial begin
    logic [127:0] k, t, r, e;
    logic [127:0] exp_q [$];
    logic [31:0] s;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // FIPS-197 appendix B, both directions
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    push_block(128'h3243f6a8885a308d313198a2e0370734);
    while (!irq) @(negedge clk);
    pop_block(r);
    check(r == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("FIPS-197 B encrypt: %h", r));
    set_mode(1);
    push_block(128'h3925841d02dc09fbdc118597196a0b32);
    while (!irq) @(negedge clk);
    pop_block(r);
    check(r == 128'h3243f6a8885a308d313198a2e0370734, $sformatf("FIPS-197 B decrypt: %h", r));

    // FIPS-197 C.1
    set_key(128'h000102030405060708090a0b0c0d0e0f, 0);
    push_block(128'h00112233445566778899aabbccddeeff);
    while (!irq) @(negedge clk);
    pop_block(r);
    check(r == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS-197 C.1 encrypt: %h", r));

    // underflow: read DATA with the output memory empty
    bus_read(3'd2, s);
    bus_read(3'd1, s);
    if (s[3]) n_unf++;
    bus_write(3'd0, 32'h4);

    // random key; four encryptions queued at once run back to back, and the
    // output memory (four blocks) then fills so that the next waits
    k = {$urandom, $urandom, $urandom, $urandom};
    set_key(k, 0);
    for (int i = 0; i < 4; i++) begin
      t = {$urandom, $urandom, $urandom, $urandom};
      push_block(t);
      exp_q.push_back(cipher(t, k, 0));
    end
    wait_idle();
    for (int i = 0; i < 4; i++) begin
      t = {$urandom, $urandom, $urandom, $urandom};
      push_block(t);
      exp_q.push_back(cipher(t, k, 0));
    end
    // input memory is now full: one more word overflows
    bus_read(3'd1, s);
    check(s[15:8] == 16, $sformatf("input memory full: %0d words", s[15:8]));
    bus_write(3'd2, 32'hdeadbeef);
    bus_read(3'd1, s);
    if (s[2]) n_ovf++;
    bus_write(3'd0, 32'h4);
    while (exp_q.size() > 0) begin
      while (!irq) @(negedge clk);
      pop_block(r);
      e = exp_q.pop_front();
      check(r == e, $sformatf("random encrypt: %h expected %h", r, e));
    end

    // mixed modes, one block at a time so each picks up its own mode
    for (int i = 0; i < 6; i++) begin
      bit d;
      d = bit'($urandom_range(0, 1)) ^ i[0];
      set_mode(d);
      t = {$urandom, $urandom, $urandom, $urandom};
      push_block(t);
      while (!irq) @(negedge clk);
      pop_block(r);
      e = cipher(t, k, d);
      check(r == e, $sformatf("mixed block %0d dec %0d: %h expected %h", i, d, r, e));
    end

    check(n_keyprep > 0, "key preparation");
    check(n_enc > 0, "encryption");
    check(n_dec > 0, "decryption");
    check(n_switch > 0, "mode switch");
    check(n_b2b > 0, "back-to-back blocks");
    check(n_stall > 0, "output stall");
    check(n_ovf > 0, "input overflow");
    check(n_unf > 0, "output underflow");
    $display("key preps %0d enc %0d dec %0d switches %0d back-to-back %0d stall cycles %0d ovf %0d unf %0d",
             n_keyprep, n_enc, n_dec, n_switch, n_b2b, n_stall, n_ovf, n_unf);
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
