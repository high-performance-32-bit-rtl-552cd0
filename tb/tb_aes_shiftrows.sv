// tb_aes_shiftrows: checks the 4-stage ShiftRows / InvShiftRows pipeline.
// Random states are streamed in back to back, one column per cycle with the
// column index on phase_i, changing direction between states. Column j of
// each state's shifted result must be on dout_o after the (4+j)-th rising
// edge counted from the one that took column 0, i.e. a 4-stage pipeline.
// Expected values come from the FIPS-197 definition s'[r][c] = s[r][c+r]
// (ShiftRows) or s[r][c-r] (InvShiftRows). A final check freezes the
// pipeline with en_i low.
module tb_aes_shiftrows;
  logic clk = 0, rst_n = 0, en = 0, dec = 0;
  logic [1:0]  phase = 0;
  logic [31:0] din = 0, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_shiftrows dut (.clk(clk), .rst_n(rst_n), .en_i(en), .dec_i(dec), .phase_i(phase),
                     .din_i(din), .dout_o(dout));

  localparam int N = 40;
  logic [7:0] st [N][4][4];  // [state][row][col]
  bit         dm [N];

  function automatic logic [31:0] exp_col(int s, int c);
    logic [31:0] w;
    for (int r = 0; r < 4; r++)
      w[31-8*r -: 8] = dm[s] ? st[s][r][(c - r + 4) % 4] : st[s][r][(c + r) % 4];
    return w;
  endfunction

  initial begin
    logic [31:0] hold;
    for (int s = 0; s < N; s++) begin
      dm[s] = (s < 10) ? s[0] : bit'($urandom_range(0, 1));
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) st[s][r][c] = 8'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    // cycle t (t = 0, 1, ...) drives column t%4 of state t/4; the output read
    // after edge t+4 ... i.e. at cycle t+4 belongs to column (t)%4 of state t/4
    for (int t = 0; t < 4*N + 4; t++) begin
      if (t < 4*N) begin
        din   = {st[t/4][0][t%4], st[t/4][1][t%4], st[t/4][2][t%4], st[t/4][3][t%4]};
        dec   = dm[t/4];
        phase = 2'(t % 4);
      end else begin
        din = $urandom; phase = 2'(t % 4);
      end
      if (t >= 4) begin
        int s, c;
        s = (t - 4) / 4;
        c = (t - 4) % 4;
        // the mode is the one of the state leaving; during the last column of
        // a state the next state's mode is already applied at the input,
        // which must not matter for what leaves
        check(dout == exp_col(s, c),
              $sformatf("state %0d col %0d dec %0d: got %h expected %h", s, c, dm[s], dout, exp_col(s, c)));
      end
      @(negedge clk);
    end
    // en_i low freezes the registers
    hold = dout;
    en = 0;
    repeat (3) @(negedge clk);
    check(dout == hold, "en_i low holds the pipeline");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
