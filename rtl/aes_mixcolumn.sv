// aes_mixcolumn: shared MixColumn / InvMixColumn on one 32-bit column,
// split in two parts with a pipeline register between them.
//
// Part 1 is the plain MixColumn. With t = a0^a1^a2^a3 it forms
//   b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1))
// which is 2a_i + 3a_(i+1) + a_(i+2) + a_(i+3). Part 2 turns a MixColumn
// result into an InvMixColumn result, using that the inverse matrix equals
// the MixColumn matrix times circ(05,00,04,00):
//   u = xtime(xtime(b0^b2)), c0 = b0^u, c2 = b2^u
//   v = xtime(xtime(b1^b3)), c1 = b1^v, c3 = b3^v
// Encryption uses part 1 only; decryption uses part 1 then part 2.
//
// The four 8-bit pipeline registers between the parts (b_q_o) are clocked on
// the falling edge: part 1 gets the first half of the cycle, part 2 (and the
// round-key XOR that follows in the core) the second half, so the register
// costs no extra cycle in the round loop. This use of both clock edges is
// deliberate and is the point of the structure.
//
// bypass_i (last round) passes the column around part 1 into the register.
// Timing: a_i is sampled at the falling edge; b_q_o changes at the falling
// edge; c_o is combinational from b_q_o.
module aes_mixcolumn
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t a_i,
  input  logic  bypass_i,  // 1: skip part 1 (final round)
  output word_t b_q_o,     // registered part-1 result (MixColumn)
  output word_t c_o        // part 2 of b_q_o (InvMixColumn when bypass was 0)
);

  byte_t a [4];
  byte_t b [4];
  byte_t bq [4];
  byte_t t, u, v;
  word_t part1;

  always_comb begin
    for (int i = 0; i < 4; i++) a[i] = col_byte(a_i, i);
    t = a[0] ^ a[1] ^ a[2] ^ a[3];
    for (int i = 0; i < 4; i++) b[i] = a[i] ^ t ^ xtime(a[i] ^ a[(i+1)%4]);
    part1 = {b[0], b[1], b[2], b[3]};
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) b_q_o <= '0;
    else        b_q_o <= bypass_i ? a_i : part1;
  end

  always_comb begin
    for (int i = 0; i < 4; i++) bq[i] = col_byte(b_q_o, i);
    u = xtime(xtime(bq[0] ^ bq[2]));
    v = xtime(xtime(bq[1] ^ bq[3]));
    c_o = {bq[0] ^ u, bq[1] ^ v, bq[2] ^ u, bq[3] ^ v};
  end

endmodule
