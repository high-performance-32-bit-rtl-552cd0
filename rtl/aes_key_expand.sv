// aes_key_expand: on-the-fly AES-128 key schedule, one 32-bit word per cycle.
//
// The four words of the current round key sit in a 4-word shift register
// kw[0..3]; word_o = kw[0] is the key word for the state column being
// processed this cycle. Each step_i shifts one new word in at kw[3]:
//   forward  (encrypt): w[i] = w[i-4] ^ (i%4 == 0 ? SubWord(RotWord(w[i-1]))
//                                                    ^ Rcon : w[i-1])
//   backward (decrypt): w[i-4] = w[i] ^ w[i-1] for i%4 != 0, and for i%4 == 0
//                       w[i-4] = w[i] ^ SubWord(RotWord(w[i+3]^w[i+2])) ^ Rcon
// so over the 44 cycles of a block word_o runs through w[0..43] when
// encrypting and through round keys 10, 9, ... 0 when decrypting. The
// backward step keeps the word it has just shifted out in one extra register
// (last_q). SubWord has its own 32-bit S-box (aes_sbox32) so the key and the
// text are substituted in the same cycle; Rcon comes from aes_rcon, which
// runs forward with xtime and backward with inverse xtime.
//
// Decryption starts from the last round key. When a key is loaded
// (key_load_i) the unit runs the forward schedule for 40 cycles on its own
// (busy_o high) and keeps the result; start_i then copies the original key
// (encrypt) or this last round key (decrypt) into kw and presets Rcon.
// Keeping both 128-bit keys lets blocks follow each other without a new
// forward run; this is a choice of this design.
// start_i and step_i are ignored while busy_o is high.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           key_load_i,
  input  logic [127:0]   key_i,      // w[0] in [127:96]
  output logic           busy_o,
  input  logic           start_i,
  input  logic           dec_i,
  input  logic           step_i,
  output word_t          word_o
);

  word_t        kw [4];
  word_t        last_q;
  logic [127:0] key0_q, key10_q;
  logic [1:0]   j_q;
  logic [5:0]   prep_q;
  logic         dec_q;

  byte_t rcon;
  word_t sub_in, sub_out, nk;
  logic  adv, back;

  assign busy_o = (prep_q != 6'd0);
  assign adv    = busy_o | step_i;
  assign back   = dec_q & ~busy_o;

  aes_rcon u_rcon (
    .clk   (clk),
    .rst_n (rst_n),
    .load_i(key_load_i | (start_i & ~busy_o)),
    .step_i(adv & (j_q == 2'd0)),
    .dec_i (key_load_i ? 1'b0 : (start_i & ~busy_o) ? dec_i : back),
    .rcon_o(rcon)
  );

  aes_sbox32 u_key_sbox (
    .din_i (sub_in),
    .inv_i (1'b0),
    .dout_o(sub_out)
  );

  always_comb begin
    word_t t;
    t      = back ? (kw[3] ^ kw[2]) : kw[3];
    sub_in = {t[23:0], t[31:24]};  // RotWord
    if (j_q == 2'd0)  nk = kw[0] ^ sub_out ^ {rcon, 24'h0};
    else if (back)    nk = kw[0] ^ last_q;
    else              nk = kw[0] ^ kw[3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) kw[i] <= '0;
      last_q  <= '0;
      key0_q  <= '0;
      key10_q <= '0;
      j_q     <= '0;
      prep_q  <= '0;
      dec_q   <= 1'b0;
    end else if (key_load_i) begin
      key0_q <= key_i;
      {kw[0], kw[1], kw[2], kw[3]} <= key_i;
      j_q    <= '0;
      prep_q <= 6'd40;
      dec_q  <= 1'b0;
    end else if (start_i && !busy_o) begin
      {kw[0], kw[1], kw[2], kw[3]} <= dec_i ? key10_q : key0_q;
      j_q   <= '0;
      dec_q <= dec_i;
    end else if (adv) begin
      kw[0]  <= kw[1];
      kw[1]  <= kw[2];
      kw[2]  <= kw[3];
      kw[3]  <= nk;
      last_q <= kw[0];
      j_q    <= j_q + 2'd1;
      if (busy_o) begin
        prep_q <= prep_q - 6'd1;
        if (prep_q == 6'd1) key10_q <= {kw[1], kw[2], kw[3], nk};
      end
    end
  end

  assign word_o = kw[0];

endmodule
