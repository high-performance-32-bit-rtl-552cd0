// aes_core: 32-bit single-core AES-128 encrypt/decrypt, 44 cycles per block.
//
// One state column (32 bits) moves per clock. The round loop is
//   input mux -> aes_shiftrows (reg1..reg16, 4 stages)
//             -> aes_sbox32 (SubBytes or InvSubBytes)
//             -> [decrypt: XOR round key]
//             -> aes_mixcolumn part 1 -> reg17..reg20 (falling edge)
//             -> [encrypt: XOR round key] / [decrypt: part 2 = InvMixColumn]
//             -> back to the input mux
// Because reg17..reg20 are clocked on the falling edge, the loop holds four
// rising-edge stages per column, so one round of four columns takes exactly
// four cycles and the next round's column 0 re-enters as the last column of
// the current round is shifted. The load of the block (text XOR the first
// round key) takes cycles 0..3, the ten rounds cycles 4..43; the final round
// skips part 1 through the mix-column bypass. The key schedule
// (aes_key_expand) supplies one key word per cycle in step with the columns.
// Encryption and decryption share the S-box slot, the shift-row registers
// and the mix-column part 1; decryption reaches InvMixColumn through part 2.
//
// Interface (all on the rising edge unless noted):
//   key_load_i/key_i  load a new key when idle; key_busy_o is high for the
//                     40 cycles the schedule needs to find the last round key.
//   start_i/dec_i     start a block when ready_o is high. The cycle after
//                     the start is cycle 0 of the block.
//   din_req_o         high in cycles 0..3: din_i must then carry column
//                     0..3 of the text (row 0 in bits [31:24]).
//   dout_valid_o      high in cycles 40..43: dout_o carries column 0..3 of the
//                     result. dout_o settles after the falling edge of the
//                     cycle and is stable at its closing rising edge.
//   done_o            high in cycle 43. ready_o is high in that cycle too, so
//                     a new block can start with no gap: one block every 44
//                     cycles.
// The loop, the register placement, the key-XOR positions and the 44-cycle
// schedule follow the architecture; the port list and handshake, the reset
// and the choice of where the decryption result is taken (at the loop
// feedback point, equal in value and cycle to taking it ahead of part 1) are
// this design's own.
module aes_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_load_i,
  input  logic [127:0] key_i,
  output logic         key_busy_o,
  input  logic         start_i,
  input  logic         dec_i,
  output logic         ready_o,
  output logic         din_req_o,
  input  word_t        din_i,
  output logic         dout_valid_o,
  output word_t        dout_o,
  output logic         done_o
);

  // ---------------- sequencer ----------------
  logic       busy_q, dec_q;
  logic [5:0] cnt_q;          // cycle of the block, 0..43
  logic       go, last_cycle;

  assign last_cycle = busy_q && (cnt_q == 6'(BLOCK_CYCLES - 1));
  assign ready_o    = !key_busy_o && (!busy_q || last_cycle);
  assign go         = start_i && ready_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      dec_q  <= 1'b0;
      cnt_q  <= '0;
    end else if (go) begin
      busy_q <= 1'b1;
      dec_q  <= dec_i;
      cnt_q  <= '0;
    end else if (busy_q) begin
      busy_q <= !last_cycle;
      cnt_q  <= cnt_q + 6'd1;
    end
  end

  localparam int unsigned NB_LOAD = 4;  // load cycles, one per column

  logic       ld, final_round;
  logic [1:0] phase;
  assign phase       = cnt_q[1:0];
  assign ld          = busy_q && (cnt_q < 6'(NB_LOAD));
  assign final_round = cnt_q >= 6'(NB_LOAD + 4 * (NR - 1));

  // ---------------- key schedule ----------------
  word_t key_word;

  aes_key_expand u_key (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_load_i(key_load_i && !busy_q),
    .key_i     (key_i),
    .busy_o    (key_busy_o),
    .start_i   (go),
    .dec_i     (dec_i),
    .step_i    (busy_q),
    .word_o    (key_word)
  );

  // ---------------- datapath ----------------
  word_t sr_in, sr_out, sb_out, mix_in, mix_q, inv_mix, loop_col;

  aes_shiftrows u_shiftrows (
    .clk    (clk),
    .rst_n  (rst_n),
    .en_i   (busy_q),
    .dec_i  (dec_q),
    .phase_i(phase),
    .din_i  (sr_in),
    .dout_o (sr_out)
  );

  aes_sbox32 u_sbox (
    .din_i (sr_out),
    .inv_i (dec_q),
    .dout_o(sb_out)
  );

  // decryption adds the round key ahead of the (inverse) mix column
  assign mix_in = dec_q ? (sb_out ^ key_word) : sb_out;

  aes_mixcolumn u_mix (
    .clk     (clk),
    .rst_n   (rst_n),
    .a_i     (mix_in),
    .bypass_i(final_round),
    .b_q_o   (mix_q),
    .c_o     (inv_mix)
  );

  // encryption adds the round key after the mix-column register
  always_comb begin
    if (!dec_q)           loop_col = mix_q ^ key_word;
    else if (final_round) loop_col = mix_q;
    else                  loop_col = inv_mix;
  end

  assign sr_in = ld ? (din_i ^ key_word) : loop_col;

  assign din_req_o    = ld;
  assign dout_valid_o = busy_q && final_round;
  assign dout_o       = loop_col;
  assign done_o       = last_cycle;

  // a new key may only be loaded between blocks
  a_key_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    key_load_i |-> !busy_q);

endmodule
