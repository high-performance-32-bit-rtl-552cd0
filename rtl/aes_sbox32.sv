// aes_sbox32: SubBytes / InvSubBytes on one 32-bit state column.
//
// Four forward S-boxes and four inverse S-boxes work on the four bytes of the
// column in parallel; inv_i picks the inverse set. The design has two such
// 32-bit units, one on the text path and one in the key schedule, so that the
// text and the key get their SubBytes in the same cycle. The key schedule only
// ever uses the forward set (inv_i tied low).
//
// The tables are read-only arrays filled at elaboration from the GF(2^8)
// definition (aes_pkg::gen_sbox); in silicon they map to logic or ROM.
// The two sets side by side with a mode select follow the architecture; the
// table implementation is this design's choice.
// Purely combinational: dout_o follows din_i in the same cycle.
module aes_sbox32
  import aes_pkg::*;
(
  input  word_t din_i,
  input  logic  inv_i,   // 1: InvSubBytes, 0: SubBytes
  output word_t dout_o
);

  localparam logic [2047:0] SBOX     = gen_sbox();
  localparam logic [2047:0] INV_SBOX = gen_inv_sbox();

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      dout_o[31-8*r -: 8] = inv_i ? INV_SBOX[8*din_i[31-8*r -: 8] +: 8]
                                  : SBOX[8*din_i[31-8*r -: 8] +: 8];
    end
  end

endmodule
