// aes_pkg: constants and functions shared by the 32-bit AES-128 core.
//
// A state column is one 32-bit word with row 0 in bits [31:24] and row 3 in
// bits [7:0], the byte order of FIPS-197. The GF(2^8) helpers are the
// multiplication by {02} (xtime: shift left, then XOR {1b} when the bit
// shifted out was 1) and its inverse, the division by {02} (shift right, then
// XOR {8d} when the bit shifted out was 1). The inverse xtime is what lets the
// round constant run backwards for decryption instead of being stored.
//
// The S-box tables are not typed in: gen_sbox() computes them at elaboration
// from the definition. It walks the multiplicative group with generator {03}
// (p) while tracking the inverse element (q = p^-1, multiplied by {03}^-1
// each step), and applies the affine map s = q ^ rotl(q,1..4) ^ {63}.
// The result is packed as 256 bytes, entry x at bits [8x+7:8x].
package aes_pkg;

  localparam int unsigned NR          = 10;  // rounds for a 128-bit key
  localparam int unsigned BLOCK_CYCLES = 44; // cycles per block, load included

  typedef logic [7:0]  byte_t;
  typedef logic [31:0] word_t;

  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } aes_mode_e;

  function automatic byte_t xtime(input byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t inv_xtime(input byte_t b);
    return {1'b0, b[7:1]} ^ (b[0] ? 8'h8d : 8'h00);
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // forward S-box, 256 entries packed
  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    byte_t p, q, s;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int i = 0; i < 255; i++) begin
      // p <- p * {03}
      p = p ^ xtime(p);
      // q <- q / {03}
      q = q ^ byte_t'(q << 1);
      q = q ^ byte_t'(q << 2);
      q = q ^ byte_t'(q << 4);
      if (q[7]) q = q ^ 8'h09;
      s = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
      t[8*p +: 8] = s;
    end
    t[7:0] = 8'h63;  // zero has no inverse; affine map of 0
    return t;
  endfunction

  // inverse S-box, the forward table inverted
  function automatic logic [2047:0] gen_inv_sbox();
    logic [2047:0] f, t;
    f = gen_sbox();
    t = '0;
    for (int i = 0; i < 256; i++) t[8*f[8*i +: 8] +: 8] = byte_t'(i);
    return t;
  endfunction

  // column bytes by row
  function automatic byte_t col_byte(input word_t w, input int unsigned row);
    return w[31 - 8*row -: 8];
  endfunction

endpackage
