// aes_ref_pkg: plain reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is found by brute-force search
// of the GF(2^8) inverse (multiplication by shift-and-add) followed by the
// affine map, and the cipher works on a 16-byte array round by round as in
// FIPS-197. Byte 0 of a block is bits [127:120].
package aes_ref_pkg;

  typedef logic [7:0] u8;

  function automatic u8 gmul(input u8 a, input u8 b);
    u8 p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic u8 sbox(input u8 x);
    u8 inv, s;
    inv = 0;
    for (int y = 1; y < 256; y++) if (gmul(x, u8'(y)) == 8'h01) inv = u8'(y);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  u8 S [256];
  u8 IS [256];
  bit ready = 0;

  function automatic void init();
    if (ready) return;
    for (int i = 0; i < 256; i++) begin
      S[i] = sbox(u8'(i));
      IS[S[i]] = u8'(i);
    end
    ready = 1;
  endfunction

  function automatic void expand(input logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    u8 rc;
    rc = 1;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {S[t[31:24]], S[t[23:16]], S[t[15:8]], S[t[7:0]]} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // state index: s[r + 4c] = byte of row r, column c
  function automatic logic [127:0] cipher(input logic [127:0] pt, input logic [127:0] key,
                                          input bit decrypt);
    logic [127:0] rk [11];
    u8 s [16];
    u8 t [16];
    u8 m [4];
    init();
    expand(key, rk);
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ rk[decrypt ? 10 : 0][127-8*i -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      // (inverse) shift rows
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          t[r + 4*c] = decrypt ? s[r + 4*((c - r + 4) % 4)] : s[r + 4*((c + r) % 4)];
      // (inverse) sub bytes
      for (int i = 0; i < 16; i++) s[i] = decrypt ? IS[t[i]] : S[t[i]];
      if (decrypt)
        for (int i = 0; i < 16; i++) s[i] ^= rk[10-rnd][127-8*i -: 8];
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++) begin
          for (int r = 0; r < 4; r++) m[r] = s[r + 4*c];
          for (int r = 0; r < 4; r++)
            s[r + 4*c] = decrypt ?
              gmul(m[r], 8'h0e) ^ gmul(m[(r+1)%4], 8'h0b) ^ gmul(m[(r+2)%4], 8'h0d) ^ gmul(m[(r+3)%4], 8'h09) :
              gmul(m[r], 8'h02) ^ gmul(m[(r+1)%4], 8'h03) ^ m[(r+2)%4] ^ m[(r+3)%4];
        end
      end
      if (!decrypt)
        for (int i = 0; i < 16; i++) s[i] ^= rk[rnd][127-8*i -: 8];
    end
    for (int i = 0; i < 16; i++) cipher[127-8*i -: 8] = s[i];
  endfunction

endpackage
