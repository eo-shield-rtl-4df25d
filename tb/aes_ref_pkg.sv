// aes_ref_pkg: reference AES-128 decryption for the testbenches.
//
// Checks of the encryption core decrypt its ciphertext with this
// independent inverse cipher and compare with the plaintext. The inverse
// S-box is built here by brute force: for each output y the inverse affine
// map rotl(y,1) ^ rotl(y,3) ^ rotl(y,6) ^ 8'h05 is taken and its inverse in
// GF(2^8) (mod x^8 + x^4 + x^3 + x + 1) found by search. The key schedule
// is expanded forward with the S-box obtained by inverting that table.
`timescale 1ns / 1ps
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk_t;

  function automatic u8 xt(u8 a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic u8 mul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xt(a);
    end
    return p;
  endfunction

  function automatic u8 rl(u8 b, int n);
    return u8'((b << n) | (b >> (8 - n)));
  endfunction

  u8 inv_sbox [256];
  u8 fwd_sbox [256];
  bit tables_ready = 0;

  function automatic void build_tables();
    for (int y = 0; y < 256; y++) begin
      u8 a = rl(u8'(y), 1) ^ rl(u8'(y), 3) ^ rl(u8'(y), 6) ^ 8'h05;
      u8 inv = 0;
      if (a != 0)
        for (int c = 1; c < 256; c++) if (mul(a, u8'(c)) == 8'h01) inv = u8'(c);
      inv_sbox[y] = inv;
    end
    for (int y = 0; y < 256; y++) fwd_sbox[inv_sbox[y]] = u8'(y);
    tables_ready = 1;
  endfunction

  function automatic void expand_key(blk_t key, ref blk_t rk [11]);
    logic [31:0] w [44];
    u8 rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {fwd_sbox[t[23:16]] ^ rcon, fwd_sbox[t[15:8]], fwd_sbox[t[7:0]], fwd_sbox[t[31:24]]};
        rcon = xt(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t decrypt(blk_t key, blk_t ct);
    blk_t rk [11];
    u8 s [16];
    u8 t [16];
    if (!tables_ready) build_tables();
    expand_key(key, rk);
    for (int i = 0; i < 16; i++) s[i] = ct[127 - 8*i -: 8] ^ rk[10][127 - 8*i -: 8];
    for (int r = 9; r >= 0; r--) begin
      // inverse ShiftRows: row k rotated right by k
      for (int c = 0; c < 4; c++)
        for (int k = 0; k < 4; k++) t[k + 4*((c + k) % 4)] = s[k + 4*c];
      for (int i = 0; i < 16; i++) s[i] = inv_sbox[t[i]] ^ rk[r][127 - 8*i -: 8];
      if (r != 0)
        for (int c = 0; c < 4; c++) begin
          u8 a0 = s[4*c], a1 = s[4*c+1], a2 = s[4*c+2], a3 = s[4*c+3];
          s[4*c]   = mul(a0, 8'h0e) ^ mul(a1, 8'h0b) ^ mul(a2, 8'h0d) ^ mul(a3, 8'h09);
          s[4*c+1] = mul(a0, 8'h09) ^ mul(a1, 8'h0e) ^ mul(a2, 8'h0b) ^ mul(a3, 8'h0d);
          s[4*c+2] = mul(a0, 8'h0d) ^ mul(a1, 8'h09) ^ mul(a2, 8'h0e) ^ mul(a3, 8'h0b);
          s[4*c+3] = mul(a0, 8'h0b) ^ mul(a1, 8'h0d) ^ mul(a2, 8'h09) ^ mul(a3, 8'h0e);
        end
    end
    begin
      blk_t p;
      for (int i = 0; i < 16; i++) p[127 - 8*i -: 8] = s[i];
      return p;
    end
  endfunction

endpackage
