// aes_pkg: AES-128 helper functions (FIPS-197).
//
// The S-box is not stored as a table of numbers: gen_sbox() computes it at
// elaboration from its definition, the multiplicative inverse in GF(2^8)
// modulo x^8 + x^4 + x^3 + x + 1 (0 maps to 0),
// found through powers of the generator 3, followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63. The other
// functions are the round steps on a 128-bit state whose byte i
// (i = row + 4 * column) is bits [127-8i -: 8], the byte order of FIPS-197.
`timescale 1ns / 1ps
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef byte_t        sbox_t [256];
  typedef logic [127:0] block_t;

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t rotl8(byte_t b, int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // Inverses come from exponent and logarithm tables to the generator 3,
  // so the constant evaluation takes a few thousand steps.
  function automatic sbox_t gen_sbox();
    sbox_t t;
    byte_t exp_t [256];
    byte_t log_t [256];
    byte_t x;
    x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = x;
      log_t[x] = byte_t'(i);
      x = xtime(x) ^ x;
    end
    exp_t[255] = 8'h01;
    log_t[0]   = 8'h00;
    for (int v = 0; v < 256; v++) begin
      byte_t inv, b;
      inv  = (v == 0) ? 8'h00 : exp_t[(255 - int'(log_t[v])) % 255];
      b    = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
      t[v] = b;
    end
    return t;
  endfunction

  localparam sbox_t SBOX = gen_sbox();

  function automatic byte_t get_byte(block_t s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = SBOX[s[127 - 8*i -: 8]];
    return r;
  endfunction

  // Row r of the state is rotated left by r columns.
  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*c) -: 8] = s[127 - 8*(row + 4*((c + row) % 4)) -: 8];
    return r;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) begin
      byte_t a0 = s[127 - 8*(4*c + 0) -: 8];
      byte_t a1 = s[127 - 8*(4*c + 1) -: 8];
      byte_t a2 = s[127 - 8*(4*c + 2) -: 8];
      byte_t a3 = s[127 - 8*(4*c + 3) -: 8];
      r[127 - 8*(4*c + 0) -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // Next round key from the current one and the round constant.
  function automatic block_t next_round_key(block_t k, byte_t rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96]; w1 = k[95:64]; w2 = k[63:32]; w3 = k[31:0];
    t  = {SBOX[w3[23:16]] ^ rcon, SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
