// aes_pkg: types, constants and pure functions shared by the AES-128 modules.
//
// Byte order follows FIPS-197: a 128-bit block is 16 bytes b0..b15 with b0 in
// bits [127:120]. Byte bi sits in row (i mod 4), column (i div 4) of the 4x4
// state matrix, so each 32-bit word is one column.
//
// The GF(2^8) arithmetic uses the AES polynomial x^8 + x^4 + x^3 + x + 1.
// The multiplicative inverse is x^254, reached with four general
// multiplications and seven squarings (squaring is a fixed XOR network). It
// is what the S-box modules are built from, so no S-box table is stored
// anywhere in the design.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  // Round keys 0..10 of AES-128; index 0 is the cipher key itself.
  typedef logic [10:0][127:0] round_keys_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  function automatic byte_t get_byte(input block_t b, input int unsigned i);
    return b[127-8*i -: 8];
  endfunction

  // Multiply by x (0x02) modulo the AES polynomial.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p;
    byte_t t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Squaring is linear over GF(2): a^2 = sum of a_i * x^(2i), so it needs
  // only XORs of the reduced powers x^0, x^2, ..., x^14.
  localparam byte_t SQ_BASIS [8] = '{8'h01, 8'h04, 8'h10, 8'h40, 8'h1b, 8'h6c, 8'hab, 8'h9a};

  function automatic byte_t gf_sq(input byte_t a);
    byte_t p;
    p = '0;
    for (int i = 0; i < 8; i++)
      if (a[i]) p = p ^ SQ_BASIS[i];
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t gf_inv(input byte_t a);
    byte_t a2, a3, a12, a14, a15, a240;
    a2   = gf_sq(a);
    a3   = gf_mul(a2, a);
    a12  = gf_sq(gf_sq(a3));
    a14  = gf_mul(a12, a2);
    a15  = gf_mul(a12, a3);
    a240 = gf_sq(gf_sq(gf_sq(gf_sq(a15))));
    return gf_mul(a240, a14);
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  // ShiftRows: row r rotates left by r columns.
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(r+4*c) -: 8] = get_byte(s, r + 4*((c + r) % 4));
    return o;
  endfunction

  // InvShiftRows: row r rotates right by r columns.
  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(r+4*((c + r) % 4)) -: 8] = get_byte(s, r + 4*c);
    return o;
  endfunction

  // MixColumns: each column multiplied by the circulant matrix (02 03 01 01).
  function automatic block_t mix_columns(input block_t s);
    block_t o;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2);
      a3 = get_byte(s, 4*c+3);
      o[127-8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[127-8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // InvMixColumns: circulant matrix (0E 0B 0D 09).
  function automatic block_t inv_mix_columns(input block_t s);
    block_t o;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2);
      a3 = get_byte(s, 4*c+3);
      o[127-8*(4*c)   -: 8] = gf_mul(a0,8'h0e) ^ gf_mul(a1,8'h0b) ^ gf_mul(a2,8'h0d) ^ gf_mul(a3,8'h09);
      o[127-8*(4*c+1) -: 8] = gf_mul(a0,8'h09) ^ gf_mul(a1,8'h0e) ^ gf_mul(a2,8'h0b) ^ gf_mul(a3,8'h0d);
      o[127-8*(4*c+2) -: 8] = gf_mul(a0,8'h0d) ^ gf_mul(a1,8'h09) ^ gf_mul(a2,8'h0e) ^ gf_mul(a3,8'h0b);
      o[127-8*(4*c+3) -: 8] = gf_mul(a0,8'h0b) ^ gf_mul(a1,8'h0d) ^ gf_mul(a2,8'h09) ^ gf_mul(a3,8'h0e);
    end
    return o;
  endfunction

  // Round constant of key-expansion step r (1..10).
  function automatic byte_t rcon(input int unsigned r);
    byte_t v;
    v = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < r) v = xtime(v);
    return v;
  endfunction

endpackage
