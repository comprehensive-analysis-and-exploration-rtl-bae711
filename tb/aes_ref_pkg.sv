// aes_ref_pkg: reference AES-128 model for the testbenches.
//
// Written independently of the RTL: the S-box comes from a brute-force
// search for each byte's inverse followed by the affine transform written
// bit by bit, the inverse S-box is the inverted table, and the cipher works
// on a 4x4 byte matrix indexed [row][column]. Call ref_init() once before
// using the other functions.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0] mat_t [4][4];

  logic [7:0] sbox_tab [256];
  logic [7:0] isbox_tab [256];
  bit         tables_ready = 0;

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic void ref_init();
    logic [7:0] inv, s;
    for (int x = 0; x < 256; x++) begin
      inv = 8'h00;
      for (int y = 1; y < 256; y++) if (mul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
      sbox_tab[x] = s;
    end
    for (int x = 0; x < 256; x++) isbox_tab[sbox_tab[x]] = 8'(x);
    tables_ready = 1;
  endfunction

  function automatic void to_mat(input blk_t b, output mat_t m);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) m[r][c] = b[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic blk_t from_mat(input mat_t m);
    blk_t b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = m[r][c];
    return b;
  endfunction

  // Round key r (0..10) of a cipher key.
  function automatic blk_t round_key(input blk_t key, input int r);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // One encryption round on a block (last: no MixColumns).
  function automatic blk_t enc_round(input blk_t s, input blk_t rk, input bit last);
    mat_t m, n;
    to_mat(s, m);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) n[r][c] = sbox_tab[m[r][(c + r) % 4]];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        logic [7:0] a [4];
        for (int r = 0; r < 4; r++) a[r] = n[r][c];
        for (int r = 0; r < 4; r++)
          n[r][c] = mul(a[r], 8'h02) ^ mul(a[(r+1)%4], 8'h03) ^ a[(r+2)%4] ^ a[(r+3)%4];
      end
    return from_mat(n) ^ rk;
  endfunction

  // One decryption round: InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns.
  function automatic blk_t dec_round(input blk_t s, input blk_t rk, input bit last);
    mat_t m, n;
    to_mat(s, m);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) n[r][(c + r) % 4] = isbox_tab[m[r][c]];
    to_mat(from_mat(n) ^ rk, n);
    if (!last)
      for (int c = 0; c < 4; c++) begin
        logic [7:0] a [4];
        for (int r = 0; r < 4; r++) a[r] = n[r][c];
        for (int r = 0; r < 4; r++)
          n[r][c] = mul(a[r], 8'h0e) ^ mul(a[(r+1)%4], 8'h0b) ^ mul(a[(r+2)%4], 8'h0d) ^ mul(a[(r+3)%4], 8'h09);
      end
    return from_mat(n);
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    blk_t s;
    s = pt ^ round_key(key, 0);
    for (int r = 1; r <= 10; r++) s = enc_round(s, round_key(key, r), r == 10);
    return s;
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input blk_t key);
    blk_t s;
    s = ct ^ round_key(key, 10);
    for (int r = 9; r >= 0; r--) s = dec_round(s, round_key(key, r), r == 0);
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // FIPS-197 Appendix B vector, also used throughout the design-space study.
  localparam blk_t FIPS_PT  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam blk_t FIPS_KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam blk_t FIPS_CT  = 128'h3925841d02dc09fbdc118597196a0b32;

endpackage
