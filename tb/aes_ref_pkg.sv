// aes_ref_pkg: reference model used by the testbenches.
//
// Everything here works in the AES polynomial basis (m(z) =
// z^8+z^4+z^3+z+1) with plain shift-and-add multiplication and brute-force
// inversion, so it shares nothing with the composite-field hardware. It also
// provides schoolbook models of the GF(2^2)/GF(2^4)/GF(2^8) tower used by the
// S-box (x^2+x+1, y^2+y+{10}, z^2+z+{1000}) for the small field units.
// Call ref_init() once before using the S-box tables.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;

  u8 sbox_tab [256];
  u8 isbox_tab [256];

  function automatic u8 gmul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ({a[6:0], 1'b0} ^ 8'h1b) : {a[6:0], 1'b0};
    end
    return p;
  endfunction

  function automatic u8 ginv(u8 a);
    for (int b = 1; b < 256; b++)
      if (gmul(a, u8'(b)) == 8'h01) return u8'(b);
    return 8'h00;
  endfunction

  function automatic u8 affine(u8 b);
    u8 r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic void ref_init();
    for (int a = 0; a < 256; a++) begin
      sbox_tab[a] = affine(ginv(u8'(a)));
      isbox_tab[sbox_tab[a]] = u8'(a);
    end
  endfunction

  // ---- tower-field models (schoolbook) ----
  function automatic logic [1:0] t2_mul(logic [1:0] a, logic [1:0] b);
    // polynomial product, then x^2 = x + 1
    logic [2:0] p;
    p = {a[1] & b[1], (a[1] & b[0]) ^ (a[0] & b[1]), a[0] & b[0]};
    return {p[1] ^ p[2], p[0] ^ p[2]};
  endfunction

  function automatic logic [3:0] t4_mul(logic [3:0] a, logic [3:0] b);
    logic [1:0] hh, hl, lh, ll;
    hh = t2_mul(a[3:2], b[3:2]);
    hl = t2_mul(a[3:2], b[1:0]);
    lh = t2_mul(a[1:0], b[3:2]);
    ll = t2_mul(a[1:0], b[1:0]);
    // y^2 = y + {10}
    return {hh ^ hl ^ lh, ll ^ t2_mul(hh, 2'b10)};
  endfunction

  function automatic u8 t8_mul(u8 a, u8 b);
    logic [3:0] hh, hl, lh, ll;
    hh = t4_mul(a[7:4], b[7:4]);
    hl = t4_mul(a[7:4], b[3:0]);
    lh = t4_mul(a[3:0], b[7:4]);
    ll = t4_mul(a[3:0], b[3:0]);
    // z^2 = z + {1000}
    return {hh ^ hl ^ lh, ll ^ t4_mul(hh, 4'b1000)};
  endfunction

  // ---- AES transformations ----
  function automatic u8 byte_of(u128 s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic u128 sub_bytes(u128 s, bit inv);
    u128 r;
    for (int i = 0; i < 16; i++)
      r[127 - 8*i -: 8] = inv ? isbox_tab[byte_of(s, i)] : sbox_tab[byte_of(s, i)];
    return r;
  endfunction

  function automatic u128 shift_rows(u128 s, bit inv);
    u128 r;
    for (int i = 0; i < 16; i++) begin
      int row, col, src;
      row = i % 4; col = i / 4;
      src = inv ? row + 4*((col + 4 - row) % 4) : row + 4*((col + row) % 4);
      r[127 - 8*i -: 8] = byte_of(s, src);
    end
    return r;
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] c, bit inv);
    u8 s [4];
    u8 k [4];
    logic [31:0] r;
    for (int i = 0; i < 4; i++) s[i] = c[31 - 8*i -: 8];
    if (inv) k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     k = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int row = 0; row < 4; row++) begin
      u8 acc = 0;
      for (int j = 0; j < 4; j++) acc ^= gmul(k[(j - row + 4) % 4], s[j]);
      r[31 - 8*row -: 8] = acc;
    end
    return r;
  endfunction

  function automatic u128 mix_columns(u128 s, bit inv);
    u128 r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = mix_col(s[127 - 32*c -: 32], inv);
    return r;
  endfunction

  function automatic u128 enc_round(u128 s, u128 rk, bit final_round);
    s = shift_rows(sub_bytes(s, 0), 0);
    if (!final_round) s = mix_columns(s, 0);
    return s ^ rk;
  endfunction

  function automatic u128 dec_round(u128 s, u128 rk, bit final_round);
    s = sub_bytes(shift_rows(s, 1), 1) ^ rk;
    if (!final_round) s = mix_columns(s, 1);
    return s;
  endfunction

  function automatic void expand_key(u128 key, output u128 rk [11]);
    logic [31:0] w [44];
    u8 rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic u128 encrypt(u128 pt, u128 key);
    u128 rk [11];
    u128 s;
    expand_key(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = enc_round(s, rk[r], r == 10);
    return s;
  endfunction

  function automatic u128 decrypt(u128 ct, u128 key);
    u128 rk [11];
    u128 s;
    expand_key(key, rk);
    s = ct ^ rk[10];
    for (int r = 1; r <= 10; r++) s = dec_round(s, rk[10 - r], r == 10);
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
