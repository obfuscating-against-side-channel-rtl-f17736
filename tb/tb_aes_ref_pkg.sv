// tb_aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
//
// Written independently of the RTL tables: the S-box is computed from the
// multiplicative inverse in GF(2^8) (by exhaustive search) and the affine map,
// the state is handled as a 4x4 byte matrix, and the key schedule is expanded in
// full (44 words). ref_encrypt also returns the eleven intermediate values (the
// state after round 0..10) so tests can follow a block round by round.
package tb_aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;
  typedef u128          trace_t [11];

  function automatic u8 gmul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic u8 ref_sbox(u8 x);
    u8 inv = 0;
    u8 r;
    if (x != 0)
      for (int b = 1; b < 256; b++)
        if (gmul(x, u8'(b)) == 8'h01) inv = u8'(b);
    r = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] = r[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r;
  endfunction

  // Cached S-box so the search above runs only once.
  u8  sbox_tab [256];
  bit sbox_ready = 0;

  function automatic u8 sb(u8 x);
    if (!sbox_ready) begin
      for (int i = 0; i < 256; i++) sbox_tab[i] = ref_sbox(u8'(i));
      sbox_ready = 1;
    end
    return sbox_tab[x];
  endfunction

  // st[r][c] <-> bits of a FIPS-197 ordered block.
  function automatic u8 at(u128 s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic u128 ref_round(u128 s, u128 k, bit last);
    u8   m [4][4];
    u8   t [4][4];
    u128 o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = sb(at(s, r, (c + r) % 4));          // SubBytes + ShiftRows
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[r][c] = last ? m[r][c]
                       : gmul(8'h02, m[r][c]) ^ gmul(8'h03, m[(r+1)%4][c]) ^
                         m[(r+2)%4][c] ^ m[(r+3)%4][c];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = t[r][c] ^ at(k, r, c);
    return o;
  endfunction

  function automatic void ref_expand(u128 key, output u128 rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sb(t[23:16]), sb(t[15:8]), sb(t[7:0]), sb(t[31:24])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic u128 ref_encrypt(u128 key, u128 pt, output trace_t tr);
    u128 rk [11];
    u128 s;
    ref_expand(key, rk);
    s = pt ^ rk[0];
    tr[0] = s;
    for (int r = 1; r <= 10; r++) begin
      s = ref_round(s, rk[r], r == 10);
      tr[r] = s;
    end
    return s;
  endfunction

  // Inverse S-box by search over the forward table.
  function automatic u8 isb(u8 y);
    u8 x;
    x = 0;
    for (int i = 0; i < 256; i++) if (sb(u8'(i)) == y) x = u8'(i);
    return x;
  endfunction

  // One round of the straightforward inverse cipher: InvShiftRows,
  // InvSubBytes, AddRoundKey, InvMixColumns (not in the last round).
  function automatic u128 ref_inv_round(u128 s, u128 k, bit last);
    u8   m [4][4];
    u128 o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = isb(at(s, r, (c + 4 - r) % 4)) ^ at(k, r, c);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = last ? m[r][c]
            : gmul(8'h0e, m[r][c]) ^ gmul(8'h0b, m[(r+1)%4][c]) ^
              gmul(8'h0d, m[(r+2)%4][c]) ^ gmul(8'h09, m[(r+3)%4][c]);
    return o;
  endfunction

  function automatic u128 ref_decrypt(u128 key, u128 ct, output trace_t tr);
    u128 rk [11];
    u128 s;
    ref_expand(key, rk);
    s = ct ^ rk[10];
    tr[0] = s;
    for (int r = 1; r <= 10; r++) begin
      s = ref_inv_round(s, rk[10-r], r == 10);
      tr[r] = s;
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
