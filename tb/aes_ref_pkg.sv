// aes_ref_pkg: a plain software model of AES-128 (FIPS-197) used by the
// testbenches as the reference.
//
// It shares no code with the design: GF(2^8) products are shift-and-add
// modulo x^8+x^4+x^3+x+1, the inverse is a^254 by repeated multiplication,
// the S-box affine step is the bitwise FIPS-197 form and the inverse S-box
// is found by searching the forward one. The round functions work on whole
// 16-byte states.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [31:0]  u32;
  typedef logic [127:0] u128;

  function automatic u8 gmul(input u8 a, input u8 b);
    u8 r = 0;
    u8 x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return r;
  endfunction

  function automatic u8 ginv(input u8 a);
    u8 r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return (a == 0) ? 8'h00 : r;
  endfunction

  function automatic u8 sbox(input u8 a);
    u8 b = ginv(a);
    u8 c = 8'h63;
    u8 s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return s;
  endfunction

  function automatic u8 inv_sbox(input u8 s);
    for (int a = 0; a < 256; a++) if (sbox(u8'(a)) == s) return u8'(a);
    return 8'h00;
  endfunction

  // state byte k = row k%4, column k/4; byte 0 is bits [127:120]
  function automatic u8 sb(input u128 s, input int k);
    return s[127 - 8*k -: 8];
  endfunction

  function automatic u128 sub_bytes(input u128 s, input bit inv);
    u128 r;
    for (int k = 0; k < 16; k++) r[127 - 8*k -: 8] = inv ? inv_sbox(sb(s, k)) : sbox(sb(s, k));
    return r;
  endfunction

  function automatic u128 shift_rows(input u128 s, input bit inv);
    u128 r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = sb(s, 4*((inv ? c - row + 4 : c + row) % 4) + row);
    return r;
  endfunction

  function automatic u32 mix_col(input u32 w, input bit inv);
    u8 a [4];
    u8 m [4];
    u8 y [4];
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int i = 0; i < 4; i++) a[i] = w[31 - 8*i -: 8];
    for (int r = 0; r < 4; r++) begin
      y[r] = 0;
      for (int j = 0; j < 4; j++) y[r] ^= gmul(m[(j - r + 4) % 4], a[j]);
    end
    return {y[0], y[1], y[2], y[3]};
  endfunction

  function automatic u128 mix_columns(input u128 s, input bit inv);
    u128 r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = mix_col(s[127 - 32*c -: 32], inv);
    return r;
  endfunction

  // round keys 0..10 of a 128-bit key
  function automatic void expand_key(input u128 key, output u128 rk [11]);
    u32 w [44];
    u8  rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      u32 t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rcon, 24'h0};
        rcon = gmul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic u128 encrypt(input u128 key, input u128 pt);
    u128 rk [11];
    u128 s;
    expand_key(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic u128 decrypt(input u128 key, input u128 ct);
    u128 rk [11];
    u128 s;
    expand_key(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
