// aes_ref_pkg: software reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is built by searching for the
// multiplicative inverse and applying the affine map in its rotate-and-XOR
// form, the inverse S-box by searching the S-box, MixColumns by general
// GF(2^8) multiplication with the matrix coefficients, and the key schedule
// is expanded in full (44 words) as in the AES standard.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;

  function automatic u8 mul(u8 a, u8 b);
    u8 p = 0;
    u8 aa = a;
    u8 bb = b;
    while (bb != 0) begin
      if (bb[0]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1b) : (aa << 1);
      bb = bb >> 1;
    end
    return p;
  endfunction

  function automatic u8 rotl(u8 x, int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic u8 sbox(u8 x);
    u8 inv = 0;
    for (int b = 1; b < 256; b++) if (mul(x, u8'(b)) == 8'h01) inv = u8'(b);
    return inv ^ rotl(inv, 1) ^ rotl(inv, 2) ^ rotl(inv, 3) ^ rotl(inv, 4) ^ 8'h63;
  endfunction

  u8 SB  [256];
  u8 ISB [256];
  bit tables_ready = 0;

  function automatic void init_tables();
    if (tables_ready) return;
    for (int i = 0; i < 256; i++) SB[i] = sbox(u8'(i));
    for (int i = 0; i < 256; i++) ISB[SB[i]] = u8'(i);
    tables_ready = 1;
  endfunction

  // state as s[r][c] from a block (byte r+4c)
  typedef u8 st_t [4][4];

  function automatic st_t to_st(u128 b);
    st_t s;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = b[127-8*(r+4*c) -: 8];
    return s;
  endfunction

  function automatic u128 from_st(st_t s);
    u128 b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127-8*(r+4*c) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic u128 shift_rows(u128 b, bit inv);
    st_t s = to_st(b);
    st_t t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) t[r][c] = s[r][(c + r) % 4];
        else      t[r][(c + r) % 4] = s[r][c];
    return from_st(t);
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] w, bit inv);
    u8 m [4][4];
    u8 a [4];
    u8 o [4];
    u8 fwd [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    u8 bwd [4] = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    for (int i = 0; i < 4; i++) a[i] = w[31-8*i -: 8];
    for (int r = 0; r < 4; r++) begin
      o[r] = 0;
      for (int c = 0; c < 4; c++) o[r] ^= mul(inv ? bwd[(c - r + 4) % 4] : fwd[(c - r + 4) % 4], a[c]);
    end
    return {o[0], o[1], o[2], o[3]};
  endfunction

  function automatic u128 mix_cols(u128 b, bit inv);
    u128 o;
    for (int c = 0; c < 4; c++) o[127-32*c -: 32] = mix_col(b[127-32*c -: 32], inv);
    return o;
  endfunction

  function automatic u128 sub_bytes(u128 b, bit inv);
    u128 o;
    init_tables();
    for (int k = 0; k < 16; k++) o[127-8*k -: 8] = inv ? ISB[b[127-8*k -: 8]] : SB[b[127-8*k -: 8]];
    return o;
  endfunction

  typedef u128 rk_t [11];

  function automatic rk_t expand(u128 key);
    logic [31:0] w [44];
    logic [31:0] t;
    u8 rc = 8'h01;
    rk_t rk;
    init_tables();
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic u128 encrypt(u128 pt, u128 key);
    rk_t rk = expand(key);
    u128 s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_cols(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic u128 decrypt(u128 ct, u128 key);
    rk_t rk = expand(key);
    u128 s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix_cols(s, 1);
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Known-answer vectors of the AES standard (FIPS-197 appendices B and C.1)
  localparam u128 KAT_KEY0 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam u128 KAT_PT0  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam u128 KAT_CT0  = 128'h3925841d02dc09fbdc118597196a0b32;
  localparam u128 KAT_KEY1 = 128'h000102030405060708090a0b0c0d0e0f;
  localparam u128 KAT_PT1  = 128'h00112233445566778899aabbccddeeff;
  localparam u128 KAT_CT1  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

endpackage
