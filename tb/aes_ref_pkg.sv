// aes_ref_pkg: reference model of AES-256 used by the testbenches.
//
// Written independently of the RTL: the S-box is built by searching for each
// byte's field inverse and applying the affine map as rotations, the inverse
// S-box is found by searching the forward box, multiplication is done with
// the peasant algorithm, and the state is handled as a 4x4 byte matrix.
// The key schedule follows the word-by-word description of the AES standard
// (w[0..59]). The model is slow and only meant for simulation.
package aes_ref_pkg;

  typedef logic [7:0] u8;
  typedef u8 mat_t [4][4];   // [row][col]

  function automatic u8 ref_mul(u8 a, u8 b);
    u8 r = 0;
    u8 x = a;
    u8 y = b;
    while (y != 0) begin
      if (y[0]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1B) : (x << 1);
      y = y >> 1;
    end
    return r;
  endfunction

  function automatic u8 rotl8(u8 a, int n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic u8 ref_sbox(u8 a);
    u8 inv = 0;
    if (a != 0)
      for (int y = 1; y < 256; y++)
        if (ref_mul(a, u8'(y)) == 8'h01) inv = u8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic u8 ref_inv_sbox(u8 a);
    for (int y = 0; y < 256; y++)
      if (ref_sbox(u8'(y)) == a) return u8'(y);
    return 0;
  endfunction

  function automatic mat_t to_mat(logic [127:0] s);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        m[r][c] = s[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[127 - 8*(4*c + r) -: 8] = m[r][c];
    return s;
  endfunction

  // Table versions of the S-boxes, filled once by init_tables().
  u8 SBOX [256];
  u8 ISBOX [256];
  bit tables_ready = 0;

  function automatic void init_tables();
    if (tables_ready) return;
    for (int i = 0; i < 256; i++) SBOX[i] = ref_sbox(u8'(i));
    for (int i = 0; i < 256; i++) ISBOX[SBOX[i]] = u8'(i);
    tables_ready = 1;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] s, bit inv);
    logic [127:0] o;
    init_tables();
    for (int n = 0; n < 16; n++) o[8*n +: 8] = inv ? ISBOX[s[8*n +: 8]] : SBOX[s[8*n +: 8]];
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] s, bit inv);
    mat_t a = to_mat(s);
    mat_t b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) b[r][c] = a[r][(c + r) % 4];
        else      b[r][(c + r) % 4] = a[r][c];
    return from_mat(b);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] s, bit inv);
    u8 m [4][4];
    mat_t a = to_mat(s);
    mat_t b;
    if (!inv) m = '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
                    '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};
    else      m = '{'{8'h0e, 8'h0b, 8'h0d, 8'h09}, '{8'h09, 8'h0e, 8'h0b, 8'h0d},
                    '{8'h0d, 8'h09, 8'h0e, 8'h0b}, '{8'h0b, 8'h0d, 8'h09, 8'h0e}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b[r][c] = 0;
        for (int k = 0; k < 4; k++) b[r][c] ^= ref_mul(m[r][k], a[k][c]);
      end
    return from_mat(b);
  endfunction

  // Expanded key schedule, returned as 15 round keys.
  function automatic void ref_key_expand(logic [255:0] key, output logic [127:0] rk [15]);
    logic [31:0] w [60];
    logic [31:0] t;
    u8 rc = 8'h01;
    init_tables();
    for (int i = 0; i < 8; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SBOX[t[31:24]], SBOX[t[23:16]], SBOX[t[15:8]], SBOX[t[7:0]]};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end else if (i % 8 == 4) begin
        t = {SBOX[t[31:24]], SBOX[t[23:16]], SBOX[t[15:8]], SBOX[t[7:0]]};
      end
      w[i] = w[i-8] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [255:0] key, logic [127:0] pt);
    logic [127:0] rk [15];
    logic [127:0] s;
    ref_key_expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 14; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (r != 14) s = ref_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [255:0] key, logic [127:0] ct);
    logic [127:0] rk [15];
    logic [127:0] s;
    ref_key_expand(key, rk);
    s = ct ^ rk[14];
    for (int r = 13; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

endpackage
