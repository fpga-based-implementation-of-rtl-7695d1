// aes_pkg: shared types, constants and GF(2^8) arithmetic for the AES-256 core.
//
// The 128-bit state is held as a flat vector in the byte order of the AES
// standard: byte n of the input block sits in bits [127-8n -: 8], and byte n
// is state row (n mod 4), column (n div 4). The helper functions give the
// field arithmetic used by SubBytes and MixColumns: multiplication modulo the
// AES polynomial x^8+x^4+x^3+x+1 (0x11B), multiplicative inverse computed as
// a^254, and the affine maps of the S-box. The S-box is computed from these
// functions rather than stored as a table. All functions are purely
// combinational. The number of rounds (Nr = 14) and of round keys (15) are
// those of AES-256, the variant this core implements.
package aes_pkg;

  localparam int unsigned NR = 14;         // rounds of AES-256
  localparam int unsigned NUM_RKEYS = NR + 1;
  localparam int unsigned RK_AW = 4;       // address width of the round key store

  typedef logic [127:0] state_t;
  typedef logic [255:0] key256_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;
  typedef logic [RK_AW-1:0] rk_addr_t;

  typedef enum logic {MODE_ENCRYPT = 1'b0, MODE_DECRYPT = 1'b1} mode_e;

  // Byte n (0..15) of a state vector.
  function automatic byte_t get_byte(state_t s, int unsigned n);
    return s[127 - 8*n -: 8];
  endfunction

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // General multiplication in GF(2^8), shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
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

  // Multiplicative inverse, a^254 (maps 0 to 0).
  function automatic byte_t gf_inv(byte_t a);
    byte_t a2, a3, a6, a12, a15, a30, a60, a120, a240, a252;
    a2   = gf_mul(a, a);
    a3   = gf_mul(a2, a);
    a6   = gf_mul(a3, a3);
    a12  = gf_mul(a6, a6);
    a15  = gf_mul(a12, a3);
    a30  = gf_mul(a15, a15);
    a60  = gf_mul(a30, a30);
    a120 = gf_mul(a60, a60);
    a240 = gf_mul(a120, a120);
    a252 = gf_mul(a240, a12);
    return gf_mul(a252, a2);
  endfunction

  // Forward S-box affine map: b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ c_i, c = 0x63.
  function automatic byte_t affine_fwd(byte_t a);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = a[i] ^ a[(i+4)%8] ^ a[(i+5)%8] ^ a[(i+6)%8] ^ a[(i+7)%8];
    return b ^ 8'h63;
  endfunction

  // Inverse affine map: b_i = a_(i+2) ^ a_(i+5) ^ a_(i+7) ^ d_i, d = 0x05.
  function automatic byte_t affine_inv(byte_t a);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = a[(i+2)%8] ^ a[(i+5)%8] ^ a[(i+7)%8];
    return b ^ 8'h05;
  endfunction

  function automatic byte_t sbox_fwd(byte_t a);
    return affine_fwd(gf_inv(a));
  endfunction

  function automatic byte_t sbox_inv(byte_t a);
    return gf_inv(affine_inv(a));
  endfunction

  // SubWord on a 32-bit key word.
  function automatic word_t sub_word(word_t w);
    return {sbox_fwd(w[31:24]), sbox_fwd(w[23:16]), sbox_fwd(w[15:8]), sbox_fwd(w[7:0])};
  endfunction

  // RotWord: [a0,a1,a2,a3] -> [a1,a2,a3,a0].
  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

endpackage
