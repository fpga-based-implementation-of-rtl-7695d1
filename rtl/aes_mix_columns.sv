// aes_mix_columns: the MixColumns transformation of AES (InvMixColumns when
// INVERSE = 1).
//
// Each state column is taken as a polynomial over GF(2^8) and multiplied
// modulo x^4 + 1 by the fixed polynomial {03}x^3+{01}x^2+{01}x+{02}, or by its
// inverse {0b}x^3+{0d}x^2+{09}x+{0e} for decryption. In matrix form each
// output byte is a circulant combination of the four column bytes. The
// constant multiplications are built from xtime (multiply by x), so every
// product is a few XOR gates. Interface: state_i in, state_o out, AES byte
// order. Combinational, zero latency.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t state_i,
  output state_t state_o
);

  // Multiply by a constant as sums of x^k multiples.
  function automatic byte_t mul_const(byte_t a, logic [3:0] k);
    byte_t x1, x2, x3;
    x1 = xtime(a);
    x2 = xtime(x1);
    x3 = xtime(x2);
    return (k[0] ? a : 8'h00) ^ (k[1] ? x1 : 8'h00) ^ (k[2] ? x2 : 8'h00) ^ (k[3] ? x3 : 8'h00);
  endfunction

  localparam logic [3:0] K0 = INVERSE ? 4'hE : 4'h2;
  localparam logic [3:0] K1 = INVERSE ? 4'hB : 4'h3;
  localparam logic [3:0] K2 = INVERSE ? 4'hD : 4'h1;
  localparam logic [3:0] K3 = INVERSE ? 4'h9 : 4'h1;

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    for (genvar r = 0; r < 4; r++) begin : g_in
      assign a[r] = state_i[127 - 8*(4*c + r) -: 8];
    end
    for (genvar r = 0; r < 4; r++) begin : g_out
      assign state_o[127 - 8*(4*c + r) -: 8] = mul_const(a[r], K0) ^ mul_const(a[(r+1)%4], K1)
                                             ^ mul_const(a[(r+2)%4], K2) ^ mul_const(a[(r+3)%4], K3);
    end
  end

endmodule
