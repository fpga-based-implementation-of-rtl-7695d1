// aes_sbox: one AES S-box (or inverse S-box) lookup for a single byte.
//
// The forward S-box is the multiplicative inverse in GF(2^8) (0 maps to 0)
// followed by the affine map with constant 0x63; the inverse S-box applies the
// inverse affine map first and then the field inverse. Both are computed by
// the functions of aes_pkg, so the 256-entry table is generated by logic
// instead of being listed. INVERSE = 0 selects the forward box, 1 the inverse.
// Purely combinational, no clock.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t in_i,
  output byte_t out_o
);

  always_comb begin
    if (INVERSE) out_o = sbox_inv(in_i);
    else         out_o = sbox_fwd(in_i);
  end

endmodule
