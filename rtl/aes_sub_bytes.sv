// aes_sub_bytes: the SubBytes transformation of AES (InvSubBytes when
// INVERSE = 1).
//
// Each of the 16 state bytes is passed independently through its own S-box
// instance (aes_sbox), so the whole 128-bit state is substituted in one
// combinational pass. Sixteen parallel boxes are this design's choice for a
// one-round-per-clock datapath. Interface: state_i in, state_o out, both in
// the AES byte order of aes_pkg. No clock; zero cycles of latency.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t state_i,
  output state_t state_o
);

  for (genvar n = 0; n < 16; n++) begin : g_box
    aes_sbox #(.INVERSE(INVERSE)) u_sbox (
      .in_i (state_i[127-8*n -: 8]),
      .out_o(state_o[127-8*n -: 8])
    );
  end

endmodule
