// aes_add_round_key: the AddRoundKey transformation of AES.
//
// The 128-bit state and the 128-bit round key are combined by bitwise XOR.
// The same block serves encryption and decryption, since XOR is its own
// inverse. Interface: state_i and round_key_i in, state_o out. Combinational,
// zero latency.
module aes_add_round_key
  import aes_pkg::*;
(
  input  state_t state_i,
  input  state_t round_key_i,
  output state_t state_o
);

  assign state_o = state_i ^ round_key_i;

endmodule
