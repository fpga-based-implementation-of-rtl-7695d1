// aes_round: one complete AES round, combinational.
//
// Encryption (INVERSE = 0): SubBytes, ShiftRows, MixColumns, AddRoundKey, with
// MixColumns bypassed when last_i is high (the final round). Decryption
// (INVERSE = 1) uses the straightforward inverse cipher order: InvShiftRows,
// InvSubBytes, AddRoundKey, InvMixColumns, with InvMixColumns bypassed in the
// final round. The round is combinational so that the iterative cipher can
// compute one round per clock. Interface: state_i, round_key_i, last_i in;
// state_o out. Zero latency.
module aes_round
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t state_i,
  input  state_t round_key_i,
  input  logic   last_i,
  output state_t state_o
);

  if (!INVERSE) begin : g_enc
    state_t sb, sr, mc, pre;
    aes_sub_bytes     #(.INVERSE(1'b0)) u_sb  (.state_i(state_i), .state_o(sb));
    aes_shift_rows    #(.INVERSE(1'b0)) u_sr  (.state_i(sb),      .state_o(sr));
    aes_mix_columns   #(.INVERSE(1'b0)) u_mc  (.state_i(sr),      .state_o(mc));
    assign pre = last_i ? sr : mc;
    aes_add_round_key                   u_ark (.state_i(pre), .round_key_i(round_key_i), .state_o(state_o));
  end else begin : g_dec
    state_t isr, isb, ark, imc;
    aes_shift_rows    #(.INVERSE(1'b1)) u_isr (.state_i(state_i), .state_o(isr));
    aes_sub_bytes     #(.INVERSE(1'b1)) u_isb (.state_i(isr),     .state_o(isb));
    aes_add_round_key                   u_ark (.state_i(isb), .round_key_i(round_key_i), .state_o(ark));
    aes_mix_columns   #(.INVERSE(1'b1)) u_imc (.state_i(ark),     .state_o(imc));
    assign state_o = last_i ? ark : imc;
  end

endmodule
