// aes_cipher: iterative AES-256 encryption / decryption engine with its round
// controller.
//
// One 128-bit block is processed at a time, one round per clock, by a single
// state register fed from either the encryption round (aes_round) or the
// inverse round (aes_round, INVERSE = 1). The round keys come from an
// external store addressed through rk_addr_o and read combinationally on
// rk_i.
//   Encrypt: s = in ^ K0; rounds 1..13: s = MixColumns(ShiftRows(SubBytes(s))) ^ Kr;
//            round 14: s = ShiftRows(SubBytes(s)) ^ K14.
//   Decrypt: s = in ^ K14; rounds 13..1: s = InvMixColumns(InvSubBytes(InvShiftRows(s)) ^ Kr);
//            final: s = InvSubBytes(InvShiftRows(s)) ^ K0.
// Handshake: when ready_o is high, a cycle with start_i high takes data_i and
// mode_i (0 encrypt, 1 decrypt) and performs the initial AddRoundKey. The 14
// rounds follow in the next 14 cycles; valid_o pulses for one cycle with the
// result on data_o, 15 clock cycles after the start cycle, and data_o holds
// the result until the next start. ready_o is high again in the valid_o
// cycle. Reset is synchronous, active-low. The round count Nr = 14 is that of
// AES-256; the one-round-per-cycle structure is this design's choice.
module aes_cipher
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start_i,
  input  mode_e    mode_i,
  input  state_t   data_i,
  output logic     ready_o,
  output rk_addr_t rk_addr_o,
  input  state_t   rk_i,
  output logic     valid_o,
  output state_t   data_o
);

  typedef enum logic {S_IDLE, S_RUN} fsm_e;

  fsm_e     fsm_q;
  mode_e    mode_q;
  rk_addr_t round_q;     // round number 1..NR while running
  state_t   state_q;
  logic     valid_q;

  state_t   enc_out, dec_out, init_out;
  logic     last;

  assign last = (round_q == rk_addr_t'(NR));

  // Round key address: the initial key in IDLE, the current round's key while running.
  always_comb begin
    if (fsm_q == S_IDLE)
      rk_addr_o = (mode_i == MODE_ENCRYPT) ? rk_addr_t'(0) : rk_addr_t'(NR);
    else
      rk_addr_o = (mode_q == MODE_ENCRYPT) ? round_q : rk_addr_t'(NR) - round_q;
  end

  aes_add_round_key             u_init (.state_i(data_i),  .round_key_i(rk_i), .state_o(init_out));
  aes_round #(.INVERSE(1'b0))   u_enc  (.state_i(state_q), .round_key_i(rk_i), .last_i(last), .state_o(enc_out));
  aes_round #(.INVERSE(1'b1))   u_dec  (.state_i(state_q), .round_key_i(rk_i), .last_i(last), .state_o(dec_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm_q   <= S_IDLE;
      mode_q  <= MODE_ENCRYPT;
      round_q <= '0;
      state_q <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= 1'b0;
      unique case (fsm_q)
        S_IDLE: begin
          if (start_i) begin
            mode_q  <= mode_i;
            state_q <= init_out;
            round_q <= rk_addr_t'(1);
            fsm_q   <= S_RUN;
          end
        end
        S_RUN: begin
          state_q <= (mode_q == MODE_ENCRYPT) ? enc_out : dec_out;
          round_q <= round_q + 1'b1;
          if (last) begin
            fsm_q   <= S_IDLE;
            valid_q <= 1'b1;
          end
        end
        default: fsm_q <= S_IDLE;
      endcase
    end
  end

  assign ready_o = (fsm_q == S_IDLE);
  assign valid_o = valid_q;
  assign data_o  = state_q;

  a_rk_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(rk_addr_o) < int'(NUM_RKEYS));
  a_round_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    fsm_q == S_RUN |-> (round_q >= rk_addr_t'(1) && round_q <= rk_addr_t'(NR)));
  a_valid_only_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    valid_o |-> ready_o);

endmodule
