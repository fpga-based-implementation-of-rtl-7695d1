// aes_key_expansion: sequential AES-256 key schedule.
//
// A pulse on key_load_i captures the 256-bit cipher key. The unit then
// produces the 15 round keys of AES-256, one 128-bit round key per clock, and
// writes them through a simple write port (rk_we_o, rk_waddr_o, rk_wdata_o)
// into the round key store. Round keys 0 and 1 are the two halves of the
// cipher key. Every further round key is four new schedule words computed
// from a sliding 256-bit window holding the previous eight words
// w[i-8..i-1]:
//   even round key index: temp = SubWord(RotWord(w[i-1])) ^ (Rcon << 24)
//   odd  round key index: temp = SubWord(w[i-1])
//   w[i] = w[i-8] ^ temp, w[i+1] = w[i-7] ^ w[i], ... (chained XOR).
// Rcon starts at 0x01 and is doubled in GF(2^8) after every even step.
// Timing: the cycle after key_load_i, busy_o is high for 15 cycles (one write
// per cycle, addresses 0..14); key_valid_o rises when the last key is written
// and stays high until the next key_load_i. A key_load_i while busy restarts
// the schedule. Reset is active-low and synchronous to clk.
// Producing one round key per cycle from a 256-bit window is this design's
// own choice.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     key_load_i,
  input  key256_t  key_i,
  output logic     busy_o,
  output logic     key_valid_o,
  output logic     rk_we_o,
  output rk_addr_t rk_waddr_o,
  output state_t   rk_wdata_o
);

  key256_t  win_q;
  rk_addr_t idx_q;
  byte_t    rcon_q;
  logic     busy_q, valid_q;

  word_t    w [8];
  word_t    temp;
  word_t    n0, n1, n2, n3;

  always_comb begin
    for (int k = 0; k < 8; k++) w[k] = win_q[255 - 32*k -: 32];
    if (!idx_q[0]) temp = sub_word(rot_word(w[7])) ^ {rcon_q, 24'h0};
    else           temp = sub_word(w[7]);
    n0 = w[0] ^ temp;
    n1 = w[1] ^ n0;
    n2 = w[2] ^ n1;
    n3 = w[3] ^ n2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_q   <= '0;
      idx_q   <= '0;
      rcon_q  <= 8'h01;
      busy_q  <= 1'b0;
      valid_q <= 1'b0;
    end else if (key_load_i) begin
      win_q   <= key_i;
      idx_q   <= '0;
      rcon_q  <= 8'h01;
      busy_q  <= 1'b1;
      valid_q <= 1'b0;
    end else if (busy_q) begin
      if (idx_q >= rk_addr_t'(2)) begin
        win_q <= {w[4], w[5], w[6], w[7], n0, n1, n2, n3};
        if (!idx_q[0]) rcon_q <= xtime(rcon_q);
      end
      if (idx_q == rk_addr_t'(NR)) begin
        busy_q  <= 1'b0;
        valid_q <= 1'b1;
      end else begin
        idx_q <= idx_q + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (idx_q)
      rk_addr_t'(0): rk_wdata_o = win_q[255:128];
      rk_addr_t'(1): rk_wdata_o = win_q[127:0];
      default:       rk_wdata_o = {n0, n1, n2, n3};
    endcase
  end

  assign rk_we_o     = busy_q;
  assign rk_waddr_o  = idx_q;
  assign busy_o      = busy_q;
  assign key_valid_o = valid_q;

endmodule
