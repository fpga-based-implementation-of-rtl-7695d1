// aes256_top: AES-256 encryption and decryption core.
//
// The core ties together the key schedule (aes_key_expansion), the round key
// store (aes_round_key_ram, 15 x 128 bits) and the iterative cipher
// (aes_cipher), so that one 128-bit block is encrypted or decrypted with a
// 256-bit key in 14 rounds, one round per clock.
// Use: pulse key_load_i with the cipher key on key_i while ready or idle; the
// 15 round keys are written in the next 15 cycles and key_ready_o then rises.
// While ready_o is high, a cycle with start_i high takes one block on data_i
// and the direction on mode_i (0 encrypt, 1 decrypt); 15 cycles later
// valid_o pulses with the result on data_o. start_i is ignored while ready_o
// is low; key_load_i is ignored while a block is being processed. One key
// serves any number of blocks, in either direction, until the next
// key_load_i. Reset is synchronous and active-low.
module aes256_top
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    key_load_i,
  input  key256_t key_i,
  output logic    key_ready_o,
  input  logic    start_i,
  input  mode_e   mode_i,
  input  state_t  data_i,
  output logic    ready_o,
  output logic    valid_o,
  output state_t  data_o
);

  logic     ke_busy, ke_valid, rk_we;
  rk_addr_t rk_waddr, rk_raddr;
  state_t   rk_wdata, rk_rdata;
  logic     cipher_ready, key_load_ok, start_ok;

  assign key_load_ok = key_load_i && cipher_ready;
  assign ready_o     = cipher_ready && ke_valid && !ke_busy;
  assign start_ok    = start_i && ready_o;
  assign key_ready_o = ke_valid;

  aes_key_expansion u_key_expansion (
    .clk        (clk),
    .rst_n      (rst_n),
    .key_load_i (key_load_ok),
    .key_i      (key_i),
    .busy_o     (ke_busy),
    .key_valid_o(ke_valid),
    .rk_we_o    (rk_we),
    .rk_waddr_o (rk_waddr),
    .rk_wdata_o (rk_wdata)
  );

  aes_round_key_ram #(.DEPTH(NUM_RKEYS), .WIDTH(128), .AW(RK_AW)) u_rk_ram (
    .clk    (clk),
    .we_i   (rk_we),
    .waddr_i(rk_waddr),
    .wdata_i(rk_wdata),
    .raddr_i(rk_raddr),
    .rdata_o(rk_rdata)
  );

  aes_cipher u_cipher (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_i  (start_ok),
    .mode_i   (mode_i),
    .data_i   (data_i),
    .ready_o  (cipher_ready),
    .rk_addr_o(rk_raddr),
    .rk_i     (rk_rdata),
    .valid_o  (valid_o),
    .data_o   (data_o)
  );

endmodule
