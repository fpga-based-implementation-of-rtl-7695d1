// tb_aes256_text: text workload for the AES-256 core.
// An ASCII message is cut into 16-character blocks, column by column as the
// standard lays bytes into the state, the last block padded by repeating the
// pad length byte. Every block is encrypted (ECB, block by block) and
// compared with the reference model, then the ciphertext is decrypted and the
// recovered text compared with the original. Blocks are issued back to back
// the moment ready_o allows, so the test also checks the sustained rate of
// one block per 15 clock cycles.
module tb_aes256_text;
  import aes_ref_pkg::*;
  import aes_pkg::mode_e;
  import aes_pkg::MODE_ENCRYPT;
  import aes_pkg::MODE_DECRYPT;

  localparam string MSG = "Encryption and decryption of a plaintext with a 256-bit AES key, one 16-byte block at a time.";
  localparam int NBLK = (MSG.len() / 16) + 1;

  logic clk = 0, rst_n = 0;
  logic key_load, key_ready, start, ready, valid;
  logic [255:0] key;
  mode_e mode;
  logic [127:0] din, dout;
  logic [127:0] pt [NBLK];
  logic [127:0] ct [NBLK];
  logic [127:0] rt [NBLK];
  int checks = 0, failures = 0;

  aes256_top dut (.clk(clk), .rst_n(rst_n), .key_load_i(key_load), .key_i(key),
                  .key_ready_o(key_ready), .start_i(start), .mode_i(mode), .data_i(din),
                  .ready_o(ready), .valid_o(valid), .data_o(dout));

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] g, logic [127:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  // Stream all blocks through the core in one direction; returns the cycle count.
  task automatic stream(mode_e m, input logic [127:0] src [NBLK], output logic [127:0] dst [NBLK],
                        output int cycles);
    int issued = 0, done = 0;
    cycles = 0;
    while (done < NBLK) begin
      @(negedge clk);
      if (valid) begin
        dst[done] = dout;
        done++;
      end
      start = 0;
      if (ready && issued < NBLK) begin
        start = 1; mode = m; din = src[issued];
        issued++;
      end
      cycles++;
      if (cycles > 40 * NBLK) break;
    end
    start = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc_enc, cyc_dec, pad;
    string txt;
    // Pad to whole blocks: each pad byte holds the number of pad bytes.
    pad = 16 * NBLK - MSG.len();
    for (int i = 0; i < 16 * NBLK; i++) begin
      logic [7:0] ch;
      ch = (i < MSG.len()) ? MSG[i] : 8'(pad);
      pt[i / 16][127 - 8 * (i % 16) -: 8] = ch;
    end
    key = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
    key_load = 0; start = 0; mode = MODE_ENCRYPT; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    key_load = 1;
    @(negedge clk);
    key_load = 0;
    wait (ready);
    stream(MODE_ENCRYPT, pt, ct, cyc_enc);
    for (int b = 0; b < NBLK; b++) check($sformatf("ciphertext block %0d", b), ct[b], ref_encrypt(key, pt[b]));
    stream(MODE_DECRYPT, ct, rt, cyc_dec);
    for (int b = 0; b < NBLK; b++) check($sformatf("recovered block %0d", b), rt[b], pt[b]);
    txt = "";
    for (int i = 0; i < MSG.len(); i++) txt = {txt, string'(rt[i / 16][127 - 8 * (i % 16) -: 8])};
    checks++;
    if (txt != MSG) begin
      failures++;
      $display("FAIL recovered text: %s", txt);
    end
    $display("%0d blocks: encrypt %0d cycles, decrypt %0d cycles", NBLK, cyc_enc, cyc_dec);
    // Back to back: 15 cycles per block plus one cycle to see the last result.
    check("encrypt cycles", 128'(cyc_enc), 128'(15 * NBLK + 1));
    check("decrypt cycles", 128'(cyc_dec), 128'(15 * NBLK + 1));
    $display("recovered: %s", txt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
