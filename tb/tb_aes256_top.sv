// tb_aes256_top: end-to-end test of the AES-256 core at its default size.
// Loads cipher keys through the key schedule, then encrypts and decrypts
// blocks and compares them with the standard's AES-256 examples and with the
// reference model. Measures the key schedule time (15 cycles) and the block
// latency (15 cycles). Exercises and counts each mechanism of the core: key
// loading, encryption, decryption, switching direction between back-to-back
// blocks, start ignored while a block is in flight or while the key schedule
// runs, and key loading ignored while a block is in flight. A mechanism that
// never happened counts as a failure.
module tb_aes256_top;
  import aes_ref_pkg::*;
  import aes_pkg::mode_e;
  import aes_pkg::MODE_ENCRYPT;
  import aes_pkg::MODE_DECRYPT;

  logic clk = 0, rst_n = 0;
  logic key_load, key_ready, start, ready, valid;
  logic [255:0] key, cur_key;
  mode_e mode, last_mode;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  int n_keyload = 0, n_enc = 0, n_dec = 0, n_switch = 0;
  int n_start_busy = 0, n_start_keying = 0, n_keyload_busy = 0;

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

  // Load a key; pokes start during the schedule, which must be ignored.
  task automatic load_key(logic [255:0] k);
    int cyc;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    cyc = 1;
    while (!ready) begin
      if (cyc == 3) begin
        start = 1; din = '1; mode = MODE_ENCRYPT;
        n_start_keying++;
      end else start = 0;
      @(negedge clk);
      cyc++;
      if (cyc > 40) break;
    end
    start = 0;
    check("key schedule cycles", 128'(cyc), 128'(16));
    check("key ready", 128'(key_ready), 128'(1));
    check("no output from ignored start", 128'(valid), 128'(0));
    cur_key = k;
    n_keyload++;
  endtask

  // One block; tries start and key_load while it is in flight.
  task automatic run(mode_e m, logic [127:0] d, logic [127:0] e, string what);
    int lat;
    @(negedge clk);
    check({what, " ready"}, 128'(ready), 128'(1));
    if (n_enc + n_dec > 0 && m != last_mode) n_switch++;
    last_mode = m;
    start = 1; mode = m; din = d;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!valid) begin
      start = 0; key_load = 0;
      if (lat == 3) begin
        start = 1; din = ~d;
        n_start_busy++;
      end
      if (lat == 6) begin
        key_load = 1; key = ~cur_key;
        n_keyload_busy++;
      end
      @(negedge clk);
      lat++;
      if (lat > 40) break;
    end
    start = 0; key_load = 0;
    check({what, " latency"}, 128'(lat), 128'(15));
    check(what, dout, e);
    if (m == MODE_ENCRYPT) n_enc++; else n_dec++;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] p, c;
    key_load = 0; start = 0; mode = MODE_ENCRYPT; last_mode = MODE_ENCRYPT;
    key = '0; din = '0; cur_key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("not ready without key", 128'({key_ready, ready}), 128'(0));
    load_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    run(MODE_ENCRYPT, 128'h00112233445566778899aabbccddeeff,
        128'h8ea2b7ca516745bfeafc49904b496089, "example encrypt");
    run(MODE_DECRYPT, 128'h8ea2b7ca516745bfeafc49904b496089,
        128'h00112233445566778899aabbccddeeff, "example decrypt");
    load_key(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    run(MODE_ENCRYPT, 128'h6bc1bee22e409f96e93d7e117393172a,
        128'hf3eed1bdb5d2a03c064b5a7e3db181f8, "second example encrypt");
    run(MODE_DECRYPT, 128'hf3eed1bdb5d2a03c064b5a7e3db181f8,
        128'h6bc1bee22e409f96e93d7e117393172a, "second example decrypt");
    for (int k = 0; k < 4; k++) begin
      load_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      for (int n = 0; n < 4; n++) begin
        p = {$urandom, $urandom, $urandom, $urandom};
        c = ref_encrypt(cur_key, p);
        if ($urandom_range(0, 1) == 0) begin
          run(MODE_ENCRYPT, p, c, "random encrypt");
          run(MODE_DECRYPT, c, p, "random decrypt");
        end else begin
          run(MODE_DECRYPT, c, p, "random decrypt");
          run(MODE_ENCRYPT, p, c, "random encrypt");
        end
      end
    end
    $display("mechanisms: key loads=%0d encrypt=%0d decrypt=%0d direction switches=%0d",
             n_keyload, n_enc, n_dec, n_switch);
    $display("ignored: start while busy=%0d start while keying=%0d key load while busy=%0d",
             n_start_busy, n_start_keying, n_keyload_busy);
    if (n_keyload == 0 || n_enc == 0 || n_dec == 0 || n_switch == 0 ||
        n_start_busy == 0 || n_start_keying == 0 || n_keyload_busy == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
