// tb_aes_cipher: self-checking test of the iterative AES-256 engine.
// A testbench array holds the reference round keys and answers the engine's
// round key address combinationally, as the round key store does. Checks
// the standard's AES-256 example in both directions, random blocks against
// the reference model, the 15-cycle latency from start to valid, the ready
// signal, that start is ignored while a block is in flight, and
// back-to-back blocks that switch direction.
module tb_aes_cipher;
  import aes_ref_pkg::*;
  import aes_pkg::mode_e;
  import aes_pkg::MODE_ENCRYPT;
  import aes_pkg::MODE_DECRYPT;

  logic clk = 0, rst_n = 0;
  logic start, ready, valid;
  mode_e mode;
  logic [127:0] din, dout, rk_data;
  logic [3:0] rk_addr;
  logic [127:0] rk [15];
  logic [255:0] key;
  int checks = 0, failures = 0;

  aes_cipher dut (.clk(clk), .rst_n(rst_n), .start_i(start), .mode_i(mode), .data_i(din),
                  .ready_o(ready), .rk_addr_o(rk_addr), .rk_i(rk_data), .valid_o(valid),
                  .data_o(dout));

  assign rk_data = (rk_addr < 15) ? rk[rk_addr] : '0;

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] g, logic [127:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  task automatic set_key(logic [255:0] k);
    key = k;
    ref_key_expand(k, rk);
  endtask

  // Run one block; poke start again while busy to check that it is ignored.
  task automatic run(mode_e m, logic [127:0] d, logic [127:0] e, string what);
    int lat;
    @(negedge clk);
    check({what, " ready before start"}, 128'(ready), 128'(1));
    start = 1; mode = m; din = d;
    @(negedge clk);
    start = 0;
    lat = 1;
    check({what, " busy after start"}, 128'(ready), 128'(0));
    while (!valid) begin
      if (lat == 4) begin
        start = 1; din = ~d; mode = (m == MODE_ENCRYPT) ? MODE_DECRYPT : MODE_ENCRYPT;
      end else start = 0;
      @(negedge clk);
      lat++;
      if (lat > 40) break;
    end
    start = 0;
    check({what, " latency"}, 128'(lat), 128'(15));
    check({what, " ready with valid"}, 128'(ready), 128'(1));
    check(what, dout, e);
    @(negedge clk);
    check({what, " valid is a pulse"}, 128'(valid), 128'(0));
    check({what, " result held"}, dout, e);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] p, c;
    start = 0; mode = MODE_ENCRYPT; din = '0;
    set_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(MODE_ENCRYPT, 128'h00112233445566778899aabbccddeeff,
        128'h8ea2b7ca516745bfeafc49904b496089, "example encrypt");
    run(MODE_DECRYPT, 128'h8ea2b7ca516745bfeafc49904b496089,
        128'h00112233445566778899aabbccddeeff, "example decrypt");
    set_key(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    run(MODE_ENCRYPT, 128'h6bc1bee22e409f96e93d7e117393172a,
        128'hf3eed1bdb5d2a03c064b5a7e3db181f8, "second example encrypt");
    for (int n = 0; n < 6; n++) begin
      set_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      p = {$urandom, $urandom, $urandom, $urandom};
      c = ref_encrypt(key, p);
      run(MODE_ENCRYPT, p, c, "random encrypt");
      run(MODE_DECRYPT, c, p, "random decrypt");
      check("reference round trip", ref_decrypt(key, c), p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
