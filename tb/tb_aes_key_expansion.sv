// tb_aes_key_expansion: self-checking test of the AES-256 key schedule.
// Loads keys, records every write to the round key port and compares the 15
// round keys with the word-by-word reference schedule and, for the example
// key of the standard, with its published words. Checks the timing: writes
// to addresses 0..14 on 15 consecutive cycles right after the load cycle,
// key_valid_o only after the last write. Also restarts the schedule with a
// second load while it is busy.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_load, busy, key_valid, we;
  logic [255:0] key;
  logic [3:0] waddr;
  logic [127:0] wdata;
  logic [127:0] got [15];
  logic [127:0] exp_rk [15];
  int checks = 0, failures = 0;

  aes_key_expansion dut (.clk(clk), .rst_n(rst_n), .key_load_i(key_load), .key_i(key),
                         .busy_o(busy), .key_valid_o(key_valid), .rk_we_o(we),
                         .rk_waddr_o(waddr), .rk_wdata_o(wdata));

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] g, logic [127:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  // Load a key and collect the writes; checks order and cycle count.
  task automatic run_key(logic [255:0] k);
    int cyc;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    cyc = 0;
    for (int i = 0; i < 15; i++) begin
      check("write enable", 128'(we), 128'(1));
      check("write address", 128'(waddr), 128'(i));
      check("valid low while busy", 128'(key_valid), 128'(0));
      got[i] = wdata;
      @(negedge clk);
      cyc++;
    end
    check("done after 15 cycles", {126'(0), busy, key_valid}, 128'b01);
    check("write cycles", 128'(cyc), 128'(15));
    ref_key_expand(k, exp_rk);
    for (int i = 0; i < 15; i++) check($sformatf("round key %0d", i), got[i], exp_rk[i]);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_load = 0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle after reset", {126'(0), busy, key_valid}, 128'b00);
    // Example key of the standard's key expansion appendix.
    run_key(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    check("w8..w11",  got[2],  128'h9ba354118e6925afa51a8b5f2067fcde);
    check("w56..w59", got[14], 128'hfe4890d1e6188d0b046df344706c631e);
    run_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    check("example key rk14", got[14], 128'h24fc79ccbf0979e9371ac23c6d68de36);
    for (int n = 0; n < 5; n++)
      run_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    // Restart while busy: load, wait 5 cycles, load again.
    @(negedge clk);
    key = '1; key_load = 1;
    @(negedge clk);
    key_load = 0;
    repeat (5) @(negedge clk);
    run_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
