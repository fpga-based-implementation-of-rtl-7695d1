// tb_aes_add_round_key: self-checking test of AddRoundKey.
// Checks random state/key pairs against the XOR worked out in the testbench,
// the identity with a zero key and the self-cancelling property.
module tb_aes_add_round_key;
  logic [127:0] s, k, o, o2;
  int checks = 0, failures = 0;

  aes_add_round_key dut  (.state_i(s), .round_key_i(k), .state_o(o));
  aes_add_round_key dut2 (.state_i(o), .round_key_i(k), .state_o(o2));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 128'h00112233445566778899aabbccddeeff;
    k = 128'h000102030405060708090a0b0c0d0e0f;
    #1;
    check("known", o, 128'h00102030405060708090a0b0c0d0e0f0);
    for (int n = 0; n < 100; n++) begin
      logic [127:0] e;
      s = {$urandom, $urandom, $urandom, $urandom};
      k = (n % 10 == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) e[b] = (s[b] != k[b]);
      #1;
      check("xor", o, e);
      check("cancel", o2, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
