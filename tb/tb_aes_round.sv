// tb_aes_round: self-checking test of one encryption round and one inverse
// round, in both the normal and the final (no MixColumns) form. Expected
// values are composed from the reference transformations of aes_ref_pkg.
// Also checks the first round of the AES-256 example of the standard.
module tb_aes_round;
  import aes_ref_pkg::*;

  logic [127:0] s, k, enc, dec;
  logic last;
  int checks = 0, failures = 0;

  aes_round #(.INVERSE(1'b0)) dut_enc (.state_i(s), .round_key_i(k), .last_i(last), .state_o(enc));
  aes_round #(.INVERSE(1'b1)) dut_dec (.state_i(s), .round_key_i(k), .last_i(last), .state_o(dec));

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
    logic [127:0] e;
    init_tables();
    // Round 1 of the AES-256 example: start 00102030..., key 10111213...
    s = 128'h00102030405060708090a0b0c0d0e0f0;
    k = 128'h101112131415161718191a1b1c1d1e1f;
    last = 1'b0;
    #1;
    check("example round 1", enc, 128'h4f63760643e0aa85efa7213201a4e705);
    for (int n = 0; n < 100; n++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      last = n[0];
      #1;
      e = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (!last) e = ref_mix_columns(e, 0);
      check(last ? "enc last" : "enc", enc, e ^ k);
      e = ref_sub_bytes(ref_shift_rows(s, 1), 1) ^ k;
      if (!last) e = ref_mix_columns(e, 1);
      check(last ? "dec last" : "dec", dec, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
