// tb_aes_sub_bytes: self-checking test of SubBytes and InvSubBytes.
// Drives all 256 byte values through every byte lane (16 vectors), plus
// random states, and compares both directions against the reference S-box
// of aes_ref_pkg. Also checks published S-box entries and the round trip
// InvSubBytes(SubBytes(x)) == x.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;

  logic [127:0] din, fwd, inv, back;
  int checks = 0, failures = 0;

  aes_sub_bytes #(.INVERSE(1'b0)) dut_fwd (.state_i(din), .state_o(fwd));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_inv (.state_i(din), .state_o(inv));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_back (.state_i(fwd), .state_o(back));

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
    init_tables();
    // Known entries: S(00)=63, S(01)=7c, S(53)=ed, S(ff)=16, S(10)=ca.
    din = {8'h00, 8'h01, 8'h53, 8'hff, 8'h10, {11{8'h00}}};
    #1;
    check("known fwd", fwd, {8'h63, 8'h7c, 8'hed, 8'h16, 8'hca, {11{8'h63}}});
    for (int v = 0; v < 16; v++) begin
      for (int n = 0; n < 16; n++) din[127 - 8*n -: 8] = 8'(16*v + n + v);
      #1;
      check("fwd", fwd, ref_sub_bytes(din, 0));
      check("inv", inv, ref_sub_bytes(din, 1));
      check("round trip", back, din);
    end
    for (int k = 0; k < 50; k++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check("fwd rand", fwd, ref_sub_bytes(din, 0));
      check("inv rand", inv, ref_sub_bytes(din, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
