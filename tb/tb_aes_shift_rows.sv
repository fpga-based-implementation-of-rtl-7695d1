// tb_aes_shift_rows: self-checking test of ShiftRows and InvShiftRows.
// Checks a state of distinct bytes against the permutation written out by
// hand, random states against the reference model, and the round trip.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] din, fwd, inv, back;
  int checks = 0, failures = 0;

  aes_shift_rows #(.INVERSE(1'b0)) dut_fwd  (.state_i(din), .state_o(fwd));
  aes_shift_rows #(.INVERSE(1'b1)) dut_inv  (.state_i(din), .state_o(inv));
  aes_shift_rows #(.INVERSE(1'b1)) dut_back (.state_i(fwd), .state_o(back));

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
    // Bytes 00..0f in input order; byte n is row n%4, column n/4.
    din = 128'h000102030405060708090a0b0c0d0e0f;
    #1;
    check("fixed fwd", fwd, 128'h00050a0f04090e03080d02070c01060b);
    check("fixed inv", inv, 128'h000d0a0704010e0b0805020f0c090603);
    for (int k = 0; k < 100; k++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check("fwd", fwd, ref_shift_rows(din, 0));
      check("inv", inv, ref_shift_rows(din, 1));
      check("round trip", back, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
