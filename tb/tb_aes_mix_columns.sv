// tb_aes_mix_columns: self-checking test of MixColumns and InvMixColumns.
// Uses published single-column examples (db 13 53 45 -> 8e 4d a1 bc and
// others), random states against the matrix reference model, and the round
// trip InvMixColumns(MixColumns(x)) == x.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] din, fwd, inv, back;
  int checks = 0, failures = 0;

  aes_mix_columns #(.INVERSE(1'b0)) dut_fwd  (.state_i(din), .state_o(fwd));
  aes_mix_columns #(.INVERSE(1'b1)) dut_inv  (.state_i(din), .state_o(inv));
  aes_mix_columns #(.INVERSE(1'b1)) dut_back (.state_i(fwd), .state_o(back));

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
    din = 128'hdb135345_f20a225c_d4d4d4d5_2d26314c;
    #1;
    check("known fwd", fwd, 128'h8e4da1bc_9fdc589d_d5d5d7d6_4d7ebdf8);
    din = 128'h8e4da1bc_9fdc589d_d5d5d7d6_4d7ebdf8;
    #1;
    check("known inv", inv, 128'hdb135345_f20a225c_d4d4d4d5_2d26314c);
    din = 128'h01010101_c6c6c6c6_00000000_ffffffff;
    #1;
    check("known fixed points", fwd, din);
    for (int k = 0; k < 100; k++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check("fwd", fwd, ref_mix_columns(din, 0));
      check("inv", inv, ref_mix_columns(din, 1));
      check("round trip", back, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
