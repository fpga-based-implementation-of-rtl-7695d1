// aes_shift_rows: the ShiftRows transformation of AES (InvShiftRows when
// INVERSE = 1).
//
// Row r of the state is rotated cyclically by r byte positions: to the left
// for encryption (out[r][c] = in[r][(c+r) mod 4]) and to the right for
// decryption (out[r][c] = in[r][(c-r) mod 4]). Row 0 is unchanged. It is pure
// wiring. Interface: state_i in, state_o out, AES byte order (byte n is row
// n mod 4, column n div 4). Combinational, zero latency.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t state_i,
  output state_t state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int SRC_C = INVERSE ? ((c - r + 4) % 4) : ((c + r) % 4);
      assign state_o[127 - 8*(4*c + r) -: 8] = state_i[127 - 8*(4*SRC_C + r) -: 8];
    end
  end

endmodule
