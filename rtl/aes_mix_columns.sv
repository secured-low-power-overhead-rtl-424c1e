// aes_mix_columns: the AES MixColumn step on a full 128-bit state.
//
// Each of the four 32-bit columns is multiplied, over GF(2^8), by the fixed
// matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2]; multiplication by 2 is the
// shift-and-reduce xtime, by 3 is xtime plus the byte. Purely combinational.
// Column c occupies bits [127-32c -: 32], row 0 at the top of the column.
module aes_mix_columns
  import aes_pkg::*;
(
  input  logic [127:0] state_i,
  output logic [127:0] state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    assign state_o[127-32*c -: 32] = mix_column(state_i[127-32*c -: 32]);
  end

endmodule
