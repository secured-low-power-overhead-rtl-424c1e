// aes_round: one AES encryption round on a 128-bit state.
//
// SubBytes runs all 16 state bytes through compensated LUT S-Boxes in
// parallel, ShiftRow rotates row r left by r columns, MixColumn mixes each
// column (skipped when final_round is high, as in the last AES round) and
// AddRoundKey XORs the round key. The 16 complementary S-Box outputs are
// brought out on dummy_o, byte k belonging to state byte k. Purely
// combinational; the core applies it once per clock.
module aes_round
  import aes_pkg::*;
#(
  parameter sbox_arch_e ARCH       = SBOX_ANDOR,
  parameter bit         COMPENSATE = 1'b1
) (
  input  logic [127:0] state_i,
  input  logic [127:0] round_key,
  input  logic         final_round,
  output logic [127:0] state_o,
  output logic [127:0] dummy_o
);

  logic [127:0] sub, shifted, mixed, pre_key;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    lut_sbox #(.ARCH(ARCH), .COMPENSATE(COMPENSATE)) u_sbox (
      .x(state_i[127-8*k -: 8]),
      .s(sub[127-8*k -: 8]),
      .d(dummy_o[127-8*k -: 8])
    );
  end

  assign shifted = shift_rows(sub);

  aes_mix_columns u_mix (.state_i(shifted), .state_o(mixed));

  assign pre_key = final_round ? shifted : mixed;
  assign state_o = pre_key ^ round_key;

endmodule
