// aes_key_expand: one step of the AES-128 key expansion.
//
// From round key i-1 (words w0..w3) and the round constant of round i it forms
// round key i: t = SubWord(RotWord(w3)) ^ {rcon, 24'h0}, then w0' = w0 ^ t,
// w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'. SubWord uses four instances
// of the same compensated LUT S-Box as the state, so the key schedule has the
// same protection; their complementary outputs come out on dummy_o.
// Purely combinational; the core registers the round key and applies this
// block once per round, so the schedule is computed on the fly.
module aes_key_expand
  import aes_pkg::*;
#(
  parameter sbox_arch_e ARCH       = SBOX_ANDOR,
  parameter bit         COMPENSATE = 1'b1
) (
  input  logic [127:0] key_i,
  input  byte_t        rcon,
  output logic [127:0] key_o,
  output logic [31:0]  dummy_o
);

  logic [31:0] w0, w1, w2, w3, rot, sub, t;

  assign {w0, w1, w2, w3} = key_i;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    lut_sbox #(.ARCH(ARCH), .COMPENSATE(COMPENSATE)) u_sbox (
      .x(rot[31-8*b -: 8]),
      .s(sub[31-8*b -: 8]),
      .d(dummy_o[31-8*b -: 8])
    );
  end

  assign t = sub ^ {rcon, 24'h0};

  logic [31:0] n0, n1, n2, n3;
  assign n0 = w0 ^ t;
  assign n1 = w1 ^ n0;
  assign n2 = w2 ^ n1;
  assign n3 = w3 ^ n2;
  assign key_o = {n0, n1, n2, n3};

endmodule
