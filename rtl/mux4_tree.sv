// mux4_tree: multiplexing circuit made of 4 cascaded levels of 4-to-1
// multiplexers, selecting one of 256 W-bit LUT entries.
//
// Level 1 has 64 multiplexers, each choosing among 4 neighbouring entries with
// sel[1:0]; level 2 has 16 choosing among level-1 outputs with sel[3:2];
// level 3 has 4 with sel[5:4]; level 4 is a single multiplexer using sel[7:6].
// This is the plain multiplexer alternative to andor_mux and is used when an
// S-Box is built with ARCH = SBOX_MUX4. Purely combinational. The four levels
// of 4-to-1 multiplexers follow the architecture; which select bits drive
// which level is this design's choice.
module mux4_tree #(
  parameter int W = 8
) (
  input  logic [255:0][W-1:0] data,
  input  logic [7:0]          sel,
  output logic [W-1:0]        y
);

  // lv1: 64 outputs, lv2: 16, lv3: 4
  logic [63:0][W-1:0] lv1;
  logic [15:0][W-1:0] lv2;
  logic [3:0][W-1:0]  lv3;

  for (genvar j = 0; j < 64; j++) begin : g_l1
    assign lv1[j] = data[4*j + int'(sel[1:0])];
  end
  for (genvar j = 0; j < 16; j++) begin : g_l2
    assign lv2[j] = lv1[4*j + int'(sel[3:2])];
  end
  for (genvar j = 0; j < 4; j++) begin : g_l3
    assign lv3[j] = lv2[4*j + int'(sel[5:4])];
  end
  assign y = lv3[sel[7:6]];

endmodule
