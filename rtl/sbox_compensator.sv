// sbox_compensator: the compensated complementary multiplexing circuit of the
// LUT S-Box.
//
// It is a second copy of the S-Box multiplexing circuit that works on
// complemented signals: its input k is the inverted LUT entry ~A(255-k) and
// its select is the inverted S-Box input ~x. It therefore picks
// ~A(255 - ~x) = ~A(x), so its dummy output D(x) is the bitwise complement of
// the S-Box output S(x). Whatever x is, the true and complementary circuits
// together carry the same number of ones and zeros, which evens out the
// switching power across input patterns. The LUT itself is shared and is not
// duplicated. Purely combinational.
//
// The inverted select, the inverted LUT entries wired in reverse order
// (entry 00 to position FF, FF to 00) and the reuse of the same multiplexing
// architecture follow the compensator this core is built on. ARCH picks the
// AND/OR circuit (default) or the 4-to-1 multiplexer tree.
module sbox_compensator
  import aes_pkg::*;
#(
  parameter sbox_arch_e ARCH = SBOX_ANDOR
) (
  input  lut_t  lut,
  input  byte_t x,
  output byte_t d
);

  (* keep = "true" *) lut_t  lut_n;  // inverted, reversed LUT entries
  (* keep = "true" *) byte_t x_n;    // inverted select

  assign x_n = ~x;
  for (genvar k = 0; k < 256; k++) begin : g_inv
    assign lut_n[k] = ~lut[255-k];
  end

  if (ARCH == SBOX_ANDOR) begin : g_andor
    logic [255:0] en_n;
    onehot_decoder #(.SEL_W(8)) u_dec (.sel(x_n), .onehot(en_n));
    andor_mux #(.N(256), .W(8)) u_mux (.data(lut_n), .en(en_n), .y(d));
  end else begin : g_mux4
    mux4_tree #(.W(8)) u_mux (.data(lut_n), .sel(x_n), .y(d));
  end

endmodule
