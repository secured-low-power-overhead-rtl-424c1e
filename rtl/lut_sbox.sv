// lut_sbox: LUT based AES S-Box with a compensator.
//
// A 256-byte ROM holds S(x) for every byte x and presents all 256 entries
// (A0..A255) in parallel. The multiplexing circuit picks entry x: with the
// default ARCH = SBOX_ANDOR an 8-to-256 decoder enables one group of AND gates
// and an 8-level tree of 2-input OR gates collects the result; with
// SBOX_MUX4 four levels of 4-to-1 multiplexers do it. With COMPENSATE = 1 a
// complementary copy of the multiplexing circuit (sbox_compensator) runs on
// the inverted LUT entries and the inverted input and drives the dummy output
// d = ~S(x); only the multiplexing circuits are compensated, not the ROM.
// With COMPENSATE = 0 the compensator is left out and d is 0.
//
// Purely combinational: s and d follow x in the same cycle. The ROM contents
// come from aes_pkg::SBOX_LUT, computed at elaboration. The structure (ROM,
// decoder, AND/OR tree, complementary compensator) follows the architecture
// this core implements; the parameter names and the dummy output port are
// this design's own.
module lut_sbox
  import aes_pkg::*;
#(
  parameter sbox_arch_e ARCH       = SBOX_ANDOR,
  parameter bit         COMPENSATE = 1'b1
) (
  input  byte_t x,
  output byte_t s,
  output byte_t d
);

  // 256 Byte LUT (ROM)
  (* keep = "true" *) lut_t lut;
  assign lut = SBOX_LUT;

  // Multiplexing circuit
  if (ARCH == SBOX_ANDOR) begin : g_andor
    logic [255:0] en;
    onehot_decoder #(.SEL_W(8)) u_dec (.sel(x), .onehot(en));
    andor_mux #(.N(256), .W(8)) u_mux (.data(lut), .en(en), .y(s));
  end else begin : g_mux4
    mux4_tree #(.W(8)) u_mux (.data(lut), .sel(x), .y(s));
  end

  // Compensator
  if (COMPENSATE) begin : g_comp
    sbox_compensator #(.ARCH(ARCH)) u_comp (.lut(lut), .x(x), .d(d));
  end else begin : g_nocomp
    assign d = '0;
  end

endmodule
