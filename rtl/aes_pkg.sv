// aes_pkg: types, constants and functions shared by the AES-128 core and its
// LUT based S-Boxes.
//
// The 128-bit AES state and round keys use the usual byte order: byte k
// (k = 0..15, column-major, k = 4*column + row) occupies bits [127-8k -: 8],
// so the first byte of a plaintext written as a hex string is the top byte.
//
// The 256-byte S-Box table is not read from a file: build_sbox_lut() fills it
// at elaboration time from the AES definition, S(x) = Affine(x^-1) over
// GF(2^8) with the polynomial x^8+x^4+x^3+x+1, where the inverse is computed
// as x^254 (0 maps to 0) and Affine(b) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3)
// ^ rotl(b,4) ^ 8'h63. The hardware never computes these functions at run
// time; they only produce the ROM contents and the round constants.
package aes_pkg;

  typedef logic [7:0] byte_t;
  // 256 LUT entries presented side by side; entry i (output Ai of the ROM) is lut[i].
  typedef byte_t [255:0] lut_t;

  // Multiplexing circuit used inside an S-Box.
  //  SBOX_ANDOR : 8-to-256 decoder, AND gates, 8-level tree of 2-input OR gates
  //  SBOX_MUX4  : 4 levels of 4-to-1 multiplexers
  typedef enum logic {SBOX_ANDOR = 1'b0, SBOX_MUX4 = 1'b1} sbox_arch_e;

  localparam int NR = 10;           // rounds of AES-128

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication, shift and add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254; gives 0 for 0.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    // 254 = 8'b1111_1110
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t affine(byte_t b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic lut_t build_sbox_lut();
    lut_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

  // Contents of the 256-byte LUT (ROM).
  localparam lut_t SBOX_LUT = build_sbox_lut();

  // Byte k of a 128-bit state.
  function automatic byte_t get_byte(logic [127:0] s, int k);
    return s[127-8*k -: 8];
  endfunction

  // ShiftRow: row r of the state rotates left by r columns.
  function automatic logic [127:0] shift_rows(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  // MixColumn on one 32-bit column (row 0 in bits 31:24).
  function automatic logic [31:0] mix_column(logic [31:0] col);
    byte_t a0 = col[31:24], a1 = col[23:16], a2 = col[15:8], a3 = col[7:0];
    byte_t b0 = xtime(a0), b1 = xtime(a1), b2 = xtime(a2), b3 = xtime(a3);
    return {b0 ^ b1 ^ a1 ^ a2 ^ a3,
            a0 ^ b1 ^ b2 ^ a2 ^ a3,
            a0 ^ a1 ^ b2 ^ b3 ^ a3,
            b0 ^ a0 ^ a1 ^ a2 ^ b3};
  endfunction

endpackage
