// aes_ref_pkg: reference AES-128 model for the testbenches.
//
// It is written independently of the RTL package: the S-Box inverse is found
// by searching for the byte b with a*b = 1 in GF(2^8) (polynomial 0x11b), the
// affine map is applied bit by bit, s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^
// b_(i+7) ^ c_i with c = 0x63, and the state is handled as an unpacked
// array of 16 bytes rather than as a packed vector. Byte k of a 128-bit value
// is bits [127-8k -: 8].
package aes_ref_pkg;

  typedef logic [7:0] u8;
  typedef u8 blk_t [16];

  function automatic u8 ref_mul(u8 a, u8 b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic u8 ref_sbox(u8 a);
    u8 inv = 8'h00;
    u8 s;
    u8 c = 8'h63;
    for (int b = 1; b < 256; b++) if (ref_mul(a, u8'(b)) == 8'h01) inv = u8'(b);
    for (int i = 0; i < 8; i++)
      s[i] = ^{inv[i], inv[(i+4)%8], inv[(i+5)%8], inv[(i+6)%8], inv[(i+7)%8], c[i]};
    return s;
  endfunction

  function automatic blk_t to_blk(logic [127:0] v);
    blk_t b;
    for (int k = 0; k < 16; k++) b[k] = v[127-8*k -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_blk(blk_t b);
    logic [127:0] v;
    for (int k = 0; k < 16; k++) v[127-8*k -: 8] = b[k];
    return v;
  endfunction

  // Table built once per caller: sb[i] = ref_sbox(i)
  function automatic void fill_table(ref u8 sb [256]);
    for (int i = 0; i < 256; i++) sb[i] = ref_sbox(u8'(i));
  endfunction

  function automatic blk_t ref_sub(blk_t s, const ref u8 sb [256]);
    blk_t o;
    for (int k = 0; k < 16; k++) o[k] = sb[s[k]];
    return o;
  endfunction

  function automatic blk_t ref_shift(blk_t s);
    blk_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[4*c + r] = s[4*((c + r) % 4) + r];
    return o;
  endfunction

  function automatic blk_t ref_mix(blk_t s);
    blk_t o;
    u8 m [4][4] = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c + r] = 8'h00;
        for (int j = 0; j < 4; j++) o[4*c + r] ^= ref_mul(m[r][j], s[4*c + j]);
      end
    return o;
  endfunction

  // Round keys 0..10 of AES-128.
  function automatic void ref_keys(logic [127:0] key, const ref u8 sb [256],
                                   ref logic [127:0] rk [11]);
    logic [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {sb[t[23:16]], sb[t[15:8]], sb[t[7:0]], sb[t[31:24]]} ^ {rc, 24'h0};
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // One round: returns the round output; also gives SubBytes of the input.
  function automatic logic [127:0] ref_round(logic [127:0] st, logic [127:0] rk, bit final_rnd,
                                             const ref u8 sb [256]);
    blk_t b = ref_shift(ref_sub(to_blk(st), sb));
    if (!final_rnd) b = ref_mix(b);
    return from_blk(b) ^ rk;
  endfunction

  function automatic logic [127:0] ref_subbytes(logic [127:0] st, const ref u8 sb [256]);
    return from_blk(ref_sub(to_blk(st), sb));
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key,
                                               const ref u8 sb [256]);
    logic [127:0] rk [11];
    logic [127:0] st;
    ref_keys(key, sb, rk);
    st = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) st = ref_round(st, rk[r], r == 10, sb);
    return st;
  endfunction

endpackage
