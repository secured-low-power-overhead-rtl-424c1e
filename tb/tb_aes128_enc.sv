// tb_aes128_enc: end-to-end test of the AES-128 core at its default
// parameters (AND/OR multiplexing circuits with compensators).
//
// It encrypts the two FIPS-197 example blocks, blocks under the cipher key
// 13 11 1D 7F E3 94 4A 17 F3 07 A7 8B 4D 2B 30 C5 and blocks under random
// keys, comparing each ciphertext with the reference model. For every
// encryption it checks the latency (done exactly 10 clocks after start is
// taken) and, in every busy cycle, that the compensator outputs of the state
// and key-schedule S-Boxes are the complement of what those S-Boxes compute
// for the reference round state. It also starts encryptions back to back
// (start in the done cycle), gives start while busy (must be ignored) and
// applies a reset in the middle of an encryption.
// Mechanisms counted: load through the 2-to-1 multiplexer, feedback rounds,
// final round without MixColumn, compensator checks, ignored starts,
// back-to-back starts, mid-operation reset. Each must occur at least once.
module tb_aes128_enc;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] pt = '0, key = '0, ct, sbox_dummy;
  logic [31:0]  key_dummy;
  logic         busy, done;

  u8 sb [256];
  int checks = 0, failures = 0;
  int n_load = 0, n_feedback = 0, n_final = 0, n_comp = 0, n_ignored = 0, n_b2b = 0, n_reset = 0;

  aes128_enc dut (
    .clk(clk), .rst_n(rst_n), .start(start), .plaintext(pt), .key(key),
    .busy(busy), .done(done), .ciphertext(ct), .sbox_dummy(sbox_dummy), .key_dummy(key_dummy)
  );

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // Encrypt one block. Start is raised before a rising edge on which the core
  // is idle (or finishing, for back-to-back operation). While the rounds run,
  // the compensator outputs are compared with the reference round states.
  // If ignore_pt is given, a second start with other data is raised while
  // busy and must not disturb the result.
  task automatic encrypt(logic [127:0] p, logic [127:0] k, logic [127:0] exp_ct,
                         bit poke_busy, string tag);
    logic [127:0] rk [11];
    logic [127:0] st;
    int t0;
    ref_keys(k, sb, rk);
    st = p ^ rk[0];
    pt = p; key = k; start = 1'b1;
    @(posedge clk); #1;
    t0 = cycle;
    start = 1'b0;
    n_load++;
    for (int r = 1; r <= 10; r++) begin
      logic [31:0] w3;
      // core is busy computing round r
      checks++;
      if (!busy || done) begin failures++; $display("FAIL %s busy/done in round %0d", tag, r); end
      check({tag, " sbox_dummy"}, sbox_dummy, ~ref_subbytes(st, sb));
      w3 = rk[r-1][31:0];
      checks++;
      if (key_dummy !== ~{sb[w3[23:16]], sb[w3[15:8]], sb[w3[7:0]], sb[w3[31:24]]}) begin
        failures++;
        $display("FAIL %s key_dummy round %0d got=%h", tag, r, key_dummy);
      end
      n_comp++;
      if (r == 10) n_final++; else n_feedback++;
      if (poke_busy && r == 4) begin
        pt = ~p; key = ~k; start = 1'b1;
        n_ignored++;
      end
      st = ref_round(st, rk[r], r == 10, sb);
      @(posedge clk); #1;
      start = 1'b0;
    end
    checks++;
    if (!done || busy || cycle - t0 != 10) begin
      failures++;
      $display("FAIL %s latency: done=%0d busy=%0d cycles=%0d", tag, done, busy, cycle - t0);
    end
    check({tag, " ciphertext"}, ct, exp_ct);
    check({tag, " ref state"}, st, exp_ct);
  endtask

  initial begin
    logic [127:0] p, k;
    fill_table(sb);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // published examples (FIPS-197 appendix C.1 and appendix B)
    encrypt(128'h00112233_44556677_8899aabb_ccddeeff, 128'h00010203_04050607_08090a0b_0c0d0e0f,
            128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, 0, "fips-c1");
    @(posedge clk); #1;
    encrypt(128'h3243f6a8_885a308d_313198a2_e0370734, 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c,
            128'h3925841d_02dc09fb_dc118597_196a0b32, 1, "fips-b");
    // the done cycle is the current one: start the next block right away
    n_b2b++;
    k = 128'h13111d7f_e3944a17_f307a78b_4d2b30c5;
    for (int t = 0; t < 20; t++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, ref_encrypt(p, k, sb), t == 5, "table-key");
      if (t % 2 == 1) @(posedge clk); else n_b2b++;
      #1;
    end
    for (int t = 0; t < 20; t++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, ref_encrypt(p, k, sb), 0, "random");
    end

    // reset in the middle of an encryption, then encrypt again
    pt = '1; key = '1; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b0;
    #2;
    checks++;
    if (busy || done) begin failures++; $display("FAIL reset did not clear busy/done"); end
    n_reset++;
    @(posedge clk); #1 rst_n = 1'b1;
    @(posedge clk); #1;
    p = 128'h0; k = 128'h0;
    encrypt(p, k, 128'h66e94bd4_ef8a2c3b_884cfa59_ca342b2e, 0, "after-reset");

    $display("mechanisms: load=%0d feedback=%0d final=%0d compensator=%0d ignored_start=%0d back_to_back=%0d reset=%0d",
             n_load, n_feedback, n_final, n_comp, n_ignored, n_b2b, n_reset);
    if (n_load == 0)     begin failures++; $display("FAIL no load"); end
    if (n_feedback == 0) begin failures++; $display("FAIL no feedback round"); end
    if (n_final == 0)    begin failures++; $display("FAIL no final round"); end
    if (n_comp == 0)     begin failures++; $display("FAIL no compensator check"); end
    if (n_ignored == 0)  begin failures++; $display("FAIL no ignored start"); end
    if (n_b2b == 0)      begin failures++; $display("FAIL no back-to-back start"); end
    if (n_reset == 0)    begin failures++; $display("FAIL no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
