// tb_aes_round: one round against the published FIPS-197 round-1 example and
// against the reference round for random states and keys, with and without
// MixColumn. The compensator outputs must be the complement of SubBytes of
// the input state.
module tb_aes_round;
  import aes_ref_pkg::*;
  logic [127:0] si, rk, so, dummy;
  logic         fin;
  u8 sb [256];
  int checks = 0, failures = 0;

  aes_round dut (.state_i(si), .round_key(rk), .final_round(fin), .state_o(so), .dummy_o(dummy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill_table(sb);
    si  = 128'h193de3be_a0f4e22b_9ac68d2a_e9f84808;
    rk  = 128'ha0fafe17_88542cb1_23a33939_2a6c7605;
    fin = 1'b0;
    #1;
    checks++;
    if (so !== 128'ha49c7ff2_689f352b_6b5bea43_026a5049) begin
      failures++; $display("FAIL known round so=%h", so);
    end
    for (int t = 0; t < 200; t++) begin
      si  = {$urandom, $urandom, $urandom, $urandom};
      rk  = {$urandom, $urandom, $urandom, $urandom};
      fin = t[0];
      #1;
      checks += 2;
      if (so !== ref_round(si, rk, fin, sb)) begin
        failures++; $display("FAIL random fin=%0d si=%h so=%h", fin, si, so);
      end
      if (dummy !== ~ref_subbytes(si, sb)) begin
        failures++; $display("FAIL dummy si=%h", si);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
