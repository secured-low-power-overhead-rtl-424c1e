// tb_aes_key_expand: runs the key expansion step ten times from a cipher key
// and compares every round key (and the compensator outputs, which must be
// the complement of the key-schedule S-Box outputs) with the reference key
// schedule. The published FIPS-197 key 2b7e1516... is checked against its
// known first and last round keys, then random keys.
module tb_aes_key_expand;
  import aes_ref_pkg::*;
  logic [127:0] ki, ko;
  logic [7:0]   rcon;
  logic [31:0]  dummy;
  u8 sb [256];
  logic [127:0] rk [11];
  int checks = 0, failures = 0;

  aes_key_expand dut (.key_i(ki), .rcon(rcon), .key_o(ko), .dummy_o(dummy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key;
    logic [31:0]  w3;
    fill_table(sb);
    for (int t = 0; t < 20; t++) begin
      key = (t == 0) ? 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c
                     : {$urandom, $urandom, $urandom, $urandom};
      ref_keys(key, sb, rk);
      ki = key;
      rcon = 8'h01;
      for (int r = 1; r <= 10; r++) begin
        #1;
        w3 = ki[31:0];
        checks += 2;
        if (ko !== rk[r]) begin
          failures++; $display("FAIL key %0d round %0d ko=%h exp=%h", t, r, ko, rk[r]);
        end
        if (dummy !== ~{sb[w3[23:16]], sb[w3[15:8]], sb[w3[7:0]], sb[w3[31:24]]}) begin
          failures++; $display("FAIL dummy key %0d round %0d", t, r);
        end
        if (t == 0 && r == 1) begin
          checks++;
          if (ko !== 128'ha0fafe17_88542cb1_23a33939_2a6c7605) begin
            failures++; $display("FAIL known round key 1 %h", ko);
          end
        end
        if (t == 0 && r == 10) begin
          checks++;
          if (ko !== 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6) begin
            failures++; $display("FAIL known round key 10 %h", ko);
          end
        end
        ki = ko;
        rcon = ref_mul(rcon, 8'h02);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
