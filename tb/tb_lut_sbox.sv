// tb_lut_sbox: exhaustive check of the LUT S-Box.
// For all 256 inputs the output must equal an independently computed AES
// S-Box value, the compensator output must be its complement (so S and D
// together always hold eight ones), and the 4-to-1 multiplexer variant and
// the uncompensated variant must give the same S(x). A few published S-Box
// values are checked as constants as well.
module tb_lut_sbox;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  byte_t x, s, d, s_m, d_m, s_n, d_n;
  u8 sb [256];
  int checks = 0, failures = 0;

  lut_sbox dut (.x(x), .s(s), .d(d));
  lut_sbox #(.ARCH(SBOX_MUX4), .COMPENSATE(1'b1)) dut_mux4 (.x(x), .s(s_m), .d(d_m));
  lut_sbox #(.ARCH(SBOX_ANDOR), .COMPENSATE(1'b0)) dut_nocomp (.x(x), .s(s_n), .d(d_n));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%h got=%h exp=%h", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill_table(sb);
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      check("S", s, sb[v]);
      check("D", d, ~sb[v]);
      check("ones", 8'($countones({s, d})), 8'd8);
      check("S mux4", s_m, sb[v]);
      check("D mux4", d_m, ~sb[v]);
      check("S nocomp", s_n, sb[v]);
      check("D nocomp", d_n, 8'h00);
    end
    // published values
    x = 8'h00; #1; check("S(00)", s, 8'h63);
    x = 8'h01; #1; check("S(01)", s, 8'h7c);
    x = 8'h53; #1; check("S(53)", s, 8'hed);
    x = 8'hff; #1; check("S(ff)", s, 8'h16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
