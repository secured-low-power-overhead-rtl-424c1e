// tb_sbox_compensator: the complementary multiplexing circuit must return
// the complement of LUT entry x for every x, for random tables, in both the
// AND/OR and the 4-to-1 multiplexer form.
module tb_sbox_compensator;
  import aes_pkg::*;
  lut_t  lut;
  byte_t x, d_andor, d_mux4;
  int checks = 0, failures = 0;

  sbox_compensator #(.ARCH(SBOX_ANDOR)) dut_andor (.lut(lut), .x(x), .d(d_andor));
  sbox_compensator #(.ARCH(SBOX_MUX4))  dut_mux4  (.lut(lut), .x(x), .d(d_mux4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < 256; i++) lut[i] = (t == 0) ? 8'(i) : 8'($urandom);
      for (int v = 0; v < 256; v++) begin
        x = 8'(v);
        #1;
        checks += 2;
        if (d_andor !== ~lut[v]) begin
          failures++;
          $display("FAIL andor table=%0d x=%0d d=%h exp=%h", t, v, d_andor, ~lut[v]);
        end
        if (d_mux4 !== ~lut[v]) begin
          failures++;
          $display("FAIL mux4 table=%0d x=%0d d=%h exp=%h", t, v, d_mux4, ~lut[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
