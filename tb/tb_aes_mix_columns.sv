// tb_aes_mix_columns: MixColumn against published column test values and
// against the reference model for random states.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] si, so;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.state_i(si), .state_o(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // four published columns in one state
    si = 128'hdb135345_f20a225c_d4d4d4d5_2d26314c;
    #1;
    checks++;
    if (so !== 128'h8e4da1bc_9fdc589d_d5d5d7d6_4d7ebdf8) begin
      failures++; $display("FAIL known so=%h", so);
    end
    si = 128'h01010101_c6c6c6c6_01010101_c6c6c6c6;
    #1;
    checks++;
    if (so !== si) begin
      failures++; $display("FAIL fixed-point so=%h", so);
    end
    for (int t = 0; t < 200; t++) begin
      si = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (so !== from_blk(ref_mix(to_blk(si)))) begin
        failures++; $display("FAIL random si=%h so=%h", si, so);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
