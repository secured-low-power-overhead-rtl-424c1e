// tb_onehot_decoder: exhaustive check of the 8-to-256 one-hot decoder.
// Every select value must raise exactly line sel and no other.
module tb_onehot_decoder;
  logic [7:0]   sel;
  logic [255:0] onehot;
  int checks = 0, failures = 0;

  onehot_decoder #(.SEL_W(8)) dut (.sel(sel), .onehot(onehot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      sel = 8'(v);
      #1;
      checks++;
      if (onehot !== (256'(1) << v)) begin
        failures++;
        $display("FAIL sel=%0d onehot=%h", v, onehot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
