// tb_andor_mux: checks that the AND/OR multiplexing circuit passes exactly the
// enabled entry. Random 256 x 8-bit tables, every one-hot enable position.
module tb_andor_mux;
  logic [255:0][7:0] data;
  logic [255:0]      en;
  logic [7:0]        y;
  int checks = 0, failures = 0;

  andor_mux #(.N(256), .W(8)) dut (.data(data), .en(en), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 256; i++) data[i] = (t == 0) ? 8'hff : 8'($urandom);
      for (int v = 0; v < 256; v++) begin
        en = 256'(1) << v;
        #1;
        checks++;
        if (y !== data[v]) begin
          failures++;
          $display("FAIL table=%0d sel=%0d y=%h exp=%h", t, v, y, data[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
