// tb_mux4_tree: checks the 4-level 4-to-1 multiplexer tree against direct
// indexing for every select value over several random tables.
module tb_mux4_tree;
  logic [255:0][7:0] data;
  logic [7:0]        sel;
  logic [7:0]        y;
  int checks = 0, failures = 0;

  mux4_tree #(.W(8)) dut (.data(data), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 256; i++) data[i] = (t == 0) ? 8'(i) : 8'($urandom);
      for (int v = 0; v < 256; v++) begin
        sel = 8'(v);
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
