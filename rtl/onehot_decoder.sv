// onehot_decoder: the 8-to-256 decoder of the AND/OR multiplexing circuit.
//
// Exactly one of the 2^SEL_W outputs is high: onehot[i] = (sel == i). In the
// S-Box it enables the single AND gate group whose LUT entry is to reach the
// OR tree, so every input pattern switches one line on and one line off.
// Purely combinational. The 8-bit width follows the S-Box input; the output
// encoding (line i for value i) is this design's choice.
module onehot_decoder #(
  parameter int SEL_W = 8
) (
  input  logic [SEL_W-1:0]      sel,
  output logic [2**SEL_W-1:0]   onehot
);

  for (genvar i = 0; i < 2**SEL_W; i++) begin : g_line
    assign onehot[i] = (sel == SEL_W'(i));
  end

endmodule
