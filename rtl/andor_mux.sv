// andor_mux: power-balanced multiplexing circuit built from AND and OR gates.
//
// Each of the N W-bit inputs passes through a row of AND gates enabled by its
// one-hot line en[i], so only the selected entry reaches the OR stage and all
// others are forced to 0. The gated entries are then combined by a balanced
// binary tree of 2-input OR gates with log2(N) levels (8 levels for N = 256),
// so every input pattern sees the same depth of logic and, at each level,
// only one OR gate carries the selected value. The tree is stored heap-style:
// node k has children 2k+1 and 2k+2, the leaves are nodes N-1 .. 2N-2 and the
// output is node 0. Purely combinational.
//
// The AND gates, the 2-input OR gates and the 8 levels follow the
// architecture this core is built on; `en` must be one-hot (checked by an
// assertion), otherwise the output is the OR of several entries. The keep
// attributes ask synthesis to retain the gate structure rather than fold it
// into a generic multiplexer, which would remove its balanced shape.
module andor_mux #(
  parameter int N = 256,
  parameter int W = 8
) (
  input  logic [N-1:0][W-1:0] data,
  input  logic [N-1:0]        en,
  output logic [W-1:0]        y
);

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("andor_mux: N must be a power of two");
  end

  (* keep = "true" *) logic [2*N-2:0][W-1:0] node;

  // AND gates: leaves of the tree
  for (genvar i = 0; i < N; i++) begin : g_and
    assign node[N-1+i] = data[i] & {W{en[i]}};
  end

  // 2-input OR gates
  for (genvar k = 0; k < N-1; k++) begin : g_or
    assign node[k] = node[2*k+1] | node[2*k+2];
  end

  assign y = node[0];

  always_comb begin
    assert ($onehot(en)) else $error("andor_mux: enable lines are not one-hot");
  end

endmodule
