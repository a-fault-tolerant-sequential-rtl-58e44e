// parity_xor: the XOR subcircuit of the fault-tolerant scheme.
//
// Computes y'_{s+1} = z'1 ^ z'2 ^ ... ^ z'p, the parity of FSSC1's next-state
// lines, as a fan-out-free tree of WIDTH-1 two-input XOR gates. The tree is
// laid out like a heap: node k (0 = root) is the XOR of nodes 2k+1 and
// 2k+2, and the WIDTH leaves, nodes WIDTH-1 .. 2*WIDTH-2, are the inputs.
// Every node drives exactly one gate, so a fault anywhere in the tree can
// only change the single output.
// With constant-weight state codes the output is fixed for every proper
// code word (1 for odd weight, 0 for even), so any odd number of flipped
// state lines inverts it and the checker sees a non-code word.
// The function and the fan-out-free tree follow the architecture; the heap
// layout is this design's choice. Purely combinational.
module parity_xor #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] z,
  output logic             par_o
);

  logic [2*WIDTH-2:0] node;

  for (genvar i = 0; i < WIDTH; i++) begin : g_leaf
    assign node[WIDTH-1+i] = z[i];
  end

  for (genvar k = 0; k < WIDTH - 1; k++) begin : g_gate
    assign node[k] = node[2*k+1] ^ node[2*k+2];
  end

  assign par_o = node[0];

endmodule
