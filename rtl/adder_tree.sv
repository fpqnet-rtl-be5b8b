// adder_tree: sum of N signed terms plus a bias, as a balanced binary tree.
//
// The tree is laid out as a heap of 2N-1 nodes: the N terms are the leaves
// (nodes N-1 .. 2N-2) and every inner node i adds its children 2i+1 and 2i+2, so
// the depth is ceil(log2 N). The bias is added after the root, as the last adder.
// Purely combinational; the enclosing layer registers the result.
module adder_tree #(
  parameter int N  = 25,   // number of terms
  parameter int W  = 8,    // width of each signed term
  parameter int BW = 8,    // width of the signed bias
  parameter int OW = 14    // width of the signed sum
) (
  input  logic [N-1:0][W-1:0] terms,
  input  logic signed [BW-1:0] bias,
  output logic signed [OW-1:0] sum
);
  logic signed [OW-1:0] node [2*N-1];

  always_comb begin
    for (int i = 0; i < N; i++) node[N-1+i] = OW'($signed(terms[i]));
    for (int i = N-2; i >= 0; i--) node[i] = node[2*i+1] + node[2*i+2];
    sum = node[0] + OW'(bias);
  end
endmodule
