// xor_tree: the function XOR tree of the testable ESOP network. S product
// terms are combined by S-1 two-input XOR gates arranged as a binary tree in
// heap order (node 1 is the output f, node k = node 2k ^ node 2k+1, leaves
// are nodes S..2S-1). Term t sits on leaf esop_pkg::leaf_node(S,t), so the
// first terms are deepest and the last terms join nearest the output; for
// three terms this is f = (t1 ^ t2) ^ t3. Every gate output can be forced
// stuck-at; bit k-1 of sa_en/sa_val is gate node k. Combinational.
// The tree of two-input XOR gates follows the published scheme; the heap ordering
// for term counts that are not a power of two is this design's choice.
module xor_tree
  import esop_pkg::*;
#(
  parameter int unsigned S = 3
) (
  input  logic [S-1:0]   za,
  input  logic [S-2:0]   sa_en,
  input  logic [S-2:0]   sa_val,
  output logic           f
);
  // Evaluated leaves first, then gates from the deepest index up to the
  // output, so every gate reads children already computed.
  always_comb begin
    logic node [1:2*S-1];
    for (int t = 0; t < S; t++) node[leaf_node(S, t)] = za[t];
    for (int k = S - 1; k >= 1; k--)
      node[k] = sa_en[k-1] ? sa_val[k-1] : (node[2*k] ^ node[2*k+1]);
    f = node[1];
  end

  initial begin
    if (S < 2) $error("xor_tree needs at least two product terms");
  end
endmodule
