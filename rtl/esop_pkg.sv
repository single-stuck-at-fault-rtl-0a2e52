// esop_pkg: shared types and constant functions for the testable
// exclusive-or sum-of-products (ESOP) network and its test sequencer.
//
// The network has four control inputs c0..c3. c0 drives the
// literal-complementing XOR gates; c1..c3 gate the product terms. Which of
// c1..c3 gates a given term follows the three-colour labelling of the XOR
// tree: every two-input XOR gate, its two inputs and its output carry three
// different labels from {1,2,3}; the tree output carries 3. The labels of an
// eight-leaf tree are, left to right, 3,1,1,2,1,2,2,3 (as printed for the
// seven-gate tree). The tree is stored in heap order: node 1 is the output,
// node k has children 2k and 2k+1, and the S leaves are nodes S..2S-1.
//
// Fault sites of a network with N data inputs and S terms are numbered
//   0..3                 control inputs c0..c3
//   4..N+3               data inputs x1..xN
//   N+4..2N+3            complementing XOR output of x1..xN (only where built)
//   2N+4..2N+S+3         AND gate outputs, term 1..S
//   2N+S+4..2N+2S+2      XOR gate outputs, heap node 1..S-1 (node 1 is f)
// This numbering is this design's own choice.
package esop_pkg;

  localparam int NCTRL = 4;

  // Test vector sets. REF: zero walk of c1, c2 over vectors 2 and 3 (n+5
  // vectors). AC: all of c1..c3 take part in the zero walk (n+6 vectors).
  // ALT: zero walk of c2, c3 instead of c1, c2 (n+5 vectors).
  typedef enum logic [1:0] {
    M_REF = 2'd0,
    M_AC  = 2'd1,
    M_ALT = 2'd2
  } method_e;

  // Number of control vectors that walk a zero through c1..c3.
  function automatic int unsigned n_ctrl_walk(method_e m);
    return (m == M_AC) ? 3 : 2;
  endfunction

  // Length of the test set for N data inputs.
  function automatic int unsigned n_vectors(int unsigned n, method_e m);
    return n + 3 + n_ctrl_walk(m);
  endfunction

  // Smallest power of two not below s.
  function automatic int unsigned pow2_ceil(int unsigned s);
    int unsigned d;
    d = 1;
    while (d < s) d = d * 2;
    return d;
  endfunction

  // Heap index of the leaf that carries product term t (0-based) in a tree of
  // s leaves. Terms are placed left to right, so the first terms sit at the
  // deepest level and the last terms attach nearest the output.
  function automatic int unsigned leaf_node(int unsigned s, int unsigned t);
    return s + ((t + pow2_ceil(s) - s) % s);
  endfunction

  // Control label (1..3) of heap node k: the output is 3; the children of a
  // node labelled L are labelled L+1 and L+2 (mod 3, counted from 1).
  function automatic int unsigned node_label(int unsigned k);
    int unsigned lab;
    int          msb;
    lab = 3;
    msb = 0;
    for (int b = 0; b < 32; b++) if (k[b]) msb = b;
    for (int b = msb - 1; b >= 0; b--)
      lab = k[b] ? ((lab + 1) % 3) + 1 : (lab % 3) + 1;
    return lab;
  endfunction

  // Control line (1..3) that gates product term t of an s-term network.
  function automatic int unsigned term_ctrl(int unsigned s, int unsigned t);
    return node_label(leaf_node(s, t));
  endfunction

  // Number of fault sites of a network with n data inputs and s terms.
  function automatic int unsigned n_sites(int unsigned n, int unsigned s);
    return NCTRL + 2 * n + 2 * s - 1;
  endfunction

endpackage
