// esop_network: the testable realisation of one ESOP expression
//   f = T1 ^ T2 ^ ... ^ TS,  each Tt a product of true/complemented literals.
// Data inputs x1..xN and control inputs c0..c3 feed
//   - lit_complement: z_i = x_i ^ c0 for each variable used complemented,
//   - and_block:      one AND gate per term, gated by c1, c2 or c3,
//   - xor_tree:       two-input XOR tree giving f,
//   - aux_gates:      o1 = AND, o2 = OR of all data and control inputs.
// In normal use c0..c3 are all 1 and f is the expression. The default
// parameters build f = x1 ^ x2x3 ^ x2'x3'. POS[t][i] / NEG[t][i] set means
// term t+1 contains x(i+1) / x(i+1)'.
//
// A single stuck-at fault can be injected at any site (numbering in
// esop_pkg): fault_en selects injection, fault_site the node, fault_val the
// stuck value. Control and data input faults are applied once, at the input,
// so every gate reading that input sees the fault. Combinational.
// The network follows the published scheme; the fault injection port is this
// design's own, added to reproduce the published fault evaluation.
module esop_network
  import esop_pkg::*;
#(
  parameter int unsigned          N      = 3,
  parameter int unsigned          S      = 3,
  parameter logic [S-1:0][N-1:0]  POS    = {3'b000, 3'b110, 3'b001},
  parameter logic [S-1:0][N-1:0]  NEG    = {3'b110, 3'b000, 3'b000},
  parameter int unsigned          NSITE  = n_sites(N, S),
  parameter int unsigned          SITE_W = $clog2(NSITE)
) (
  input  logic [NCTRL-1:0]  c,          // c[j] is control input cj
  input  logic [N-1:0]      x,          // x[i] is data input x(i+1)
  input  logic              fault_en,
  input  logic [SITE_W-1:0] fault_site,
  input  logic              fault_val,
  output logic              f,
  output logic              o1,
  output logic              o2
);
  // Variables that need a complementing gate.
  function automatic logic [N-1:0] comp_mask();
    logic [N-1:0] m;
    m = '0;
    for (int t = 0; t < S; t++) m |= NEG[t];
    return m;
  endfunction
  localparam logic [N-1:0] COMP_MASK = comp_mask();

  localparam int unsigned X_BASE  = NCTRL;
  localparam int unsigned Z_BASE  = NCTRL + N;
  localparam int unsigned A_BASE  = NCTRL + 2 * N;
  localparam int unsigned T_BASE  = NCTRL + 2 * N + S;

  // One-hot decode of the fault site.
  logic [NSITE-1:0] sa_en;
  logic [NSITE-1:0] sa_val;
  always_comb begin
    sa_en = '0;
    if (fault_en && (fault_site < SITE_W'(NSITE))) sa_en[fault_site] = 1'b1;
    sa_val = {NSITE{fault_val}};
  end

  logic [NCTRL-1:0] c_f;
  logic [N-1:0]     x_f;
  logic [N-1:0]     z;
  logic [S-1:0]     za;

  stuck_at #(.W(NCTRL)) u_sa_c (
    .in(c), .en(sa_en[NCTRL-1:0]), .val(sa_val[NCTRL-1:0]), .out(c_f));
  stuck_at #(.W(N)) u_sa_x (
    .in(x), .en(sa_en[X_BASE +: N]), .val(sa_val[X_BASE +: N]), .out(x_f));

  lit_complement #(.N(N), .COMP_MASK(COMP_MASK)) u_lit (
    .x(x_f), .c0(c_f[0]),
    .sa_en(sa_en[Z_BASE +: N]), .sa_val(sa_val[Z_BASE +: N]), .z(z));

  and_block #(.N(N), .S(S), .POS(POS), .NEG(NEG)) u_and (
    .x(x_f), .z(z), .c(c_f),
    .sa_en(sa_en[A_BASE +: S]), .sa_val(sa_val[A_BASE +: S]), .za(za));

  xor_tree #(.S(S)) u_xor (
    .za(za), .sa_en(sa_en[T_BASE +: S-1]), .sa_val(sa_val[T_BASE +: S-1]), .f(f));

  aux_gates #(.W(NCTRL + N)) u_aux (.in({x_f, c_f}), .o1(o1), .o2(o2));
endmodule
