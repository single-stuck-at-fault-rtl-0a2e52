// and_block: the AND array of the testable ESOP network. There is one AND
// gate per product term. Gate t combines the true literals of term t
// (POS[t]), the complemented literals (NEG[t], taken from the
// literal-complementing block) and one control line c1, c2 or c3. The control
// line is fixed by where the term enters the XOR tree: the three-colour
// labelling of the tree (see esop_pkg::term_ctrl) gives, for a seven-gate
// tree, c3,c1,c1,c2,c1,c2,c2,c3 across the eight leaves, and for the
// three-term example c2,c3,c2. Each gate output can be forced stuck-at.
// Combinational, no clock. Gate structure and control assignment follow the
// published scheme; the heap-ordered tree generalisation is this design's reading.
module and_block
  import esop_pkg::*;
#(
  parameter int unsigned          N   = 3,
  parameter int unsigned          S   = 3,
  parameter logic [S-1:0][N-1:0]  POS = {3'b000, 3'b110, 3'b001},
  parameter logic [S-1:0][N-1:0]  NEG = {3'b110, 3'b000, 3'b000}
) (
  input  logic [N-1:0]       x,      // true literals x1..xN
  input  logic [N-1:0]       z,      // complemented literals
  input  logic [NCTRL-1:0]   c,      // control inputs c0..c3 (c0 unused here)
  input  logic [S-1:0]       sa_en,
  input  logic [S-1:0]       sa_val,
  output logic [S-1:0]       za      // product term t
);
  for (genvar t = 0; t < S; t++) begin : g_term
    localparam int unsigned CSEL = term_ctrl(S, t);
    logic raw;
    always_comb raw = c[CSEL] & (&(x | ~POS[t])) & (&(z | ~NEG[t]));
    stuck_at #(.W(1)) u_sa (.in(raw), .en(sa_en[t]), .val(sa_val[t]), .out(za[t]));
  end
endmodule
