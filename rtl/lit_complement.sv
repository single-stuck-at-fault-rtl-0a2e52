// lit_complement: literal-complementing XOR block of the testable ESOP
// network. For every data variable that appears complemented somewhere in
// the expression (bit set in COMP_MASK) one XOR gate forms z_i = x_i ^ c0.
// In normal operation c0 = 1 and z_i is the complemented literal x_i'; during
// test c0 is a control input, so the same gate can also pass x_i unchanged.
// Variables never complemented get no gate, and their z bit is a constant 0
// that nothing reads. Each built gate output can be forced stuck-at through
// sa_en/sa_val. Combinational, no clock.
// The structure follows the published scheme; the constant for unbuilt gates and the
// fault-forcing ports are this design's choices. The x, sa_en and sa_val
// bits of variables that get no gate are deliberately left unread.
module lit_complement #(
  parameter int unsigned  N         = 3,
  parameter logic [N-1:0] COMP_MASK = 3'b110
) (
  input  logic [N-1:0] x,      // x[i] is data input x(i+1)
  input  logic         c0,     // complement control
  input  logic [N-1:0] sa_en,  // force gate output i
  input  logic [N-1:0] sa_val, // forced value
  output logic [N-1:0] z       // complemented literals
);
  for (genvar i = 0; i < N; i++) begin : g_lit
    if (COMP_MASK[i]) begin : g_xor
      logic raw;
      always_comb raw = x[i] ^ c0;
      stuck_at #(.W(1)) u_sa (.in(raw), .en(sa_en[i]), .val(sa_val[i]), .out(z[i]));
    end else begin : g_none
      assign z[i] = 1'b0;
    end
  end
endmodule
