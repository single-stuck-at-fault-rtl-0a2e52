// aux_gates: the two auxiliary test outputs of the network. o1 is the AND
// and o2 the OR of all data and control inputs (c0..c3, x1..xN), taken after
// any stuck-at fault on those inputs. They expose input faults that the
// function output f cannot tell apart. Combinational. The set of inputs
// follows the published scheme's modified circuit.
module aux_gates #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] in,
  output logic         o1,
  output logic         o2
);
  always_comb begin
    o1 = &in;
    o2 = |in;
  end
endmodule
