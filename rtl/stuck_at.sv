// stuck_at: per-bit stuck-at fault injector placed on a group of circuit
// nodes. Where en[i] is set, out[i] is held at val[i] (stuck-at-0 or
// stuck-at-1); elsewhere the node passes unchanged. With en tied low it
// reduces to wires. Purely combinational. The single stuck-at fault model is
// the one the network is designed for; injecting it in the RTL mirrors how
// the faults were evaluated and is this design's own addition.
module stuck_at #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] in,
  input  logic [W-1:0] en,
  input  logic [W-1:0] val,
  output logic [W-1:0] out
);
  always_comb out = (in & ~en) | (val & en);
endmodule
