// response_capture: collects the network's responses over a test sequence.
// Each clock with capture high shifts f, o1 and o2 into three registers, so
// after NV vectors bit NV-1 holds the response to the first vector and bit 0
// the response to the last: read as a binary number this is the decimal
// signature used to compare faults. clear empties the registers (it wins over
// capture). NV_MAX bounds the sequence length. Synchronous, active-low
// asynchronous reset. The MSB-first ordering follows the published scheme; the
// shift-register form is this design's choice.
module response_capture #(
  parameter int unsigned NV_MAX = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              capture,
  input  logic              f,
  input  logic              o1,
  input  logic              o2,
  output logic [NV_MAX-1:0] sig_f,
  output logic [NV_MAX-1:0] sig_o1,
  output logic [NV_MAX-1:0] sig_o2
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_f  <= '0;
      sig_o1 <= '0;
      sig_o2 <= '0;
    end else if (clear) begin
      sig_f  <= '0;
      sig_o1 <= '0;
      sig_o2 <= '0;
    end else if (capture) begin
      sig_f  <= {sig_f[NV_MAX-2:0],  f};
      sig_o1 <= {sig_o1[NV_MAX-2:0], o1};
      sig_o2 <= {sig_o2[NV_MAX-2:0], o2};
    end
  end
endmodule
