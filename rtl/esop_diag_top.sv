// esop_diag_top: a testable ESOP network with its built-in test sequencer.
//
// Functional mode (idle): the network is driven from the primary inputs
// c_in/x_in and f_out/o1_out/o2_out follow them combinationally. With
// c_in = 4'b1111 f_out is the implemented expression (by default
// f = x1 ^ x2x3 ^ x2'x3').
//
// Test mode: a start pulse while idle selects the vector set (REF, AC or
// ALT, see test_vector_gen) and runs it, one vector per clock. The network
// inputs then come from the generator and the responses are shifted into the
// three signature words sig_f, sig_o1, sig_o2 (first vector in the most
// significant used bit, nvec bits in all). One clock after the last vector
// done rises for one cycle, and mismatch tells whether any of the three
// words differs from exp_f/exp_o1/exp_o2, the fault-free signature of the
// chosen method that the user supplies. The signature is kept until the next
// start. From the clock edge that samples start to the edge that raises done
// takes nvec + 1 cycles.
//
// fault_en/fault_site/fault_val inject one stuck-at fault into the network
// (site numbering in esop_pkg) so that the diagnosis can be exercised; tie
// fault_en low in a real circuit. The network and the vector sets follow the
// published scheme; the sequencing, the signature registers, the compare with a
// supplied signature and the fault injection port are this design's own.
module esop_diag_top
  import esop_pkg::*;
#(
  parameter int unsigned          N      = 3,
  parameter int unsigned          S      = 3,
  parameter logic [S-1:0][N-1:0]  POS    = {3'b000, 3'b110, 3'b001},
  parameter logic [S-1:0][N-1:0]  NEG    = {3'b110, 3'b000, 3'b000},
  parameter int unsigned          NV_MAX = N + 6,
  parameter int unsigned          SITE_W = $clog2(n_sites(N, S))
) (
  input  logic              clk,
  input  logic              rst_n,
  // functional inputs and outputs
  input  logic [NCTRL-1:0]  c_in,
  input  logic [N-1:0]      x_in,
  output logic              f_out,
  output logic              o1_out,
  output logic              o2_out,
  // test control
  input  logic              start,
  input  method_e           method,
  input  logic [NV_MAX-1:0] exp_f,
  input  logic [NV_MAX-1:0] exp_o1,
  input  logic [NV_MAX-1:0] exp_o2,
  output logic              busy,
  output logic              done,
  output logic              mismatch,
  output logic [$clog2(N+6)-1:0] nvec,
  output logic [NV_MAX-1:0] sig_f,
  output logic [NV_MAX-1:0] sig_o1,
  output logic [NV_MAX-1:0] sig_o2,
  // fault injection
  input  logic              fault_en,
  input  logic [SITE_W-1:0] fault_site,
  input  logic              fault_val
);
  logic             gen_valid, gen_last;
  logic [NCTRL-1:0] gen_c, net_c;
  logic [N-1:0]     gen_x, net_x;
  logic             start_ok;

  always_comb start_ok = start && !busy;

  test_vector_gen #(.N(N)) u_gen (
    .clk, .rst_n, .start(start_ok), .method,
    .valid(gen_valid), .last(gen_last), .vc(gen_c), .vx(gen_x), .nvec(nvec));

  always_comb begin
    busy  = gen_valid;
    net_c = gen_valid ? gen_c : c_in;
    net_x = gen_valid ? gen_x : x_in;
  end

  esop_network #(.N(N), .S(S), .POS(POS), .NEG(NEG), .SITE_W(SITE_W)) u_net (
    .c(net_c), .x(net_x),
    .fault_en, .fault_site, .fault_val,
    .f(f_out), .o1(o1_out), .o2(o2_out));

  response_capture #(.NV_MAX(NV_MAX)) u_cap (
    .clk, .rst_n, .clear(start_ok), .capture(gen_valid),
    .f(f_out), .o1(o1_out), .o2(o2_out),
    .sig_f, .sig_o1, .sig_o2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= gen_valid && gen_last;
  end

  // done follows the last vector, when the sequencer is already idle.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!done || !busy) else $error("done while busy");
  end

  always_comb
    mismatch = (sig_f != exp_f) || (sig_o1 != exp_o1) || (sig_o2 != exp_o2);

  initial begin
    if (NV_MAX < N + 6) $error("NV_MAX must hold the longest test set (N+6)");
  end
endmodule
