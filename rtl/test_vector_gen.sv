// test_vector_gen: sequencer for the universal single-stuck-at test set of
// an N-input ESOP network. On start (while idle) it latches the method and
// then emits one vector per clock, with valid high, for n_vectors(N, method)
// cycles; last marks the final vector. Vector rows (c0..c3 | x1..xN):
//   1          all zero
//   2..K+1     c0 = 0 and one control line zero, x all one; the zero walks
//              over c1,c2 (REF), c2,c3 (ALT) or c1,c2,c3 (AC; K = 3)
//   K+2        all one except c0
//   K+3..K+2+N walking zero over x1..xN, c0 = 0, c1..c3 = 1
//   K+3+N      c0 = 1, all else zero
// giving N+5 vectors (REF, ALT) or N+6 (AC). The rows follow the published scheme;
// c1..c3 = 1 in the walking-zero rows is this design's reading, as are the
// start/valid/last handshake and one vector per cycle.
module test_vector_gen
  import esop_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  method_e          method,
  output logic             valid,
  output logic             last,
  output logic [NCTRL-1:0] vc,     // vc[j] drives cj
  output logic [N-1:0]     vx,     // vx[i] drives x(i+1)
  output logic [$clog2(N+6)-1:0] nvec
);
  localparam int unsigned IW = $clog2(N + 6);

  method_e       m_q;
  logic [IW-1:0] idx_q;
  logic          run_q;
  int unsigned   k;

  always_comb begin
    k    = n_ctrl_walk(m_q);
    nvec = IW'(n_vectors(N, m_q));
    last = run_q && (idx_q == nvec - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      idx_q <= '0;
      m_q   <= M_REF;
    end else if (!run_q) begin
      if (start) begin
        run_q <= 1'b1;
        idx_q <= '0;
        m_q   <= method;
      end
    end else if (last) begin
      run_q <= 1'b0;
    end else begin
      idx_q <= idx_q + 1'b1;
    end
  end

  // Row decode.
  always_comb begin
    vc = '0;
    vx = '0;
    if (idx_q == '0) begin
      vc = 4'b0000;
      vx = '0;
    end else if (idx_q <= IW'(k)) begin
      // zero walk over the control lines; first zeroed line is c1 (REF, AC)
      // or c2 (ALT)
      vc = 4'b1110;
      vc[int'(idx_q) + ((m_q == M_ALT) ? 1 : 0)] = 1'b0;
      vx = '1;
    end else if (idx_q == IW'(k + 1)) begin
      vc = 4'b1110;
      vx = '1;
    end else if (idx_q < IW'(k + 2 + N)) begin
      vc = 4'b1110;
      vx = '1;
      vx[int'(idx_q) - int'(k) - 2] = 1'b0;
    end else begin
      vc = 4'b0001;
      vx = '0;
    end
  end

  always_comb valid = run_q;

  // Handshake rule: last only marks a vector that is being applied, and the
  // index never runs past the end of the set.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!last || valid) else $error("last without valid");
      assert (!run_q || idx_q < nvec) else $error("vector index past end of set");
    end
  end

  initial begin
    if (N < 1) $error("test_vector_gen needs at least one data input");
  end
endmodule
