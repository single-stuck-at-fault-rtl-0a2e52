// esop_examples_tb: the fault-coverage evaluation of the nine example
// expressions (3 to 9 data inputs, 3 or 4 product terms), each built as its
// own esop_diag_top and tested with all three vector sets.
//
// For every example and vector set the testbench runs the fault-free circuit
// and every single stuck-at fault at every site that exists in that network
// (control and data inputs, built complementing XOR gates, AND gates, XOR
// tree gates), then counts
//   U: faults whose {f, o1, o2} signature equals the fault-free one
//      (unidentifiable), and
//   I: faults whose signature differs from the fault-free one but is shared
//      with another fault (indistinguishable),
// and compares the fault total, U and I with values computed independently
// from the gate-level description. Those agree with the published
// percentages for examples 1, 2, 4 and 6 and, taking the published example 3
// figures as fractions of 28, for example 3; see the README for the four
// entries that differ. The examples are:
//   1  x1 ^ x2x3 ^ x2'x3'              6  x1x2x6' ^ x2x3x4 ^ x3'x4'x5'
//   2  x1 ^ x1x2x3 ^ x2'x3'            7  x1x2x7' ^ x3x4x5 ^ x4'x5'x6'
//   3  x1' ^ x1'x2' ^ x2x3'            8  x1x2x8' ^ x3x7'x6' ^ x4'x5' ^ x1'x2'x3'
//   4  x1x2x3 ^ x2x3x4 ^ x2'x3'x4'     9  x1x2x8' ^ x3x7'x6' ^ x4'x5'x9 ^ x1'x2'x3'
//   5  x1x5 ^ x1x2x3 ^ x2x3x4 ^ x2'x3'x4'
module esop_examples_tb;
  import esop_pkg::*;

  localparam int NEX = 9;
  localparam int NN [NEX] = '{3, 3, 3, 4, 5, 6, 7, 8, 9};
  localparam int SS [NEX] = '{3, 3, 3, 3, 4, 3, 3, 4, 4};
  // true / complemented literal masks per term, bit i = x(i+1)
  localparam logic [8:0] PT [NEX][4] = '{
    '{9'h001, 9'h006, 9'h000, 9'h000},
    '{9'h001, 9'h007, 9'h000, 9'h000},
    '{9'h000, 9'h000, 9'h002, 9'h000},
    '{9'h007, 9'h00e, 9'h000, 9'h000},
    '{9'h011, 9'h007, 9'h00e, 9'h000},
    '{9'h003, 9'h00e, 9'h000, 9'h000},
    '{9'h003, 9'h01c, 9'h000, 9'h000},
    '{9'h003, 9'h004, 9'h000, 9'h000},
    '{9'h003, 9'h004, 9'h100, 9'h000}};
  localparam logic [8:0] NT [NEX][4] = '{
    '{9'h000, 9'h000, 9'h006, 9'h000},
    '{9'h000, 9'h000, 9'h006, 9'h000},
    '{9'h001, 9'h003, 9'h004, 9'h000},
    '{9'h000, 9'h000, 9'h00e, 9'h000},
    '{9'h000, 9'h000, 9'h000, 9'h00e},
    '{9'h020, 9'h000, 9'h01c, 9'h000},
    '{9'h040, 9'h000, 9'h038, 9'h000},
    '{9'h080, 9'h060, 9'h018, 9'h007},
    '{9'h080, 9'h060, 9'h018, 9'h007}};
  // expected fault totals and {U, I} for REF, AC, ALT
  localparam int EXP_T [NEX] = '{28, 28, 30, 32, 38, 38, 40, 54, 56};
  localparam int EXP_UI [NEX][6] = '{
    '{1, 13, 1, 12, 1, 12}, '{1, 14, 1, 13, 1, 13}, '{2, 14, 2, 12, 2, 12},
    '{1, 14, 1, 13, 1, 13}, '{0, 17, 0, 17, 0, 17}, '{1, 20, 1, 19, 1, 19},
    '{1, 19, 1, 18, 1, 18}, '{0, 24, 0, 24, 0, 26}, '{0, 26, 0, 26, 0, 26}};

  // term masks of example e packed as a [s][n] array, term t at bits t*n
  function automatic logic [35:0] pack(int e, int n, int s, bit neg);
    logic [35:0] r;
    r = '0;
    for (int t = 0; t < s; t++)
      for (int i = 0; i < n; i++) r[t*n + i] = neg ? NT[e][t][i] : PT[e][t][i];
    return r;
  endfunction
  // variables used complemented in example e
  function automatic logic [8:0] comp(int e, int s);
    logic [8:0] m;
    m = '0;
    for (int t = 0; t < s; t++) m |= NT[e][t];
    return m;
  endfunction

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, finished = 0;
  int n_method [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar e = 0; e < NEX; e++) begin : g_ex
    localparam int unsigned N = NN[e];
    localparam int unsigned S = SS[e];
    localparam int unsigned NSITE = n_sites(N, S);
    localparam int unsigned SW = $clog2(NSITE);

    localparam logic [S-1:0][N-1:0] P = (S*N)'(pack(e, N, S, 1'b0));
    localparam logic [S-1:0][N-1:0] Q = (S*N)'(pack(e, N, S, 1'b1));
    localparam logic [N-1:0] CM = N'(comp(e, S));

    logic start = 0, busy, done, mismatch, f_out, o1_out, o2_out;
    method_e method = M_REF;
    logic [N+5:0] sig_f, sig_o1, sig_o2;
    logic [$clog2(N+6)-1:0] nvec;
    logic fault_en = 0, fault_val = 0;
    logic [SW-1:0] fault_site = '0;

    esop_diag_top #(.N(N), .S(S), .POS(P), .NEG(Q)) dut (
      .clk, .rst_n, .c_in(4'b0000), .x_in('0), .f_out, .o1_out, .o2_out,
      .start, .method, .exp_f('0), .exp_o1('0), .exp_o2('0),
      .busy, .done, .mismatch, .nvec, .sig_f, .sig_o1, .sig_o2,
      .fault_en, .fault_site, .fault_val);

    task automatic run(output logic [47:0] sig);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      sig = {16'(sig_f), 16'(sig_o1), 16'(sig_o2)};
    endtask

    initial begin
      logic [47:0] sigs [2*NSITE];
      logic [47:0] good;
      int nf, u, ind;
      method_e ms [3];
      ms = '{M_REF, M_AC, M_ALT};
      @(posedge rst_n);
      foreach (ms[mi]) begin
        method = ms[mi];
        fault_en = 0;
        run(good);
        nf = 0;
        for (int s = 0; s < int'(NSITE); s++) begin
          // sites of complementing gates that are not built do not exist
          if (s >= int'(NCTRL + N) && s < int'(NCTRL + 2 * N) && !CM[s - int'(NCTRL + N)]) continue;
          for (int v = 0; v < 2; v++) begin
            fault_en = 1; fault_site = SW'(s); fault_val = v[0];
            run(sigs[nf]);
            nf++;
          end
        end
        fault_en = 0;
        u = 0; ind = 0;
        for (int a = 0; a < nf; a++) begin
          bit shared;
          shared = 0;
          for (int b = 0; b < nf; b++) if (b != a && sigs[b] == sigs[a]) shared = 1;
          if (sigs[a] == good) u++;
          else if (shared) ind++;
        end
        n_method[mi]++;
        checks++;
        if (nf != EXP_T[e] || u != EXP_UI[e][2*mi] || ind != EXP_UI[e][2*mi+1]) begin
          failures++;
          $display("FAIL example %0d method %0d: faults %0d U %0d I %0d, expected %0d %0d %0d",
                   e + 1, mi, nf, u, ind, EXP_T[e], EXP_UI[e][2*mi], EXP_UI[e][2*mi+1]);
        end else
          $display("example %0d method %0d: %0d faults, %0d unidentifiable (%0.2f%%), %0d indistinguishable (%0.2f%%)",
                   e + 1, mi, nf, u, 100.0 * u / nf, ind, 100.0 * ind / nf);
      end
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == NEX);
    foreach (n_method[i]) begin
      checks++;
      if (n_method[i] != NEX) begin failures++; $display("FAIL method %0d ran %0d times", i, n_method[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
