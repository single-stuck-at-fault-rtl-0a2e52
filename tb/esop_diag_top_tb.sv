// esop_diag_top_tb: end-to-end test of the default design,
// f = x1 ^ x2x3 ^ x2'x3' with N = 3 data inputs, at its default parameters.
//
// For each vector set (REF, AC, ALT) it runs the fault-free circuit and then
// every one of the 28 single stuck-at faults (s-a-0 and s-a-1 on c0..c3,
// x1..x3, the two complementing XOR gates, the three AND gates and the two
// XOR tree gates) and compares the decimal signatures {f, o1, o2} with
// published values: the REF f words and all ALT words are those tabulated
// for this example; the other words were computed independently from the
// gate-level description. It then counts unidentifiable faults (signature
// equal to the fault-free one) and indistinguishable faults (signature shared
// with another fault) and compares them with the published percentages
// (REF 3.57 / 46.43, AC 3.57 / 42.86, ALT 3.57 / 42.86 of 28 faults).
// Also checked: done comes nvec + 1 clocks after start, mismatch against the
// fault-free signature, a start while busy is ignored, and the functional
// mode (c = 1111) evaluates the expression. Each mechanism is counted and
// one that never happened counts as a failure.
module esop_diag_top_tb;
  import esop_pkg::*;

  localparam int NF = 14;   // fault sites of this network

  logic clk = 0, rst_n = 0;
  logic [3:0] c_in = '0;
  logic [2:0] x_in = '0;
  logic f_out, o1_out, o2_out;
  logic start = 0;
  method_e method = M_REF;
  logic [8:0] exp_f = '0, exp_o1 = '0, exp_o2 = '0;
  logic busy, done, mismatch;
  logic [3:0] nvec;
  logic [8:0] sig_f, sig_o1, sig_o2;
  logic fault_en = 0, fault_val = 0;
  logic [3:0] fault_site = '0;

  int checks = 0, failures = 0;
  int n_run [3] = '{0, 0, 0};
  int n_detect = 0, n_undetect = 0, n_busy_start = 0, n_func = 0;

  always #5 clk = ~clk;

  esop_diag_top dut (.*);

  // site numbers in the order c0..c3, x1..x3, z1, z2, za1..za3, zx1, zx2(=f)
  localparam int SITE [NF] = '{0, 1, 2, 3, 4, 5, 6, 8, 9, 10, 11, 12, 14, 13};

  // expected signatures [method][stuck value][site] and fault-free [method]
  localparam int GOOD [3][3] = '{'{118, 0, 127}, '{214, 0, 255}, '{86, 0, 127}};
  localparam int EXP_F [3][2][NF] = '{
    '{'{118, 118, 120, 14, 32, 86, 86, 46, 46, 32, 14, 46, 88, 0},
      '{46, 118, 119, 118, 126, 118, 118, 114, 116, 223, 241, 209, 167, 255}},
    '{'{214, 214, 216, 14, 96, 182, 182, 110, 110, 96, 14, 110, 184, 0},
      '{110, 214, 215, 246, 222, 214, 214, 210, 212, 415, 497, 401, 327, 511}},
    '{'{86, 86, 88, 14, 96, 54, 54, 110, 110, 96, 14, 110, 56, 0},
      '{110, 86, 87, 118, 94, 86, 86, 82, 84, 159, 241, 145, 199, 255}}};
  // o1: 0 everywhere except s-a-1 on c0 (16); o2: full word except s-a-0 on
  // c0 (last bit lost) and s-a-1 on an input (first bit set).
  localparam int U_EXP [3] = '{1, 1, 1};
  localparam int I_EXP [3] = '{13, 12, 12};

  function automatic int exp_o1_of(int fi, int fv);
    return (fi == 0 && fv == 1) ? 16 : 0;
  endfunction
  function automatic int exp_o2_of(int m, int fi, int fv);
    int full;
    full = (m == 1) ? 255 : 127;
    if (fi == 0 && fv == 0) return full - 1;
    if (fi < 7 && fv == 1)  return full + ((m == 1) ? 256 : 128);
    return full;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one test sequence; returns the signature and checks the latency
  task automatic run(input method_e m, output int sf, output int s1, output int s2);
    int cyc;
    @(negedge clk);
    method = m;
    start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 1;                      // held high while busy: must be ignored
    if (busy) n_busy_start++;
    cyc = 1;
    @(negedge clk);
    start = 0;
    cyc++;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != int'(nvec) + 1 || int'(nvec) != n_vectors(3, m)) begin
      failures++;
      $display("FAIL latency m=%0d: %0d cycles, nvec=%0d", m, cyc, nvec);
    end
    sf = int'(sig_f); s1 = int'(sig_o1); s2 = int'(sig_o2);
    n_run[m]++;
  endtask

  initial begin
    method_e ms [3];
    ms = '{M_REF, M_AC, M_ALT};
    repeat (2) @(posedge clk);
    rst_n = 1;

    // functional mode
    c_in = 4'b1111;
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      x_in = 3'(v);
      #1;
      checks++;
      n_func++;
      if (f_out !== (x_in[0] ^ (x_in[1] & x_in[2]) ^ (~x_in[1] & ~x_in[2]))) begin
        failures++; $display("FAIL function x=%b f=%b", x_in, f_out);
      end
    end
    c_in = 4'b0000;

    foreach (ms[mi]) begin
      int sig [2*NF][3];
      int gs [3];
      int u, ind;
      fault_en = 0;
      run(ms[mi], gs[0], gs[1], gs[2]);
      checks++;
      if (gs[0] != GOOD[mi][0] || gs[1] != GOOD[mi][1] || gs[2] != GOOD[mi][2]) begin
        failures++;
        $display("FAIL fault-free m=%0d: {%0d,%0d,%0d}", mi, gs[0], gs[1], gs[2]);
      end
      exp_f = 9'(GOOD[mi][0]); exp_o1 = 9'(GOOD[mi][1]); exp_o2 = 9'(GOOD[mi][2]);
      #1;
      checks++;
      if (mismatch) begin failures++; $display("FAIL mismatch on fault-free run"); end
      for (int fv = 0; fv < 2; fv++)
        for (int fi = 0; fi < NF; fi++) begin
          int idx;
          idx = fv * NF + fi;
          fault_en = 1; fault_site = 4'(SITE[fi]); fault_val = fv[0];
          run(ms[mi], sig[idx][0], sig[idx][1], sig[idx][2]);
          checks++;
          if (sig[idx][0] != EXP_F[mi][fv][fi] || sig[idx][1] != exp_o1_of(fi, fv) ||
              sig[idx][2] != exp_o2_of(mi, fi, fv)) begin
            failures++;
            $display("FAIL m=%0d sa%0d site %0d: {%0d,%0d,%0d} exp {%0d,%0d,%0d}", mi, fv, fi,
                     sig[idx][0], sig[idx][1], sig[idx][2],
                     EXP_F[mi][fv][fi], exp_o1_of(fi, fv), exp_o2_of(mi, fi, fv));
          end
          // mismatch must be set exactly when the signature differs
          checks++;
          if (mismatch != (sig[idx][0] != gs[0] || sig[idx][1] != gs[1] || sig[idx][2] != gs[2])) begin
            failures++; $display("FAIL mismatch flag m=%0d sa%0d site %0d", mi, fv, fi);
          end
          if (mismatch) n_detect++; else n_undetect++;
        end
      fault_en = 0;
      // unidentifiable and indistinguishable counts
      u = 0; ind = 0;
      for (int a = 0; a < 2 * NF; a++) begin
        bit same_good, shared;
        same_good = (sig[a][0] == gs[0] && sig[a][1] == gs[1] && sig[a][2] == gs[2]);
        shared = 0;
        for (int b = 0; b < 2 * NF; b++)
          if (b != a && sig[a][0] == sig[b][0] && sig[a][1] == sig[b][1] && sig[a][2] == sig[b][2])
            shared = 1;
        if (same_good) u++;
        else if (shared) ind++;
      end
      checks++;
      if (u != U_EXP[mi] || ind != I_EXP[mi]) begin
        failures++;
        $display("FAIL m=%0d unidentifiable %0d (exp %0d) indistinguishable %0d (exp %0d)",
                 mi, u, U_EXP[mi], ind, I_EXP[mi]);
      end else
        $display("method %0d: %0d/28 unidentifiable, %0d/28 indistinguishable", mi, u, ind);
    end

    // every mechanism must have happened
    foreach (n_run[i]) begin
      checks++;
      if (n_run[i] == 0) begin failures++; $display("FAIL method %0d never ran", i); end
    end
    checks += 4;
    if (n_detect == 0)     begin failures++; $display("FAIL no fault detected"); end
    if (n_undetect == 0)   begin failures++; $display("FAIL no undetected fault seen"); end
    if (n_busy_start == 0) begin failures++; $display("FAIL start while busy never tried"); end
    if (n_func == 0)       begin failures++; $display("FAIL functional mode never used"); end
    $display("runs REF=%0d AC=%0d ALT=%0d detected=%0d undetected=%0d busy-starts=%0d functional=%0d",
             n_run[0], n_run[1], n_run[2], n_detect, n_undetect, n_busy_start, n_func);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
