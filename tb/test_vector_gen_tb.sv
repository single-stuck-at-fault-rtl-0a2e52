// test_vector_gen_tb: runs all three vector sets for N = 3 and N = 5 and
// compares every emitted vector with the test matrix rebuilt from its row
// rules, written here as explicit c patterns per row. Checks the length
// (N+5 for REF and ALT, N+6 for AC), that valid stays high for exactly that
// many cycles after the start edge, that last marks the final vector, and
// that a start while running is ignored.
module test_vector_gen_tb;
  import esop_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  method_e method;
  logic valid3, last3, valid5, last5;
  logic [3:0] vc3, vc5;
  logic [2:0] vx3;
  logic [4:0] vx5;
  logic [3:0] nvec3, nvec5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_vector_gen #(.N(3)) dut3 (.clk, .rst_n, .start, .method,
    .valid(valid3), .last(last3), .vc(vc3), .vx(vx3), .nvec(nvec3));
  test_vector_gen #(.N(5)) dut5 (.clk, .rst_n, .start, .method,
    .valid(valid5), .last(last5), .vc(vc5), .vx(vx5), .nvec(nvec5));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected row r of the matrix for n inputs: {c3 c2 c1 c0} and x bits
  task automatic exp_row(input method_e m, input int n, input int r,
                         output logic [3:0] ec, output logic [7:0] ex, output int len);
    logic [3:0] walk [3];
    int k;
    case (m)
      M_REF: begin walk = '{4'b1100, 4'b1010, 4'b0000}; k = 2; end
      M_ALT: begin walk = '{4'b1010, 4'b0110, 4'b0000}; k = 2; end
      default: begin walk = '{4'b1100, 4'b1010, 4'b0110}; k = 3; end
    endcase
    len = n + 3 + k;
    ex = '0;
    if (r == 0) begin ec = 4'b0000; end
    else if (r <= k) begin ec = walk[r-1]; ex = 8'((1 << n) - 1); end
    else if (r == k + 1) begin ec = 4'b1110; ex = 8'((1 << n) - 1); end
    else if (r < k + 2 + n) begin
      ec = 4'b1110; ex = 8'((1 << n) - 1) & ~(8'd1 << (r - k - 2));
    end else begin ec = 4'b0001; end
  endtask

  initial begin
    method_e ms [3];
    ms = '{M_REF, M_AC, M_ALT};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (ms[mi]) begin
      int r, len3, len5;
      logic [3:0] ec; logic [7:0] ex;
      method <= ms[mi];
      start <= 1;
      @(posedge clk);          // start sampled here
      start <= 0;
      r = 0;
      while (1) begin
        @(negedge clk);
        if (r == 2) start = 1;  // ignored while running
        if (!valid3) break;
        exp_row(ms[mi], 3, r, ec, ex, len3);
        checks++;
        if (vc3 !== ec || vx3 !== ex[2:0] || last3 !== (r == len3 - 1) || nvec3 != 4'(len3)) begin
          failures++;
          $display("FAIL n=3 m=%0d row %0d: c=%b x=%b last=%b exp c=%b x=%b", ms[mi], r, vc3, vx3, last3, ec, ex[2:0]);
        end
        exp_row(ms[mi], 5, r, ec, ex, len5);
        checks++;
        if (!valid5 || vc5 !== ec || vx5 !== ex[4:0] || last5 !== (r == len5 - 1)) begin
          failures++;
          $display("FAIL n=5 m=%0d row %0d: c=%b x=%b exp c=%b x=%b", ms[mi], r, vc5, vx5, ec, ex[4:0]);
        end
        r++;
        @(posedge clk);
        start = 0;
      end
      // n=3 has stopped; n=5 runs two more rows
      checks++;
      if (r != len3) begin failures++; $display("FAIL n=3 m=%0d length %0d exp %0d", ms[mi], r, len3); end
      while (valid5) @(posedge clk);
      start <= 0;
      repeat (2) @(posedge clk);
      checks++;
      if (valid3 || valid5) begin failures++; $display("FAIL generator did not stop"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
