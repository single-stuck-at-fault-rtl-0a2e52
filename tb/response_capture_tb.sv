// response_capture_tb: shifts random response bits into the capture
// registers and compares with words built by hand (first bit most
// significant), checks that capture low holds the words and that clear
// empties them.
module response_capture_tb;
  logic clk = 0, rst_n = 0, clear = 0, capture = 0, f = 0, o1 = 0, o2 = 0;
  logic [8:0] sig_f, sig_o1, sig_o2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  response_capture #(.NV_MAX(9)) dut (.clk, .rst_n, .clear, .capture, .f, .o1, .o2,
                                      .sig_f, .sig_o1, .sig_o2);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 50; run++) begin
      int len;
      logic [8:0] ef, e1, e2;
      len = 8 + run % 2;
      ef = '0; e1 = '0; e2 = '0;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int i = 0; i < len; i++) begin
        capture = 1;
        {f, o1, o2} = 3'($urandom);
        ef[len-1-i] = f; e1[len-1-i] = o1; e2[len-1-i] = o2;
        @(negedge clk);
        // idle cycle between some vectors
        if (i == 3) begin capture = 0; {f, o1, o2} = 3'b111; @(negedge clk); end
      end
      capture = 0;
      @(negedge clk);
      checks++;
      if (sig_f !== ef || sig_o1 !== e1 || sig_o2 !== e2) begin
        failures++;
        $display("FAIL run %0d: %0d %0d %0d exp %0d %0d %0d", run, sig_f, sig_o1, sig_o2, ef, e1, e2);
      end
    end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (sig_f !== '0 || sig_o1 !== '0 || sig_o2 !== '0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
