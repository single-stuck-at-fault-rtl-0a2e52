// aux_gates_tb: exhaustive check of the auxiliary AND/OR gates over seven
// inputs (c0..c3, x1..x3): o1 must be 1 only for all ones, o2 must be 0 only
// for all zeros.
module aux_gates_tb;
  logic [6:0] in;
  logic o1, o2;
  int checks = 0, failures = 0;

  aux_gates #(.W(7)) dut (.in, .o1, .o2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      in = 7'(v);
      #1;
      checks += 2;
      if (o1 !== (v == 127)) begin failures++; $display("FAIL o1 in=%b", in); end
      if (o2 !== (v != 0))   begin failures++; $display("FAIL o2 in=%b", in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
