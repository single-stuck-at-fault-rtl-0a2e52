// lit_complement_tb: exhaustive check of the literal-complementing block for
// N = 3 with gates on x2 and x3 only (mask 3'b110): every x, both c0 values,
// no fault and every stuck-at on every bit. Expected z is worked out bit by
// bit: x^c0 where a gate exists, forced value on a faulted gate, 0 elsewhere.
module lit_complement_tb;
  localparam int unsigned N = 3;
  localparam logic [N-1:0] MASK = 3'b110;
  logic [N-1:0] x, sa_en, sa_val, z;
  logic c0;
  int checks = 0, failures = 0;

  lit_complement #(.N(N), .COMP_MASK(MASK)) dut (.x, .c0, .sa_en, .sa_val, .z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 8; xv++)
      for (int cv = 0; cv < 2; cv++)
        for (int fs = -1; fs < int'(N); fs++)
          for (int fv = 0; fv < 2; fv++) begin
            logic [N-1:0] exp_z;
            x = N'(xv); c0 = cv[0];
            sa_en = '0; sa_val = '0;
            if (fs >= 0) begin sa_en[fs] = 1'b1; sa_val[fs] = fv[0]; end
            #1;
            for (int i = 0; i < int'(N); i++) begin
              if (!MASK[i])              exp_z[i] = 1'b0;
              else if (fs == i)          exp_z[i] = fv[0];
              else                       exp_z[i] = (xv >> i & 1) != cv;
            end
            checks++;
            if (z !== exp_z) begin
              failures++;
              $display("FAIL x=%b c0=%b fault=%0d/%0d z=%b exp=%b", x, c0, fs, fv, z, exp_z);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
