// xor_tree_tb: checks the XOR tree.
// Three terms: the tree must be f = (za1 ^ za2) ^ za3, written out by hand;
// all inputs, every stuck-at on the inner gate (node 2) and on the output
// gate (node 1). Eight terms: without faults f is the parity of all inputs
// (random inputs), and a stuck-at on the gate joining leaves 1 and 2 (node 4)
// replaces za1 ^ za2 by the forced value.
module xor_tree_tb;
  logic [2:0] za;
  logic [1:0] sa_en, sa_val;
  logic f;
  logic [7:0] za8;
  logic [6:0] en8, val8;
  logic f8;
  int checks = 0, failures = 0;

  xor_tree #(.S(3)) dut (.za, .sa_en, .sa_val, .f);
  xor_tree #(.S(8)) dut8 (.za(za8), .sa_en(en8), .sa_val(val8), .f(f8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++)
      for (int fs = 0; fs < 3; fs++)   // 0: none, 1: output gate, 2: inner gate
        for (int fv = 0; fv < 2; fv++) begin
          logic inner, e;
          za = 3'(v);
          sa_en = '0; sa_val = '0;
          if (fs > 0) begin sa_en[fs-1] = 1'b1; sa_val[fs-1] = fv[0]; end
          #1;
          inner = (fs == 2) ? fv[0] : (za[0] ^ za[1]);
          e = (fs == 1) ? fv[0] : (inner ^ za[2]);
          checks++;
          if (f !== e) begin
            failures++;
            $display("FAIL za=%b fault=%0d/%0d f=%b exp=%b", za, fs, fv, f, e);
          end
        end
    for (int r = 0; r < 200; r++) begin
      za8 = 8'($urandom);
      en8 = '0; val8 = '0;
      if (r % 2 == 1) begin en8[3] = 1'b1; val8[3] = r[1]; end
      #1;
      checks++;
      if (r % 2 == 0) begin
        if (f8 !== ^za8) begin failures++; $display("FAIL parity za=%b", za8); end
      end else begin
        if (f8 !== (r[1] ^ (^za8[7:2]))) begin
          failures++; $display("FAIL node4 stuck za=%b", za8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
