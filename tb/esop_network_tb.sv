// esop_network_tb: checks the network for f = x1 ^ x2x3 ^ x2'x3'.
// For all 128 combinations of c0..c3 and x1..x3, with no fault and with each
// of the 28 single stuck-at faults, f, o1 and o2 are compared with a model
// written from the gate list: z1 = x2^c0, z2 = x3^c0, za1 = x1.c2,
// za2 = x2.x3.c3, za3 = z1.z2.c2, zx1 = za1^za2, f = zx1^za3,
// o1 = AND and o2 = OR of c0..c3, x1..x3. With c = 1111 f must also equal
// the expression itself.
module esop_network_tb;
  logic [3:0] c;
  logic [2:0] x;
  logic fault_en, fault_val;
  logic [3:0] fault_site;
  logic f, o1, o2;
  int checks = 0, failures = 0;

  esop_network dut (.c, .x, .fault_en, .fault_site, .fault_val, .f, .o1, .o2);

  // Site numbers of the 14 fault locations of this network, in the order
  // c0..c3, x1..x3, z1, z2, za1..za3, zx1, zx2(=f).
  localparam int SITE [14] = '{0, 1, 2, 3, 4, 5, 6, 8, 9, 10, 11, 12, 14, 13};

  function automatic logic [2:0] model(logic [3:0] cc, logic [2:0] xx, int fi, logic fv);
    logic [3:0] ci; logic [2:0] xi;
    logic z1, z2, a1, a2, a3, t1, ff;
    ci = cc; xi = xx;
    if (fi >= 0 && fi < 4) ci[fi] = fv;
    if (fi >= 4 && fi < 7) xi[fi-4] = fv;
    z1 = (fi == 7) ? fv : xi[1] ^ ci[0];
    z2 = (fi == 8) ? fv : xi[2] ^ ci[0];
    a1 = (fi == 9)  ? fv : xi[0] & ci[2];
    a2 = (fi == 10) ? fv : xi[1] & xi[2] & ci[3];
    a3 = (fi == 11) ? fv : z1 & z2 & ci[2];
    t1 = (fi == 12) ? fv : a1 ^ a2;
    ff = (fi == 13) ? fv : t1 ^ a3;
    return {ff, &{ci, xi}, |{ci, xi}};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_en = 0; fault_site = '0; fault_val = 0;
    for (int fi = -1; fi < 14; fi++)
      for (int fv = 0; fv < 2; fv++)
        for (int v = 0; v < 128; v++) begin
          logic [2:0] e;
          {x, c} = 7'(v);
          fault_en = (fi >= 0);
          fault_site = (fi >= 0) ? 4'(SITE[fi]) : 4'd0;
          fault_val = fv[0];
          #1;
          e = model(c, x, fi, fv[0]);
          checks++;
          if ({f, o1, o2} !== e) begin
            failures++;
            $display("FAIL c=%b x=%b fault=%0d/%0d got=%b exp=%b", c, x, fi, fv, {f, o1, o2}, e);
          end
        end
    // normal operation: the expression itself
    fault_en = 0; c = 4'b1111;
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      #1;
      checks++;
      if (f !== (x[0] ^ (x[1] & x[2]) ^ (~x[1] & ~x[2]))) begin
        failures++; $display("FAIL function x=%b f=%b", x, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
