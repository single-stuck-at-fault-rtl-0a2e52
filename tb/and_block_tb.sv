// and_block_tb: checks the AND array in two configurations.
// 1. The three-term example f = x1 ^ x2x3 ^ x2'x3': exhaustively over x, z
//    and c, with and without a stuck-at on each gate, against the terms
//    written out by hand: x1.c2, x2.x3.c3, x2'.x3'.c2.
// 2. An eight-term, eight-input array whose term t is just x(t+1): with all
//    literals 1 and a single control line high, exactly the terms whose
//    control is that line must be 1. The printed labels of the seven-gate tree
//    are c3,c1,c1,c2,c1,c2,c2,c3.
module and_block_tb;
  logic [2:0] x, z, za, sa_en, sa_val;
  logic [3:0] c;
  logic [7:0] x8, z8, za8;
  logic [3:0] c8;
  int checks = 0, failures = 0;

  and_block dut (.x, .z, .c, .sa_en, .sa_val, .za);

  and_block #(.N(8), .S(8),
              .POS({8'h80, 8'h40, 8'h20, 8'h10, 8'h08, 8'h04, 8'h02, 8'h01}),
              .NEG('0)) dut8 (
    .x(x8), .z(z8), .c(c8), .sa_en(8'h00), .sa_val(8'h00), .za(za8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control line of each of the eight leaves, left to right
  localparam int LAB [8] = '{3, 1, 1, 2, 1, 2, 2, 3};

  initial begin
    for (int v = 0; v < 1024; v++)
      for (int fs = -1; fs < 3; fs++)
        for (int fv = 0; fv < 2; fv++) begin
          logic [2:0] e;
          {c, z, x} = 10'(v);
          sa_en = '0; sa_val = '0;
          if (fs >= 0) begin sa_en[fs] = 1'b1; sa_val[fs] = fv[0]; end
          #1;
          e[0] = x[0] & c[2];
          e[1] = x[1] & x[2] & c[3];
          e[2] = z[1] & z[2] & c[2];
          if (fs >= 0) e[fs] = fv[0];
          checks++;
          if (za !== e) begin
            failures++;
            $display("FAIL x=%b z=%b c=%b fault=%0d/%0d za=%b exp=%b", x, z, c, fs, fv, za, e);
          end
        end
    x8 = '1; z8 = '0;
    for (int j = 1; j <= 3; j++) begin
      logic [7:0] e8;
      c8 = 4'b0001 | (4'b0001 << j);
      #1;
      for (int t = 0; t < 8; t++) e8[t] = (LAB[t] == j);
      checks++;
      if (za8 !== e8) begin
        failures++;
        $display("FAIL eight-leaf labels c%0d: za=%b exp=%b", j, za8, e8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
