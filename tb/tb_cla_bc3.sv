// tb_cla_bc3: exhaustive check of the 3-input block carry unit.
// The children's (g, p) describe a carry chain x_{j+1} = g_j + p_j x_j. For
// every g, p (any pairs, not only those with p covering g) and every carry
// cin, it checks that the unit hands child j the carry x_j of that chain
// started from x_0 = not cin, and that the upward pair satisfies
// not(x_3) = gk + pk cin, the chain's carry out in the opposite polarity.
module tb_cla_bc3;
  localparam int R = 3;
  logic [R-1:0] g, p, c;
  logic         cin, gk, pk;
  int checks = 0, failures = 0;

  cla_bc3 dut (.g(g), .p(p), .cin(cin), .gk(gk), .pk(pk), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*R+1)); v++) begin
      logic [R:0] x;
      {cin, p, g} = (2*R+1)'(v);
      #1;
      x[0] = ~cin;
      for (int j = 0; j < R; j++) x[j+1] = g[j] | (p[j] & x[j]);
      checks++;
      if (c !== x[R-1:0]) begin
        failures++;
        $display("FAIL g=%b p=%b cin=%b: c=%b expected %b", g, p, cin, c, x[R-1:0]);
      end
      checks++;
      if (~x[R] !== (gk | (pk & cin))) begin
        failures++;
        $display("FAIL g=%b p=%b cin=%b: gk=%b pk=%b wrong", g, p, cin, gk, pk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
