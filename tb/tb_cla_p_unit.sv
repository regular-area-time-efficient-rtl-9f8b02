// tb_cla_p_unit: exhaustive check of the primitive unit.
// For all 128 combinations of a[2:0], b[2:0] and the complemented carry cd it
// checks the sum against integer addition with carry-in = not cd, and checks
// that the unit's (g1, p1) reproduce the complemented carry out of its three
// bits through not(cout) = g1 + p1 cd, for the carry-in actually applied.
module tb_cla_p_unit;
  logic [2:0] a, b, s;
  logic       cd, g1, p1;
  int checks = 0, failures = 0;

  cla_p_unit dut (.a(a), .b(b), .cd(cd), .g1(g1), .p1(p1), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int unsigned sum;
      logic cin, cout;
      {cd, b, a} = 7'(v);
      cin  = ~cd;
      #1;
      sum  = 32'(a) + 32'(b) + 32'(cin);
      cout = sum[3];
      checks++;
      if (s !== sum[2:0]) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: s=%0d expected %0d", a, b, cin, s, sum[2:0]);
      end
      checks++;
      if (~cout !== (g1 | (p1 & cd))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: g1=%b p1=%b do not give carry %b", a, b, cin, g1, p1, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
