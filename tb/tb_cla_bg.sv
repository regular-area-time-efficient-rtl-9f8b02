// tb_cla_bg: exhaustive check of the block carry generation unit in its two
// sizes (3 and 4 inputs) and both carry-in polarities.
// The top-level (g, p) pairs describe carries of the top-level polarity,
// which is the true polarity for an even number of levels below and its
// complement for an odd one. The expected carries come from rippling the
// true carry-in, converted to that polarity, through the pairs; the
// carry-out must be the last carry converted back to true polarity.
module tb_cla_bg;
  int checks = 0, failures = 0;

  logic [2:0] g3, p3, c3e, c3o;
  logic [3:0] g4, p4, c4e, c4o;
  logic       c0, co3e, co3o, co4e, co4o;

  cla_bg #(.R(3), .INVERT(1'b0)) dut3e (.g(g3), .p(p3), .c0(c0), .c(c3e), .cout(co3e));
  cla_bg #(.R(3), .INVERT(1'b1)) dut3o (.g(g3), .p(p3), .c0(c0), .c(c3o), .cout(co3o));
  cla_bg #(.R(4), .INVERT(1'b0)) dut4e (.g(g4), .p(p4), .c0(c0), .c(c4e), .cout(co4e));
  cla_bg #(.R(4), .INVERT(1'b1)) dut4o (.g(g4), .p(p4), .c0(c0), .c(c4o), .cout(co4o));

  task automatic check(input int r, input bit inv, input logic [3:0] g, input logic [3:0] p,
                       input logic cin, input logic [3:0] c, input logic cout);
    logic [4:0] x;
    x[0] = inv ? ~cin : cin;
    for (int j = 0; j < r; j++) x[j+1] = g[j] | (p[j] & x[j]);
    for (int j = 0; j < r; j++) begin
      checks++;
      if (c[j] !== x[j]) begin
        failures++;
        $display("FAIL R=%0d inv=%0d g=%b p=%b c0=%b: c[%0d]=%b expected %b", r, inv, g, p, cin, j, c[j], x[j]);
      end
    end
    checks++;
    if (cout !== (inv ? ~x[r] : x[r])) begin
      failures++;
      $display("FAIL R=%0d inv=%0d g=%b p=%b c0=%b: cout=%b", r, inv, g, p, cin, cout);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {c0, p4, g4} = 9'(v);
      g3 = g4[2:0];
      p3 = p4[2:0];
      #1;
      check(4, 1'b0, g4, p4, c0, c4e, co4e);
      check(4, 1'b1, g4, p4, c0, c4o, co4o);
      if (p4[3] == 1'b0 && g4[3] == 1'b0) begin
        check(3, 1'b0, {1'b0, g3}, {1'b0, p3}, c0, {1'b0, c3e}, co3e);
        check(3, 1'b1, {1'b0, g3}, {1'b0, p3}, c0, {1'b0, c3o}, co3o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
