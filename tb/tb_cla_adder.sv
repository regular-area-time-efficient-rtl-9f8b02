// tb_cla_adder: the adder tree at all four sizes of the design, 9, 27, 108
// and 432 bits (LEVELS = 2..5), checked against integer addition.
// Stimulus, applied to all four at once (each takes the low bits):
//   - corner cases: zeros, all ones with and without carry-in, and a carry
//     entering a run of ones of every length 1..432 (a = 2^k - 1, b = 1 or
//     cin = 1), which sends carries through every level of the tree;
//   - random operands, half of them "propagate-heavy" (b close to not a) so
//     that long block-propagate chains occur at all levels.
module tb_cla_adder;
  localparam int W = 432;
  logic [W-1:0] a, b;
  logic         cin;
  int checks = 0, failures = 0;

  logic [8:0]   s9;   logic co9;
  logic [26:0]  s27;  logic co27;
  logic [107:0] s108; logic co108;
  logic [431:0] s432; logic co432;

  cla_adder #(.LEVELS(2)) dut9   (.a(a[8:0]),   .b(b[8:0]),   .cin(cin), .s(s9),   .cout(co9));
  cla_adder #(.LEVELS(3)) dut27  (.a(a[26:0]),  .b(b[26:0]),  .cin(cin), .s(s27),  .cout(co27));
  cla_adder #(.LEVELS(4)) dut108 (.a(a[107:0]), .b(b[107:0]), .cin(cin), .s(s108), .cout(co108));
  cla_adder #(.LEVELS(5)) dut432 (.a(a),        .b(b),        .cin(cin), .s(s432), .cout(co432));

  function automatic logic [W-1:0] rand_vec();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  task automatic check_all();
    logic [W:0] e432;
    logic [108:0] e108;
    logic [27:0]  e27;
    logic [9:0]   e9;
    #1;
    e432 = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    e108 = {1'b0, a[107:0]} + {1'b0, b[107:0]} + 109'(cin);
    e27  = {1'b0, a[26:0]} + {1'b0, b[26:0]} + 28'(cin);
    e9   = {1'b0, a[8:0]} + {1'b0, b[8:0]} + 10'(cin);
    checks += 4;
    if ({co432, s432} !== e432) begin failures++; $display("FAIL 432: a=%h b=%h cin=%b", a, b, cin); end
    if ({co108, s108} !== e108) begin failures++; $display("FAIL 108: a=%h b=%h cin=%b", a[107:0], b[107:0], cin); end
    if ({co27,  s27}  !== e27)  begin failures++; $display("FAIL 27: a=%h b=%h cin=%b s=%h", a[26:0], b[26:0], cin, s27); end
    if ({co9,   s9}   !== e9)   begin failures++; $display("FAIL 9: a=%h b=%h cin=%b s=%h", a[8:0], b[8:0], cin, s9); end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; cin = 0; check_all();
    cin = 1; check_all();
    a = '1; b = '1; cin = 0; check_all();
    cin = 1; check_all();
    a = '1; b = '0; cin = 1; check_all();
    for (int k = 1; k <= W; k++) begin
      a = '0;
      for (int i = 0; i < k; i++) a[i] = 1'b1;
      b = W'(1); cin = 0; check_all();
      b = '0;    cin = 1; check_all();
      b = a;     cin = 1; check_all();
    end
    for (int n = 0; n < 4000; n++) begin
      a   = rand_vec();
      b   = rand_vec();
      cin = 1'($urandom());
      if (n % 2 == 1) b = ~a ^ (rand_vec() & rand_vec() & rand_vec() & rand_vec());
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
