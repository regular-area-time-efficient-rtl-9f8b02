// tb_cla_bus_adder: complete additions through the shared bus on the
// default (432-bit, 144-unit) adder. Each addition writes every unit's
// operand bits (144 clocks, in random order), latches the sums (1 clock) and
// reads every unit back (144 clocks), then compares the collected sum and
// carry-out with integer addition. The clock count of each addition must be
// exactly 2*N/3 + 1. A second phase rewrites only a few units and checks that
// the others kept their operands.
module tb_cla_bus_adder;
  import cla_pkg::*;
  localparam int unsigned LV = 5;
  localparam int unsigned N  = adder_width(LV);
  localparam int unsigned NP = N / 3;

  logic clk = 0, rst_n;
  cla_bus_t bus;
  logic cin, cout;
  logic [2:0] rd_data;
  int checks = 0, failures = 0;
  longint unsigned cycles = 0;

  cla_bus_adder dut (.clk(clk), .rst_n(rst_n), .bus(bus), .cin(cin),
                     .rd_data(rd_data), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] opa, opb, got;

  task automatic write_unit(input int i);
    bus = '0;
    bus.wr = 1; bus.addr = BUS_ADDR_W'(i);
    bus.wr_a = opa[3*i +: 3]; bus.wr_b = opb[3*i +: 3];
    @(posedge clk); #1;
  endtask

  task automatic latch_and_read();
    bus = '0; bus.latch = 1;
    @(posedge clk); #1;
    for (int i = 0; i < int'(NP); i++) begin
      bus = '0; bus.rd = 1; bus.addr = BUS_ADDR_W'(i);
      #1 got[3*i +: 3] = rd_data;
      @(posedge clk); #1;
    end
    bus = '0;
  endtask

  task automatic compare(input string what);
    logic [N:0] e;
    e = {1'b0, opa} + {1'b0, opb} + (N+1)'(cin);
    checks++;
    if ({cout, got} !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, {cout, got}, e);
    end
  endtask

  initial begin
    bus = '0; cin = 0; rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int order [NP];
      longint unsigned c0;
      for (int i = 0; i < int'(N); i += 32) begin opa[i +: 32] = $urandom(); opb[i +: 32] = $urandom(); end
      if (t == 0) begin opa = '1; opb = '0; end
      if (t == 1) begin opb = ~opa; end
      cin = (t == 0) ? 1'b1 : 1'($urandom());
      foreach (order[i]) order[i] = i;
      order.shuffle();
      c0 = cycles;
      foreach (order[i]) write_unit(order[i]);
      latch_and_read();
      checks++;
      if (cycles - c0 != 2 * NP + 1) begin
        failures++;
        $display("FAIL cycle count %0d, expected %0d", cycles - c0, 2 * NP + 1);
      end
      compare("full addition");
    end
    // rewrite only three units; the others keep their operands
    for (int k = 0; k < 3; k++) begin
      automatic int i = $urandom_range(NP - 1);
      opa[3*i +: 3] = 3'($urandom());
      opb[3*i +: 3] = 3'($urandom());
      write_unit(i);
    end
    latch_and_read();
    compare("partial update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
