// tb_cla_top: end-to-end test of the top level at its default size (432
// bits), both I/O arrangements.
//  - Parallel adder: directed and random additions checked against integer
//    addition. For each it records which tree levels had to deliver a carry
//    into a block boundary (bit 3k: a P-unit boundary, set by a level-1 BC3;
//    9k: level-2 BC3; 27k: BC4; 108k: BG), and whether a carry ran the full
//    width or came out as carry-out. Each of these must happen at least once.
//  - Bus adder: whole additions through the bus (write every unit, latch,
//    read every unit), results compared with integer addition and with the
//    parallel adder given the same operands; cycle count per addition checked
//    (2*N/3 + 1); one partial rewrite; writes, latches and reads counted.
module tb_cla_top;
  import cla_pkg::*;
  localparam int unsigned N  = adder_width(5);
  localparam int unsigned NP = N / 3;

  logic [N-1:0] par_a, par_b, par_s;
  logic         par_cin, par_cout;
  logic         clk = 0, rst_n;
  cla_bus_t     bus;
  logic         bus_cin, bus_cout;
  logic [2:0]   bus_rd_data;

  int checks = 0, failures = 0;
  int n_carry_l1 = 0, n_carry_l2 = 0, n_carry_l3 = 0, n_carry_bg = 0;
  int n_full_run = 0, n_cout = 0;
  int n_wr = 0, n_latch = 0, n_rd = 0, n_partial = 0;
  longint unsigned cycles = 0;

  cla_top dut (
    .par_a(par_a), .par_b(par_b), .par_cin(par_cin), .par_s(par_s), .par_cout(par_cout),
    .clk(clk), .rst_n(rst_n), .bus(bus), .bus_cin(bus_cin),
    .bus_rd_data(bus_rd_data), .bus_cout(bus_cout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int i = 0; i < int'(N); i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  task automatic par_add(input logic [N-1:0] x, input logic [N-1:0] y, input logic ci);
    logic [N:0]   e;
    logic [N-1:0] cy;   // carry into each bit
    par_a = x; par_b = y; par_cin = ci;
    #1;
    e = {1'b0, x} + {1'b0, y} + (N+1)'(ci);
    checks++;
    if ({par_cout, par_s} !== e) begin
      failures++;
      $display("FAIL parallel: a=%h b=%h cin=%b", x, y, ci);
    end
    cy = x ^ y ^ e[N-1:0];
    for (int i = 3; i < int'(N); i += 3) begin
      if (cy[i]) begin
        if (i % 108 == 0)     n_carry_bg++;
        else if (i % 27 == 0) n_carry_l3++;
        else if (i % 9 == 0)  n_carry_l2++;
        else                  n_carry_l1++;
      end
    end
    if (cy == '1 && ci) n_full_run++;
    if (e[N]) n_cout++;
  endtask

  logic [N-1:0] opa, opb, got;

  task automatic bus_write(input int i);
    bus = '0; bus.wr = 1; bus.addr = BUS_ADDR_W'(i);
    bus.wr_a = opa[3*i +: 3]; bus.wr_b = opb[3*i +: 3];
    @(posedge clk); #1;
    n_wr++;
  endtask

  task automatic bus_latch_read();
    bus = '0; bus.latch = 1;
    @(posedge clk); #1;
    n_latch++;
    for (int i = 0; i < int'(NP); i++) begin
      bus = '0; bus.rd = 1; bus.addr = BUS_ADDR_W'(i);
      #1 got[3*i +: 3] = bus_rd_data;
      n_rd++;
      @(posedge clk); #1;
    end
    bus = '0;
  endtask

  task automatic bus_compare(input string what);
    logic [N:0] e;
    e = {1'b0, opa} + {1'b0, opb} + (N+1)'(bus_cin);
    checks++;
    if ({bus_cout, got} !== e) begin
      failures++;
      $display("FAIL bus %s: got %h expected %h", what, {bus_cout, got}, e);
    end
    par_add(opa, opb, bus_cin);
    checks++;
    if ({par_cout, par_s} !== {bus_cout, got}) begin
      failures++;
      $display("FAIL bus %s: bus and parallel adders disagree", what);
    end
  endtask

  initial begin
    bus = '0; bus_cin = 0; rst_n = 0;
    par_a = '0; par_b = '0; par_cin = 0;
    // parallel adder
    par_add('0, '0, 1'b0);
    par_add('1, '0, 1'b1);          // carry runs the full width
    par_add('1, '1, 1'b1);
    for (int k = 0; k < int'(N); k += 3) par_add(N'((N+1)'(1) << k) - N'(1), N'(1), 1'b0);
    for (int n = 0; n < 2000; n++) begin
      automatic logic [N-1:0] x = rand_vec();
      automatic logic [N-1:0] y = (n % 2 == 1) ? ~x ^ (rand_vec() & rand_vec() & rand_vec()) : rand_vec();
      par_add(x, y, 1'($urandom()));
    end

    // bus adder
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      automatic longint unsigned c0 = cycles;
      opa = rand_vec();
      opb = (t == 0) ? ~opa : rand_vec();
      bus_cin = (t == 0) ? 1'b1 : 1'($urandom());
      for (int i = int'(NP) - 1; i >= 0; i--) bus_write(i);
      bus_latch_read();
      checks++;
      if (cycles - c0 != 2 * NP + 1) begin
        failures++;
        $display("FAIL bus cycle count %0d, expected %0d", cycles - c0, 2 * NP + 1);
      end
      bus_compare("addition");
    end
    for (int k = 0; k < 5; k++) begin
      automatic int i = $urandom_range(NP - 1);
      opa[3*i +: 3] = 3'($urandom());
      opb[3*i +: 3] = 3'($urandom());
      bus_write(i);
      n_partial++;
    end
    bus_latch_read();
    bus_compare("partial rewrite");

    $display("carries delivered: level-1 %0d, level-2 %0d, BC4 %0d, BG %0d; full-width runs %0d; carry-outs %0d",
             n_carry_l1, n_carry_l2, n_carry_l3, n_carry_bg, n_full_run, n_cout);
    $display("bus: writes %0d, latches %0d, reads %0d, partial rewrites %0d", n_wr, n_latch, n_rd, n_partial);
    checks++;
    if (n_carry_l1 == 0 || n_carry_l2 == 0 || n_carry_l3 == 0 || n_carry_bg == 0 ||
        n_full_run == 0 || n_cout == 0 || n_wr == 0 || n_latch == 0 || n_rd == 0 || n_partial == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
