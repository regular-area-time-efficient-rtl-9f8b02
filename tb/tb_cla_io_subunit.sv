// tb_cla_io_subunit: checks one I/O subunit on the shared bus: reset clears
// the registers; a write loads a/b only when the address matches; latch
// captures the sum input regardless of address; a read drives the sum
// register only when the address matches and rd is high, else 0.
// A reference model of the three registers is kept alongside.
module tb_cla_io_subunit;
  import cla_pkg::*;
  localparam logic [BUS_ADDR_W-1:0] MY = BUS_ADDR_W'(37);

  logic clk = 0, rst_n;
  cla_bus_t bus;
  logic [2:0] s, a, b, rd_data;
  logic [2:0] ea, eb, es;   // expected register contents
  int checks = 0, failures = 0;
  int writes_hit = 0, writes_miss = 0, reads_hit = 0;

  cla_io_subunit dut (.clk(clk), .rst_n(rst_n), .my_addr(MY), .bus(bus), .s(s),
                      .a(a), .b(b), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0; s = '0; rst_n = 0;
    ea = '0; eb = '0; es = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // drive a random bus cycle, addressing this unit about half the time
      bus.addr  = ($urandom_range(1) == 1) ? MY : BUS_ADDR_W'($urandom());
      bus.wr    = 1'($urandom());
      bus.wr_a  = 3'($urandom());
      bus.wr_b  = 3'($urandom());
      bus.latch = ($urandom_range(3) == 0);
      bus.rd    = 1'($urandom());
      s         = 3'($urandom());
      #1;
      checks++;
      if (rd_data !== ((bus.rd && bus.addr == MY) ? es : 3'b0)) begin
        failures++;
        $display("FAIL read: addr=%0d rd=%b data=%b expected reg %b", bus.addr, bus.rd, rd_data, es);
      end
      if (bus.rd && bus.addr == MY) reads_hit++;
      @(posedge clk);
      if (bus.wr && bus.addr == MY) begin ea = bus.wr_a; eb = bus.wr_b; writes_hit++; end
      else if (bus.wr) writes_miss++;
      if (bus.latch) es = s;
      #1;
      checks++;
      if (a !== ea || b !== eb) begin
        failures++;
        $display("FAIL regs: a=%b b=%b expected %b %b", a, b, ea, eb);
      end
    end
    // reset clears everything
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    bus = '0; bus.addr = MY; bus.rd = 1; #1;
    checks++;
    if (a !== 0 || b !== 0 || rd_data !== 0) begin failures++; $display("FAIL reset"); end
    checks++;
    if (writes_hit == 0 || writes_miss == 0 || reads_hit == 0) begin
      failures++; $display("FAIL coverage: hit=%0d miss=%0d reads=%0d", writes_hit, writes_miss, reads_hit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
