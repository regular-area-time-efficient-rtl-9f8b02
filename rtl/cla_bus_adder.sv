// cla_bus_adder: the carry-lookahead adder with shared-bus I/O.
//
// Instead of bringing all 2N operand and N sum wires to the edge of the
// array, every primitive unit gets an input/output subunit (cla_io_subunit)
// on a common address/data/control bus. The P unit at address i holds bits
// 3i+2..3i. A complete addition is:
//   1. N/3 write cycles, one per unit (bus.wr, bus.addr, bus.wr_a, bus.wr_b);
//      any order, units not written keep their previous operands;
//   2. one cycle with bus.latch: the combinational adder has settled on the
//      registered operands and carry-in cin, and every unit captures its sum
//      bits; the carry-out is captured alongside;
//   3. N/3 read cycles (bus.rd, bus.addr), rd_data shows the addressed unit's
//      sum bits in the same cycle.
// So I/O takes N/3 clocks each way with this single bus; the addition itself
// is the one latch cycle. The bus widths, the strobe protocol, cin as a plain
// control line and the registered carry-out are this implementation's
// choices; the design only fixes registers plus an address decoder per unit.
//
// Assertions: a write or read may only address an existing unit.
module cla_bus_adder
  import cla_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  localparam int unsigned N     = adder_width(LEVELS),
  localparam int unsigned NP    = N / P_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cla_bus_t          bus,
  input  logic              cin,
  output logic [P_BITS-1:0] rd_data,
  output logic              cout
);
  logic [N-1:0] a, b, s;
  logic         cout_comb;
  logic [P_BITS-1:0] rd_unit [NP];

  initial begin : check_addr
    assert (NP <= (1 << BUS_ADDR_W))
      else $fatal(1, "cla_bus_adder: too many units for BUS_ADDR_W");
  end

  for (genvar i = 0; i < int'(NP); i++) begin : g_io
    cla_io_subunit u_io (
      .clk     (clk),
      .rst_n   (rst_n),
      .my_addr (BUS_ADDR_W'(i)),
      .bus     (bus),
      .s       (s[P_BITS*i +: P_BITS]),
      .a       (a[P_BITS*i +: P_BITS]),
      .b       (b[P_BITS*i +: P_BITS]),
      .rd_data (rd_unit[i])
    );
  end

  cla_adder #(.LEVELS(LEVELS)) u_add (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .s    (s),
    .cout (cout_comb)
  );

  // Wired-OR read bus: only the addressed unit drives non-zero data.
  always_comb begin
    rd_data = '0;
    for (int unsigned i = 0; i < NP; i++) rd_data |= rd_unit[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         cout <= 1'b0;
    else if (bus.latch) cout <= cout_comb;
  end

  a_addr_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    (bus.wr || bus.rd) |-> (32'(bus.addr) < NP))
    else $error("cla_bus_adder: bus address %0d beyond last unit", bus.addr);
endmodule
