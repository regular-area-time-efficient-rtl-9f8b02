// cla_io_subunit: input/output subunit of one primitive unit, for the
// shared-bus (time-multiplexed) I/O arrangement of the adder.
//
// Every primitive unit sits on common address, data, clock and control
// lines. This subunit holds the unit's operand registers (3 bits of A, 3 of
// B), a sum register (3 bits) and an address decoder comparing the bus
// address with the unit's own address my_addr:
//   - bus.wr with a matching address loads a <= bus.wr_a, b <= bus.wr_b at
//     the clock edge;
//   - bus.latch (a common control line, no address) makes every unit capture
//     the sum bits its P unit produces from the registered operands;
//   - bus.rd with a matching address drives the sum register onto rd_data in
//     the same cycle; otherwise rd_data is 0, so the read bus of all units is
//     formed by OR-ing their rd_data.
// The register and decoder contents are the design's; the bus protocol
// (separate wr / latch / rd strobes, one unit per transfer, synchronous
// active-low reset clearing the registers) is this implementation's choice.
module cla_io_subunit
  import cla_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [BUS_ADDR_W-1:0] my_addr,
  input  cla_bus_t              bus,
  input  logic [P_BITS-1:0]     s,        // sum bits from the P unit
  output logic [P_BITS-1:0]     a,        // registered operand A bits
  output logic [P_BITS-1:0]     b,        // registered operand B bits
  output logic [P_BITS-1:0]     rd_data   // sum register when read, else 0
);
  logic              sel;
  logic [P_BITS-1:0] s_q;

  assign sel = (bus.addr == my_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a   <= '0;
      b   <= '0;
      s_q <= '0;
    end else begin
      if (bus.wr && sel) begin
        a <= bus.wr_a;
        b <= bus.wr_b;
      end
      if (bus.latch) s_q <= s;
    end
  end

  assign rd_data = (bus.rd && sel) ? s_q : '0;
endmodule
