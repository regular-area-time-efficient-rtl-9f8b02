// cla_top: the carry-lookahead adder in both of its I/O arrangements, side
// by side, each with its own ports.
//
//  - Parallel ("boundary") I/O: cla_adder with every operand and sum bit
//    brought out (par_a, par_b, par_cin -> par_s, par_cout). Combinational:
//    the sum is valid one tree pass-up-and-down after the operands change.
//  - Shared-bus I/O: cla_bus_adder, operands written and sums read one
//    primitive unit (3 bits) per clock over an addressed bus (bus_*).
//
// LEVELS sets the size of both: 5 levels = 432 bits (the default), 4 = 108,
// 3 = 27, 2 = 9.
module cla_top
  import cla_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  localparam int unsigned N     = adder_width(LEVELS)
) (
  // parallel I/O adder
  input  logic [N-1:0]      par_a,
  input  logic [N-1:0]      par_b,
  input  logic              par_cin,
  output logic [N-1:0]      par_s,
  output logic              par_cout,
  // shared-bus I/O adder
  input  logic              clk,
  input  logic              rst_n,
  input  cla_bus_t          bus,
  input  logic              bus_cin,
  output logic [P_BITS-1:0] bus_rd_data,
  output logic              bus_cout
);
  cla_adder #(.LEVELS(LEVELS)) u_par (
    .a    (par_a),
    .b    (par_b),
    .cin  (par_cin),
    .s    (par_s),
    .cout (par_cout)
  );

  cla_bus_adder #(.LEVELS(LEVELS)) u_bus (
    .clk     (clk),
    .rst_n   (rst_n),
    .bus     (bus),
    .cin     (bus_cin),
    .rd_data (bus_rd_data),
    .cout    (bus_cout)
  );
endmodule
