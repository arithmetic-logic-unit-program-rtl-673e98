// alu: the CPU's 8-bit arithmetic logic unit.
//
// Four operations, chosen by ALU_SELECT1/ALU_SELECT0 (control lines c12, c13):
//   00 SHIFTL  result = a << 1          carry = bit shifted out, overflow = 0
//   01 SHIFTR  result = a >> 1          carry = bit shifted out, overflow = 0
//   10 ADD     result = a + b           carry, overflow from the adder
//   11 SUB/CMP result = a - b           carry, overflow from the adder
// Operand a feeds both the shifter and the adder's X input; b feeds only the
// adder. ALU_SELECT0 is the shifter's L/R line and the adder's add/sub line at
// the same time, and ALU_SELECT1 picks which of the two units drives the
// result bus (bus_mux2) and the carry and overflow outputs. Zero and negative
// are computed from the selected result. All four flag outputs go to the flags
// register. Both units compute every cycle; the unselected one is ignored.
// Purely combinational: the result is valid one gate-delay chain after the
// operands, within the CPU's single clock cycle.
//
// The arrangement of shifter, adder and the three muxes follows the original
// design; computing zero and negative after the result mux is this design's
// reading of it.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] result,
  output flags_t           flags
);
  logic             select1, select0;
  logic [WIDTH-1:0] shift_y, sum;
  logic             shift_out, add_carry, add_overflow;

  assign select1 = op[1];
  assign select0 = op[0];

  shifter #(.WIDTH(WIDTH)) u_shifter (
    .d(a), .right(select0), .y(shift_y), .shift_out(shift_out)
  );

  adder_subtractor #(.WIDTH(WIDTH)) u_addsub (
    .x(a), .y(b), .sub(select0), .s(sum), .carry(add_carry), .overflow(add_overflow)
  );

  bus_mux2 #(.WIDTH(WIDTH)) u_result_mux (
    .u(shift_y), .v(sum), .sel(select1), .z(result)
  );

  bus_mux2 #(.WIDTH(1)) u_carry_mux (
    .u(shift_out), .v(add_carry), .sel(select1), .z(flags.carry)
  );

  bus_mux2 #(.WIDTH(1)) u_overflow_mux (
    .u(1'b0), .v(add_overflow), .sel(select1), .z(flags.overflow)
  );

  flag_calculator #(.WIDTH(WIDTH)) u_flag_calc (
    .result(result), .zero(flags.zero), .negative(flags.negative)
  );
endmodule
