// pc_register: the 6-bit program counter register.
//
// A parallel-access register with write enable (PROGRAM_COUNTER_WRITE_EN, c3):
// on a rising clock edge with write_enable = 1 it loads the next address from
// the PC update logic; with write_enable = 0 it holds. Because the CPU
// completes one instruction per cycle, c3 is 1 for every instruction and the
// PC advances every cycle. Reset is asynchronous and active high and puts the
// PC at RESET_PC, 100000 by default: the address where the program sits in
// code memory and the value the PC holds when a program starts.
// Its output drives the six read-select lines of the code memory.
//
// The register, its enable and reset follow the original design; the reset
// value is taken from the example program's starting address (an all-zero
// reset is one parameter change away).
module pc_register #(
  parameter int unsigned      WIDTH    = 6,
  parameter logic [WIDTH-1:0] RESET_PC = 6'b100000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             write_enable,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] pc
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)               pc <= RESET_PC;
    else if (write_enable) pc <= d;
  end
endmodule
