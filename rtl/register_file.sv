// register_file: four 8-bit general registers A, B, C, D (select 00..11).
//
// Two combinational read ports (port 0 feeds the ALU's a operand; port 1
// feeds the ALU source mux and the data-memory input mux) and one write port
// that stores write_data into register write_sel on the rising clock edge
// when write_enable (REGISTERS_WRITE_ENABLE, c10) is 1. A register read and
// written by the same instruction shows its old value until the edge, which
// is what lets "ADD B, A" read B and write B in one cycle. The asynchronous,
// active-high reset to zero is this design's choice.
module register_file
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned NREGS = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] port0_sel,
  input  logic [$clog2(NREGS)-1:0] port1_sel,
  output logic [WIDTH-1:0]         port0_data,
  output logic [WIDTH-1:0]         port1_data,
  input  logic [$clog2(NREGS)-1:0] write_sel,
  input  logic                     write_enable,
  input  logic [WIDTH-1:0]         write_data
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (write_enable) begin
      regs[write_sel] <= write_data;
    end
  end

  assign port0_data = regs[port0_sel];
  assign port1_data = regs[port1_sel];
endmodule
