// flags_register: the 4-bit flags register (carry, overflow, negative, zero).
//
// A parallel-access register: on each rising clock edge every bit loads its
// new value when write_enable (FLAGS_WRITE_ENABLE, c14) is 1 and keeps its
// old value when it is 0 (a 2-to-1 mux in front of each D flip-flop). Only
// the seven flag-setting instructions (ADD, ADDI, SUB, SUBI, SHIFTL, SHIFTR,
// CMP) raise write_enable. The asynchronous, active-high reset to all zeros
// is this design's addition so that the flags start at a known value.
module flags_register
  import cpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   write_enable,
  input  flags_t d,
  output flags_t q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)               q <= '0;
    else if (write_enable) q <= d;
  end
endmodule
