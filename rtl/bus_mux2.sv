// bus_mux2: 2-to-1 bus multiplexer.
//
// Z = sel ? V : U, bit by bit. Each bit is the classic two-AND-one-OR
// multiplexer: (U_i & ~sel) | (V_i & sel). The CPU uses this block for its
// internal ALU result bus (selected by ALU_SELECT1) and for the other
// two-way choices of the datapath (ALU source, ALU result, data-memory input,
// register write-back). Purely combinational.
// WIDTH defaults to the 8-bit lines of the datapath.
//
// The per-bit gate form follows the original design.
module bus_mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] u,    // input 0
  input  logic [WIDTH-1:0] v,    // input 1
  input  logic             sel,
  output logic [WIDTH-1:0] z
);
  always_comb z = (u & {WIDTH{~sel}}) | (v & {WIDTH{sel}});
endmodule
