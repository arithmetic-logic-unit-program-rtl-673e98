// shifter: WIDTH-bit shifter that moves its input one position.
//
// right = 0 (L): y = {d[WIDTH-2:0], 0}, shift_out = d[WIDTH-1].
// right = 1 (R): y = {0, d[WIDTH-1:1]}, shift_out = d[0].
// The vacated bit is filled with 0 (a logical shift, this design's choice).
// shift_out is the bit that falls off and becomes the carry flag of SHIFTL
// and SHIFTR. Combinational.
module shifter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] d,
  input  logic             right,     // the L/R line: 0 left, 1 right
  output logic [WIDTH-1:0] y,
  output logic             shift_out
);
  always_comb begin
    if (right) begin
      y         = {1'b0, d[WIDTH-1:1]};
      shift_out = d[0];
    end else begin
      y         = {d[WIDTH-2:0], 1'b0};
      shift_out = d[WIDTH-1];
    end
  end
endmodule
