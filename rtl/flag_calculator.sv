// flag_calculator: zero and negative flags of a WIDTH-bit result.
//
// zero is the NOR of all result bits; negative is the sign bit, result[WIDTH-1].
// Combinational.
//
// Follows the original design.
module flag_calculator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             negative
);
  always_comb begin
    zero     = ~(|result);
    negative = result[WIDTH-1];
  end
endmodule
