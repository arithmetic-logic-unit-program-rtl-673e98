// adder_subtractor: WIDTH-bit ripple-carry adder/subtractor.
//
// With sub = 0 it computes S = X + Y; with sub = 1 it computes S = X - Y as
// X + ~Y + 1: every Y bit passes through an XOR with sub, and sub is also the
// carry into the lowest full adder (c0). carry is the carry out of the top
// stage (c_WIDTH); for a subtraction it is 1 when no borrow occurred, i.e.
// when X >= Y unsigned. overflow is c_WIDTH ^ c_WIDTH-1, the two's-complement
// overflow of the signed result. Combinational.
//
// The structure (XOR on Y, sub as c0, full-adder chain, overflow from the
// two top carries) follows the original design.
module adder_subtractor #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             sub,      // 0: add, 1: subtract
  output logic [WIDTH-1:0] s,
  output logic             carry,
  output logic             overflow
);
  logic [WIDTH:0]   c;
  logic [WIDTH-1:0] y_eff;

  assign c[0]  = sub;
  assign y_eff = y ^ {WIDTH{sub}};

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (.x(x[i]), .y(y_eff[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end

  assign carry    = c[WIDTH];
  assign overflow = c[WIDTH] ^ c[WIDTH-1];
endmodule
