// full_adder: one-bit full adder, the cell of the ripple-carry chains in
// adder_subtractor and pc_update_logic. s = x ^ y ^ cin; cout is the
// majority of the three inputs. Combinational.
//
// Textbook cell; the original design draws it only as a box.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end
endmodule
