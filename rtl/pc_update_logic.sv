// pc_update_logic: computes the two candidate next values of the PC.
//
// pc_next   = PC + 1                (sequential execution)
// pc_branch = PC + 1 + offset       (jump or taken branch)
// Both are WIDTH-bit add-only ripple-carry adders (carry-in tied to 0). The
// offset is the low WIDTH bits of the instruction's immediate byte, a
// two's-complement number, so a branch can go forward or backward; it is
// stored with a "+1 correction": to move by d instructions from the current
// one, the program stores d - 1. Carries and overflows are dropped, so the PC
// wraps around: 111111 + 1 = 000000. The PC mux (c2) chooses between the two
// outputs. Combinational.
//
// The two adders and the +1 correction follow the original design. The
// carry outs of the top stages are left unconnected on purpose: dropping them
// is what makes the PC wrap.
module pc_update_logic #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] pc,
  input  logic [WIDTH-1:0] offset,
  output logic [WIDTH-1:0] pc_next,
  output logic [WIDTH-1:0] pc_branch
);
  logic [WIDTH:0] c_inc, c_off;

  // First adder: PC + 1.
  assign c_inc[0] = 1'b0;
  for (genvar i = 0; i < WIDTH; i++) begin : g_inc
    full_adder u_fa (.x(pc[i]), .y(i == 0 ? 1'b1 : 1'b0), .cin(c_inc[i]),
                     .s(pc_next[i]), .cout(c_inc[i+1]));
  end

  // Second adder: (PC + 1) + offset.
  assign c_off[0] = 1'b0;
  for (genvar i = 0; i < WIDTH; i++) begin : g_off
    full_adder u_fa (.x(pc_next[i]), .y(offset[i]), .cin(c_off[i]),
                     .s(pc_branch[i]), .cout(c_off[i+1]));
  end
endmodule
