// tb_pc_update_logic: exhaustive self-check of the PC update adders for all
// 64 PC values and 64 offsets, including the wrap from 111111 to 000000, plus
// the two branch offsets of the sample program (BRG +3 and JUMP -5).
//
// Combinational: 1 ns settle per vector. Expected values are (pc + 1) and
// (pc + 1 + offset) modulo 64, the +1 correction of the original design.
module tb_pc_update_logic;
  logic [5:0] pc, offset, pc_next, pc_branch;
  int checks = 0, failures = 0;

  pc_update_logic #(.WIDTH(6)) dut (.pc(pc), .offset(offset),
                                    .pc_next(pc_next), .pc_branch(pc_branch));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 64; p++) begin
      for (int o = 0; o < 64; o++) begin
        pc = 6'(p); offset = 6'(o);
        #1;
        checks++;
        if (pc_next !== 6'((p + 1) % 64) || pc_branch !== 6'((p + 1 + o) % 64)) begin
          failures++;
          $display("FAIL pc=%0d off=%0d next=%0d branch=%0d", p, o, pc_next, pc_branch);
        end
      end
    end
    // BRG End at 100100 with offset 00000011 goes to 101000
    pc = 6'b100100; offset = 6'b000011; #1;
    checks++;
    if (pc_branch !== 6'b101000) begin failures++; $display("FAIL BRG target %b", pc_branch); end
    // JUMP Loop at 100111 with offset 11111011 (-5) goes to 100011
    pc = 6'b100111; offset = 6'b111011; #1;
    checks++;
    if (pc_branch !== 6'b100011) begin failures++; $display("FAIL JUMP target %b", pc_branch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
