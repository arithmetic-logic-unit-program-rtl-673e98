// tb_branch_logic: exhaustive self-check of the c2 (PC mux) logic over every
// one-hot jump/branch line (and none) and all 16 flag combinations, against
// the signed-comparison rules: equal ZF, not equal ~ZF, greater
// ~ZF & NF==OF, greater-or-equal NF==OF.
//
// Combinational: 1 ns settle per vector. The conditions are the original
// design's signed-comparison rules, written directly on the flag values.
module tb_branch_logic;
  import cpu_pkg::*;
  branch_lines_t br;
  flags_t        flags;
  logic          c2;
  int checks = 0, failures = 0;

  branch_logic dut (.br(br), .flags(flags), .c2(c2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int line = 0; line < 6; line++) begin
      for (int f = 0; f < 16; f++) begin
        br = '0;
        case (line)
          0: br.jump = 1;
          1: br.bre  = 1;
          2: br.brne = 1;
          3: br.brg  = 1;
          4: br.brge = 1;
          default: ;
        endcase
        flags = flags_t'(f);
        #1;
        case (line)
          0: exp = 1;
          1: exp = flags.zero;
          2: exp = !flags.zero;
          3: exp = !flags.zero && (flags.negative == flags.overflow);
          4: exp = (flags.negative == flags.overflow);
          default: exp = 0;
        endcase
        checks++;
        if (c2 !== exp) begin
          failures++;
          $display("FAIL line=%0d flags=%b c2=%0d", line, flags, c2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
