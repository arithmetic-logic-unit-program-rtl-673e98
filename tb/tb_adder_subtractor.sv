// tb_adder_subtractor: exhaustive self-check of the 8-bit adder/subtractor.
// For all 65536 operand pairs, in add and in subtract mode, the sum, the
// carry out and the signed overflow are compared with integer arithmetic.
//
// Combinational: inputs are applied, 1 ns allowed to settle, outputs sampled.
// The expected overflow is whether the signed result leaves -128..127, not
// derived from the carries, so it checks the c8 ^ c7 form independently.
module tb_adder_subtractor;
  logic [7:0] x, y, s;
  logic       sub, carry, overflow;
  int checks = 0, failures = 0;

  adder_subtractor #(.WIDTH(8)) dut (.x(x), .y(y), .sub(sub), .s(s),
                                     .carry(carry), .overflow(overflow));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full, signed_res;
    logic exp_c, exp_v;
    for (int m = 0; m < 2; m++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          x = 8'(i); y = 8'(j); sub = m[0];
          #1;
          if (m == 0) begin
            full       = i + j;
            signed_res = int'($signed(x)) + int'($signed(y));
          end else begin
            full       = i + (255 - j) + 1;   // x + ~y + 1
            signed_res = int'($signed(x)) - int'($signed(y));
          end
          exp_c = full[8];
          exp_v = (signed_res > 127) || (signed_res < -128);
          checks++;
          if (s !== 8'(full) || carry !== exp_c || overflow !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL x=%0d y=%0d sub=%0d s=%0d c=%0d v=%0d", i, j, m, s, carry, overflow);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
