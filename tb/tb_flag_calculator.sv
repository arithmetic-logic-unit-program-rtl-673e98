// tb_flag_calculator: exhaustive self-check of the zero and negative flags.
//
// All 256 values are applied, 1 ns settle each; zero = all bits 0 and
// negative = bit 7 are checked with integer comparisons.
module tb_flag_calculator;
  logic [7:0] result;
  logic       zero, negative;
  int checks = 0, failures = 0;

  flag_calculator #(.WIDTH(8)) dut (.result(result), .zero(zero), .negative(negative));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      result = 8'(i);
      #1;
      checks++;
      if (zero !== (i == 0) || negative !== (i >= 128)) begin
        failures++;
        $display("FAIL result=%0d zero=%0d negative=%0d", i, zero, negative);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
