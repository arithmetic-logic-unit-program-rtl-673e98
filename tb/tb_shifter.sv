// tb_shifter: exhaustive self-check of the 8-bit one-position shifter in both
// directions: shifted value with a 0 filled in, and the bit shifted out.
//
// Combinational: all 256 operands in each direction, 1 ns settle each.
module tb_shifter;
  logic [7:0] d, y;
  logic       right, shift_out;
  int checks = 0, failures = 0;

  shifter #(.WIDTH(8)) dut (.d(d), .right(right), .y(y), .shift_out(shift_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey, eo;
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 256; i++) begin
        d = 8'(i); right = r[0];
        #1;
        if (r == 0) begin ey = (i * 2) % 256; eo = i / 128; end
        else        begin ey = i / 2;         eo = i % 2;   end
        checks++;
        if (y !== 8'(ey) || shift_out !== eo[0]) begin
          failures++;
          $display("FAIL d=%b right=%0d y=%b out=%0d", d, right, y, shift_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
