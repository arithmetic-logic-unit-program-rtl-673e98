// tb_flags_register: self-check of the 4-bit flags register. Random flag
// values are presented with a random write enable for 500 cycles; after each
// rising edge the register must hold the new value if enabled and the old
// one otherwise. Reset must clear it.
//
// 10 ns clock; values are checked just after each rising edge.
module tb_flags_register;
  import cpu_pkg::*;
  logic   clk = 0, rst, we;
  flags_t d, q, model;
  int checks = 0, failures = 0;

  flags_register dut (.clk(clk), .rst(rst), .write_enable(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '1;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%b", q); end
    rst = 0; model = '0;
    for (int i = 0; i < 500; i++) begin
      d  = flags_t'($urandom_range(0, 15));
      we = $urandom_range(0, 1) == 1;
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d we=%0d q=%b expected %b", i, we, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
