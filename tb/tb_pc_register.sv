// tb_pc_register: self-check of the 6-bit PC register: reset value 100000,
// load on write enable, hold without it, and asynchronous reset in mid-cycle.
//
// 10 ns clock. The reset value 100000 is the address the original design's
// example program starts at.
module tb_pc_register;
  logic       clk = 0, rst, we;
  logic [5:0] d, pc, model;
  int checks = 0, failures = 0;

  pc_register dut (.clk(clk), .rst(rst), .write_enable(we), .d(d), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 1; d = 6'h15;
    @(posedge clk); #1;
    checks++;
    if (pc !== 6'b100000) begin failures++; $display("FAIL reset pc=%b", pc); end
    rst = 0; model = 6'b100000;
    for (int i = 0; i < 300; i++) begin
      d  = 6'($urandom_range(0, 63));
      we = $urandom_range(0, 3) != 0;
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL cycle %0d we=%0d pc=%b expected %b", i, we, pc, model);
      end
    end
    // asynchronous reset between clock edges
    #2 rst = 1; #1;
    checks++;
    if (pc !== 6'b100000) begin failures++; $display("FAIL async reset pc=%b", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
