// tb_data_memory: self-check of the 256-byte data memory: fill every byte,
// read all back, then random reads and writes against a model array.
//
// A 10 ns clock drives the write port; reads are combinational and checked
// before and after each edge.
module tb_data_memory;
  logic       clk = 0, we;
  logic [7:0] addr, rdata, wdata;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  data_memory #(.ADDR_W(8), .DATA_W(8)) dut (
    .clk(clk), .addr(addr), .rdata(rdata), .we(we), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int i = 0; i < 256; i++) begin
      model[i] = 8'($urandom_range(0, 255));
      addr = 8'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL addr %0d", i); end
    end
    for (int i = 0; i < 600; i++) begin
      we    = $urandom_range(0, 1) == 1;
      addr  = 8'($urandom_range(0, 255));
      wdata = 8'($urandom_range(0, 255));
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL random read %0d", addr); end
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
