// tb_code_memory: self-check of the 64 x 16 instruction memory. The sample
// program is written at 100000..101000 and the rest filled with random words
// through the write port; every location is then read back on the
// combinational read port. Random writes interleaved with reads follow.
//
// A 10 ns clock drives the write port; reads are checked in the same cycle
// the address is applied. The program words are those of the original
// design's example.
module tb_code_memory;
  logic        clk = 0, we;
  logic [5:0]  raddr, waddr;
  logic [15:0] rdata, wdata;
  logic [15:0] model [64];
  int checks = 0, failures = 0;

  code_memory #(.ADDR_W(6), .DATA_W(16)) dut (
    .clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] prog [9] = '{16'b0011010000000000, 16'b0011000000000001,
                              16'b1000110000000000, 16'b1101001100000000,
                              16'b1111001000000011, 16'b0100010000000000,
                              16'b0101000000000001, 16'b1110000011111011,
                              16'b1010010000000010};
    for (int i = 0; i < 64; i++) model[i] = 16'($urandom_range(0, 65535));
    foreach (prog[i]) model[32 + i] = prog[i];
    we = 1; raddr = 0;
    for (int i = 0; i < 64; i++) begin
      waddr = 6'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = 6'(i); #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL addr %b read %b expected %b", raddr, rdata, model[i]);
      end
    end
    for (int i = 0; i < 400; i++) begin
      we    = $urandom_range(0, 1) == 1;
      waddr = 6'($urandom_range(0, 63));
      wdata = 16'($urandom_range(0, 65535));
      raddr = 6'($urandom_range(0, 63));
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL random read %0d", raddr); end
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
