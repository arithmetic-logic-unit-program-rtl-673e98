// tb_register_file: self-check of the four-register file. After reset all
// registers read 0; then for 600 cycles random writes and random reads on
// both ports are compared with a model array. Reads are combinational, writes
// take effect at the clock edge.
//
// 10 ns clock; reset is asynchronous and active high.
module tb_register_file;
  logic       clk = 0, rst, we;
  logic [1:0] s0, s1, ws;
  logic [7:0] d0, d1, wd;
  logic [7:0] model [4];
  int checks = 0, failures = 0;

  register_file #(.WIDTH(8), .NREGS(4)) dut (
    .clk(clk), .rst(rst), .port0_sel(s0), .port1_sel(s1),
    .port0_data(d0), .port1_data(d1),
    .write_sel(ws), .write_enable(we), .write_data(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; ws = 0; wd = 0; s0 = 0; s1 = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 4; i++) model[i] = 0;
    for (int i = 0; i < 4; i++) begin
      s0 = 2'(i); s1 = 2'(3 - i); #1;
      checks++;
      if (d0 !== 0 || d1 !== 0) begin failures++; $display("FAIL reset reg %0d", i); end
    end
    for (int i = 0; i < 600; i++) begin
      we = $urandom_range(0, 1) == 1;
      ws = 2'($urandom_range(0, 3));
      wd = 8'($urandom_range(0, 255));
      s0 = 2'($urandom_range(0, 3));
      s1 = 2'($urandom_range(0, 3));
      #1;
      checks++;
      if (d0 !== model[s0] || d1 !== model[s1]) begin
        failures++;
        $display("FAIL read s0=%0d d0=%h s1=%0d d1=%h", s0, d0, s1, d1);
      end
      @(posedge clk); #1;
      if (we) model[ws] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
