// tb_bus_mux2: self-check of the 8-bit 2-to-1 bus multiplexer.
// Every (u, v) pair from a sweep and both select values are applied and z is
// compared with the selected input.
//
// Combinational: 1 ns settle per vector.
module tb_bus_mux2;
  logic [7:0] u, v, z;
  logic       sel;
  int checks = 0, failures = 0;

  bus_mux2 #(.WIDTH(8)) dut (.u(u), .v(v), .sel(sel), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i += 5) begin
      for (int j = 0; j < 256; j += 7) begin
        for (int s = 0; s < 2; s++) begin
          u = 8'(i); v = 8'(j); sel = s[0];
          #1;
          checks++;
          if (z !== (s ? v : u)) begin
            failures++;
            $display("FAIL u=%h v=%h sel=%0d z=%h", u, v, sel, z);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
