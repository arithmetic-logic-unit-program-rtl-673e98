// tb_alu: self-check of the 8-bit ALU. All four operations are applied to
// every (a, b) pair on a sweep grid plus corner values; result and the four
// flags are compared with an integer model of SHIFTL, SHIFTR, ADD and SUB.
//
// Combinational: 1 ns settle per vector. The operation codes come from the
// ALU operation table of the original design; the logical right shift with 0
// fill is this design's choice and is what the model expects.
module tb_alu;
  import cpu_pkg::*;
  logic [7:0] a, b, result;
  alu_op_e    op;
  flags_t     flags;
  int checks = 0, failures = 0;

  alu #(.WIDTH(8)) dut (.a(a), .b(b), .op(op), .result(result), .flags(flags));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int ia, int ib, int iop);
    int r, full, sr;
    logic ec, ev;
    a = 8'(ia); b = 8'(ib); op = alu_op_e'(iop);
    #1;
    case (iop)
      0: begin full = ia * 2; r = full % 256; ec = full[8]; ev = 0; end
      1: begin r = ia / 2; ec = ia[0]; ev = 0; end
      2: begin full = ia + ib; r = full % 256; ec = full[8];
               sr = int'($signed(a)) + int'($signed(b)); ev = (sr > 127 || sr < -128); end
      default: begin full = ia + 256 - ib; r = full % 256; ec = full[8];
               sr = int'($signed(a)) - int'($signed(b)); ev = (sr > 127 || sr < -128); end
    endcase
    checks++;
    if (result !== 8'(r) || flags.carry !== ec || flags.overflow !== ev ||
        flags.zero !== (r == 0) || flags.negative !== (r >= 128)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%0d b=%0d result=%0d flags=%b exp r=%0d c=%0d v=%0d",
                 iop, ia, ib, result, flags, r, ec, ev);
    end
  endtask

  initial begin
    int corner [6] = '{0, 1, 127, 128, 129, 255};
    for (int o = 0; o < 4; o++) begin
      for (int i = 0; i < 256; i += 3)
        for (int j = 0; j < 256; j += 11)
          check(i, j, o);
      foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j], o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
