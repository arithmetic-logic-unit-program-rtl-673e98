// tb_control_unit: self-check of the instruction decoder against the control
// table. Each row is written below as 18 characters for c1..c18: '.' = 0,
// '1' = 1, 'X'/'Y' = the bits of register field X or Y, 'B' = the row's own
// branch line (c2 before it is combined with the flags). Every row is decoded
// 40 times with random register fields and immediates, and a word with an
// unused branch condition must decode as NOOP. The row also tells that
// exactly seven instructions write the flags.
//
// Combinational: 1 ns settle per instruction word. The rows are the original
// control table; the opcode and sub-code values are this design's (cpu_pkg).
module tb_control_unit;
  import cpu_pkg::*;
  logic [15:0]   instr;
  ctrl_t         ctrl;
  branch_lines_t br;
  int checks = 0, failures = 0;

  control_unit dut (.instr(instr), .ctrl(ctrl), .br(br));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    string name;
    int    opcode;
    int    fixed_y;     // -1: Y is free, else forced value of Y field
    int    fixed_xy;    // -1: free, else forced value of bits [11:8]
    int    y_lsb;       // -1: free, else forced value of Y[0]
    int    brline;      // 0 jump, 1 bre, 2 brne, 3 brg, 4 brge, -1 none
    string row;
  } row_t;

  row_t rows [20];
  int   flag_rows;

  function automatic logic [17:0] dut_vector();
    logic [17:0] v;
    v[17]    = ctrl.imem_we;          // c1
    v[16]    = |br;                   // c2 (branch line raised)
    v[15]    = ctrl.pc_we;            // c3
    v[14:13] = ctrl.port0_sel;        // c4, c5
    v[12:11] = ctrl.port1_sel;        // c6, c7
    v[10:9]  = ctrl.write_sel;        // c8, c9
    v[8]     = ctrl.reg_we;           // c10
    v[7]     = ctrl.alu_src;          // c11
    v[6:5]   = ctrl.alu_op;           // c12, c13
    v[4]     = ctrl.flags_we;         // c14
    v[3]     = ctrl.alu_result_mux;   // c15
    v[2]     = ctrl.dmem_in_mux;      // c16
    v[1]     = ctrl.dmem_we;          // c17
    v[0]     = ctrl.wb_mux;           // c18
    return v;
  endfunction

  function automatic logic [17:0] expected(string row, logic [1:0] x, logic [1:0] y);
    logic [17:0] v;
    for (int p = 0; p < 18; p++) begin
      logic bitv;
      bit   high = (p == 3 || p == 5 || p == 7);
      case (row[p])
        "1":     bitv = 1'b1;
        "B":     bitv = 1'b1;
        "X":     bitv = high ? x[1] : x[0];
        "Y":     bitv = high ? y[1] : y[0];
        default: bitv = 1'b0;
      endcase
      v[17-p] = bitv;
    end
    return v;
  endfunction

  initial begin
    rows[0]  = '{"NOOP",    0, -1, -1, -1, -1, "..1..............."};
    rows[1]  = '{"INPUTC",  1,  0, -1, -1, -1, "1.1...........1..."};
    rows[2]  = '{"INPUTCF", 1,  1, -1, -1, -1, "1.1XX.....11......"};
    rows[3]  = '{"INPUTD",  1,  2, -1, -1, -1, "..1...........111."};
    rows[4]  = '{"INPUTDF", 1,  3, -1, -1, -1, "..1XX.....11...11."};
    rows[5]  = '{"MOVE",    2, -1, -1, -1, -1, "..1YY..XX111......"};
    rows[6]  = '{"LOADI",   3, -1, -1, -1, -1, "..1....XX1....1..."};
    rows[7]  = '{"ADD",     4, -1, -1, -1, -1, "..1XXYYXX1.1.1...."};
    rows[8]  = '{"ADDI",    5, -1, -1, -1, -1, "..1XX..XX111.1...."};
    rows[9]  = '{"SUB",     6, -1, -1, -1, -1, "..1XXYYXX1.111...."};
    rows[10] = '{"SUBI",    7, -1, -1, -1, -1, "..1XX..XX11111...."};
    rows[11] = '{"LOAD",    8, -1, -1, -1, -1, "..1....XX1....1..1"};
    rows[12] = '{"LOADF",   9, -1, -1, -1, -1, "..1YY..XX111.....1"};
    rows[13] = '{"STORE",  10, -1, -1, -1, -1, "..1..XX.......1.1."};
    rows[14] = '{"STOREF", 11, -1, -1, -1, -1, "..1YYXX...11....1."};
    rows[15] = '{"SHIFTL", 12, -1, -1,  0, -1, "..1XX..XX1...1...."};
    rows[16] = '{"SHIFTR", 12, -1, -1,  1, -1, "..1XX..XX1..11...."};
    rows[17] = '{"CMP",    13, -1, -1, -1, -1, "..1XXYY....111...."};
    rows[18] = '{"JUMP",   14, -1, -1, -1,  0, ".11..............."};
    rows[19] = '{"BRG",    15, -1,  2, -1,  3, ".B1..............."};

    flag_rows = 0;
    foreach (rows[r]) if (rows[r].row[13] == "1") flag_rows++;
    checks++;
    if (flag_rows != 7) begin failures++; $display("FAIL %0d flag rows", flag_rows); end

    foreach (rows[r]) begin
      for (int k = 0; k < 40; k++) begin
        logic [1:0] x, y;
        logic [7:0] imm;
        logic [17:0] got, exp;
        x   = 2'($urandom_range(0, 3));
        y   = 2'($urandom_range(0, 3));
        imm = 8'($urandom_range(0, 255));
        if (rows[r].fixed_y >= 0) y = 2'(rows[r].fixed_y);
        if (rows[r].y_lsb >= 0)   y[0] = rows[r].y_lsb[0];
        if (rows[r].fixed_xy >= 0) {x, y} = 4'(rows[r].fixed_xy);
        instr = {4'(rows[r].opcode), x, y, imm};
        #1;
        got = dut_vector();
        exp = expected(rows[r].row, x, y);
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL %s instr=%b got=%b exp=%b", rows[r].name, instr, got, exp);
        end
        if (rows[r].brline >= 0) begin
          checks++;
          if (br !== branch_lines_t'(5'b10000 >> rows[r].brline)) begin
            failures++;
            $display("FAIL %s branch lines %b", rows[r].name, br);
          end
        end
      end
    end

    // the other branch conditions raise their own lines
    for (int c = 0; c < 4; c++) begin
      instr = {4'hF, 4'(c), 8'($urandom_range(0, 255))};
      #1;
      checks++;
      if (br !== branch_lines_t'(5'b01000 >> c) || dut_vector() !== expected(".B1...............", 0, 0)) begin
        failures++;
        $display("FAIL branch condition %0d lines %b", c, br);
      end
    end
    // an unused branch condition is a NOOP
    instr = 16'hF9_05; #1;
    checks++;
    if (br !== '0 || dut_vector() !== expected("..1...............", 0, 0)) begin
      failures++;
      $display("FAIL unused branch condition");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
