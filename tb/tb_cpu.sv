// tb_cpu: end-to-end test of the single-cycle CPU at its default parameters.
//
// Part 1 runs the sample program "add the numbers from 1 to N" (LOADI, LOAD,
// CMP, BRG, ADD, ADDI, JUMP, STORE) placed at code address 100000 with N in
// data byte 0, for N = 5 and then N = 0..22 (the largest N whose sum fits in
// a byte). It checks the stored sum and that the STORE happens in cycle
// 3 + 5N + 3, one instruction per clock.
//
// Part 2 fills the whole code memory with random instruction words and the
// data memory with random bytes, and runs them with random values on the
// external inputs. An instruction-level model of the machine, written here
// from the instruction descriptions, predicts every cycle the PC, the
// instruction, the flags, the register write and the data-memory write; the
// CPU's observation outputs must match it. Each instruction kind, taken and
// not-taken branches of every condition, self-modifying code via INPUTC,
// the PC wrapping from 111111 to 000000, carry and overflow being set are
// counted; a mechanism that never occurs is a failure.
//
// Timing: 10 ns clock, one instruction per rising edge; loading happens
// through the cload/dload ports with rst held high. The program and its
// expected cycle count come from the original design's example; the
// encodings of the instructions it does not use are this design's.
module tb_cpu;
  import cpu_pkg::*;

  logic        clk = 0, rst;
  logic [15:0] code_in;
  logic [7:0]  data_in;
  logic        cload_we, dload_we;
  logic [5:0]  cload_addr;
  logic [15:0] cload_data;
  logic [7:0]  dload_addr, dload_data;
  logic [5:0]  dbg_pc;
  logic [15:0] dbg_instr;
  flags_t      dbg_flags;
  logic        dbg_reg_we, dbg_dmem_we;
  logic [1:0]  dbg_reg_sel;
  logic [7:0]  dbg_reg_data, dbg_dmem_addr, dbg_dmem_data;

  int checks = 0, failures = 0;
  longint cycles = 0;

  cpu dut (
    .clk(clk), .rst(rst), .code_in(code_in), .data_in(data_in),
    .cload_we(cload_we), .cload_addr(cload_addr), .cload_data(cload_data),
    .dload_we(dload_we), .dload_addr(dload_addr), .dload_data(dload_data),
    .dbg_pc(dbg_pc), .dbg_instr(dbg_instr), .dbg_flags(dbg_flags),
    .dbg_reg_we(dbg_reg_we), .dbg_reg_sel(dbg_reg_sel), .dbg_reg_data(dbg_reg_data),
    .dbg_dmem_we(dbg_dmem_we), .dbg_dmem_addr(dbg_dmem_addr), .dbg_dmem_data(dbg_dmem_data));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- loading ----------------
  task automatic load(logic [15:0] code [64], logic [7:0] data [256]);
    rst = 1; cload_we = 0; dload_we = 0;
    code_in = 0; data_in = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      cload_we = 1; cload_addr = 6'(i); cload_data = code[i];
      @(negedge clk);
    end
    cload_we = 0;
    for (int i = 0; i < 256; i++) begin
      dload_we = 1; dload_addr = 8'(i); dload_data = data[i];
      @(negedge clk);
    end
    dload_we = 0;
    rst = 0;
  endtask

  // ---------------- part 1: the for-loop program ----------------
  task automatic run_sum(int n);
    logic [15:0] code [64];
    logic [7:0]  data [256];
    logic [15:0] prog [9] = '{
      16'b0011010000000000,   // 100000 LOADI B, 0
      16'b0011000000000001,   // 100001 LOADI A, 1
      16'b1000110000000000,   // 100010 LOAD  D, [N]
      16'b1101001100000000,   // 100011 CMP   A, D
      16'b1111001000000011,   // 100100 BRG   End
      16'b0100010000000000,   // 100101 ADD   B, A
      16'b0101000000000001,   // 100110 ADDI  A, 1
      16'b1110000011111011,   // 100111 JUMP  Loop
      16'b1010010000000010};  // 101000 STORE [sum], B
    int n_cycles, expected_cycles, sum;
    bit stored;
    for (int i = 0; i < 64; i++) code[i] = 16'h0000;   // NOOP
    foreach (prog[i]) code[32 + i] = prog[i];
    for (int i = 0; i < 256; i++) data[i] = 8'h00;
    data[0] = 8'(n);
    load(code, data);
    expected_cycles = 3 + 5 * n + 3;
    sum = n * (n + 1) / 2;
    stored = 0;
    n_cycles = 0;
    while (!stored && n_cycles < 400) begin
      @(posedge clk);  // edges while rst was low count as executed cycles
      n_cycles++;
      #1;
      if (dbg_dmem_we) stored = 1;
    end
    // the STORE is the instruction now on the bus; it executes at the next edge
    check(stored, $sformatf("N=%0d: no STORE", n));
    check(dbg_dmem_addr == 8'd2 && dbg_dmem_data == 8'(sum),
          $sformatf("N=%0d: stored %0d at %0d, expected %0d at 2", n, dbg_dmem_data, dbg_dmem_addr, sum));
    check(n_cycles + 1 == expected_cycles,
          $sformatf("N=%0d: STORE is instruction %0d, expected %0d", n, n_cycles + 1, expected_cycles));
    check(dbg_pc == 6'b101000, $sformatf("N=%0d: STORE at pc %b", n, dbg_pc));
  endtask

  // ---------------- part 2: reference model ----------------
  logic [7:0]  m_regs [4];
  flags_t      m_flags;
  logic [5:0]  m_pc;
  logic [15:0] m_code [64];
  logic [7:0]  m_data [256];

  int cnt_op [16];
  int cnt_taken [4], cnt_not_taken [4];
  int cnt_input [4], cnt_shift [2];
  int cnt_wrap, cnt_carry, cnt_overflow, cnt_selfmod;
  bit modified [64];

  function automatic flags_t addsub_flags(logic [7:0] a, logic [7:0] b, bit sub, output logic [7:0] r);
    flags_t f;
    int ia, ib, full, sr;
    ia = a; ib = b;
    if (sub) begin full = ia + (255 - ib) + 1; sr = int'($signed(a)) - int'($signed(b)); end
    else     begin full = ia + ib;             sr = int'($signed(a)) + int'($signed(b)); end
    r = 8'(full);
    f.carry    = full[8];
    f.overflow = (sr > 127) || (sr < -128);
    f.negative = r[7];
    f.zero     = (r == 0);
    return f;
  endfunction

  task automatic step_and_check(logic [15:0] cin, logic [7:0] din);
    logic [15:0] ins;
    logic [3:0]  op;
    logic [1:0]  x, y;
    logic [7:0]  imm, r, addr;
    flags_t      nf;
    bit          reg_we, dmem_we, imem_we, flags_we, taken;
    logic [1:0]  reg_sel;
    logic [7:0]  reg_val, dmem_addr, dmem_val;
    logic [5:0]  imem_addr, next_pc;

    ins = m_code[m_pc];
    op = ins[15:12]; x = ins[11:10]; y = ins[9:8]; imm = ins[7:0];
    reg_we = 0; dmem_we = 0; imem_we = 0; flags_we = 0; taken = 0;
    reg_sel = x; reg_val = 0; dmem_addr = 0; dmem_val = 0; imem_addr = 0;
    nf = m_flags;
    cnt_op[op]++;
    case (op)
      4'd1: begin
        cnt_input[y]++;
        case (y)
          2'd0: begin imem_we = 1; imem_addr = imm[5:0]; end
          2'd1: begin imem_we = 1; r = m_regs[x] + imm; imem_addr = r[5:0]; end
          2'd2: begin dmem_we = 1; dmem_addr = imm; dmem_val = din; end
          default: begin dmem_we = 1; dmem_addr = m_regs[x] + imm; dmem_val = din; end
        endcase
      end
      4'd2: begin reg_we = 1; reg_val = m_regs[y] + imm; end
      4'd3: begin reg_we = 1; reg_val = imm; end
      4'd4: begin reg_we = 1; flags_we = 1; nf = addsub_flags(m_regs[x], m_regs[y], 0, reg_val); end
      4'd5: begin reg_we = 1; flags_we = 1; nf = addsub_flags(m_regs[x], imm, 0, reg_val); end
      4'd6: begin reg_we = 1; flags_we = 1; nf = addsub_flags(m_regs[x], m_regs[y], 1, reg_val); end
      4'd7: begin reg_we = 1; flags_we = 1; nf = addsub_flags(m_regs[x], imm, 1, reg_val); end
      4'd8: begin reg_we = 1; reg_val = m_data[imm]; end
      4'd9: begin reg_we = 1; reg_val = m_data[8'(m_regs[y] + imm)]; end
      4'd10: begin dmem_we = 1; dmem_addr = imm; dmem_val = m_regs[x]; end
      4'd11: begin dmem_we = 1; dmem_addr = m_regs[y] + imm; dmem_val = m_regs[x]; end
      4'd12: begin
        reg_we = 1; flags_we = 1;
        cnt_shift[y[0]]++;
        if (y[0]) begin reg_val = {1'b0, m_regs[x][7:1]}; nf.carry = m_regs[x][0]; end
        else      begin reg_val = {m_regs[x][6:0], 1'b0}; nf.carry = m_regs[x][7]; end
        nf.overflow = 0; nf.negative = reg_val[7]; nf.zero = (reg_val == 0);
      end
      4'd13: begin flags_we = 1; nf = addsub_flags(m_regs[x], m_regs[y], 1, r); end
      4'd14: taken = 1;
      4'd15: begin
        if (ins[11:8] < 4) begin
          case (ins[9:8])
            2'd0: taken = m_flags.zero;
            2'd1: taken = !m_flags.zero;
            2'd2: taken = !m_flags.zero && (m_flags.negative == m_flags.overflow);
            default: taken = (m_flags.negative == m_flags.overflow);
          endcase
          if (taken) cnt_taken[ins[9:8]]++; else cnt_not_taken[ins[9:8]]++;
        end
      end
      default: ;
    endcase
    next_pc = taken ? 6'(m_pc + 1 + imm[5:0]) : 6'(m_pc + 1);
    if (!taken && m_pc == 6'd63) cnt_wrap++;
    if (modified[m_pc]) cnt_selfmod++;
    if (flags_we && nf.carry) cnt_carry++;
    if (flags_we && nf.overflow) cnt_overflow++;

    // compare with the CPU, before the clock edge
    code_in = cin; data_in = din;
    #1;
    check(dbg_pc == m_pc, $sformatf("pc %b expected %b", dbg_pc, m_pc));
    check(dbg_instr == ins, $sformatf("pc %b instr %h expected %h", m_pc, dbg_instr, ins));
    check(dbg_flags == m_flags, $sformatf("pc %b flags %b expected %b", m_pc, dbg_flags, m_flags));
    check(dbg_reg_we == reg_we && (!reg_we || (dbg_reg_sel == reg_sel && dbg_reg_data == reg_val)),
          $sformatf("pc %b instr %h reg write %0d %0d %h expected %0d %0d %h", m_pc, ins,
                    dbg_reg_we, dbg_reg_sel, dbg_reg_data, reg_we, reg_sel, reg_val));
    check(dbg_dmem_we == dmem_we && (!dmem_we || (dbg_dmem_addr == dmem_addr && dbg_dmem_data == dmem_val)),
          $sformatf("pc %b instr %h dmem write %0d %h %h expected %0d %h %h", m_pc, ins,
                    dbg_dmem_we, dbg_dmem_addr, dbg_dmem_data, dmem_we, dmem_addr, dmem_val));
    @(posedge clk);
    // update the model
    if (reg_we)   m_regs[reg_sel] = reg_val;
    if (dmem_we)  m_data[dmem_addr] = dmem_val;
    if (imem_we)  begin m_code[imem_addr] = cin; modified[imem_addr] = 1; end
    if (flags_we) m_flags = nf;
    m_pc = next_pc;
    @(negedge clk);
  endtask

  task automatic run_random(int n_cycles);
    logic [15:0] code [64];
    logic [7:0]  data [256];
    for (int i = 0; i < 64; i++) begin
      code[i] = 16'($urandom_range(0, 65535));
      // bias the branch sub-codes towards the four defined conditions
      if (code[i][15:12] == 4'hF) code[i][11:10] = 2'b00;
      m_code[i] = code[i];
      modified[i] = 0;
    end
    for (int i = 0; i < 256; i++) begin
      data[i] = 8'($urandom_range(0, 255));
      m_data[i] = data[i];
    end
    load(code, data);
    for (int i = 0; i < 4; i++) m_regs[i] = 0;
    m_flags = '0;
    m_pc = 6'b100000;
    for (int c = 0; c < n_cycles; c++)
      step_and_check(16'($urandom_range(0, 65535)), 8'($urandom_range(0, 255)));
  endtask

  initial begin
    string names [16] = '{"NOOP", "INPUT*", "MOVE", "LOADI", "ADD", "ADDI", "SUB", "SUBI",
                          "LOAD", "LOADF", "STORE", "STOREF", "SHIFT*", "CMP", "JUMP", "BR*"};
    rst = 1;
    cload_we = 0; dload_we = 0; cload_addr = 0; cload_data = 0;
    dload_addr = 0; dload_data = 0; code_in = 0; data_in = 0;

    // part 1
    run_sum(5);
    for (int n = 0; n <= 22; n++) run_sum(n);

    // part 2
    for (int p = 0; p < 60; p++) run_random(300);

    $display("instruction counts:");
    for (int i = 0; i < 16; i++) begin
      $display("  %-7s %0d", names[i], cnt_op[i]);
      check(cnt_op[i] > 0, $sformatf("opcode %s never executed", names[i]));
    end
    for (int i = 0; i < 4; i++) begin
      $display("  branch cond %0d taken %0d not taken %0d", i, cnt_taken[i], cnt_not_taken[i]);
      check(cnt_taken[i] > 0 && cnt_not_taken[i] > 0, $sformatf("branch condition %0d not both ways", i));
      check(cnt_input[i] > 0, $sformatf("INPUT sub-code %0d never executed", i));
    end
    check(cnt_shift[0] > 0 && cnt_shift[1] > 0, "SHIFTL or SHIFTR never executed");
    $display("  pc wraps %0d, carry set %0d, overflow set %0d, modified code executed %0d",
             cnt_wrap, cnt_carry, cnt_overflow, cnt_selfmod);
    check(cnt_wrap > 0, "PC never wrapped");
    check(cnt_carry > 0, "carry never set");
    check(cnt_overflow > 0, "overflow never set");
    check(cnt_selfmod > 0, "code written by INPUTC never executed");
    $display("cycles simulated: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
