// cpu_pkg: types and constants shared by the 8-bit single-cycle CPU.
//
// Instruction word (16 bits, one per code-memory location):
//   [15:12] opcode   [11:10] register X   [9:8] register Y   [7:0] immediate
// The immediate byte is a constant (LOADI, ADDI, SUBI), a data-memory
// address (LOAD, STORE, INPUTD, INPUTC), an address offset (LOADF, STOREF,
// INPUTCF, INPUTDF) or a branch offset (JUMP, Bxx; only its low 6 bits are
// used). Registers are A=00, B=01, C=10, D=11.
//
// The opcodes MOVE, LOADI, ADD, ADDI, LOAD, STORE, CMP, JUMP and the BRG
// sub-code follow the machine code of the sample program. The remaining
// opcode numbers keep the order of the instruction list (NOOP first, SUB
// after ADDI, and so on) and, like the sub-codes of the grouped opcodes,
// are this design's choice.
package cpu_pkg;

  localparam int unsigned DATA_W  = 8;   // register, ALU and data-memory width
  localparam int unsigned INSTR_W = 16;  // instruction width
  localparam int unsigned PC_W    = 6;   // code-memory address / PC width

  typedef enum logic [3:0] {
    OP_NOOP   = 4'b0000,
    OP_INPUT  = 4'b0001,  // INPUTC / INPUTCF / INPUTD / INPUTDF, sub-code in Y
    OP_MOVE   = 4'b0010,
    OP_LOADI  = 4'b0011,  // also LOADP
    OP_ADD    = 4'b0100,
    OP_ADDI   = 4'b0101,
    OP_SUB    = 4'b0110,
    OP_SUBI   = 4'b0111,
    OP_LOAD   = 4'b1000,
    OP_LOADF  = 4'b1001,
    OP_STORE  = 4'b1010,
    OP_STOREF = 4'b1011,
    OP_SHIFT  = 4'b1100,  // SHIFTL (Y[0]=0) / SHIFTR (Y[0]=1)
    OP_CMP    = 4'b1101,
    OP_JUMP   = 4'b1110,
    OP_BRANCH = 4'b1111   // condition in bits [11:8]
  } opcode_e;

  // Sub-codes of OP_INPUT, held in the Y field.
  typedef enum logic [1:0] {
    IN_C  = 2'b00,  // INPUTC  : code[imm]     <= code_in
    IN_CF = 2'b01,  // INPUTCF : code[X + imm] <= code_in
    IN_D  = 2'b10,  // INPUTD  : data[imm]     <= data_in
    IN_DF = 2'b11   // INPUTDF : data[X + imm] <= data_in
  } input_sub_e;

  // Branch conditions of OP_BRANCH, held in bits [11:8].
  typedef enum logic [3:0] {
    BR_E  = 4'b0000,  // BRE  / BRZ  : ZF
    BR_NE = 4'b0001,  // BRNE / BRNZ : ~ZF
    BR_G  = 4'b0010,  // BRG         : ~ZF & (NF == OF)
    BR_GE = 4'b0011   // BRGE        : NF == OF
  } branch_cond_e;

  // ALU operation, the two lines ALU_SELECT1 (c12) and ALU_SELECT0 (c13).
  typedef enum logic [1:0] {
    ALU_SHL = 2'b00,
    ALU_SHR = 2'b01,
    ALU_ADD = 2'b10,
    ALU_SUB = 2'b11
  } alu_op_e;

  typedef struct packed {
    logic carry;
    logic overflow;
    logic negative;
    logic zero;
  } flags_t;

  // Control lines c1..c18. c2 is not decoded from the opcode alone: it is
  // produced by branch_logic from the jump/branch lines and the flags.
  typedef struct packed {
    logic       imem_we;        // c1  IMEM_WRITE_ENABLE
    logic       pc_we;          // c3  PROGRAM_COUNTER_WRITE_EN
    logic [1:0] port0_sel;      // c4,c5  REGISTERS_PORT0_SELECT1/0
    logic [1:0] port1_sel;      // c6,c7  REGISTERS_PORT1_SELECT1/0
    logic [1:0] write_sel;      // c8,c9  REGISTERS_WRITE_SELECT1/0
    logic       reg_we;         // c10 REGISTERS_WRITE_ENABLE
    logic       alu_src;        // c11 ALU_SOURCE_MUX (1: immediate)
    alu_op_e    alu_op;         // c12,c13 ALU_SELECT1/0
    logic       flags_we;       // c14 FLAGS_WRITE_ENABLE
    logic       alu_result_mux; // c15 ALU_RESULT_MUX (1: immediate)
    logic       dmem_in_mux;    // c16 DMEM_INPUT_MUX (1: external input)
    logic       dmem_we;        // c17 DMEM_WRITE_ENABLE
    logic       wb_mux;         // c18 REG_WRITEBACK_MUX (1: data memory)
  } ctrl_t;

  // Decoded jump/branch lines feeding the c2 logic.
  typedef struct packed {
    logic jump;
    logic bre;
    logic brne;
    logic brg;
    logic brge;
  } branch_lines_t;

endpackage
