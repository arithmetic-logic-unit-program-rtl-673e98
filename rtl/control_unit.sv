// control_unit: decodes one instruction into the CPU's control lines.
//
// The opcode (bits 15:12) selects one row of the control table; register
// fields X (bits 11:10) and Y (bits 9:8) are routed to the register-file
// select lines as the table prescribes. The rows, with every unnamed line 0:
//   NOOP    pc_we
//   INPUTC  imem_we, alu_result_mux                    code[imm] <= input
//   INPUTCF imem_we, port0=X, alu_src, ADD             code[X+imm] <= input
//   INPUTD  alu_result_mux, dmem_in_mux, dmem_we       data[imm] <= input
//   INPUTDF port0=X, alu_src, ADD, dmem_in_mux, dmem_we
//   MOVE    port0=Y, write=X, reg_we, alu_src, ADD     X = Y + imm (imm = 0)
//   LOADI   write=X, reg_we, alu_result_mux            X = imm
//   ADD     port0=X, port1=Y, write=X, reg_we, ADD, flags_we
//   ADDI    port0=X, write=X, reg_we, alu_src, ADD, flags_we
//   SUB     port0=X, port1=Y, write=X, reg_we, SUB, flags_we
//   SUBI    port0=X, write=X, reg_we, alu_src, SUB, flags_we
//   LOAD    write=X, reg_we, alu_result_mux, wb_mux    X = data[imm]
//   LOADF   port0=Y, write=X, reg_we, alu_src, ADD, wb_mux   X = data[Y+imm]
//   STORE   port1=X, alu_result_mux, dmem_we           data[imm] = X
//   STOREF  port0=Y, port1=X, alu_src, ADD, dmem_we    data[Y+imm] = X
//   SHIFTL  port0=X, write=X, reg_we, SHL, flags_we
//   SHIFTR  port0=X, write=X, reg_we, SHR, flags_we
//   CMP     port0=X, port1=Y, SUB, flags_we            flags of X - Y only
//   JUMP / BRE / BRNE / BRG / BRGE: only the matching branch line
// pc_we is 1 in every row (one instruction per clock). Rows that do not name
// an ALU operation leave ALU_SELECT at 00, so the ALU shifts left and its
// result is ignored. The grouped opcodes (INPUT*, SHIFT*, branches) are
// told apart by the sub-codes defined in cpu_pkg; an unused branch sub-code
// behaves as NOOP. Combinational.
//
// The rows follow the original control table; writing them as one case
// statement instead of per-line gate wiring, and the sub-code encodings, are
// this design's choices.
module control_unit
  import cpu_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output ctrl_t              ctrl,
  output branch_lines_t      br
);
  opcode_e    op;
  logic [1:0] rx, ry;

  always_comb begin
    op = opcode_e'(instr[15:12]);
    rx = instr[11:10];
    ry = instr[9:8];

    ctrl       = '0;
    ctrl.pc_we = 1'b1;
    br         = '0;

    unique case (op)
      OP_NOOP: ;
      OP_INPUT: begin
        unique case (input_sub_e'(ry))
          IN_C: begin
            ctrl.imem_we        = 1'b1;
            ctrl.alu_result_mux = 1'b1;
          end
          IN_CF: begin
            ctrl.imem_we   = 1'b1;
            ctrl.port0_sel = rx;
            ctrl.alu_src   = 1'b1;
            ctrl.alu_op    = ALU_ADD;
          end
          IN_D: begin
            ctrl.alu_result_mux = 1'b1;
            ctrl.dmem_in_mux    = 1'b1;
            ctrl.dmem_we        = 1'b1;
          end
          IN_DF: begin
            ctrl.port0_sel   = rx;
            ctrl.alu_src     = 1'b1;
            ctrl.alu_op      = ALU_ADD;
            ctrl.dmem_in_mux = 1'b1;
            ctrl.dmem_we     = 1'b1;
          end
        endcase
      end
      OP_MOVE: begin
        ctrl.port0_sel = ry;
        ctrl.write_sel = rx;
        ctrl.reg_we    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALU_ADD;
      end
      OP_LOADI: begin
        ctrl.write_sel      = rx;
        ctrl.reg_we         = 1'b1;
        ctrl.alu_result_mux = 1'b1;
      end
      OP_ADD, OP_SUB: begin
        ctrl.port0_sel = rx;
        ctrl.port1_sel = ry;
        ctrl.write_sel = rx;
        ctrl.reg_we    = 1'b1;
        ctrl.alu_op    = (op == OP_SUB) ? ALU_SUB : ALU_ADD;
        ctrl.flags_we  = 1'b1;
      end
      OP_ADDI, OP_SUBI: begin
        ctrl.port0_sel = rx;
        ctrl.write_sel = rx;
        ctrl.reg_we    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = (op == OP_SUBI) ? ALU_SUB : ALU_ADD;
        ctrl.flags_we  = 1'b1;
      end
      OP_LOAD: begin
        ctrl.write_sel      = rx;
        ctrl.reg_we         = 1'b1;
        ctrl.alu_result_mux = 1'b1;
        ctrl.wb_mux         = 1'b1;
      end
      OP_LOADF: begin
        ctrl.port0_sel = ry;
        ctrl.write_sel = rx;
        ctrl.reg_we    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALU_ADD;
        ctrl.wb_mux    = 1'b1;
      end
      OP_STORE: begin
        ctrl.port1_sel      = rx;
        ctrl.alu_result_mux = 1'b1;
        ctrl.dmem_we        = 1'b1;
      end
      OP_STOREF: begin
        ctrl.port0_sel = ry;
        ctrl.port1_sel = rx;
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALU_ADD;
        ctrl.dmem_we   = 1'b1;
      end
      OP_SHIFT: begin
        ctrl.port0_sel = rx;
        ctrl.write_sel = rx;
        ctrl.reg_we    = 1'b1;
        ctrl.alu_op    = ry[0] ? ALU_SHR : ALU_SHL;
        ctrl.flags_we  = 1'b1;
      end
      OP_CMP: begin
        ctrl.port0_sel = rx;
        ctrl.port1_sel = ry;
        ctrl.alu_op    = ALU_SUB;
        ctrl.flags_we  = 1'b1;
      end
      OP_JUMP: br.jump = 1'b1;
      OP_BRANCH: begin
        case (branch_cond_e'(instr[11:8]))
          BR_E:    br.bre  = 1'b1;
          BR_NE:   br.brne = 1'b1;
          BR_G:    br.brg  = 1'b1;
          BR_GE:   br.brge = 1'b1;
          default: ;
        endcase
      end
    endcase
  end
endmodule
