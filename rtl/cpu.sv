// cpu: single-cycle 8-bit CPU with four registers, flags and a 6-bit PC.
//
// Every clock cycle executes one complete 16-bit instruction:
//   1. The PC addresses the code memory; the instruction appears at once.
//   2. control_unit turns its opcode and register fields into control lines
//      c1, c3..c18; branch_logic combines the jump/branch lines with the
//      stored flags into c2.
//   3. Register port 0 feeds the ALU's a operand; the ALU source mux (c11)
//      gives b = register port 1 or the immediate byte. The ALU shifts, adds
//      or subtracts (c12, c13).
//   4. The ALU result mux (c15) passes the ALU result or the immediate byte.
//      That byte is the data-memory address, the code-memory write address
//      (low 6 bits) and, through the write-back mux (c18, which can pick the
//      data-memory output instead), the value written to a register (c10).
//   5. On the rising edge the register file, the flags (c14), the data
//      memory (c17, data from port 1 or data_in by c16), the code memory (c1,
//      data from code_in) and the PC (c3) are all updated together. The PC
//      gets PC + 1, or PC + 1 + offset when c2 is 1.
//
// Interface: clk; rst (asynchronous, active high) puts the PC at RESET_PC
// (100000) and clears registers and flags. code_in and data_in are the
// external inputs read by INPUTC/INPUTCF and INPUTD/INPUTDF. The cload_* and
// dload_* ports write the code and data memories while rst is held; they are
// this design's way of putting a program and its data in place, and are
// ignored when rst is low. The dbg_* outputs expose the PC, the current
// instruction, the flags and the register and data-memory write buses so that
// execution can be followed from outside.
//
// Timing: one instruction per clock; all state changes on the rising edge,
// memories are read combinationally within the cycle.
//
// From the original design: the block structure, the 18 control lines and
// their per-opcode values, the ALU, the PC update adders and the branch
// equations. This design's own choices: the opcodes the original leaves
// unprinted (see cpu_pkg), the 256-byte data memory, the reset value of the
// PC (the address where the example program starts), the assignment of the
// mux inputs, and the memory loading ports.
//
// rst is used both as the asynchronous reset of the flip-flops and as the
// select of the loading muxes in front of the memory write ports, which lint
// tools report as a net feeding both synchronous and asynchronous logic. It
// stands: while rst is high the registers are held cleared, so the only
// state that changes is the memories, which have no reset.
module cpu
  import cpu_pkg::*;
#(
  parameter logic [PC_W-1:0] RESET_PC    = 6'b100000,
  parameter int unsigned     DMEM_ADDR_W = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [INSTR_W-1:0]     code_in,
  input  logic [DATA_W-1:0]      data_in,
  // memory loading while in reset
  input  logic                   cload_we,
  input  logic [PC_W-1:0]        cload_addr,
  input  logic [INSTR_W-1:0]     cload_data,
  input  logic                   dload_we,
  input  logic [DMEM_ADDR_W-1:0] dload_addr,
  input  logic [DATA_W-1:0]      dload_data,
  // observation
  output logic [PC_W-1:0]        dbg_pc,
  output logic [INSTR_W-1:0]     dbg_instr,
  output flags_t                 dbg_flags,
  output logic                   dbg_reg_we,
  output logic [1:0]             dbg_reg_sel,
  output logic [DATA_W-1:0]      dbg_reg_data,
  output logic                   dbg_dmem_we,
  output logic [DMEM_ADDR_W-1:0] dbg_dmem_addr,
  output logic [DATA_W-1:0]      dbg_dmem_data
);
  logic [PC_W-1:0]    pc, pc_next, pc_branch, pc_d;
  logic [INSTR_W-1:0] instr;
  logic [DATA_W-1:0]  imm;
  ctrl_t              ctrl;
  branch_lines_t      br;
  logic               c2;
  logic [DATA_W-1:0]  port0_data, port1_data, alu_b, alu_result;
  logic [DATA_W-1:0]  result_bus, dmem_wdata, dmem_rdata, wb_data;
  flags_t             alu_flags, flags_q;

  // memory write ports: program/data loading during reset, instructions after
  logic                   imem_we, dmem_we;
  logic [PC_W-1:0]        imem_waddr;
  logic [INSTR_W-1:0]     imem_wdata;
  logic [DMEM_ADDR_W-1:0] dmem_addr;
  logic [DATA_W-1:0]      dmem_data;

  assign imm = instr[DATA_W-1:0];

  // ---------------- program counter ----------------
  pc_update_logic #(.WIDTH(PC_W)) u_pc_update (
    .pc(pc), .offset(imm[PC_W-1:0]), .pc_next(pc_next), .pc_branch(pc_branch)
  );

  bus_mux2 #(.WIDTH(PC_W)) u_pc_mux (
    .u(pc_next), .v(pc_branch), .sel(c2), .z(pc_d)
  );

  pc_register #(.WIDTH(PC_W), .RESET_PC(RESET_PC)) u_pc (
    .clk(clk), .rst(rst), .write_enable(ctrl.pc_we), .d(pc_d), .pc(pc)
  );

  code_memory #(.ADDR_W(PC_W), .DATA_W(INSTR_W)) u_code_mem (
    .clk(clk), .raddr(pc), .rdata(instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // ---------------- control ----------------
  control_unit u_control (.instr(instr), .ctrl(ctrl), .br(br));

  branch_logic u_branch (.br(br), .flags(flags_q), .c2(c2));

  // ---------------- datapath ----------------
  register_file #(.WIDTH(DATA_W), .NREGS(4)) u_regs (
    .clk(clk), .rst(rst),
    .port0_sel(ctrl.port0_sel), .port1_sel(ctrl.port1_sel),
    .port0_data(port0_data), .port1_data(port1_data),
    .write_sel(ctrl.write_sel), .write_enable(ctrl.reg_we), .write_data(wb_data)
  );

  bus_mux2 #(.WIDTH(DATA_W)) u_alu_src_mux (
    .u(port1_data), .v(imm), .sel(ctrl.alu_src), .z(alu_b)
  );

  alu #(.WIDTH(DATA_W)) u_alu (
    .a(port0_data), .b(alu_b), .op(ctrl.alu_op), .result(alu_result), .flags(alu_flags)
  );

  flags_register u_flags (
    .clk(clk), .rst(rst), .write_enable(ctrl.flags_we), .d(alu_flags), .q(flags_q)
  );

  bus_mux2 #(.WIDTH(DATA_W)) u_alu_result_mux (
    .u(alu_result), .v(imm), .sel(ctrl.alu_result_mux), .z(result_bus)
  );

  bus_mux2 #(.WIDTH(DATA_W)) u_dmem_in_mux (
    .u(port1_data), .v(data_in), .sel(ctrl.dmem_in_mux), .z(dmem_wdata)
  );

  data_memory #(.ADDR_W(DMEM_ADDR_W), .DATA_W(DATA_W)) u_data_mem (
    .clk(clk), .addr(dmem_addr), .rdata(dmem_rdata), .we(dmem_we), .wdata(dmem_data)
  );

  bus_mux2 #(.WIDTH(DATA_W)) u_wb_mux (
    .u(result_bus), .v(dmem_rdata), .sel(ctrl.wb_mux), .z(wb_data)
  );

  // Loading ports take over the memory write ports while rst is high.
  always_comb begin
    if (rst) begin
      imem_we    = cload_we;
      imem_waddr = cload_addr;
      imem_wdata = cload_data;
      dmem_we    = dload_we;
      dmem_addr  = dload_addr;
      dmem_data  = dload_data;
    end else begin
      imem_we    = ctrl.imem_we;
      imem_waddr = result_bus[PC_W-1:0];
      imem_wdata = code_in;
      dmem_we    = ctrl.dmem_we;
      dmem_addr  = DMEM_ADDR_W'(result_bus);
      dmem_data  = dmem_wdata;
    end
  end

  assign dbg_pc        = pc;
  assign dbg_instr     = instr;
  assign dbg_flags     = flags_q;
  assign dbg_reg_we    = ctrl.reg_we & ~rst;
  assign dbg_reg_sel   = ctrl.write_sel;
  assign dbg_reg_data  = wb_data;
  assign dbg_dmem_we   = dmem_we & ~rst;
  assign dbg_dmem_addr = dmem_addr;
  assign dbg_dmem_data = dmem_data;
endmodule
