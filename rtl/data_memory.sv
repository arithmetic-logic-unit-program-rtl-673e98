// data_memory: the CPU's byte-wide data memory, 2**ADDR_W bytes.
//
// addr comes from the ALU result mux: either the immediate byte of the
// instruction (LOAD, STORE, INPUTD) or register + immediate computed by the
// ALU (LOADF, STOREF, INPUTDF). Reads are combinational, so LOAD completes in
// its single cycle; writes happen on the rising clock edge when we
// (DMEM_WRITE_ENABLE, c17) is 1. The 8-bit address and hence 256 bytes are
// this design's choice: the address is a full byte in every instruction
// that uses one. The contents are not reset.
module data_memory #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
