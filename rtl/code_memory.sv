// code_memory: the CPU's instruction memory, 2**ADDR_W words of 16 bits.
//
// The read port is combinational: the PC drives the six read-select lines
// and the addressed instruction appears on rdata in the same cycle (single-
// cycle CPU). The write port is synchronous: on a rising clock edge with
// we = 1 (IMEM_WRITE_ENABLE, c1, raised by INPUTC and INPUTCF) wdata is
// stored at waddr. The contents are not reset.
//
// The 64 x 16 size follows the original design; the asynchronous read and
// clocked write are this design's choice, needed for one instruction per clock.
module code_memory #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
