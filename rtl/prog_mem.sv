// prog_mem: program memory of the crypto-processor.
//
// Holds DEPTH instructions of INSTR_BITS = 25 bits, the binary code produced
// by the assembler. The host writes it through wr_en/wr_addr/wr_data before a
// run; the controller reads it at rd_addr. The read is asynchronous (a
// distributed-RAM style memory) so that the controller sees the instruction at
// its program counter in the same cycle. Depth and read style are choices of
// this design.
module prog_mem
  import hecc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)-1:0]  wr_addr,
  input  logic [INSTR_BITS-1:0]     wr_data,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output logic [INSTR_BITS-1:0]     rd_data
);

  logic [INSTR_BITS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
