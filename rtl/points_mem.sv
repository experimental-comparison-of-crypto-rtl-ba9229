// points_mem: data memory for point coordinates, curve constants and
// temporaries.
//
// DEPTH words of W = 32 bits, with two synchronous read ports (operands A and
// B of a read instruction are fetched together) and one synchronous write
// port, the shape of a dual-port block RAM. A field element occupies NW
// consecutive words, least significant first, at word address {element, word}.
// Read data appears the cycle after the address. Reading and writing the same
// address in one cycle returns the old word. Port layout and depth are choices
// of this design.
module points_mem
  import hecc_pkg::*;
#(
  parameter int unsigned DEPTH = 2048   // 256 elements of 8 words
) (
  input  logic                      clk,
  input  logic [$clog2(DEPTH)-1:0]  ra_addr,
  output logic [W-1:0]              ra_data,
  input  logic [$clog2(DEPTH)-1:0]  rb_addr,
  output logic [W-1:0]              rb_data,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  wa_addr,
  input  logic [W-1:0]              wa_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa_addr] <= wa_data;
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
  end

endmodule
