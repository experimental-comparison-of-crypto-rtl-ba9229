// fu_result_mux: result interconnect from the arithmetic units to the points
// memory.
//
// Each of the NFU units presents the result word selected by the common
// read index; sel picks the unit whose word goes to the memory write port.
// Purely combinational. Units are numbered adder/subtracter (0), inverter (1),
// multipliers (2 ...); an out-of-range sel gives zero.
module fu_result_mux
  import hecc_pkg::*;
#(
  parameter int unsigned NFU = 3
) (
  input  logic [NFU-1:0][W-1:0]  words,
  input  logic [FU_BITS-1:0]     sel,
  output logic [W-1:0]           word
);

  always_comb begin
    word = '0;
    for (int i = 0; i < NFU; i++)
      if (sel == FU_BITS'(i)) word = words[i];
  end

endmodule
