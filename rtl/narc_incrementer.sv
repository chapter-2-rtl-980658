// narc_incrementer: the PC incrementer of the NARC data path.
//
// Combinational: y = a + 1, wrapping at 2**WIDTH. The PC is passed through it
// while the instruction is fetched, so that PC+1 is ready to be written back
// into the PC in the same step that loads the instruction register. The width
// is this design's choice: addresses are as wide as the 24-bit operand D.
module narc_incrementer #(
  parameter int unsigned WIDTH = narc_pkg::ADDR_W
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  always_comb y = a + WIDTH'(1);
endmodule
