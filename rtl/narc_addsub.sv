// narc_addsub: the arithmetic unit of the NARC data path.
//
// Combinational. Operand a is always the accumulator; operand b comes from the
// switch that picks either the instruction's D field or the memory's DataOut.
// The control signal op chooses add or subtract, as in the NARC data path,
// and a third operation, pass, lets loadc/loadm put b into the accumulator
// through the same unit (the data path has no other way into the accumulator;
// the pass operation is this design's reading of that).
// The unit also tests the accumulator: n = (a < 0) in two's complement, the
// signal N that jmpn needs, and z = (a == 0) for jmpz.
module narc_addsub
  import narc_pkg::*;
#(
  parameter int unsigned WIDTH = narc_pkg::WORD_W
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             n,
  output logic             z
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      default: y = b;
    endcase
    n = a[WIDTH-1];
    z = (a == '0);
  end
endmodule
