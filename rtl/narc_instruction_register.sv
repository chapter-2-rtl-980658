// narc_instruction_register: holds the instruction being executed.
//
// On a clock edge with load high it captures the memory's DataOut word and
// presents it in two parts: op, the most significant 8 bits, and d, the least
// significant 24 bits. It is cleared by reset (opcode 0 is no instruction), a
// choice of this design.
module narc_instruction_register
  import narc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  word_t    data_in,
  output logic [OP_W-1:0] op,
  output operand_t        d
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= '0;
      d  <= '0;
    end else if (load) begin
      op <= data_in[WORD_W-1 -: OP_W];
      d  <= data_in[D_W-1:0];
    end
  end
endmodule
