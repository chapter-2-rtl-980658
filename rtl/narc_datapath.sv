// narc_datapath: the NARC data path.
//
// Registers: PC (program counter), Lnk (link), Accumulator and the
// Instruction Register (Op and D). Switches (multiplexers), each set by a
// control signal of the ctrl bundle:
//   - AddressIn of the memory: PC or D;
//   - new PC: incrementer output (PC+1), D, or Lnk;
//   - second operand of the add/sub unit: D or the memory's DataOut.
// The accumulator always feeds the first operand of the add/sub unit and the
// memory's DataIn; its result is written back into the accumulator. Lnk is
// loaded from the PC (call). The add/sub unit's tests n (Acc<0) and z (Acc=0)
// go to the control unit. All registers load on the rising clock edge when
// their load signal is high; reset clears them (PC=0: execution starts at
// location zero, Accumulator=0 as in the NARC traces; clearing Lnk is this
// design's choice). D is zero-extended to 32 bits where it meets the
// accumulator, also this design's choice.
module narc_datapath
  import narc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_t           ctrl,
  input  word_t           mem_dout,   // memory DataOut
  output addr_t           mem_addr,   // memory AddressIn
  output word_t           mem_din,    // memory DataIn
  output logic [OP_W-1:0] op,
  output operand_t        d,
  output logic            n,
  output logic            z,
  output addr_t           pc,
  output addr_t           lnk,
  output word_t           acc
);

  addr_t pc_inc, pc_next;
  word_t alu_b, alu_y;

  narc_instruction_register u_ir (
    .clk, .rst_n,
    .load    (ctrl.ir_load),
    .data_in (mem_dout),
    .op, .d
  );

  narc_incrementer #(.WIDTH(ADDR_W)) u_inc (.a(pc), .y(pc_inc));

  narc_addsub #(.WIDTH(WORD_W)) u_addsub (
    .op (ctrl.alu_op),
    .a  (acc),
    .b  (alu_b),
    .y  (alu_y),
    .n, .z
  );

  always_comb begin
    unique case (ctrl.pc_sel)
      PC_FROM_D:   pc_next = d;
      PC_FROM_LNK: pc_next = lnk;
      default:     pc_next = pc_inc;
    endcase
    alu_b    = (ctrl.b_sel == B_FROM_DATAOUT) ? mem_dout : WORD_W'(d);
    mem_addr = (ctrl.addr_sel == ADDR_FROM_D) ? d : pc;
    mem_din  = acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= '0;
      lnk <= '0;
      acc <= '0;
    end else begin
      if (ctrl.pc_load)  pc  <= pc_next;
      if (ctrl.lnk_load) lnk <= pc;
      if (ctrl.acc_load) acc <= alu_y;
    end
  end

endmodule
