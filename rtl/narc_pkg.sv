// narc_pkg: types and constants shared by the NARC processor and its bus.
//
// NARC is a 32-bit accumulator machine. An instruction word holds an 8-bit
// opcode in bits 31..24 and a 24-bit operand D in bits 23..0; the opcode
// numbers 1..13 below are the machine's instruction set. Everything else here
// (the control-signal bundle, the select encodings, the add/sub operations)
// is this design's own way of naming the signals the control unit drives.
package narc_pkg;

  localparam int unsigned WORD_W = 32;  // word size
  localparam int unsigned OP_W   = 8;   // opcode field, bits 31..24
  localparam int unsigned D_W    = 24;  // operand field, bits 23..0
  localparam int unsigned ADDR_W = D_W; // every address comes from D or the PC

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [D_W-1:0]    operand_t;

  typedef enum logic [OP_W-1:0] {
    OP_LOADC  = 8'd1,   // ACC := D
    OP_LOADM  = 8'd2,   // ACC := Memory(D)
    OP_STOREM = 8'd3,   // Memory(D) := ACC
    OP_ADDC   = 8'd4,   // ACC := ACC + D
    OP_ADDM   = 8'd5,   // ACC := ACC + Memory(D)
    OP_SUBC   = 8'd6,   // ACC := ACC - D
    OP_SUBM   = 8'd7,   // ACC := ACC - Memory(D)
    OP_JMP    = 8'd8,   // PC := D
    OP_JMPZ   = 8'd9,   // if ACC = 0 then PC := D
    OP_JMPN   = 8'd10,  // if ACC < 0 then PC := D
    OP_CALL   = 8'd11,  // LNK := PC; PC := D
    OP_RET    = 8'd12,  // PC := LNK
    OP_HALT   = 8'd13
  } opcode_e;

  // Operation of the add/sub unit.
  typedef enum logic [1:0] {
    ALU_PASS = 2'd0,  // result = operand (load)
    ALU_ADD  = 2'd1,  // result = Acc + operand
    ALU_SUB  = 2'd2   // result = Acc - operand
  } alu_op_e;

  // Switch in front of the memory's AddressIn.
  typedef enum logic {
    ADDR_FROM_PC = 1'b0,
    ADDR_FROM_D  = 1'b1
  } addr_sel_e;

  // Switch in front of the PC.
  typedef enum logic [1:0] {
    PC_FROM_INC = 2'd0,
    PC_FROM_D   = 2'd1,
    PC_FROM_LNK = 2'd2
  } pc_sel_e;

  // Switch in front of the add/sub unit's second operand.
  typedef enum logic {
    B_FROM_D       = 1'b0,
    B_FROM_DATAOUT = 1'b1
  } b_sel_e;

  // One microinstruction: every control signal the control unit drives.
  typedef struct packed {
    addr_sel_e addr_sel;
    logic      mem_read;
    logic      mem_write;
    logic      ir_load;
    logic      pc_load;
    pc_sel_e   pc_sel;
    logic      lnk_load;
    logic      acc_load;
    b_sel_e    b_sel;
    alu_op_e   alu_op;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    addr_sel: ADDR_FROM_PC, mem_read: 1'b0, mem_write: 1'b0, ir_load: 1'b0,
    pc_load: 1'b0, pc_sel: PC_FROM_INC, lnk_load: 1'b0, acc_load: 1'b0,
    b_sel: B_FROM_D, alu_op: ALU_PASS
  };

  // Instruction word assembly, used by testbenches and program images.
  function automatic word_t make_instr(opcode_e op, operand_t d);
    return {op, d};
  endfunction

endpackage
