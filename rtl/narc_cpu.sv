// narc_cpu: the NARC processor, control unit plus data path.
//
// It runs the fetch-execute cycle from address 0 after reset: fetch the word
// at PC, split it into Op and D, increment PC, then execute Op (see
// narc_control_unit for the steps of each instruction). Its bus to memory and
// devices is three bundles of wires, Address, DataToMem and DataFromMem, plus
// the Read and Write control signals. Address is 32 bits wide as drawn for the
// NARC bus; because every address comes from the 24-bit PC or D its upper 8
// bits are always 0.
// Bus timing (this design's choice): the address and Read or Write are valid
// for one cycle; a write happens on that cycle's clock edge; read data must be
// on DataFromMem during the following cycle (a synchronous memory).
module narc_cpu
  import narc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  output logic [31:0]     bus_addr,        // Address
  output word_t           bus_data_to_mem, // DataToMem
  input  word_t           bus_data_from_mem, // DataFromMem
  output logic            bus_read,
  output logic            bus_write,
  output logic            halted,
  output logic            instr_start,
  output logic [2:0]      step,
  output addr_t           pc,
  output addr_t           lnk,
  output word_t           acc,
  output logic [OP_W-1:0] op
);

  ctrl_t    ctrl;
  operand_t d;
  addr_t    mem_addr;
  logic     n, z;

  narc_control_unit u_ctrl (
    .clk, .rst_n, .op, .n, .z, .ctrl, .step, .instr_start, .halted
  );

  narc_datapath u_dp (
    .clk, .rst_n, .ctrl,
    .mem_dout (bus_data_from_mem),
    .mem_addr,
    .mem_din  (bus_data_to_mem),
    .op, .d, .n, .z, .pc, .lnk, .acc
  );

  assign bus_addr  = 32'(mem_addr);
  assign bus_read  = ctrl.mem_read;
  assign bus_write = ctrl.mem_write;

endmodule
