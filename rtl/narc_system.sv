// narc_system: a complete NARC computer.
//
// The NARC processor shares one bus (Address, DataToMem, DataFromMem, Read,
// Write) between main memory, a keyboard and a printer. Memory-mapped I/O: a
// program talks to the devices with ordinary loadm and storem instructions,
// and the address decides which part answers (see narc_bus_decoder):
//   0x000000 .. 0x7FFFFF  memory (2**23 words of 32 bits)
//   0x800000 ..           keyboard (read: one bit per key)
//   0xC00000 ..           printer  (write: the word is sent to the printer)
// After reset the processor runs from address 0 until a halt instruction.
// The program is whatever the memory holds; it has no load port, so a test
// bench or an external loader fills u_mem.mem before reset is released.
// Ports: keys are the key contacts' 1/0 signals; prn_data/prn_strobe go to the
// printer mechanism; halted, pc, lnk, acc, op (the opcode in the
// instruction register), step (the control unit's step, 1..6, 0 once halted)
// and instr_start (high in step 1) show the processor's state.
module narc_system
  import narc_pkg::*;
#(
  parameter int unsigned MEM_ADDR_BITS = 23,
  parameter int unsigned NUM_KEYS      = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_KEYS-1:0] keys,
  output word_t               prn_data,
  output logic                prn_strobe,
  output logic                halted,
  output addr_t               pc,
  output addr_t               lnk,
  output word_t               acc,
  output logic [7:0]          op,
  output logic [2:0]          step,
  output logic                instr_start
);

  logic [31:0] bus_addr;
  word_t       bus_data_to_mem, bus_data_from_mem;
  logic        bus_read, bus_write;
  logic        mem_sel, kbd_sel, prn_sel;
  word_t       mem_dout, kbd_dout;

  narc_cpu u_cpu (
    .clk, .rst_n,
    .bus_addr, .bus_data_to_mem, .bus_data_from_mem, .bus_read, .bus_write,
    .halted, .instr_start, .step, .pc, .lnk, .acc, .op
  );

  narc_bus_decoder #(.IO_BIT(ADDR_W-1)) u_dec (
    .clk, .rst_n,
    .addr (bus_addr),
    .read (bus_read),
    .mem_sel, .kbd_sel, .prn_sel,
    .mem_dout, .kbd_dout,
    .data_from_mem (bus_data_from_mem)
  );

  narc_memory #(.ADDR_BITS(MEM_ADDR_BITS)) u_mem (
    .clk,
    .sel   (mem_sel),
    .read  (bus_read),
    .write (bus_write),
    .addr  (bus_addr[MEM_ADDR_BITS-1:0]),
    .din   (bus_data_to_mem),
    .dout  (mem_dout)
  );

  narc_keyboard #(.NUM_KEYS(NUM_KEYS)) u_kbd (
    .clk, .rst_n, .keys,
    .sel  (kbd_sel),
    .read (bus_read),
    .dout (kbd_dout)
  );

  narc_printer u_prn (
    .clk, .rst_n,
    .sel    (prn_sel),
    .write  (bus_write),
    .din    (bus_data_to_mem),
    .data   (prn_data),
    .strobe (prn_strobe)
  );

endmodule
