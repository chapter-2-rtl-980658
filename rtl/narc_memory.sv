// narc_memory: the NARC main memory.
//
// Word-addressed, one 32-bit word per address; instructions and working
// variables share it (the stored-program principle). 2**ADDR_BITS words; the
// default, 2**23, is half of the 2**24 words a 24-bit operand can address,
// because the top address bit selects the I/O devices instead (see
// narc_bus_decoder). The array is not reset: its contents are the program.
// Timing (this design's choice, a synchronous RAM): with sel high, write
// stores din at addr on the rising edge; read captures mem[addr] into dout on
// the rising edge, so DataOut is valid in the cycle after AddressIn and Read.
// dout keeps its value until the next read.
module narc_memory #(
  parameter int unsigned ADDR_BITS = 23,
  parameter int unsigned WIDTH     = narc_pkg::WORD_W
) (
  input  logic                 clk,
  input  logic                 sel,
  input  logic                 read,
  input  logic                 write,
  input  logic [ADDR_BITS-1:0] addr,
  input  logic [WIDTH-1:0]     din,
  output logic [WIDTH-1:0]     dout
);
  logic [WIDTH-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (sel && write) mem[addr] <= din;
    if (sel && read)  dout <= mem[addr];
  end
endmodule
