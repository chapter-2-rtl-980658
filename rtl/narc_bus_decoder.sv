// narc_bus_decoder: address decoding for memory-mapped input/output.
//
// The processor reaches memory, keyboard and printer with the same loadm and
// storem instructions; which one answers depends on the address. One address
// bit, IO_BIT, separates memory (bit clear) from the devices (bit set), the
// way a single address bit selects the keyboard and, inverted, the memory in
// the 8-bit NARC bus. With two devices, the bit below IO_BIT picks between
// them (this design's choice):
//   addr[IO_BIT] = 0                  memory, addresses 0 .. 2**IO_BIT-1
//   addr[IO_BIT:IO_BIT-1] = 2'b10     keyboard  (0x800000 with the default)
//   addr[IO_BIT:IO_BIT-1] = 2'b11     printer   (0xC00000 with the default)
// Address bits above IO_BIT are ignored. The select outputs are
// combinational. Because devices answer a read in the following cycle, the
// decoder remembers which device a read selected and returns that device's
// data on DataFromMem in the next cycle; the printer is write-only and reads
// from it return 0.
module narc_bus_decoder
  import narc_pkg::*;
#(
  parameter int unsigned IO_BIT = ADDR_W - 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] addr,
  input  logic        read,
  output logic        mem_sel,
  output logic        kbd_sel,
  output logic        prn_sel,
  input  word_t       mem_dout,
  input  word_t       kbd_dout,
  output word_t       data_from_mem
);

  typedef enum logic [1:0] { SRC_MEM, SRC_KBD, SRC_NONE } src_e;
  src_e src_q;

  always_comb begin
    mem_sel = !addr[IO_BIT];
    kbd_sel =  addr[IO_BIT] && !addr[IO_BIT-1];
    prn_sel =  addr[IO_BIT] &&  addr[IO_BIT-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    src_q <= SRC_MEM;
    else if (read) src_q <= mem_sel ? SRC_MEM : kbd_sel ? SRC_KBD : SRC_NONE;
  end

  always_comb begin
    unique case (src_q)
      SRC_MEM: data_from_mem = mem_dout;
      SRC_KBD: data_from_mem = kbd_dout;
      default: data_from_mem = '0;
    endcase
  end

  a_one_select: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot({mem_sel, kbd_sel, prn_sel}));

endmodule
