// narc_printer: the printer's connection to the NARC memory bus.
//
// The printer is an output device reached with storem: when the address
// decoder selects it and the processor writes, the word on DataToMem is
// latched into data and strobe is high for the following cycle, telling the
// printer mechanism that a new word is there. The printer is write-only.
// Everything beyond "a store to the printer's address sends it the word" is
// this design's choice: the latch, the one-cycle strobe, and passing the
// whole 32-bit word (a printer taking characters would use the low bits).
module narc_printer #(
  parameter int unsigned WIDTH = narc_pkg::WORD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel,
  input  logic             write,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] data,
  output logic             strobe
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data   <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= sel && write;
      if (sel && write) data <= din;
    end
  end
endmodule
