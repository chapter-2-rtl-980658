// narc_keyboard: the keyboard's connection to the NARC memory bus.
//
// Each key makes an electrical contact and so gives a 1/0 signal, one per
// key; with the default eight keys, key i drives bit i of DataFromMem. The
// keyboard sends its signals only when selected by the address decoder, so a
// loadm from the keyboard's address reads the keys into the accumulator.
// The key contacts are asynchronous to the processor clock, so they pass
// through a two-flip-flop synchronizer first (this design's choice). As with
// the memory, a read with sel high captures the keys into dout on the rising
// edge and dout is valid in the next cycle; bits above NUM_KEYS read as 0.
// Reading does not consume a key press: a key reads 1 while it is held down.
module narc_keyboard #(
  parameter int unsigned NUM_KEYS = 8,
  parameter int unsigned WIDTH    = narc_pkg::WORD_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_KEYS-1:0] keys,   // 1 = key pressed
  input  logic                sel,
  input  logic                read,
  output logic [WIDTH-1:0]    dout
);
  logic [NUM_KEYS-1:0] meta_q, sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q <= '0;
      sync_q <= '0;
      dout   <= '0;
    end else begin
      meta_q <= keys;
      sync_q <= meta_q;
      if (sel && read) dout <= WIDTH'(sync_q);
    end
  end
endmodule
