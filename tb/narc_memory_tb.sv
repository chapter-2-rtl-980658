// narc_memory_tb: checks the word memory against a model array: writes only
// when selected, read data appears one clock after the read and holds until
// the next read. The memory is shrunk to 2**8 words to keep the run short.
module narc_memory_tb;
  localparam int AB = 8;
  logic clk = 0, sel = 0, read = 0, write = 0;
  logic [AB-1:0] addr = '0;
  logic [31:0] din = '0, dout;
  logic [31:0] model [2**AB];
  logic [31:0] exp_dout;
  int checks = 0, failures = 0;

  narc_memory #(.ADDR_BITS(AB)) dut (.clk, .sel, .read, .write, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill every word so that later reads are defined.
    for (int i = 0; i < 2**AB; i++) begin
      @(negedge clk);
      sel = 1; write = 1; read = 0; addr = AB'(i); din = $urandom;
      model[i] = din;
    end
    @(negedge clk);
    sel = 1; write = 0; read = 1; addr = 0;
    @(posedge clk); #1;
    exp_dout = model[0];
    repeat (4000) begin
      @(negedge clk);
      sel   = ($urandom_range(0, 3) != 0);
      read  = 1'($urandom);
      write = !read && 1'($urandom);
      addr  = AB'($urandom);
      din   = $urandom;
      @(posedge clk); #1;
      if (sel && read) exp_dout = model[addr];
      if (sel && write) model[addr] = din;
      checks++;
      if (dout !== exp_dout) begin
        failures++;
        $display("FAIL addr=%h dout=%h exp=%h", addr, dout, exp_dout);
      end
    end
    // Read back everything.
    for (int i = 0; i < 2**AB; i++) begin
      @(negedge clk);
      sel = 1; read = 1; write = 0; addr = AB'(i);
      @(posedge clk); #1;
      checks++;
      if (dout !== model[i]) begin failures++; $display("FAIL readback %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
