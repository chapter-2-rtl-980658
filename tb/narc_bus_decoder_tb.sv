// narc_bus_decoder_tb: checks the memory map (memory below 0x800000, keyboard
// at 0x800000-0xBFFFFF, printer from 0xC00000, exactly one select at a time)
// and that DataFromMem carries, one cycle after a read, the data of the device
// that the read selected, and 0 after a printer read.
module narc_bus_decoder_tb;
  import narc_pkg::*;
  logic clk = 0, rst_n = 0, read = 0;
  logic [31:0] addr = '0;
  logic mem_sel, kbd_sel, prn_sel;
  word_t mem_dout, kbd_dout, data_from_mem;
  int checks = 0, failures = 0;

  narc_bus_decoder dut (.clk, .rst_n, .addr, .read, .mem_sel, .kbd_sel, .prn_sel,
                        .mem_dout, .kbd_dout, .data_from_mem);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dev, last_dev;
    mem_dout = 32'h1111_1111;
    kbd_dout = 32'h2222_2222;
    #12 rst_n = 1;
    last_dev = 0;
    repeat (3000) begin
      @(negedge clk);
      dev  = $urandom_range(0, 2);
      addr = {8'h00, (dev == 0) ? 2'b00 + 2'($urandom_range(0, 1)) :
                     (dev == 1) ? 2'b10 : 2'b11, 22'($urandom)};
      read = 1'($urandom);
      #1;
      checks++;
      if (mem_sel !== (dev == 0) || kbd_sel !== (dev == 1) || prn_sel !== (dev == 2)) begin
        failures++;
        $display("FAIL select addr=%h m=%b k=%b p=%b", addr, mem_sel, kbd_sel, prn_sel);
      end
      if (read) last_dev = dev;
      @(posedge clk); #1;
      mem_dout = $urandom;
      kbd_dout = $urandom;
      #1;
      checks++;
      if (data_from_mem !== ((last_dev == 0) ? mem_dout : (last_dev == 1) ? kbd_dout : 32'd0)) begin
        failures++;
        $display("FAIL data dev=%0d got=%h", last_dev, data_from_mem);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
