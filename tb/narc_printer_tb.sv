// narc_printer_tb: checks that a selected write latches the word and raises
// strobe for exactly the following cycle, and that other cycles change
// nothing.
module narc_printer_tb;
  logic clk = 0, rst_n = 0, sel = 0, write = 0;
  logic [31:0] din = '0, data;
  logic strobe;
  logic [31:0] exp_data;
  logic exp_strobe;
  int checks = 0, failures = 0, prints = 0;

  narc_printer dut (.clk, .rst_n, .sel, .write, .din, .data, .strobe);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (data !== 0 || strobe !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    exp_data = 0;
    repeat (3000) begin
      @(negedge clk);
      sel   = 1'($urandom);
      write = 1'($urandom);
      din   = $urandom;
      @(posedge clk); #1;
      exp_strobe = sel && write;
      if (exp_strobe) begin exp_data = din; prints++; end
      checks++;
      if (data !== exp_data || strobe !== exp_strobe) begin
        failures++;
        $display("FAIL data=%h exp=%h strobe=%b", data, exp_data, strobe);
      end
    end
    if (prints == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
