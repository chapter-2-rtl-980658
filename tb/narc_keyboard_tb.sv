// narc_keyboard_tb: checks that a selected read returns the keys as they were
// two clocks earlier (the synchronizer), one bit per key in the low bits,
// that unselected or non-read cycles leave the output unchanged, and that
// reset clears it.
module narc_keyboard_tb;
  logic clk = 0, rst_n = 0, sel = 0, read = 0;
  logic [7:0] keys = '0;
  logic [31:0] dout;
  logic [7:0] hist [3];
  logic [31:0] exp_dout;
  int checks = 0, failures = 0;

  narc_keyboard dut (.clk, .rst_n, .keys, .sel, .read, .dout);

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
    if (dout !== 32'd0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    hist[0] = 0; hist[1] = 0; hist[2] = 0;
    exp_dout = 0;
    repeat (3000) begin
      @(negedge clk);
      keys = 8'($urandom);
      sel  = 1'($urandom);
      read = 1'($urandom);
      @(posedge clk); #1;
      // hist[1] holds keys sampled two edges ago: the value the
      // synchronizer's second stage presented at this edge.
      if (sel && read) exp_dout = {24'd0, hist[1]};
      hist[1] = hist[0];
      hist[0] = keys;
      checks++;
      if (dout !== exp_dout) begin
        failures++;
        $display("FAIL sel=%b read=%b dout=%h exp=%h", sel, read, dout, exp_dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
