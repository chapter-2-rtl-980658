// narc_instruction_register_tb: checks that the register clears on reset,
// captures a word only when load is high, and splits it into the opcode (bits
// 31..24) and operand D (bits 23..0).
module narc_instruction_register_tb;
  import narc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  word_t data_in;
  logic [7:0] op;
  operand_t d;
  logic [7:0] exp_op;
  operand_t   exp_d;
  int checks = 0, failures = 0;

  narc_instruction_register dut (.clk, .rst_n, .load, .data_in, .op, .d);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_in = 32'h0504_0000;
    #12;
    checks++;
    if (op !== 8'd0 || d !== 24'd0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    exp_op = 0; exp_d = 0;
    repeat (1000) begin
      @(negedge clk);
      load    = 1'($urandom);
      data_in = $urandom;
      if (load) begin exp_op = data_in[31:24]; exp_d = data_in[23:0]; end
      @(posedge clk); #1;
      checks++;
      if (op !== exp_op || d !== exp_d) begin
        failures++;
        $display("FAIL load=%b in=%h op=%h d=%h", load, data_in, op, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
