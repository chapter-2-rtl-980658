// narc_addsub_tb: checks the add/sub unit's add, subtract and pass results
// and its N (Acc<0) and Z (Acc=0) tests against values computed here, on
// directed corner cases and random operands.
module narc_addsub_tb;
  import narc_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        n, z;
  int checks = 0, failures = 0;

  narc_addsub dut (.op, .a, .b, .y, .n, .z);

  task automatic check(alu_op_e o, logic [31:0] av, logic [31:0] bv);
    logic [31:0] exp;
    op = o; a = av; b = bv;
    #1;
    exp = (o == ALU_ADD) ? av + bv : (o == ALU_SUB) ? av - bv : bv;
    checks++;
    if (y !== exp || n !== ($signed(av) < 0) || z !== (av == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h n=%b z=%b", o, av, bv, y, exp, n, z);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(ALU_ADD, 32'd0, 32'd13);
    check(ALU_SUB, 32'd13, 32'd13);
    check(ALU_SUB, 32'd5, 32'd7);
    check(ALU_PASS, 32'hFFFF_FFFE, 32'd5);
    check(ALU_ADD, 32'h7FFF_FFFF, 32'd1);
    check(ALU_SUB, 32'h8000_0000, 32'd1);
    repeat (3000) check(alu_op_e'($urandom_range(0, 2)), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
