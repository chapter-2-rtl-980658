// narc_incrementer_tb: checks y = a + 1 (with wrap-around) at the default
// 24-bit width on corner cases and random values.
module narc_incrementer_tb;
  logic [23:0] a, y;
  int checks = 0, failures = 0;

  narc_incrementer dut (.a, .y);

  task automatic check(logic [23:0] v);
    a = v;
    #1;
    checks++;
    if (y !== 24'(v + 1)) begin
      failures++;
      $display("FAIL a=%h y=%h", v, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(24'd0); check(24'd1); check(24'hFFFFFF); check(24'h7FFFFF);
    repeat (2000) check(24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
