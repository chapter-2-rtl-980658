// narc_control_unit_tb: runs the sequencer through every opcode (and some
// undefined ones) with the flags N and Z set both ways, and compares each
// step's control signals and the number of steps with the step lists written
// out here: fetch (1), load IR and increment PC (2), switch (3), then the
// opcode's own steps. For jmpz/jmpn the flags change after the test step to
// show that the tested value, not the later one, decides the jump. Halt must
// stop the sequencer until reset.
module narc_control_unit_tb;
  import narc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] op = '0;
  logic n = 0, z = 0;
  ctrl_t ctrl;
  logic [2:0] step;
  logic instr_start, halted;
  int checks = 0, failures = 0;

  narc_control_unit dut (.clk, .rst_n, .op, .n, .z, .ctrl, .step, .instr_start, .halted);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t idle();
    ctrl_t c;
    c = '0;
    c.addr_sel = ADDR_FROM_PC; c.pc_sel = PC_FROM_INC; c.b_sel = B_FROM_D; c.alu_op = ALU_PASS;
    return c;
  endfunction

  // Expected control word of step s (1-based) of opcode o; cond = tested flag.
  function automatic ctrl_t expect_ctrl(int o, int s, bit cond);
    ctrl_t c = idle();
    if (s == 1) begin c.mem_read = 1; return c; end
    if (s == 2) begin c.ir_load = 1; c.pc_load = 1; return c; end
    if (s == 3) return c;
    case (o)
      2, 5, 7: begin
        c.addr_sel = ADDR_FROM_D;
        if (s == 4) c.mem_read = 1;
        else begin
          c.addr_sel = ADDR_FROM_PC;
          c.acc_load = 1; c.b_sel = B_FROM_DATAOUT;
          c.alu_op = (o == 5) ? ALU_ADD : (o == 7) ? ALU_SUB : ALU_PASS;
        end
      end
      3: begin c.addr_sel = ADDR_FROM_D; if (s == 5) c.mem_write = 1; end
      1, 4, 6: begin
        c.acc_load = 1;
        c.alu_op = (o == 4) ? ALU_ADD : (o == 6) ? ALU_SUB : ALU_PASS;
      end
      8:  begin c.pc_load = 1; c.pc_sel = PC_FROM_D; end
      11: begin c.pc_load = 1; c.pc_sel = PC_FROM_D; c.lnk_load = 1; end
      12: begin c.pc_load = 1; c.pc_sel = PC_FROM_LNK; end
      9, 10: if (s == 6) begin c.pc_load = 1; c.pc_sel = PC_FROM_D; end
      default: ;
    endcase
    return c;
  endfunction

  function automatic int expect_steps(int o, bit cond);
    case (o)
      2, 3, 5, 7: return 5;
      1, 4, 6, 8, 11, 12: return 4;
      9, 10: return cond ? 6 : 5;
      default: return 3;
    endcase
  endfunction

  task automatic run_instr(int o, bit nv, bit zv);
    int  nsteps;
    bit  cond;
    ctrl_t e;
    cond   = (o == 10) ? nv : zv;
    nsteps = expect_steps(o, cond);
    op = 8'(o);
    n = nv; z = zv;
    for (int s = 1; s <= nsteps; s++) begin
      #1;
      e = expect_ctrl(o, s, cond);
      checks++;
      if (ctrl !== e || step !== 3'(s) || instr_start !== (s == 1) || halted) begin
        failures++;
        $display("FAIL op=%0d step %0d: got step=%0d ctrl=%h exp ctrl=%h", o, s, step, ctrl, e);
      end
      @(negedge clk);
      if (s == 4) begin n = !nv; z = !zv; end  // flags move on after the test
    end
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk) rst_n = 1;
    for (int rep = 0; rep < 4; rep++)
      for (int o = 0; o <= 15; o++)
        if (o != 13) run_instr(o, 1'(rep), 1'(rep >> 1));
    repeat (200) begin
      int o;
      o = $urandom_range(0, 255);
      if (o != 13) run_instr(o, 1'($urandom), 1'($urandom));
    end
    // halt: three steps, then stopped for good.
    run_instr(13, 0, 0);
    repeat (10) begin
      #1;
      checks++;
      if (!halted || step !== 3'd0 || ctrl.pc_load || ctrl.mem_read || ctrl.mem_write) begin
        failures++;
        $display("FAIL not halted");
      end
      @(negedge clk);
    end
    // reset restarts at step 1
    rst_n = 0;
    @(negedge clk) rst_n = 1;
    #1;
    checks++;
    if (halted) begin failures++; $display("FAIL halted after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
