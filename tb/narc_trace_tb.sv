// narc_trace_tb: step-by-step trace of the NARC exercise program on the full
// system, checking in every clock cycle the step number, PC, the instruction
// register (Op, D), the accumulator, the bus address and the Read/Write
// strobes against the values of the traced walkthrough (AddressIn shows the
// PC in steps without a memory access):
//   memory  0: addm 4   1: storem 3   2: jmpn 0   4: 13   (5: halt, added)
//   addm 4   step 1 PC=0 AddressIn=0 Read; step 2 loads Op=5 D=4, PC=1;
//            step 4 AddressIn=4 Read; step 5 Acc=0+13=13
//   storem 3 step 2 loads Op=3 D=3, PC=2; step 4 AddressIn=3;
//            step 5 AddressIn=3 Write DataIn=13, so Memory(3)=13
//   jmpn 0   step 2 loads Op=10 D=0, PC=3; step 4 Test (N=0 as Acc=13);
//            step 5 if (N) is false, so no step 6 and PC stays 3.
// Words 3 and 4 then hold 13 (opcode 0, skipped) and the halt at 5 stops.
module narc_trace_tb;
  import narc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] keys = '0;
  word_t prn_data, acc;
  logic prn_strobe, halted, instr_start;
  addr_t pc, lnk;
  logic [7:0] op;
  logic [2:0] step;
  int checks = 0, failures = 0;

  narc_system dut (.clk, .rst_n, .keys, .prn_data, .prn_strobe, .halted, .pc, .lnk,
                   .acc, .op, .step, .instr_start);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One expected step: step number, PC, Op, D, Acc, bus address, Read, Write.
  task automatic expect_step(int s, int e_pc, int e_op, int e_d, int e_acc,
                             int e_addr, bit e_rd, bit e_wr);
    #1;
    checks++;
    if (step !== 3'(s) || pc !== 24'(e_pc) || op !== 8'(e_op) || dut.u_cpu.u_dp.d !== 24'(e_d) ||
        acc !== 32'(e_acc) || dut.bus_addr !== 32'(e_addr) || dut.bus_read !== e_rd ||
        dut.bus_write !== e_wr) begin
      failures++;
      $display("FAIL step %0d: got step=%0d pc=%0d op=%0d d=%0d acc=%0d addr=%0d rd=%b wr=%b",
               s, step, pc, op, dut.u_cpu.u_dp.d, acc, dut.bus_addr, dut.bus_read, dut.bus_write);
    end
    @(negedge clk);
  endtask

  initial begin
    dut.u_mem.mem[0] = make_instr(OP_ADDM, 24'd4);
    dut.u_mem.mem[1] = make_instr(OP_STOREM, 24'd3);
    dut.u_mem.mem[2] = make_instr(OP_JMPN, 24'd0);
    dut.u_mem.mem[3] = 32'd0;
    dut.u_mem.mem[4] = 32'd13;
    dut.u_mem.mem[5] = make_instr(OP_HALT, 24'd0);
    @(negedge clk);
    @(negedge clk) rst_n = 1;
    //            step pc op  d acc addr rd wr
    // addm 4
    expect_step(1, 0, 0, 0, 0, 0, 1, 0);
    expect_step(2, 0, 0, 0, 0, 0, 0, 0);
    expect_step(3, 1, 5, 4, 0, 1, 0, 0);
    expect_step(4, 1, 5, 4, 0, 4, 1, 0);
    expect_step(5, 1, 5, 4, 0, 1, 0, 0);
    // storem 3
    expect_step(1, 1, 5, 4, 13, 1, 1, 0);
    expect_step(2, 1, 5, 4, 13, 1, 0, 0);
    expect_step(3, 2, 3, 3, 13, 2, 0, 0);
    expect_step(4, 2, 3, 3, 13, 3, 0, 0);
    expect_step(5, 2, 3, 3, 13, 3, 0, 1);
    // jmpn 0
    checks++;
    if (dut.u_mem.mem[3] !== 32'd13) begin failures++; $display("FAIL Memory(3) != 13"); end
    expect_step(1, 2, 3, 3, 13, 2, 1, 0);
    expect_step(2, 2, 3, 3, 13, 2, 0, 0);
    expect_step(3, 3, 10, 0, 13, 3, 0, 0);
    expect_step(4, 3, 10, 0, 13, 3, 0, 0);
    expect_step(5, 3, 10, 0, 13, 3, 0, 0);
    // not taken: next fetch from 3 (13 = opcode 0, skipped), then 4, then halt at 5
    expect_step(1, 3, 10, 0, 13, 3, 1, 0);
    expect_step(2, 3, 10, 0, 13, 3, 0, 0);
    expect_step(3, 4, 0, 13, 13, 4, 0, 0);
    expect_step(1, 4, 0, 13, 13, 4, 1, 0);
    expect_step(2, 4, 0, 13, 13, 4, 0, 0);
    expect_step(3, 5, 0, 13, 13, 5, 0, 0);
    expect_step(1, 5, 0, 13, 13, 5, 1, 0);
    expect_step(2, 5, 0, 13, 13, 5, 0, 0);
    expect_step(3, 6, 13, 0, 13, 6, 0, 0);
    #1;
    checks++;
    if (!halted || pc !== 24'd6 || acc !== 32'd13) begin failures++; $display("FAIL not halted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
