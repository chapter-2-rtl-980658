// narc_datapath_tb: drives random control words and memory data into the
// data path and compares every output each cycle with registers modelled
// here: the AddressIn switch (PC or D), the PC switch (PC+1, D or Lnk), the
// add/sub operand switch (D or DataOut), Lnk := PC, the instruction register
// split, the accumulator result and the N and Z tests.
module narc_datapath_tb;
  import narc_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  word_t mem_dout;
  addr_t mem_addr;
  word_t mem_din;
  logic [7:0] op;
  operand_t d;
  logic n, z;
  addr_t pc, lnk;
  word_t acc;
  // model
  addr_t m_pc, m_lnk, old_pc, old_lnk;
  word_t m_acc, b;
  logic [7:0] m_op;
  operand_t m_d;
  int checks = 0, failures = 0;

  narc_datapath dut (.clk, .rst_n, .ctrl, .mem_dout, .mem_addr, .mem_din,
                     .op, .d, .n, .z, .pc, .lnk, .acc);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0;
    mem_dout = '0;
    m_pc = 0; m_lnk = 0; m_acc = 0; m_op = 0; m_d = 0;
    @(negedge clk) rst_n = 1;
    repeat (4000) begin
      ctrl.addr_sel  = addr_sel_e'($urandom_range(0, 1));
      ctrl.mem_read  = 1'($urandom);
      ctrl.mem_write = 1'($urandom);
      ctrl.ir_load   = ($urandom_range(0, 3) == 0);
      ctrl.pc_load   = 1'($urandom);
      ctrl.pc_sel    = pc_sel_e'($urandom_range(0, 2));
      ctrl.lnk_load  = ($urandom_range(0, 3) == 0);
      ctrl.acc_load  = 1'($urandom);
      ctrl.b_sel     = b_sel_e'($urandom_range(0, 1));
      ctrl.alu_op    = alu_op_e'($urandom_range(0, 2));
      mem_dout       = ($urandom_range(0, 7) == 0) ? 32'd0 : $urandom;
      #1;
      checks++;
      if (mem_addr !== (ctrl.addr_sel == ADDR_FROM_D ? m_d : m_pc) || mem_din !== m_acc ||
          n !== m_acc[31] || z !== (m_acc == 0) || op !== m_op || d !== m_d ||
          pc !== m_pc || lnk !== m_lnk || acc !== m_acc) begin
        failures++;
        $display("FAIL pc=%h/%h lnk=%h/%h acc=%h/%h addr=%h", pc, m_pc, lnk, m_lnk, acc, m_acc, mem_addr);
      end
      // next state of the model
      b = (ctrl.b_sel == B_FROM_DATAOUT) ? mem_dout : {8'd0, m_d};
      old_pc  = m_pc;
      old_lnk = m_lnk;
      if (ctrl.lnk_load) m_lnk = old_pc;
      if (ctrl.acc_load)
        m_acc = (ctrl.alu_op == ALU_ADD) ? m_acc + b : (ctrl.alu_op == ALU_SUB) ? m_acc - b : b;
      if (ctrl.pc_load)
        m_pc = (ctrl.pc_sel == PC_FROM_D) ? m_d : (ctrl.pc_sel == PC_FROM_LNK) ? old_lnk : old_pc + 1;
      if (ctrl.ir_load) begin m_op = mem_dout[31:24]; m_d = mem_dout[23:0]; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
