// narc_control_unit: the microinstruction sequencer of the NARC processor.
//
// Every instruction is carried out as a sequence of steps, one per clock
// cycle, each step driving one set of control signals (a ctrl_t):
//   step 1  AddressIn = PC; Read
//   step 2  Op&D = DataOut; PC = PC+1
//   step 3  Switch(Op)                    -- dispatch only
//   then, by opcode:
//   loadm/addm/subm   4: AddressIn = D; Read   5: Acc = (Acc +/-) DataOut
//   storem            4: AddressIn = D         5: DataIn = Acc; Write
//   loadc/addc/subc   4: Acc = (Acc +/-) D
//   jmp / call / ret  4: PC = D  /  Lnk = PC; PC = D  /  PC = Lnk
//   jmpz / jmpn       4: Test (capture Z or N)  5: if (Z/N)  6: PC = D
//   halt              the sequencer stops; halted stays high until reset.
// Steps 1-5 of addm and storem and steps 1-6 of jmpn are the ones the NARC
// description traces; the step counts of the other instructions, the one-cycle
// steps, and treating an undefined opcode as doing nothing, are this design's
// choices. After reset the sequence starts at step 1 (execution starts at
// location zero, the PC being cleared by the data path).
// Interface: op/n/z come from the data path; ctrl goes back to it and to the
// memory bus; step is the current step number (0 when halted) and
// instr_start pulses in step 1 of every instruction.
module narc_control_unit
  import narc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [OP_W-1:0] op,
  input  logic            n,
  input  logic            z,
  output ctrl_t           ctrl,
  output logic [2:0]      step,
  output logic            instr_start,
  output logic            halted
);

  typedef enum logic [2:0] {
    S_HALT  = 3'd0,
    S_FETCH = 3'd1,
    S_LOAD  = 3'd2,
    S_SWTCH = 3'd3,
    S_STEP4 = 3'd4,
    S_STEP5 = 3'd5,
    S_STEP6 = 3'd6
  } state_e;

  state_e state, state_next;
  logic   cond_q, cond_d;  // the tested flag of a conditional jump

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_FETCH;
      cond_q <= 1'b0;
    end else begin
      state  <= state_next;
      cond_q <= cond_d;
    end
  end

  always_comb begin
    ctrl       = CTRL_IDLE;
    state_next = state;
    cond_d     = cond_q;
    unique case (state)
      S_FETCH: begin
        ctrl.addr_sel = ADDR_FROM_PC;
        ctrl.mem_read = 1'b1;
        state_next    = S_LOAD;
      end
      S_LOAD: begin
        ctrl.ir_load = 1'b1;
        ctrl.pc_load = 1'b1;
        ctrl.pc_sel  = PC_FROM_INC;
        state_next   = S_SWTCH;
      end
      S_SWTCH: begin
        unique case (op)
          OP_HALT:  state_next = S_HALT;
          OP_LOADC, OP_LOADM, OP_STOREM, OP_ADDC, OP_ADDM, OP_SUBC, OP_SUBM,
          OP_JMP, OP_JMPZ, OP_JMPN, OP_CALL, OP_RET:
                    state_next = S_STEP4;
          default:  state_next = S_FETCH;
        endcase
      end
      S_STEP4: begin
        state_next = S_FETCH;
        unique case (op)
          OP_LOADM, OP_ADDM, OP_SUBM: begin
            ctrl.addr_sel = ADDR_FROM_D;
            ctrl.mem_read = 1'b1;
            state_next    = S_STEP5;
          end
          OP_STOREM: begin
            ctrl.addr_sel = ADDR_FROM_D;
            state_next    = S_STEP5;
          end
          OP_LOADC, OP_ADDC, OP_SUBC: begin
            ctrl.acc_load = 1'b1;
            ctrl.b_sel    = B_FROM_D;
            ctrl.alu_op   = (op == OP_ADDC) ? ALU_ADD :
                            (op == OP_SUBC) ? ALU_SUB : ALU_PASS;
          end
          OP_JMP: begin
            ctrl.pc_load = 1'b1;
            ctrl.pc_sel  = PC_FROM_D;
          end
          OP_CALL: begin
            ctrl.lnk_load = 1'b1;
            ctrl.pc_load  = 1'b1;
            ctrl.pc_sel   = PC_FROM_D;
          end
          OP_RET: begin
            ctrl.pc_load = 1'b1;
            ctrl.pc_sel  = PC_FROM_LNK;
          end
          OP_JMPZ, OP_JMPN: begin
            cond_d     = (op == OP_JMPN) ? n : z;
            state_next = S_STEP5;
          end
          default: state_next = S_FETCH;
        endcase
      end
      S_STEP5: begin
        state_next = S_FETCH;
        unique case (op)
          OP_LOADM, OP_ADDM, OP_SUBM: begin
            ctrl.acc_load = 1'b1;
            ctrl.b_sel    = B_FROM_DATAOUT;
            ctrl.alu_op   = (op == OP_ADDM) ? ALU_ADD :
                            (op == OP_SUBM) ? ALU_SUB : ALU_PASS;
          end
          OP_STOREM: begin
            ctrl.addr_sel  = ADDR_FROM_D;
            ctrl.mem_write = 1'b1;
          end
          OP_JMPZ, OP_JMPN: begin
            if (cond_q) state_next = S_STEP6;
          end
          default: state_next = S_FETCH;
        endcase
      end
      S_STEP6: begin
        ctrl.pc_load = 1'b1;
        ctrl.pc_sel  = PC_FROM_D;
        state_next   = S_FETCH;
      end
      default: state_next = S_HALT;  // S_HALT
    endcase
  end

  assign step        = 3'(state);
  assign instr_start = (state == S_FETCH);
  assign halted      = (state == S_HALT);

  // The memory is never asked to read and write in the same step.
  a_rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(ctrl.mem_read && ctrl.mem_write));

endmodule
