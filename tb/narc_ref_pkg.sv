// narc_ref_pkg: instruction-level reference model of the NARC computer, used
// by the processor and system testbenches.
//
// NarcModel executes one instruction per call of step() on its own copy of
// memory, following the instruction set's meaning (ACC := ACC + Memory(D)
// and so on), and returns how many clock cycles the RTL is expected to take
// for that instruction. The memory map is the system's: addresses with bit 23
// set go to the keyboard (bit 22 clear) or the printer (bit 22 set).
package narc_ref_pkg;
  import narc_pkg::*;

  class NarcModel;
    word_t     mem [int unsigned];
    addr_t     pc, lnk;
    word_t     acc;
    bit        halted;
    word_t     keys;        // value a keyboard read returns
    word_t     printed[$];  // words stored to the printer
    bit        last_taken;  // last conditional jump was taken
    int        kbd_reads, prn_writes;

    function new();
      pc = '0; lnk = '0; acc = '0; halted = 0; keys = '0;
      kbd_reads = 0; prn_writes = 0; last_taken = 0;
    endfunction

    function word_t rd(addr_t a);
      if (a[23]) begin
        if (!a[22]) begin kbd_reads++; return keys; end
        return '0;
      end
      return mem.exists(int'(a)) ? mem[int'(a)] : '0;
    endfunction

    function void wr(addr_t a, word_t v);
      if (a[23]) begin
        if (a[22]) begin printed.push_back(v); prn_writes++; end
      end else mem[int'(a)] = v;
    endfunction

    // Executes the instruction at pc; returns the expected cycle count.
    function int step();
      word_t    w;
      logic [7:0] op;
      operand_t d;
      int       cyc;
      w  = mem.exists(int'(pc)) ? mem[int'(pc)] : '0;
      op = w[31:24];
      d  = w[23:0];
      pc = pc + 1;
      last_taken = 0;
      case (op)
        1:  begin acc = 32'(d);             cyc = 4; end
        2:  begin acc = rd(d);              cyc = 5; end
        3:  begin wr(d, acc);               cyc = 5; end
        4:  begin acc = acc + 32'(d);       cyc = 4; end
        5:  begin acc = acc + rd(d);        cyc = 5; end
        6:  begin acc = acc - 32'(d);       cyc = 4; end
        7:  begin acc = acc - rd(d);        cyc = 5; end
        8:  begin pc = d;                   cyc = 4; end
        9:  begin last_taken = (acc == 0);  if (last_taken) pc = d; cyc = last_taken ? 6 : 5; end
        10: begin last_taken = acc[31];     if (last_taken) pc = d; cyc = last_taken ? 6 : 5; end
        11: begin lnk = pc; pc = d;         cyc = 4; end
        12: begin pc = lnk;                 cyc = 4; end
        13: begin halted = 1;               cyc = 3; end
        default: cyc = 3;
      endcase
      return cyc;
    endfunction
  endclass

  // The test program shared by the processor and system testbenches. It uses
  // every instruction, takes and skips both conditional jumps, calls and
  // returns, reads the keyboard and writes the printer.
  function automatic void load_test_program(ref word_t img [int unsigned]);
    img[0]   = make_instr(OP_LOADC, 24'd5);        // acc = 5
    img[1]   = make_instr(OP_SUBC, 24'd7);         // acc = -2
    img[2]   = make_instr(OP_JMPN, 24'd5);         // taken
    img[3]   = make_instr(OP_HALT, 24'd0);
    img[4]   = make_instr(OP_HALT, 24'd0);
    img[5]   = make_instr(OP_STOREM, 24'd100);     // mem[100] = -2
    img[6]   = make_instr(OP_ADDC, 24'd2);         // acc = 0
    img[7]   = make_instr(OP_JMPZ, 24'd10);        // taken
    img[8]   = make_instr(OP_HALT, 24'd0);
    img[9]   = make_instr(OP_HALT, 24'd0);
    img[10]  = make_instr(OP_JMPN, 24'd3);         // not taken
    img[11]  = make_instr(OP_LOADM, 24'd100);      // acc = -2
    img[12]  = make_instr(OP_JMPZ, 24'd3);         // not taken
    img[13]  = make_instr(OP_ADDM, 24'd101);       // acc = 8
    img[14]  = make_instr(OP_SUBM, 24'd102);       // acc = 5
    img[15]  = make_instr(OP_CALL, 24'd30);        // lnk = 16
    img[16]  = make_instr(OP_LOADM, 24'h800000);   // keyboard
    img[17]  = make_instr(OP_STOREM, 24'hC00000);  // printer
    img[18]  = make_instr(OP_STOREM, 24'd103);
    img[19]  = 32'h0000_0000;                      // undefined opcode 0
    img[20]  = make_instr(OP_JMP, 24'd22);
    img[21]  = make_instr(OP_HALT, 24'd0);
    img[22]  = make_instr(OP_HALT, 24'd0);
    img[30]  = make_instr(OP_STOREM, 24'hC00000);  // print 5
    img[31]  = make_instr(OP_RET, 24'd0);
    img[100] = 32'd0;
    img[101] = 32'd10;
    img[102] = 32'd3;
    img[103] = 32'd0;
  endfunction

endpackage
