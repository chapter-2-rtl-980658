// narc_system_tb: end-to-end test of the whole NARC computer at its default
// size (2**23 words of memory, eight keys).
//
// Programs are placed in memory before reset is released. Three programs run:
//  1. the addm / storem / jmpn example traced in the NARC description
//     (word 0: addm 4, word 1: storem 3, word 2: jmpn 0, word 4: 13), with a
//     halt added at word 5;
//  2. the shared test program, which uses every instruction, reads the
//     keyboard and writes the printer;
//  3. a keyboard-polling loop: loadm from the keyboard until a key is down,
//     then store the keys to the printer.
// At every instruction start PC, Lnk and Acc are compared with the
// instruction-level reference model, and the cycles per instruction with the
// model's count. The test also counts how often each mechanism happened
// (every opcode, each conditional jump taken and not taken, call/return,
// undefined opcode, memory write, keyboard read, printer write, halt) and
// counts a failure for any that never did.
module narc_system_tb;
  import narc_pkg::*;
  import narc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] keys = '0;
  word_t prn_data;
  logic prn_strobe, halted, instr_start;
  addr_t pc, lnk;
  word_t acc;
  logic [7:0] op;
  logic [2:0] step;
  word_t printed[$];
  int checks = 0, failures = 0;
  int op_count [16];
  int jz_taken, jz_not, jn_taken, jn_not, kbd_reads, prn_writes, mem_writes, halts;

  narc_system dut (.clk, .rst_n, .keys, .prn_data, .prn_strobe, .halted, .pc, .lnk,
                   .acc, .op, .step, .instr_start);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (prn_strobe) begin printed.push_back(prn_data); prn_writes++; end
    if (rst_n && dut.u_dec.kbd_sel && dut.bus_read) kbd_reads++;
    if (rst_n && dut.u_dec.mem_sel && dut.bus_write) mem_writes++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Runs img to halt. key_cycle: cycle at which keys is set to key_val
  // (keys are 0 before it).
  task automatic run_program(ref word_t img [int unsigned], input int key_cycle,
                             input logic [7:0] key_val, output NarcModel m);
    int exp_cyc, cyc, n_instr, total, cur_op;
    bit key_down;
    m = new();
    m.mem = img;
    foreach (img[a]) dut.u_mem.mem[a] = img[a];
    keys = '0;
    m.keys = '0;
    printed.delete();
    rst_n = 0;
    @(negedge clk);
    @(negedge clk) rst_n = 1;
    n_instr = 0;
    total = 0;
    key_down = 0;
    while (!m.halted && n_instr < 2000) begin
      // Keys change only at an instruction start. The keyboard is read at
      // the earliest in step 4, after the two-flop synchronizer has passed
      // the new value on, so the model and the hardware see the same keys.
      if (!key_down && total >= key_cycle) begin
        keys = key_val;
        m.keys = {24'd0, key_val};
        key_down = 1;
      end
      check(instr_start === 1'b1 && pc === m.pc && acc === m.acc && lnk === m.lnk,
            $sformatf("before instr %0d: pc=%h/%h acc=%h/%h", n_instr, pc, m.pc, acc, m.acc));
      cur_op = m.mem.exists(int'(m.pc)) ? int'(m.mem[int'(m.pc)][31:24]) : 0;
      op_count[(cur_op >= 1 && cur_op <= 13) ? cur_op : 0]++;
      exp_cyc = m.step();
      if (cur_op == 9)  begin if (m.last_taken) jz_taken++; else jz_not++; end
      if (cur_op == 10) begin if (m.last_taken) jn_taken++; else jn_not++; end
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!instr_start && !halted && cyc < 20);
      total += cyc;
      check(cyc == exp_cyc, $sformatf("instr %0d took %0d cycles, expected %0d", n_instr, cyc, exp_cyc));
      n_instr++;
    end
    if (m.halted) halts++;
    check(halted === 1'b1 && m.halted, "halted");
    check(pc === m.pc && acc === m.acc && lnk === m.lnk, "final registers");
    foreach (m.mem[a]) check(dut.u_mem.mem[a] === m.mem[a], $sformatf("memory word %0d", a));
    check(printed.size() == m.printed.size(), "number of printed words");
    foreach (printed[i]) check(printed[i] === m.printed[i], $sformatf("printed word %0d", i));
  endtask

  initial begin
    word_t img [int unsigned];
    NarcModel m;
    for (int i = 0; i < 16; i++) op_count[i] = 0;
    {jz_taken, jz_not, jn_taken, jn_not, kbd_reads, prn_writes, mem_writes, halts} = '0;

    // 1. the traced example
    img[0] = make_instr(OP_ADDM, 24'd4);
    img[1] = make_instr(OP_STOREM, 24'd3);
    img[2] = make_instr(OP_JMPN, 24'd0);
    img[3] = 32'd0;
    img[4] = 32'd13;
    img[5] = make_instr(OP_HALT, 24'd0);
    run_program(img, 1 << 30, 8'd0, m);
    check(dut.u_mem.mem[3] === 32'd13 && acc === 32'd13, "example: Memory(3) = Acc = 13");

    // 2. the shared test program, keys held from the start
    img.delete();
    load_test_program(img);
    run_program(img, 0, 8'hA5, m);
    check(dut.u_mem.mem[100] === 32'hFFFF_FFFE, "mem[100] = -2");
    check(dut.u_mem.mem[103] === 32'h0000_00A5, "keyboard value stored");
    check(printed.size() == 2 && printed[0] === 32'd5 && printed[1] === 32'h0000_00A5, "printer output");

    // 3. keyboard polling: 0: loadm KBD; 1: jmpz 0; 2: storem PRN; 3: halt
    img.delete();
    img[0] = make_instr(OP_LOADM, 24'h800000);
    img[1] = make_instr(OP_JMPZ, 24'd0);
    img[2] = make_instr(OP_STOREM, 24'hC00000);
    img[3] = make_instr(OP_HALT, 24'd0);
    run_program(img, 60, 8'h12, m);
    check(printed.size() == 1 && printed[0] === 32'h12, "polled key printed");

    // mechanisms
    foreach (op_count[i])
      if (i >= 1 && i <= 13) check(op_count[i] > 0, $sformatf("opcode %0d executed", i));
    check(op_count[0] > 0, "undefined opcode skipped");
    check(jz_taken > 0 && jz_not > 0, "jmpz taken and not taken");
    check(jn_taken > 0 && jn_not > 0, "jmpn taken and not taken");
    check(kbd_reads > 0, "keyboard read");
    check(prn_writes > 0, "printer write");
    check(mem_writes > 0, "memory write");
    check(halts == 3, "all programs halted");
    $display("mechanisms: opcode counts %p; jmpz %0d/%0d, jmpn %0d/%0d taken/not; keyboard reads %0d, printer writes %0d, memory writes %0d",
             op_count, jz_taken, jz_not, jn_taken, jn_not, kbd_reads, prn_writes, mem_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
