// narc_cpu_tb: runs the shared test program on the processor with a bus
// model written here (a synchronous word memory plus keyboard and printer at
// their addresses) and compares, at the start of every instruction, PC, Lnk
// and the accumulator with the instruction-level reference model, and the
// clock cycles each instruction took with the model's count. Then it runs a
// few hundred random programs (random loadc/addc/subc/loadm/storem/addm/subm
// and jumps) the same way. Every program ends in halt.
module narc_cpu_tb;
  import narc_pkg::*;
  import narc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] bus_addr;
  word_t bus_data_to_mem, bus_data_from_mem;
  logic bus_read, bus_write, halted, instr_start;
  logic [2:0] step;
  addr_t pc, lnk;
  word_t acc;
  logic [7:0] op;
  word_t mem [int unsigned];
  word_t keys;
  word_t printed[$];
  int checks = 0, failures = 0;

  narc_cpu dut (.clk, .rst_n, .bus_addr, .bus_data_to_mem, .bus_data_from_mem,
                .bus_read, .bus_write, .halted, .instr_start, .step, .pc, .lnk, .acc, .op);

  always #5 clk = ~clk;

  // Bus model: synchronous read, one cycle latency.
  always_ff @(posedge clk) begin
    if (bus_read) begin
      if (bus_addr[23]) bus_data_from_mem <= bus_addr[22] ? 32'd0 : keys;
      else bus_data_from_mem <= mem.exists(bus_addr) ? mem[bus_addr] : 32'd0;
    end
    if (bus_write) begin
      if (bus_addr[23]) begin if (bus_addr[22]) printed.push_back(bus_data_to_mem); end
      else mem[bus_addr] = bus_data_to_mem;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_program(ref word_t img [int unsigned], input word_t k);
    NarcModel m;
    int exp_cyc, cyc, n_instr;
    m = new();
    m.mem = img;
    m.keys = k;
    mem = img;
    keys = k;
    printed.delete();
    rst_n = 0;
    @(negedge clk);
    @(negedge clk) rst_n = 1;
    n_instr = 0;
    while (!m.halted && n_instr < 500) begin
      // at step 1 of the instruction
      check(instr_start === 1'b1 && pc === m.pc && acc === m.acc && lnk === m.lnk,
            $sformatf("state before instr %0d: pc=%h/%h acc=%h/%h", n_instr, pc, m.pc, acc, m.acc));
      exp_cyc = m.step();
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!instr_start && !halted && cyc < 20);
      check(cyc == exp_cyc, $sformatf("instr %0d took %0d cycles, expected %0d", n_instr, cyc, exp_cyc));
      n_instr++;
    end
    check(halted === 1'b1 && m.halted, "halted");
    check(pc === m.pc && acc === m.acc && lnk === m.lnk, "final registers");
    foreach (m.mem[a]) check(mem.exists(a) && mem[a] === m.mem[a], $sformatf("memory word %0d", a));
    check(printed.size() == m.printed.size(), "number of printed words");
    foreach (printed[i]) check(printed[i] === m.printed[i], $sformatf("printed word %0d", i));
  endtask

  initial begin
    word_t img [int unsigned];
    load_test_program(img);
    run_program(img, 32'h0000_00A5);
    // Expected results of the directed program, worked out by hand.
    check(mem[100] === 32'hFFFF_FFFE, "mem[100] = -2");
    check(mem[103] === 32'h0000_00A5 && acc === 32'h0000_00A5, "keyboard value stored");
    check(printed.size() == 2 && printed[0] === 32'd5 && printed[1] === 32'h0000_00A5, "printer output");
    check(lnk === 24'd16 && pc === 24'd23, "lnk and pc");
    // Random programs of 40 instructions over 16 data words at 64..79.
    repeat (300) begin
      img.delete();
      for (int i = 0; i < 40; i++) begin
        int o;
        o = $urandom_range(1, 12);
        if (o inside {2, 3, 5, 7}) img[i] = {8'(o), 24'($urandom_range(64, 79))};
        else if (o inside {8, 9, 10, 11}) img[i] = {8'(o), 24'($urandom_range(i + 1, 40))}; // forward only
        else if (o == 12) img[i] = {8'd1, 24'($urandom)};  // no ret: loadc instead
        else img[i] = {8'(o), 24'($urandom)};
      end
      img[40] = make_instr(OP_HALT, 0);
      for (int i = 64; i < 80; i++) img[i] = $urandom;
      run_program(img, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
