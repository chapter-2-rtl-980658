# NARC — a minimal stored-program computer in SystemVerilog

NARC ("Not A Real Computer") is a teaching computer reduced to the essentials
of the von Neumann machine: one memory holding both instructions and data, a
processor with three registers (accumulator, program counter, link), and a
fetch–execute loop driven by a small control unit. Devices are attached to
the same bus as memory and are reached with ordinary load and store
instructions (memory-mapped I/O). This RTL builds the complete machine: the
processor, 2²³ words of memory, a keyboard and a printer. It runs programs
cycle by cycle, one microinstruction step per clock.

The instruction set, the register set, the 8/24-bit instruction layout, the
data-path structure, the microinstruction steps of `addm`, `storem` and
`jmpn`, and the idea of selecting a device with an address bit all come
from the original description of the machine. Bus timing, the step counts of
the other instructions, the exact memory map, reset, and the printer's
interface are this implementation's own choices. They are marked as such
below and in each file's header.

## The instruction word and instruction set

Words are 32 bits. Memory is addressed by word, not by byte.

```
 31        24 23                              0
+------------+---------------------------------+
|   opcode   |           operand D             |
+------------+---------------------------------+
```

| op | mnemonic | meaning                    | clock cycles |
|----|----------|----------------------------|--------------|
| 1  | LOADC    | ACC := D                   | 4 |
| 2  | LOADM    | ACC := Memory(D)           | 5 |
| 3  | STOREM   | Memory(D) := ACC           | 5 |
| 4  | ADDC     | ACC := ACC + D             | 4 |
| 5  | ADDM     | ACC := ACC + Memory(D)     | 5 |
| 6  | SUBC     | ACC := ACC − D             | 4 |
| 7  | SUBM     | ACC := ACC − Memory(D)     | 5 |
| 8  | JMP      | PC := D                    | 4 |
| 9  | JMPZ     | if ACC = 0 then PC := D    | 5 not taken, 6 taken |
| 10 | JMPN     | if ACC < 0 then PC := D    | 5 not taken, 6 taken |
| 11 | CALL     | LNK := PC; PC := D         | 4 |
| 12 | RET      | PC := LNK                  | 4 |
| 13 | HALT     | stop                       | 3, then stopped |
| other | —     | does nothing               | 3 |

The PC is incremented during fetch, before the instruction executes. So
`CALL` saves the address of the next instruction, and `RET` returns there.
There is only one link register, so calls do not nest unless the program
saves LNK itself (and it cannot: no instruction reads LNK into the
accumulator).

Choices made here:
- D is zero-extended when it meets the 32-bit accumulator. `LOADC` can
  therefore only load 0 … 2²⁴−1; a negative number is made with `SUBC`.
- `ACC < 0` means the accumulator's sign bit, in two's complement.
- `HALT` stops the control unit until reset.
- Opcodes 0 and 14–255 are skipped.

## Data path

```
          +-------------+      +-----+
   +----->| Incrementer |----->|     |
   |      +-------------+      | PC  |<---- switch: PC+1 | D | Lnk
   |                           +-----+
   +--------------------------- PC ---+----> Lnk (CALL)
                                      |
        switch: PC | D  --------------+----> memory AddressIn
  memory DataOut ----> Instruction Register [Op | D]
  switch: D | DataOut ----> Add/sub (b)      Accumulator ----> Add/sub (a)
                            Add/sub result --> Accumulator ----> memory DataIn
                            Add/sub tests  --> N (Acc<0), Z (Acc=0) --> control unit
```

- PC and Lnk are 24 bits wide, because every address comes from D or the PC.
  The accumulator is 32 bits.
- Each register loads on the rising clock edge when the control unit raises
  its load signal.
- The switches (multiplexers) are set by the same control word.
- The add/sub unit has three operations: add, subtract, and pass (b goes
  straight through). Pass is how `LOADC` and `LOADM` reach the accumulator,
  which has no other input.
- The add/sub unit also tests the accumulator all the time: N = sign bit,
  Z = all zeros. Conditional jumps need these signals.

Everything the control unit drives is one packed struct, `narc_pkg::ctrl_t`:

| field | role |
|-------|------|
| `addr_sel` | AddressIn switch |
| `mem_read`, `mem_write` | bus strobes |
| `ir_load` | load the instruction register |
| `pc_load`, `pc_sel` | load the PC, and from where |
| `lnk_load` | load Lnk from the PC |
| `acc_load` | load the accumulator |
| `b_sel` | add/sub operand switch |
| `alu_op` | add/sub operation |

## Control unit: microinstruction steps

This is the heart of the machine. Each instruction is a short sequence of
steps. Each step lasts one clock cycle and sets one control word. The first
three steps are the same for every instruction:

| step | action |
|------|--------|
| 1 | AddressIn = PC; Read |
| 2 | Op&D = DataOut; PC = PC + 1 |
| 3 | Switch(Op): dispatch only, nothing moves |

The instruction's own steps follow:

| instruction | step 4 | step 5 | step 6 |
|-------------|--------|--------|--------|
| LOADM / ADDM / SUBM | AddressIn = D; Read | Acc = DataOut / Acc + DataOut / Acc − DataOut | — |
| STOREM | AddressIn = D | AddressIn = D; DataIn = Acc; Write | — |
| LOADC / ADDC / SUBC | Acc = D / Acc + D / Acc − D | — | — |
| JMP | PC = D | — | — |
| CALL | Lnk = PC; PC = D | — | — |
| RET | PC = Lnk | — | — |
| JMPZ / JMPN | Test: capture Z / N | if flag: go to step 6, else next instruction | PC = D |
| HALT | — (stopped) | | |

Where these steps come from:
- From the original description: steps 1–5 of `ADDM` and `STOREM`, and
  steps 4–6 of `JMPN`. Step 4 of `JMPN` is a "Test" of the add/sub unit.
- This design's choices: holding the tested flag in a register; `JMPZ`,
  which copies `JMPN` with Z; and the short forms of the instructions that
  need no memory access.
- One walkthrough of `JMPN` draws the jump as taken although the
  accumulator holds 13. Here the instruction's definition decides: it jumps
  only when ACC < 0.

The flag is captured in step 4. A conditional jump therefore depends on the
accumulator as it was at that moment, whatever the inputs do later.

The control unit also has three outputs for watching the processor:
- `step`: 1–6, or 0 once halted.
- `instr_start`: high in step 1.
- `halted`.

The control unit holds one assertion: the memory is never asked to read and
write in the same step.

## Memory bus and memory-mapped I/O

The processor's bus has three parts: Address (32 bits), DataToMem and
DataFromMem (32 bits each). It also has Read and Write strobes. The
processor drives bits 31–24 of Address with 0.

**Timing** (a choice of this design):
- Address and a strobe are valid for one cycle.
- A write happens on the rising edge that ends that cycle.
- Read data must be on DataFromMem throughout the next cycle.

This matches a synchronous RAM. It is why the fetch (step 1) and the loading
of the instruction register (step 2) are two separate steps.

**Address decoding.** One address bit separates memory from devices.
Address bit 23 is the top bit of the 24-bit operand. The bit below it
chooses the device:

| address (24 bits)     | device   | access |
|-----------------------|----------|--------|
| 0x000000 – 0x7FFFFF   | memory, 2²³ words | read / write |
| 0x800000 – 0xBFFFFF   | keyboard | read: key *i* on bit *i*, upper bits 0 |
| 0xC00000 – 0xFFFFFF   | printer  | write: word goes to the printer; reads give 0 |

So `LOADM 0x800000` reads the keys, and `STOREM 0xC00000` prints the
accumulator.

The decoder (`narc_bus_decoder`) works in two parts:
- It makes three select signals, with exactly one active at a time. An
  assertion checks this.
- A read returns its data in the next cycle. So the decoder remembers which
  device a read selected, and routes that device's data onto DataFromMem.

Where a real board would wire tri-state outputs onto a shared bus, this
design uses a multiplexer.

**Keyboard** (`narc_keyboard`):
- Eight keys, each a 1/0 signal, where 1 means pressed.
- The key contacts are asynchronous to the clock, so each passes a
  two-flip-flop synchronizer.
- A selected read captures the synchronized keys.
- Reading does not consume a key press: a program polls until it sees a
  non-zero value.

**Printer** (`narc_printer`):
- A selected write latches the 32-bit word into `prn_data`.
- It pulses `prn_strobe` for one cycle.
- The printer reports no busy or ready status.

## Reset and loading a program

`rst_n` is an asynchronous, active-low reset. It clears PC, Lnk, the
accumulator and the instruction register. The control unit restarts at
step 1, so execution begins at address 0.

Memory is not reset and has no load port. Whatever fills it before reset is
released is the program. In simulation, write the array directly:

```systemverilog
dut.u_mem.mem[0] = narc_pkg::make_instr(narc_pkg::OP_ADDM, 24'd4);
```

A design that needs a boot loader would add a second write port, or a ROM in
part of the address map. Neither exists here.

## Files

| file | contents |
|------|----------|
| `rtl/narc_pkg.sv` | widths, opcode enum, control-word struct, `make_instr` |
| `rtl/narc_system.sv` | top: processor, decoder, memory, keyboard, printer |
| `rtl/narc_cpu.sv` | processor = control unit + data path |
| `rtl/narc_control_unit.sv` | microinstruction sequencer |
| `rtl/narc_datapath.sv` | PC, Lnk, accumulator, switches |
| `rtl/narc_instruction_register.sv` | Op / D register |
| `rtl/narc_incrementer.sv` | PC + 1 |
| `rtl/narc_addsub.sv` | add / subtract / pass, N and Z tests |
| `rtl/narc_memory.sv` | synchronous word memory |
| `rtl/narc_bus_decoder.sv` | memory map, selects, read-data return |
| `rtl/narc_keyboard.sv` | key synchronizer and bus interface |
| `rtl/narc_printer.sv` | printer output latch and strobe |
| `tb/narc_ref_pkg.sv` | instruction-level reference model and the shared test program |
| `tb/*_tb.sv` | one self-checking testbench per module |

Top-level parameters:
- `MEM_ADDR_BITS = 23`: memory is 2^MEM_ADDR_BITS words. The bus decoder
  always places I/O at bit 23, so values above 23 have no effect on the map.
  Smaller values leave the upper memory addresses aliased.
- `NUM_KEYS = 8`.

## Verification

Every testbench checks its results itself. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog that stops it
if it hangs. Run one with plain Verilator, for example:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/narc_pkg.sv tb/narc_ref_pkg.sv tb/narc_system_tb.sv \
    --top-module narc_system_tb -o sim && ./obj_dir/sim
```

What the testbenches check:
- **Leaf blocks** (add/sub, incrementer, instruction register, memory,
  decoder, keyboard, printer): random and corner-case stimulus, checked
  against a model written in the testbench. This includes the one-cycle
  read latency and the two-cycle keyboard synchronizer.
- **Control unit**: every opcode and a sample of undefined ones, with N and
  Z both ways. Each step's control word and the number of steps are checked
  against the step tables above.
- **Data path**: random control words, checked every cycle against a model
  of the registers and switches.
- **Processor** (`narc_cpu_tb`): runs a directed program and 300 random
  programs on a bus model. At every instruction start it compares PC, Lnk
  and the accumulator with the instruction-level model in `narc_ref_pkg`.
  It also checks the cycles each instruction took against the table at the
  top of this document.
- **Whole system** (`narc_system_tb`, at full size: 2²³ words, 8 keys):
  three programs.
  1. A short hand-traced example: `ADDM 4; STOREM 3; JMPN 0` with 13 in
     word 4, then `HALT`. It must leave 13 in word 3 and in the accumulator.
  2. A program that uses every instruction, takes and skips both
     conditional jumps, calls a subroutine, reads the keyboard and prints.
  3. A keyboard-polling loop that waits for a key and prints it.

  The test counts how often each mechanism happened. It fails if any of
  these never did: each opcode, taken and untaken `JMPZ`/`JMPN`, an
  undefined opcode, a memory write, a keyboard read, a printer write, a
  halt.

- **Step trace** (`narc_trace_tb`): runs the hand-traced example again,
  this time cycle by cycle. In every step it checks the step number, PC, Op,
  D, the accumulator, the bus address and the strobes.

## Not built

- **The electrical key contacts** (switches between the supply rails). They
  have no logic function; their outputs are the `keys` port.
- **The 8-bit bus used to introduce the keyboard**: address bit 7 selects
  the keyboard, inverted it selects a 128-word memory. It only illustrates
  the idea; the 32-bit bus here uses the same scheme at bit 23.
- **A separate I/O bus behind a bridge (PCI-like), and dedicated in/out
  instructions**: alternatives to memory-mapped I/O, not part of NARC.
- **Interrupts, address translation, privileged mode, pipelining, caches**:
  named as things real machines add, and not described further.
