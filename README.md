# Edit-distance systolic array on a slice-scheduled reconfigurable processor

This design computes the Smith-Waterman / Lipton-Lopresti edit distance between a
pattern S and a text T. It handles the general case:

- insertion, deletion and substitution costs (`ins`, `del`, `sub`) each take any value 0..15;
- the alphabet has 32 letters (5-bit characters).

Every cell of the dynamic-programming table H follows

    H[i][j] = min( H[i-1][j-1] + (T[i] == S[j] ? 0 : sub),   // a, the diagonal
                   H[i-1][j]   + ins,                          // b, above
                   H[i][j-1]   + del )                         // c, left

The recurrence is not built as a fixed-function datapath. It runs as a program on a
small VLIW-like processor (called CREC below):

- The processor has many identical 16-bit *execution units* (EUs), each with its own accumulator.
- All EUs execute one instruction each per clock.
- The set of instructions executed together is a *slice*.
- A *slice memory* holds one word per slice. That word points each EU at its
  instruction and its immediate operand.

Six EUs together form one *processing element* (PE), which holds one character of S. A
row of PEs forms a linear systolic array:

- T streams through the PEs one character per step.
- One step is nine slices, so nine clocks.
- Each PE produces one column of H.

Three FIFOs connect the array to the host: one for S, one for T, and one for the d
values ("d parameters"). At the default size (7 PEs, 4096-word FIFOs), the array compares
a 4096-character T with up to 4095 characters of S in about 21.6 million clocks.
That is 216 ms at 100 MHz.

The SystemVerilog is IEEE 1800-2017. It contains:

- a general processor, `crec_core`, which any program can be compiled into;
- a package that generates the edit-distance program for any number of PEs;
- the top level `sw_crec_top`, which compresses that program into the processor's
  memories at elaboration time and adds the FIFOs.

## Contents

| File | What it is |
|---|---|
| `rtl/crec_pkg.sv` | Instruction word, opcodes, operand sources, condition codes, strobe bundle |
| `rtl/crec_op_unit.sv` | Operating unit: logic, arithmetic, shift-left and shift-right blocks, carry generator |
| `rtl/crec_flag_unit.sv` | Zero and Carry flags, 6-bit condition bus |
| `rtl/crec_eu.sv` | One execution unit (decoder, MUXes, operating unit, accumulator, flags, control, buffer) |
| `rtl/crec_param_eu.sv` | Parameter EU: an accumulator loaded by the host, read by other EUs |
| `rtl/crec_rom.sv` | Per-EU instruction memory and direct-operand memory (asynchronous ROM) |
| `rtl/crec_slice_mem.sv` | Slice memory (synchronous-read ROM) |
| `rtl/crec_slice_counter.sv` | Slice program counter with JMP, CALL, RET and halt |
| `rtl/crec_stack.sv` | LIFO, used as data stack and as slice (return-address) stack |
| `rtl/crec_data_mem.sv` | Data memory with load buffer and store buffer |
| `rtl/crec_core.sv` | The general processor: N EUs, parameter EUs, memories, stacks, busses |
| `rtl/sw_fifo.sv` | First-word-fall-through FIFO used for S, T and d |
| `rtl/sw_prog_pkg.sv` | The edit-distance program: instruction and operand of every EU in every slice |
| `rtl/sw_crec_top.sv` | Top level: program compression, core, three FIFOs, host ports |

## The processor (`crec_core`)

### Slices instead of a program counter per EU

The processor has N_EU execution units and N_PAR parameter EUs. The machine has one
slice counter. In every running clock:

1. The slice memory supplies the word for the current slice. The read is synchronous and
   addressed by the *next* slice, so the word is valid throughout the cycle of `slice`.
2. For each EU, that word holds two pointers:
   - `IPW` bits into the EU's own instruction memory;
   - `OPW` bits into its own direct-operand memory.
3. Each EU decodes its instruction and executes it. Results land at the rising edge.

This splits a program into three tables:

- **Slice memory:** NSLICE words of N_EU·(IPW+OPW) bits.
- **Instruction memory:** one per EU. It holds only the distinct instructions that EU
  ever executes. Entry 0 is always NOP.
- **Operand memory:** one per EU. It holds only the distinct immediates that EU uses.
  Entry 0 is 0.

The memories are ROMs whose contents are parameters (`SLICE_INIT`, `IMEM_INIT`,
`OPMEM_INIT`, all packed bit vectors). To run a different program, supply different
parameter values.

### Registers and the register numbering

Any EU can read any register as its second operand:

- Register k < N_EU is the accumulator of EU k.
- Register N_EU + p is parameter EU p.

The parameter EUs have no instruction stream. The host loads one with `par_ld[p]` and
`par_din`, and it then holds the value. The edit-distance program uses them for the
three costs, the text length and the pass count. There is one copy of each, shared by
all PEs.

### Shared resources and busses

Program-control instructions reach the shared parts over busses. The EU that drives a bus
in a slice places a value on its *operand bus*, which is the selected operand or, for
PUSH, its accumulator.

| Resource | Used by | Driven with |
|---|---|---|
| Slice counter | JMP, CALL (target = operand), RET | operand bus, slice stack top |
| Slice stack (`SSTACK_D` words) | CALL pushes slice+1, RET pops | - |
| Data stack (`DSTACK_D` words) | PUSH writes the accumulator; `MOV acc, STACK` is POP | operand bus |
| Data memory (`DMEM_D` words) | LOAD (address = operand) fills the load buffer; STORE (address = operand, data = accumulator) fills the store buffer | operand bus, accumulator |
| Input port of EU e | `MOV acc, PORT` reads `in_port[e]` and pulses `in_stb[e]` | - |
| Output port of EU e | OUT puts the operand on `out_data[e]` and pulses `out_stb[e]` | operand bus |

The compiler, here the program generator, must give each shared resource at most one
user per slice:

- Assertions check this.
- If it is violated anyway, the lowest-numbered EU wins.

Two details of the data memory matter:

- A load's data is in the load buffer (`MOV acc, LBUF`) from the next slice on.
- A store reaches the RAM one clock later. A load of the same address in between is
  forwarded from the store buffer.

### Start, halt and timing

- `start` (one clock, while idle) begins execution at slice 0 on the next clock.
- A JMP whose target is its own slice ends the program: `running` falls and `done` stays
  high until the next `start`.
- Port strobes and the port data are combinational in the cycle of the executing slice.
- A word read from an input port is in the accumulator at the end of that cycle.

## The execution unit (`crec_eu`)

### Instruction word (21 bits)

| Bits | Field | Meaning |
|---|---|---|
| 20:15 | `op` | opcode; bit 5 set = program-control group |
| 14:12 | `cond` | ALWAYS, Z, NZ, C, NC, A (above: !C & !Z), BE (below or equal: C \| Z) |
| 11:9 | `src` | second operand: REG, LBUF (load buffer), PORT (input port), STACK (data-stack top), IMM (direct operand) |
| 8:0 | `rsel` | register number when `src` = REG (up to 512 registers) |

### Data-manipulation group

This group writes the accumulator and updates the Zero and Carry flags:

- ADD, ADC, SUB, SBB;
- CMP and TEST, which update the flags only;
- AND, OR, XOR, NOT;
- SHL, SAL, SHR, SAR, ROL, ROR, RCL, RCR, each by one bit;
- INC, DEC, NEG.

All arithmetic is unsigned. Carry is the carry out for additions and the borrow for
subtractions, DEC and NEG. For shifts it is the bit shifted out.

### Program-control group

This group is MOV, OUT, PUSH, LOAD, STORE, JMP, CALL and RET.

- Every one of these instructions is conditioned, so there are conditional moves, stores
  and so on.
- The condition is checked against the flags left by the EU's own last
  data-manipulation instruction.
- Program-control instructions never change the flags.

### Inside the EU

The EU follows the classic structure:

- a register MUX over all registers, the load buffer, the input port and the stack top;
- a 2:1 Reg/Imm MUX after it;
- the operating unit, built from four blocks plus the carry generator;
- the accumulator;
- the flag unit, which drives the 6-bit condition bus;
- the control unit, which raises the strobes;
- the buffer unit, which drives the operand bus.

## One processing element and its nine-slice step

PE k uses EUs 6k..6k+5, which play registers R1..R6:

| Register | Holds |
|---|---|
| R1 | the PE's character of S (during a step, also 0 or `sub`) |
| R2 | the current character of T |
| R3 | a, then the result d |
| R4 | b |
| R5 | c |
| R6 | saved copy of S |

One step computes one cell. Each slice is one clock. All entries of a row happen in the
same clock, in different EUs:

| Slice | R1 | R2 | R3 | R4 | R5 | R6 |
|---|---|---|---|---|---|---|
| 1 | | T ← left PE's R2 (PE 0: T FIFO) | a ← R5 | b ← R3 | c ← left PE's R3 (PE 0: d FIFO) | ← R1 |
| 2 | CMP R1, R2 | | | + ins | + del | |
| 3 | ← 0 if equal | | | | | |
| 4 | ← sub if not equal | | | | | |
| 5 | ← R6 | | + R1 | | | |
| 6 | | | CMP R3, R4 | | | |
| 7 | | | ← R4 if above | − ins | | |
| 8 | | | CMP R3, R5 | | | |
| 9 | | | ← R5 if above | | − del | |

Slice 1 is a parallel shift, and it relies on every move reading the *old* register
values:

- The previous d becomes the new b.
- The previous c becomes the new a.
- The left neighbour's previous d becomes the new c.

R4 and R5 are pushed up by `ins` and `del` for the comparison. Slices 7 and 9 bring them
back to b and c for the next step's shift. The two conditional moves leave
min(a+cost, b+ins, c+del) in R3.

## The edit-distance program (`sw_prog_pkg`)

This is the hardest part of the design. The nine-slice step describes a PE in steady
state. A complete run also needs five things:

- loading S into the array;
- filling and draining the systolic pipeline;
- the top row of H;
- patterns longer than the array;
- a stop.

The program solves all five in 38 slices, whatever the number of PEs. Three more EUs
take part besides the PEs:

| EU | Role |
|---|---|
| CNT | step counter |
| PASS | pass counter |
| TOP | current top-row value |

### Passes

PE k computes column j0+k+1 of H, where j0 is the first column of the current pass.
A pattern of m characters therefore needs m/NPE passes, each over the whole of T.

- **Left boundary column.** The d FIFO provides it. Before the first pass the host fills
  it with H[1..L][0].
- **End of a pass.** The last PE writes its column H[1..L][j0+NPE] back into the same
  FIFO. That column is the left boundary of the next pass.
- **T.** Every character PE 0 reads from the T FIFO is pushed straight back into it, so T
  is available again on the next pass.
- **Result.** After the last pass the d FIFO holds H[1..L][m]. The last word, H[L][m],
  is the edit distance.

### Slice map

| Slices | Runs | What happens |
|---|---|---|
| 0 | once | PASS ← number of passes; TOP ← 0 |
| 1 | per pass | CNT ← NPE; PE 0's a and c ← TOP; every other PE's a and c ← SENTINEL (0xF000) |
| 2–3 | NPE times | R1 of the last PE ← S FIFO, every other R1 ← R1 of the next PE (S shifts towards PE 0); TOP += del; loop on CNT |
| 4 | per pass | CNT ← NPE; PE 0's R3 += del |
| 5–13 | NPE steps | body A: nine-slice step, reading the T and d FIFOs |
| 14–15 | per pass | CNT ← L − NPE |
| 16–24 | L − NPE steps | body B: the step, reading T and d and writing d |
| 25 | per pass | CNT ← NPE |
| 26–34 | NPE steps | body C: the step, writing d only (drain) |
| 35–36 | per pass | PASS −= 1; back to slice 1 if not zero |
| 37 | once | jump to self: halt |

Each body is a loop:

- CNT decrements in the body's first slice.
- A JNZ in its ninth slice jumps back.

Neither uses a slot that the PE step needs.

### Why three copies of the body

T enters at PE 0 and reaches PE k k steps later. Therefore:

- Row i of the last PE's column is ready at step i + NPE − 1.
- One pass takes L + NPE steps.

The d FIFO is read (by PE 0) in the first L steps and written (by the last PE) in the
last L steps. The three copies of the body differ only in those port instructions:

- **Body A** reads the FIFOs.
- **Body B** reads and writes them.
- **Body C** only writes.

This gives a single slice memory with no per-step conditions.

The last PE writes d in slice 1 of a step. At that point its R3 still holds the d of the
*previous* step, because the moves of slice 1 take effect at the clock edge. This is why
the writes are shifted one step later than the reads.

### Top row, and why the sentinel works

The program assumes the top row is H[0][j] = j·del. Reaching a column with no
characters is j deletions. PE 0 and the other PEs get their row-0 values in different
ways:

- **PE 0** gets them directly. It starts with a = c = TOP = H[0][j0], and after slice 4
  its d is H[0][j0+1].
- **PE k > 0** starts with a = d = SENTINEL, a value above any real distance. In its
  first useful step the diagonal and "above" candidates are therefore never the minimum.
  The result is c + del, where c is the left PE's row-0 value, so the PE computes its own
  row-0 value H[0][j0+k+1] by itself.

Before a PE's real T characters arrive, it computes on sentinel-based garbage. Those
values never reach a real cell. The proof is the rule above plus the one-step delay of
T per PE.

The sentinel is 0xF000. The largest cost is 15, so `SENTINEL + 15` still fits in 16
bits. Real distances must stay below 0xF000.

### Run time

    cycles = 2 + passes · (9·(L + NPE) + 2·NPE + 7)

This is counted from the clock after `start` to `done`:

- 9·(L+NPE) is the steps;
- 2·NPE is the S load;
- 7 is the per-pass overhead slices;
- 2 is the first slice and the halt slice.

`sw_prog_pkg::cycles()` returns this value, and the testbenches check it exactly.

For T = 4096 characters and S padded to a multiple of the PE count, at the clock rates
listed for each FPGA:

| PEs | Clock | Passes | Cycles | Time |
|---|---|---|---|---|
| 5 | 150 MHz | 820 | 30.3 M | 202 ms |
| 7 | 100 MHz | 586 | 21.7 M | 216 ms |
| 13 | 150 MHz | 316 | 11.7 M | 78 ms |
| 14 | 150 MHz | 293 | 10.8 M | 72 ms |
| 27 | 150 MHz | 152 | 5.65 M | 38 ms |
| 32 | 100 MHz | 128 | 4.76 M | 48 ms |
| 33 | 150 MHz | 125 | 4.65 M | 31 ms |
| 46 | 150 MHz | 90 | 3.36 M | 22 ms |

## The top level (`sw_crec_top`)

### Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NPE` | 7 | processing elements; the core gets 6·NPE + 3 EUs and 5 parameter EUs |
| `CW` | 5 | character width (32-letter alphabet) |
| `FIFO_DEPTH` | 4096 | words in each of the S, T and d FIFOs |

### Compressing the program into the memories

Constant functions turn the program into the core's three ROMs at elaboration time:

1. For every EU, they collect the distinct instructions and the distinct immediates over
   all 38 slices.
2. They size the instruction and operand memories to the largest such set, which also
   fixes the pointer widths.
3. They build the slice words from those pointers.

Changing `NPE` regenerates everything. No external tool or table file is involved.

### FIFO wiring

| FIFO | Connected to |
|---|---|
| T | input port of PE 0's R2 EU; each word read is pushed back while running |
| d, read | input port of PE 0's R5 EU (left-boundary column) |
| d, write | output port of the last PE's R1 EU, which outputs that PE's R3 |
| S | input port of the last PE's R1 EU |

While the program runs, the host-side push, pop and parameter-load inputs are ignored.

### Host protocol

All of the following happens while `busy` is low.

1. Push the m characters of S (`s_push`, `s_data`). m must be a multiple of NPE; pad S
   otherwise.
2. Push the L characters of T (`t_push`, `t_data`).
3. Push the boundary column H[1..L][0] (`d_push`, `d_data`). For plain edit distance
   this is i·ins.
4. Load the parameter EUs, one per clock, with `par_ld[p]` and `par_din`:

   | p | Parameter |
   |---|---|
   | 0 | ins |
   | 1 | del |
   | 2 | sub |
   | 3 | L |
   | 4 | number of passes m/NPE |

5. Pulse `start`. `busy` is high until the program halts, and then `done` rises.
6. Read L words from the d FIFO: `d_rdata` is the oldest word, and `d_pop` removes it.
   The last word is the distance.

Constraints: NPE < L ≤ FIFO_DEPTH, and m ≤ FIFO_DEPTH. Because T is recirculated, the T
FIFO still holds T after a run. Reset the design to clear it for a new text.

## Departures and limits

These are deliberate choices, or places where the processor description leaves the
details open:

- **EUs are not trimmed.** Every EU has the full instruction set and a register MUX over
  every register. The original processor generator trims each EU to the instructions and
  inputs it uses, and wires, for example, the `sub` parameter only to R1 of each PE.
  Synthesis removes much of the unused logic, because the ROM contents are constants.
  The RTL does not do this trimming itself.
- **Pointer widths are uniform.** All EUs share one pointer width, set by the EU with the
  most distinct instructions or operands. The original sizes the pointers per EU.
- **Encoding is this design's own.** The encodings, the halt-by-jump-to-self and the
  exact strobe timing are this design's choice. So are the carry conventions of NEG, DEC
  and the logic operations.
- **Extra EUs.** The loop counter, pass counter and top-row EUs, and the L and pass-count
  parameter EUs, are additions that the multi-pass program needs. The S loading, the
  three-copy body and the T recirculation are this design's way of running a pattern
  longer than the array.
- **S distribution.** In the original PE diagram, S arrives at each PE's R1 directly.
  Here a single FIFO port feeds the last PE, and S is shifted down the chain of R1
  registers at the start of every pass, two slices per character.
- **Top row.** The top row is fixed at j·del. The host supplies the left column, so other
  boundary conditions are possible there.
- **Pattern length.** S must be a multiple of NPE. A 4096-character S at 7 PEs needs
  4102 padded characters, which the 4096-word S FIFO cannot hold. The largest pattern at
  the default size is 4095 characters (585 passes).
- **16-bit overflow.** Words are 16 bits, and every cell must stay below 0xF000
  (61,440). A cell is bounded by i·ins + j·del. A 4096 × 4096 job is therefore safe
  whatever the strings when ins + del ≤ 14. With ins = del = 15 the bound is about
  123 k, so only strings that match well enough stay in range.
- **Unused resources.** The program uses neither the data stack, the slice stack nor the
  data memory, so the top instantiates them with 2 words each. `crec_core` itself is
  general, and its testbench exercises all of them.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.
Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_crec_op_unit` | every opcode against a reference model, random operands and carry |
| `tb_crec_flag_unit` | flag update and the six condition lines |
| `tb_crec_eu` | random instructions, sources and conditions against a reference EU model |
| `tb_crec_param_eu` | load and hold |
| `tb_crec_stack` | random push, pop and push+pop against a queue model |
| `tb_crec_data_mem` | load and store timing and store-buffer forwarding |
| `tb_crec_rom` | ROM contents from the parameter |
| `tb_crec_slice_mem` | synchronous read and enable |
| `tb_crec_slice_counter` | JMP, CALL, RET, halt, restart |
| `tb_sw_fifo` | random traffic, full and empty, push+pop when full |
| `tb_crec_core` | a 2-EU program using CALL/RET, PUSH/POP, STORE/LOAD, ports, a counted loop and halt; checks slice trace, cycle count and values |
| `tb_sw_crec_top` | 3 PEs: nine jobs with 1–5 passes, zero and maximum costs, small and full alphabets |
| `tb_sw_crec_pe46` | 46 PEs (the largest array in the device table): one- and two-pass jobs |
| `tb_sw_crec_full` | default parameters: T = 4096, S = 4095 (585 passes) |

The three array tests compare every output word with an edit-distance table computed in
the testbench, and compare the run time with the cycle formula.

The array tests also count how often each cell case occurs, and fail if one never did:

- match;
- mismatch;
- minimum from the diagonal;
- minimum from above;
- minimum from the left;
- a multi-pass job.

The full-size run is 21,618,678 clocks and takes about a minute in Verilator.

### Simulating

With Verilator 5, list the two packages first and let `-y rtl` find the modules:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/crec_pkg.sv rtl/sw_prog_pkg.sv tb/tb_sw_crec_top.sv \
        --top-module tb_sw_crec_top -Mdir obj_top -o sim
    ./obj_top/sim

Replace `tb_sw_crec_top` with any testbench name above. The 46-PE build takes about half
a minute to compile.

## Changing the design

- **Array size.** Override `NPE` on `sw_crec_top`; the program and memories follow. The
  register-select field allows 512 registers, which is up to 84 PEs. `crec_core` stops
  elaboration with an error if a configuration exceeds that; widen `RSELW` in `crec_pkg`
  to go further.
- **Other programs.** `crec_core` runs any program expressed as the three ROM parameters.
  `tb_crec_core` shows how to build them from a per-slice table with constant functions.
- **Costs, alphabet, word width.** Costs are run-time values. `CW` sets the character
  width. The EU word width is `crec_pkg::W`; the sentinel in `sw_prog_pkg` assumes
  16 bits.
