# UTDSP — a VLIW DSP core that fetches one word per cycle

UTDSP is a 16-bit fixed-point digital signal processor. Seven functional units run in parallel:
- two memory units (MU1, MU2)
- two address units (AU1, AU2)
- two integer units with multipliers (DU1, DU2)
- one program-control unit (PCU)

A very-long-instruction-word machine of this width usually needs a very wide instruction memory. Most of that memory is wasted, because typical code fills only a few of the seven slots.

UTDSP avoids this with a two-level instruction store:
- The instruction memory is 32 bits wide. Each word is either one operation for one unit (a *uni-op*) or a *pointer*.
- A pointer selects a long instruction held in the seven-bank *decoder memory*. There is one bank per unit.
- A pointer carries two 12-bit bank addresses, one for banks B1–B4 (cluster A: MU1, MU2, AU1, AU2) and one for banks B5–B7 (cluster B: DU1, DU2, PCU). It also carries a mask bit per bank, saying which banks issue an operation.
- Long instructions that share operations can therefore share decoder-memory rows, and sequential code costs only one 32-bit word per operation.

The rest of the machine serves DSP loops:
- zero-overhead hardware loops, nestable five deep
- a single-instruction repeat
- modulo (circular-buffer) and bit-reversed addressing
- multiply-accumulate operations that also move an operand, so a block FIR runs one long instruction per tap
- fully forwarded pipelining, so back-to-back dependent operations never stall

This repository holds synthesizable SystemVerilog for the core and its on-chip memories, plus one self-checking testbench per block and a testbench that runs DSP benchmark kernels (FIR, IIR, LMS, lattice, FFT, matrix multiply) on the whole core.

## Instruction words

Bit 31 of an instruction-memory word selects the format.

| Bits | Uni-op (bit 31 = 0) | Pointer (bit 31 = 1) |
|---|---|---|
| 30:28 | unit slot (0 MU1, 1 MU2, 2 AU1, 3 AU2, 4 DU1, 5 DU2, 6 PCU) | 30:27 mask for B1..B4 (bit 30 = B1) |
| 27:21 | opcode | 26:15 cluster-A row |
| 20:5 | register fields i, j, k, l (4 bits each), or a 16-bit immediate in 15:0 | 14:12 mask for B5..B7 (bit 14 = B5); 11:0 cluster-B row |

Control operations have their own fields:
- a 13-bit count in bits 20:8
- an 8-bit target or trap code in bits 7:0

The words stored in decoder-memory banks use the uni-op layout. The bank decides the unit, so their slot field is ignored.

`rtl/utdsp_pkg.sv` lists every opcode and has helpers (`mk_op`, `mk_imm`, `mk_ctl`, `mk_ptr`) for assembling programs in a testbench.

What follows the document and what is this design's own:
- **From the document:** the pointer layout (flag, 4-bit mask, 12-bit address, 3-bit mask, 12-bit address) and the operation set.
- **This design's own:** the uni-op field order and the opcode numbers.

The banks are 256 rows deep, so only the low 8 bits of each 12-bit row field are used. Keep the upper bits zero.

## Pipeline

There are five stages: IF1, IF2, ID, EX, WB.

| Stage | What happens |
|---|---|
| IF1 | The PC unit addresses the 256 x 32 instruction memory. |
| IF2 | The decoder memory turns the word into up to seven operations. A uni-op passes to its slot. A pointer reads the two row addresses from the banks whose mask bit is set. |
| ID | Both register files are read. The PCU decides branches, jumps, loops and traps, and the PC unit acts on them. |
| EX | The address and integer units compute. The memory units read or write their bank: MU1 uses bank X and MU2 uses bank Y, with the address register read in ID. |
| WB | Results are written back. Each register file has four write ports. |

**Hazards.**
- A result waiting in EX/WB is forwarded to any EX operand that names its register.
- The register files are write-through, which covers distance two.
- The PCU reads its operands in ID, so they are also forwarded from the results being produced in EX. A branch therefore sees the value computed by the instruction just before it.
- Nothing in the pipeline stalls for data. Only a DMA transfer holds the pipeline.

**Branches** are decided in ID and predicted not taken. A taken branch, jump, jsr or rts squashes IF1 and IF2, so it costs two cycles. An untaken branch costs nothing.

## PC Unit

The PC unit (`pc_unit`) contains:
- the PC register and incrementer
- the DO stack (`do_stack`): begin address, end address and remaining count, five entries
- the JSR stack (`jsr_stack`): eight return addresses, each flagged if an interrupt pushed it
- a repeat counter

NEXT_PC is chosen in this priority order:

1. jump or jsr → target
2. rts → top of the JSR stack
3. rep → the instruction after rep
4. repeat still running → same PC
5. do whose end is the current PC → the instruction after do
6. PC equals the top loop's end and passes are left → loop begin
7. interrupt → vector
8. otherwise → PC + 1

**Loops.**
- The loop-end test is made at fetch, so the jump back costs no cycle.
- `do #N, label` runs the block from the next instruction through `label` N times.
- `do.a` and `do.d` take the count from a register.

**Repeat.** `rep #N` refetches the next instruction so that it runs N times.
- rep itself costs one cycle once, so the pair takes N+1 cycles.
- `rep #0` skips the instruction.

**Interrupts.** There are three vectors, at 0xC0, 0xD0 and 0xE0. Each holds 16 words.
- Entering an interrupt costs no cycle: the vector is fetched next, and the instructions already in the pipeline finish.
- The interrupt pushes the return address with its flag set. The rts that pops that entry ends the service routine.
- A vector may start with `jsr` to a longer routine. That costs the two cycles of a jump.
- A routine short enough to fit in the vector runs there directly (a "fast interrupt").
- An interrupt is accepted only when no control operation is in IF1, IF2 or ID and no repeat is running. This makes the saved address final.

**wait and halt.**
- `wait` idles the core until an interrupt. The routine then returns to the instruction after `wait`.
- `halt` stops the core until reset.

**Rules a program must follow.** The hardware does not check these:
- A loop body has at least two instructions.
- Nested loops end at different addresses.
- A `do` is not one of the last two instructions of an enclosing loop.
- The instruction repeated by `rep` is not the last instruction of a loop.
- A program does not jump out of a loop, because the DO stack is not unwound.
- A long instruction does not use MU2 together with a PCU register move or trap, because they share register ports.
- The JSR stack is not used more than eight deep. Interrupts do not nest.

## Instruction Memory

The instruction memory is one 256 x 32 single-ported SRAM (`sram_sp`). It has a synchronous write and a combinational read. Programs are loaded through the top's `im_*` port while the core is in reset or halted.

## Decoder Memory

`decoder_memory` holds seven 256 x 32 banks and the IF2 logic. Banks are loaded through `dec_*`.

For a pointer, each bank reads its cluster's row. The bank's operation is issued only if its mask bit is set; otherwise the slot gets a no-op. `is_multi` marks long instructions.

## Register Files

There are two files, each with sixteen 16-bit registers:

| File | Holds | Read ports | Write ports |
|---|---|---|---|
| REG A | addresses | 6 | 4 |
| REG D | integers | 8 | 4 |

The PCU shares MU2's read port and write port.

The files are built from flip-flops, as on the original chip. The document also proposes building a 6-read, 4-write file from dual-ported SRAMs; that version is not built.

Further details:
- Writes are write-through, so a read sees a value being written in the same cycle.
- When two ports write one register in the same cycle, the higher-numbered port wins.
- REG A write port 3 exists for the document's port count. No operation uses it, because no operation loads an address register from memory.

## Execute Units

**Address units** (`addr_unit`, with `modulo_agen`) perform:
- add and subtract
- logic and shifts
- `seq.a`, `mov.a`, `movi.a`
- modulo increment and decrement inside a circular buffer
- bit-reversed increment and decrement (`incfft`/`decfft`) for FFT addressing

A circular buffer is given by start and end registers, so its size and position are arbitrary. `set1 ai, aj` loads buffer 1, which AU1 uses, and `set2` loads buffer 2, which AU2 uses. Either unit may execute either set operation. The step of a modulo operation must not exceed the buffer size.

**Integer units** (`int_unit`) perform add and subtract, logic, shifts, abs, comparisons, and two kinds of multiply:
- `mult`: integer, keeping the low 16 bits
- `multf`: 1.15 fractional, keeping bits 30:15 of the product

The accumulating forms are:
- `madd`/`msub`: dl = dk ± di·dj
- `setacc0`/`setacc1`
- `madd2dN`/`madd2fN`: dk = AccN + di·dj, leaving AccN unchanged
- `madd2m`/`madd2fm`: Acc0 += di·dj and dk = di in one operation

`madd2m` is what lets one long instruction do one FIR tap and shift the delay line at once. Accumulators are 16 bits, and there is no saturation.

**Memory units** (`mem_unit`) do `ld.d (ai), dj` and `st.d (ai), dj` on a 512-word bank (`data_mem`). Each bank is four 256 x 8 SRAMs, 1 Kbyte in all.

**The PCU** (`pcu`) decodes control operations in ID and resolves branch conditions:
- `beqz`/`bnez` on an address or an integer register
- `jmp`, `jmp.a`, `jsr`, `rts`
- `do`, `rep`
- `mov2d`, `mov2a`
- `trap`, `wait`, `halt`

## Controller Unit

`controller` handles the interrupt lines and DMA.

**Interrupts.** A rising edge on `irq[n]` sets pending bit n. The lowest pending line is offered to the PC unit.

**DMA.** `trap #code` with `ai` = start word and `dj` = word count starts a transfer:

| Code | Direction |
|---|---|
| 6 | IO into bank X |
| 60 | IO into bank Y |
| 5 | bank X to IO |
| 50 | bank Y to IO |

- The IO side is a valid/ready pair in each direction (`io_in_*`, `io_out_*`).
- One word moves per ready cycle.
- The whole pipeline is held until the last word has moved.

The trap codes follow the document. The operand registers, handshake and stall policy are this design's own.

## Top level

`utdsp` wires all of the above together and adds:
- host access to the data banks (`host_*`, used while the core is stopped)
- the program-loading ports
- status outputs `pc`, `idle` and `halted`

All parameter defaults are the document's sizes:
- 256-word instruction memory
- 7 x 256-word decoder banks
- 2 x 512-word data banks
- five-deep DO stack
- three interrupt vectors

Sizes the document leaves open were chosen here: a JSR stack of 8, the vector spacing of 16 words, and 16-bit loop counts.

## Verification

Each block has a self-checking testbench in `tb/`. Each one:
- drives random and directed stimulus (`$urandom`)
- compares against a model written inside the testbench
- has a watchdog
- ends with `TB_RESULT checks=N failures=M`

Every testbench was also run against a copy of its block with one deliberate bug. Each such run reported failures.

`tb_utdsp` runs the whole core at its default sizes with four programs:

1. **Multi-op and datapath.** Long instructions sharing a decoder row, forwarding, modulo and bit-reversed addressing, 1.15 multiply, and a seven-operation instruction.
2. **Control flow.** jsr/rts, taken and untaken branches, nested DO loops, `rep` 5/0/1 and jmp. The cycle counts checked are:
   - 3 cycles for a taken branch, jmp, jsr or rts
   - 1 cycle for an untaken branch
   - N for a `rep N` body
   - zero overhead for loops
3. **Block FIR.** N = 8 taps, M = 4 outputs. The inner loop is `rep 8` of one long instruction with two loads, two address increments and two `madd2m`. It runs N taps in N+1 cycles. The whole kernel takes 47 cycles. The document's hand-coded result M(N+6)/2+7 would give 35; the difference is the per-block setup and store code of this test program.
4. **I/O.** DMA in and out, `wait` woken by an interrupt whose vector calls a subroutine, and a fast interrupt taken inside a loop.

The testbench counts how often each mechanism occurred:
- uni-ops, multi-ops and forwarding
- squashes and untaken branches
- jsr, rts and loop-backs
- repeats and buffer wraps
- multiply-accumulates
- interrupts and interrupt returns
- DMA beats and stalls
- idle and halt

It fails if any count is zero.

`tb_kernels` runs an N x N matrix multiply on the full core for N = 4 and N = 10:
- A is in bank X and B in bank Y. C is written back to bank X.
- Rows and columns are two nested DO loops.
- Each element is `rep N` of one long instruction: two loads, two pointer updates and a `madd2m`.
- Every result is checked.
- Each element takes N+6 cycles, and the loop-back costs nothing.
- The whole kernel takes N³+6N²+2N+7 cycles: 175 for N = 4 and 1627 for N = 10. The original compiler's published figure is N(N²+3N+1), which is 116 and 1310.

`tb_kernels` also runs a 32-tap FIR with one output, as one repeated multiply-accumulate instruction. It takes 41 cycles (N+9).

`tb_kernels` also runs the block FIR at two sizes: 32 taps with 2 outputs, and 256 taps with 64 outputs.
- All outputs are checked.
- The kernel takes M/2·(N+12)+7 cycles: 51 and 8583.
- The published hand-coded result is M(N+6)/2+7, which is 45 and 8391.
- The inner step matches the published code. The difference is per-block setup.

`tb_kernels` also runs a cascaded biquad IIR at two sizes: 1 section with 1 sample, and 4 sections with 64 samples.
- Each section is eight long instructions, with the states kept in bank Y.
- All outputs are checked.
- It takes M(8N+4)+5 cycles: 17 and 2309.
- The original compiler's published figure is M(5N+3): 8 and 1472.

`tb_kernels` also runs the LMS adaptive FIR at two sizes: 8 taps with 1 sample, and 32 taps with 64 samples. The step size is a right shift by 4.
- The filter pass is a repeated long instruction.
- The coefficient update is a five-instruction DO loop per tap.
- The outputs and the final coefficients are checked.
- It takes M(6N+9)+7 cycles: 64 and 12871.
- The original compiler's published figure is M(4N+6): 38 and 8576.

`tb_kernels` also runs a normalized lattice filter at two sizes: 8 sections with 1 sample, and 32 sections with 64 samples.
- Each section rotates the forward value and a stored state by a 1.15 coefficient pair, in six long instructions.
- The outputs and the final states are checked.
- It takes M(6N+4)+5 cycles: 57 and 12549.
- The original compiler's published figure is M(6N+3): 51 and 12480.

`tb_kernels` also runs a 256-point complex FFT: radix-2, decimation in frequency, in place.
- Real parts are in bank X and imaginary parts in bank Y. The 1.15 twiddles come from a table in the upper halves of both banks.
- Three nested DO loops (stages, groups, butterflies) take their inner counts from registers with `do.a`.
- Each butterfly is eight long instructions, so the butterflies take 8990 cycles. The original compiler's published figure is 4 cycles per butterfly, which gives 4096.
- A last pass reads the bit-reversed result in natural order with `incfft` and stores |re|+|im| of each bin.
- The whole kernel takes 9513 cycles.
- The result matches a bit-exact model. Every bin is within 125 LSB of a floating-point DFT.

To run a testbench with Verilator 5 (any `tb/` name can replace `tb_utdsp`):

```
verilator --binary --timing -Wno-fatal -Irtl rtl/utdsp_pkg.sv rtl/*.sv tb/tb_utdsp.sv --top-module tb_utdsp
./obj_dir/Vtb_utdsp
```

## Departures from the document and open points

- **Accumulators.** The text gives each integer unit "an accumulator", but the instruction set has `setacc0` and `setacc1`. This design has two accumulators per unit.
- **msub.** The instruction table prints the same formula for msub as for madd. msub is implemented as dl = dk − di·dj.
- **Memory timing.** The memories read combinationally, so a fetch or a load finishes in its stage. The timing of the original SRAM macros is not given.
- **Unspecified behaviour.** The following are not specified by the document; the choices here are listed above:
  - the interrupt priority
  - when interrupts may be accepted
  - the DMA operands and handshake
  - the JSR depth
  - how `rep` interacts with loop ends
  - overflow behaviour
- **Not built:**
  - I/O pads and the packaged chip (a 108-pin PGA)
  - the SRAM-based register file
- **Benchmarks.** The kernel programs above are written by hand for this design. They are slower than the original compiler's published cycle counts, except the lattice filter, which is close, so those counts are not reproduced here.
- **Kernels not run.** A 1024-point complex FFT does not fit: it needs 2048 data words, and the two banks hold 1024. The application programs the original work measured (speech and modem coders, image and compression codes) were not run, because their code and data sizes are not given.
