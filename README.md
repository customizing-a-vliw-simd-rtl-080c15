# A dual-issue VLIW-SIMD processor for hearing-aid signal processing

Hearing aids need a programmable processor that uses very little power at a
few megahertz. This design is such a processor, built for one
hearing-aid chain: a WOLA (weighted overlap-add) filter bank followed by
noise reduction with an adaptive gain equalizer. It keeps a generic
VLIW-SIMD core and tunes it for the chain in two ways:

* **Parallelism.** Two 32-bit instructions issue per cycle. Every operation
  works on 64-bit registers split into 8/16/32/64-bit subwords. An *X2*
  instruction uses one issue slot but runs on two registers at once, so up to
  four operations finish per cycle.
* **Specialisation.** The pipeline is cut down to fetch plus one
  register-read/execute stage. The datapath gains a 16-bit SIMD
  multiply-accumulate (MAC_16), a complex multiply unit (CMU) for FFT
  butterflies, count-leading-zeros (CLZ), and hardware circular-buffer
  pointers. Division and square root run on co-processors that trade
  precision against cycles.

The aim is a low product of area × minimum real-time clock frequency.
Adding hardware pays off when it cuts cycles (and so the clock) by more than
it adds area.

## Block map

```
              +--------------------------- asip_top ---------------------------+
 prog_* ----->| imem (1024 x 64b, sync read)                                   |
              |   | bundle                                                     |
              |   v                                                            |
              | vliw_core ---- port A (pair) ---- dmem (2048 x 64b, 2 banks)   |
              |   slot0: lane0 lane1   x2_regfile                 | port B     |
              |   slot1: lane0 lane1   (64 x 64b)        host_* --+-- dma_ctrl --> ext_*
              |   |  co-processor port (stores/loads, 10-bit address)          |
              |   +--> dcu (division)   sqrt_cop (radix-4 square root)         |
              |   +--> dma_ctrl configuration / status                         |
              +----------------------------------------------------------------+
```

| file | what it is |
|---|---|
| `rtl/asip_pkg.sv` | shared types, opcodes, condition codes, co-processor map, instruction encoders |
| `rtl/asip_top.sv` | the system: core, memories, DMA, co-processors |
| `rtl/vliw_core.sv` | decode, RA/EX stage, slot-0 memory/control, special registers, sequencing |
| `rtl/exec_lane.sv` | one execution lane: ALU, MAC_16, CMU, CLZ and result select |
| `rtl/x2_regfile.sv` | 64 × 64-bit register file with pair (X2) ports |
| `rtl/simd_alu.sv` | subword add/sub/logic/shift/MIX, flags, conditional merge |
| `rtl/mac16.sv`, `rtl/cmu.sv`, `rtl/clz_unit.sv`, `rtl/circ_addr.sv` | the custom units |
| `rtl/dcu.sv`, `rtl/sqrt_cop.sv` | the co-processors |
| `rtl/dma_ctrl.sv`, `rtl/imem.sv`, `rtl/dmem.sv` | DMA and memories |

## Execution model

**Bundles and slots.** A 64-bit bundle holds slot 0 in bits 31:0 and slot 1
in bits 63:32. Both slots run ALU, MAC_16, CMU, CLZ, MV and MVI. Only slot 0
runs loads, stores, co-processor accesses, SMVI (set a special register),
branches and HALT. A memory or control opcode in slot 1 does nothing.

**Pipeline.** There are two steps. The instruction memory read is the fetch
register. In one RA/EX cycle the bundle is decoded, registers are read,
everything executes, and results are written at the clock edge. The next
fetch address is formed in RA/EX, so a taken branch costs no cycle, and each
executed bundle takes exactly one cycle. There are no interlocks and no
forwarding. A result is visible to the next bundle. Co-processor results
must be loaded only after enough bundles have passed. Counting those
bundles and filling them is the scheduler's job: in the precision-delay
scheme, the delay you code *is* the iteration count.

**X2 mode.** An X2 instruction runs its opcode on lane 0 with the named
registers and on lane 1 with each register's last address bit flipped. For
example, `ADD_X2 r4, r0, r2` also computes `r5 = r1 + r3`. The register
file is split into an even and an odd bank of 32 registers, and every port
returns a register and its partner, so a pair costs one port. X2 memory
accesses move the aligned word pair at `addr & ~1` and `addr | 1`. X2
pointer accesses step the pointer by 2. `MIXRL` in X2 mode does MIXR on
lane 0 and MIXL on lane 1, which is how FFT reordering pairs are merged.
MAC_16 always writes two registers (named register = accumulators 0 and 1,
partner = accumulators 2 and 3) and ignores the X2 bit.

**Conditional execution.** An instruction with **CS** stores the Z/N/C/V
flags of every subword in the flag register (per byte lane; a subword's
flags are copied to all its bytes). An instruction with **CR** writes only
the subwords whose stored flags satisfy the condition in the `CONDSEL`
special register; the other subwords keep their old value. This turns
`if (x[i]==0) y[i] = a[i]+b[i]` over eight bytes into three instructions:
set CONDSEL to ZERO, `SUB_8` with CS, `ADD_8` with CR. The flag register is
shared; if both slots set flags in one bundle, slot 1's flags win. Carry on
subtract means "no borrow".

**Circular pointers.** There are eight address pointers `APTR0..7` and
eight masks `AMASK0..7`. Post-increment computes
`new = (old & mask) | ((old + step) & ~mask)`: the bits where the mask is 1
stay fixed, the low bits count and wrap. A buffer of 2^k words therefore
needs a mask with k low zeros and a start address aligned to 2^k. A mask of
0 gives a plain linear pointer.

## Instruction formats

The encoders in `asip_pkg` (`enc_alu`, `enc_alui`, `enc_ldp`, `enc_stcop`,
and so on) build every format; test programs are written with them.

| format | fields |
|---|---|
| ALU | `[31:26]` op, `[25]` X2, `[24:23]` size (0=8,1=16,2=32,3=64), `[22]` CS, `[21]` CR, `[20]` I, `[19:14]` rd, `[13:8]` ra, `[7:2]` rb; with I=1 `[7:0]` is a signed immediate copied into every subword; for CMU `[0]` picks the high twiddle |
| MVI | `[24:23]` size, `[19:14]` rd, `[13:0]` signed immediate in every subword |
| LDP / STP | `[25]` X2, `[19:14]` rd/rs, `[10:8]` pointer, `[7]` post-increment |
| LDA / STA | `[25]` X2, `[19:14]` rd/rs, `[13:0]` word address |
| LDCOP / STCOP | `[25:20]` register, `[19:10]` co-processor address, `[5:0]` iterations (STCOP) |
| SMVI | `[21:16]` special register (0 CONDSEL, 8+i APTRi, 16+i AMASKi), `[15:0]` value |
| BR | `[25:20]` ra, `[19:18]` always / ra==0 / ra!=0 (low 32 bits), `[11:0]` absolute target |

Opcodes: NOP 0, ADD 1, SUB 2, AND 3, OR 4, XOR 5, SHL 6, SHR 7, SRA 8,
MIXL 9, MIXR 10, MIXRL 11, MV 12, MVI 13, MAC16 16, CMU 17, CLZ 18, LDP 24,
STP 25, LDA 26, STA 27, LDCOP 28, STCOP 29, SMVI 30, BR 32, HALT 33. Shift
counts come from the low bits of each `b` subword.

## Arithmetic units

* **MAC_16.** Four signed 16×16 products, each added to its own 32-bit
  accumulator; full-width products, wrapping sums. A 128-tap analysis window
  takes 128/4 = 32 MAC_16.
* **CMU.** `A = [A_re | A_im]` (32-bit parts). `B` holds two twiddles with
  16-bit parts, `[B_re,hi | B_im,hi | B_re,lo | B_im,lo]`, so one load
  brings two.
  `C = [A_re·B_re − A_im·B_im | A_re·B_im + A_im·B_re]` in one cycle. The
  twiddles are Q1.15: the exact sums are shifted right by 15 (arithmetic,
  truncating) and the low 32 bits are kept.
* **CLZ.** Leading zeros of every subword; a zero subword gives its width.
  Used to range-normalise square-root inputs.

## Co-processors and the precision/latency trade

Both co-processors start on a store and return their result on a later
load. The store carries an iteration count: one iteration per cycle, 0 = run
to full precision. Results are built from the most significant end. Loading
early, or giving a small count, returns a shorter result with the low bits
zero. The latency never depends on the data.

| address | store | load |
|---|---|---|
| 0x200 | DCU dividend | DCU quotient |
| 0x201 | DCU divisor, starts | DCU busy |
| 0x300 | square-root radicand (64 bit), starts | root (32 bit) |
| 0x301 | – | square-root busy |
| 0x100 / 0x101 | DMA external / local word address | – |
| 0x102 | DMA `[15:0]` length, `[16]` direction (1 = to external), starts | – |
| 0x103 | – | DMA busy |

* **DCU.** Quotient `floor(a·2^15 / b)`, 16 bits, saturating (also for
  b = 0); a gain below one comes out in Q1.15. Each iteration is 4 chained
  restoring steps (4 bits), so a count of 4 gives full precision 4 cycles
  after the start.
* **Square root.** Root of a 64-bit radicand, two root bits per iteration
  (radix 4), 16 iterations for full precision. The rough parts of the
  computation (range reduction with CLZ, output format) are left to
  software.
* **DMA.** It moves one word at a time. For external to local, it requests
  the word on the external bus (`ext_req_o` held until `ext_ack_i`, read
  data taken with the acknowledge), then writes it into data-memory port B.
  The reverse direction works the same way. The host port has priority on
  port B; the DMA waits while `host_en_i` is high.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/asip_pkg.sv tb/tb_asip_top.sv \
          --top-module tb_asip_top -Mdir obj_top
obj_top/Vtb_asip_top
```

Use the same command for any other `tb/tb_<block>.sv`. `tb_asip_top` runs
the system at its default sizes through one audio-block step:

1. The DMA fetches a 128-sample history into a 32-word circular buffer.
2. WOLA windowing and time folding runs as 32 MAC_16 in a 3-bundle loop.
   The window and the samples are loaded in X2 pairs, and the sample
   pointer wraps once.
3. The chain continues with a CMU multiply, CLZ, a square root, and two
   divisions. The gain limit `min(1, g)` is built with CS/CR.
4. The DMA writes nine result words back.

Every result is compared with a reference. The cycle count must equal the
number of executed bundles, and each mechanism must occur at least once. The
whole step takes about 240 cycles, most of them waiting on the two DMA
transfers. `tb_vliw_core` checks the instruction set one feature at a time
on the bare core.

Two more system-level testbenches run the signal-processing kernels:

* `tb_fft_workload` runs the 32-point FFT of the filter bank as 80
  radix-2 butterflies. Every twiddle multiplication runs on the CMU, with
  twiddles packed two per word. It checks the output bit-exactly against an
  integer model and checks that a cosine lands in the right two bins. The
  straight-line program, one butterfly at a time in slot 0, takes 561
  cycles. The testbench then builds a scheduled program with a small list
  scheduler and checks it the same way:
  * the twiddles sit in registers;
  * butterflies go in pairs, moved with X2 pair loads and stores;
  * from the second stage on, the adds and subtracts are X2 instructions;
  * arithmetic fills whichever slot is free.

  That program takes 183 cycles. Of those, 164 are memory accesses, which
  only slot 0 can issue, so this is near the bound.
* `tb_age_workload` runs the adaptive gain equalizer for 17 subbands over
  four blocks:
  * a square root on the co-processor per band;
  * the short-term average and the noise-floor tracking, the latter with
    CS/CR;
  * the gain `min(1, A/(2·floor))` on the DCU.

  It checks all 51 results per block against an integer model. Every block
  takes 653 cycles: the co-processor latencies do not depend on the data.
  At 16 kHz with 8-sample blocks (2000 blocks/s) that alone is about
  1.3 MHz.

The measured parts of one audio block add up to 884 cycles:
* windowing, 48 cycles;
* the scheduled FFT, 183 cycles;
* the gain equalizer, 653 cycles.

At 2000 blocks/s that is about 1.8 MHz. The IFFT, the synthesis window and
the gain multiplication are not in that figure.

To write a program, fill the instruction memory through `prog_*` with
bundles built from the `asip_pkg` encoders, put data in through `host_*`,
and pulse `start_i`. Execution starts at bundle 0 and `running_o` falls
after HALT.

## How this relates to the source design, and what is this design's own

Taken from the source description:
* dual 32-bit issue and 64-bit subword SIMD;
* the CS/CR conditional scheme with a condition-select register;
* X2 merging on registers that differ in the last address bit, and MV_X2
  pair loads with `++`;
* MAC_16 with two destinations and 32-bit accumulators;
* the CMU equation, with two twiddles per word and a high/low select;
* the circular-pointer mask rule;
* CLZ;
* store-to-start co-processors with a coded delay that sets the iterations,
  one iteration per cycle, and delayed loads;
* a radix-4 square-root co-processor with data-independent run time;
* the reduced RA/EX pipeline;
* separate instruction and data memories and a DMA to an external memory or
  audio buffer;
* the configuration chosen: square-root co-processor, CMU, X2, extended
  register file, minimal pipeline.

This design's own choices:
* the whole instruction encoding, the opcode set beyond the named
  operations, and the special-register and co-processor maps (only the DCU
  addresses 0x200/0x201 come from the source);
* the register-file port counts, read as even/odd banks of 32 registers;
* one FU set per slot plus a second lane for X2;
* slot 0 as the only memory/control slot;
* the MIX subword convention;
* flag details and the shared flag register;
* fixed-point formats (Q1.15 twiddles, the 2^15-scaled saturating
  quotient);
* the DCU radix (4 bits per iteration, so the source's example delay of 4
  gives full precision);
* memory sizes (1024 bundles, 2048 data words), combinational data-memory
  reads, and the two-port banked data memory;
* the DMA register map and bus protocol;
* reset (asynchronous, active low, registers cleared).

Departures to be aware of:
* The square-root unit is a digit recurrence, not CORDIC rotations. It keeps
  the interface, the radix, the fixed latency and the precision trade, but
  its precision per iteration is that of a radix-4 digit recurrence.
* The six-stage baseline pipeline and the smaller register-file variants are
  not built. This design is only the chosen low-power configuration.
* The hearing-aid software is only partly present. The windowing loop, the
  FFT and the gain equalizer run as hand-written testbench programs. There is
  no complete filter bank chain (analysis, FFT, gains, IFFT, synthesis), and
  no compiler or instruction scheduler. So the real-time clock for the whole
  chain at 16 kHz has not been measured on this design.
* There is no hardware that rescues a block that misses its real-time
  deadline when the clock is set below the worst case; the source only
  suggests one.
* Slot 1 ignores memory and control opcodes. Simulation flags such a bundle
  with an assertion.
* The memories are written as arrays. A real chip would map them to SRAM
  macros, whose read timing would differ from the combinational data-memory
  read assumed here.
