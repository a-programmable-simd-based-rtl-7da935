# SIMD Rake receiver processor core

This is a programmable baseband processor for CDMA Rake receivers (WCDMA FDD/TDD, HSDPA).
It does not use a fixed-function finger array. It runs every part of the receiver as
software on two SIMD clusters:
- delay equalisation
- descrambling and de-spreading
- path search
- maximum ratio combining (MRC)

One RISC controller drives both clusters and issues one instruction per clock cycle.
A vector instruction keeps its cluster busy for up to 128 × repeat steps. Meanwhile the
controller runs loop control and set-up code, so that code costs no extra time.

```
 ADC ──► dfe (FIR + decimate) ──┐
                                │  master 0
 host port ─────────────────────┤  master 6
                         ┌──────▼───────┐    banks 0,1: delay equalizer buffers
 valu_cluster ld/st ◄───►│   mem_xbar   │◄──► banks 2..7: ordinary banks
 cmac_cluster A/B/st ◄──►│ (static map) │     (4 single-port blocks each)
                         └──────▲───────┘
 risc_ctrl ── cfg bus ──────────┴──► AGUs, crossbar map, code generators, taps
     └── vector instructions ──► valu_cluster, cmac_cluster
```

Samples are 16+16-bit two's-complement complex numbers. The sample rate is 4 samples
per chip, i.e. 15.36 MHz for 3.84 Mcps.

## How a Rake finger maps onto the core

1. **Delay equalisation.**
   - The front end (`dfe`) filters and decimates the ADC stream.
   - It writes one sample per output into a delay equalizer bank, a circular buffer.
   - A finger reads the buffer at its own delay, in quarter chips, relative to a common mark.
   - It reads with a stride of 4 samples, so it sees one chip-rate phase.
2. **Descrambling.**
   - The vector ALU multiplies four chips per cycle by the conjugate of the scrambling code (`MUL`, parallel load).
   - The scrambling generator gives four consecutive chips per step.
3. **De-spreading.**
   - Each descrambled chip is broadcast to all four lanes.
   - Each lane has its own OVSF code, so four channelisation codes are de-spread in one pass (`MAC`, broadcast load).
   - Alternatively, one code is de-spread four chips per step: OVSF parallel mode with a parallel load, then the four partial sums are added by a 4-step feedback `MAC`.
4. **Path search.**
   - The vector ALU correlates four adjacent delays at once using the sliding-window load: one fetch per step instead of four.
   - The CMAC cluster finds the peak (`MAXS`, largest |x|² and its index).
5. **MRC.**
   - The CMAC cluster multiplies the finger symbols by the conjugated channel estimates and accumulates over fingers (`MAC` with a repeat count).

Between these steps the program moves whole buffers from one engine to another by
remapping crossbar ports. Data is never copied.

## Memory banks and the delay equalizer layout

Each bank holds 4 blocks × 256 rows of complex words. One access reads or writes four
elements, one per block, and takes one cycle. Lane k of an access at element address A uses:

| bank type | element | block | row |
|---|---|---|---|
| ordinary | `e = A + k` | `e mod 4` | `e / 4` |
| delay equalizer | `e = (A + 4k) mod len` | `(e + e/4) mod 4` | `e / 4` |

Why the delay equalizer layout is skewed:
- A finger reads elements e, e+4, e+8, e+12, which is the same quarter-chip phase of four chips.
- With plain `e mod 4` placement, all four would land in one block.
- The skew `+ e/4` spreads them over four blocks, so the read takes one cycle whatever the delay.
- The buffer length `len` must be a multiple of 16 for the skew to stay conflict-free across the wrap. At the wrap, the row indices r..r+3 are taken modulo len/4, and they stay distinct modulo 4 only when len/4 is a multiple of 4. An assertion in `mem_bank` reports any access whose lanes meet in one block.

Each bank has an address generator:
- **Ordinary banks** (`agu`): registers base (0), stride (1) and circular length (2; 0 means no wrap).
- **Delay equalizer banks** (`deq_agu`): registers length (0), finger delay (1) and read stride (2, default 4). Writing register 3 sets mark to the write pointer; writing register 4 clears the write pointer.
- Writes always go to the write pointer.
- The first read of a vector (`restart`) starts at `mark + delay`.
- A direct access (`dir` in the request, used by the host port) bypasses the generator.

## Crossbar

`mem_xbar` has one map register per bank, which holds a master number. Any value of 7 or
more disconnects the bank. The masters are:

| master | number |
|---|---|
| front end | 0 |
| ALU load | 1 |
| ALU store | 2 |
| CMAC load A | 3 |
| CMAC load B | 4 |
| CMAC store | 5 |
| host | 6 |

How the map behaves:
- **No arbitration.** The program decides the schedule. This keeps timing predictable.
- **Switching takes two cycles.** A map write takes effect two cycles after the `CFG` instruction: one cycle to write, one to switch. An access in flight finishes on the old connection.
- **Read data follows the previous cycle's map**, matching the bank's one-cycle read latency.
- **A master may own several banks.** Its writes go to all of them, which is useful for duplicating a buffer. Its reads come from the lowest-numbered bank it owns.

## Vector instructions and the clusters

A vector instruction runs `length` steps (1..128) and repeats them `rep` times. `rep` is a
16-bit value taken from a controller register.

The vector controller (`vctrl`) pipelines each step in three stages, one cycle apart:
load → execute → store. A cluster is therefore busy for `P + length·rep + 2` cycles, where:
- P = 3 for the sliding-window prefill, otherwise 0;
- one cycle is added when nothing is stored.

If a vector instruction is issued to a busy cluster, the controller stalls until the
cluster is free.

| field | vector ALU (`valu_cluster`) | vector CMAC (`cmac_cluster`) |
|---|---|---|
| op | `MUL` (stored every step), `MAC` (stored per vector) | `MUL`, `MAC`, `BFLY` radix-2 butterfly, `MAXS` peak search |
| load mode | `PAR` 4 elements, `BCAST` 1 element to all lanes, `SLIDE` window (lane k = element n+k), `FB` store-unit feedback, lane k taking lane (k + step) mod 4, so a 4-step `MAC` sums all lanes | A: `PAR` or `FB`; B: parallel, or broadcast (`BCAST` and `BFLY`) |
| code | instruction word (`i^n` in bits [1:0]), immediate register (any short code), scrambling generator, OVSF generator | – (operand B from memory) |
| conj | multiply by conjugate code | multiply by conjugate of B |
| shift | arithmetic right shift before saturation to 16 bits on store | same (15 after `BFLY` for Q15 twiddles) |

About the vector ALU lanes:
- Each lane has a "short" complex multiplier. It multiplies by a code whose real and imaginary parts are in {−1, 0, +1}, using only negation and one adder per part.
- Each lane has a 32-bit accumulator.
- An idle datapath sees zeroed operands.

About the CMAC:
- It has two full 16×16 complex multipliers with 40-bit accumulators.
- `BFLY` computes `a0·2^15 ± b0·a1`.

Vector ALU cluster configuration registers (unit 0x9):

| reg | meaning |
|---|---|
| 0/1 | scrambling x seed [15:0] / [17:16] |
| 2/3 | y seed [15:0] / [17:16] |
| 4 | load seeds |
| 5 | log2(SF) |
| 6–9 | OVSF code number of lane 0–3 |
| 10 | immediate code `{re[1:0], im[1:0]}` |

Code generators:
- **Scrambling** (`scr_codegen`): two 18-stage LFSRs with configurable taps and seeds. The defaults give the WCDMA downlink Gold code. A code number is selected by loading the x seed already advanced by that number.
- **OVSF** (`ovsf_codegen`): chip i of code k at SF = 2^L is the parity of `i & bitrev_L(k)`.

## Controller

`risc_ctrl` is a 16-bit machine:
- 16 registers, with r0 = 0;
- a 32-bit MAC accumulator;
- a 256-word program memory, loaded by the host.

Instructions are 32 bits wide, with the opcode in [31:26], rd in [25:22], rs in [21:18],
rt in [17:14] and imm in [15:0].

| group | instructions |
|---|---|
| arithmetic | `ADD SUB AND OR XOR SHL SHR ADDI MUL MAC MACR CLRA` |
| branches | `BEQZ BNEZ JMP DBNZ` (decrement and branch, for loops) |
| configuration | `CFG` writes a 12-bit configuration address: unit in bits [11:8], register below |
| status | `RDS` reads status: busy flags, peak value low/high, peak index |
| vector | `VEC` issues a vector instruction |
| control | `WAIT` one or both clusters, `HALT` |

The full field layout is in the header of `rtl/risc_ctrl.sv`. The testbench package
`tb/rake_asm_pkg.sv` has one encoder function per instruction.

Configuration address map:

| address | target |
|---|---|
| `0x0b0–0x0bf` | bank b address generator |
| `0x800–0x807` | crossbar map of bank 0–7 |
| `0x900–0x90a` | vector ALU cluster |
| `0xa00–0xa07` | front-end taps |

## Front end

`dfe` is an 8-tap complex FIR with Q15 taps that decimates by 2. It assumes a 30.72 MHz
input and produces 15.36 MHz output.
- At reset it passes samples through unchanged.
- Each output is saturated to 16 bits.
- Each output is written as a single-element write into the bank mapped to master 0, normally a delay equalizer bank.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The package must come first in the
file list:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/rake_pkg.sv tb/tb_rake_top.sv \
    --top-module tb_rake_top
./obj_dir/Vtb_rake_top +verilator+rand+reset+2
```

Verilator finds the other modules and packages through `-I`. The remaining lint warnings are unused configuration bits, open debug outputs and the reset feeding assertions; each module header explains its own. Replace `tb_rake_top` by any
other testbench name to run that block alone. `+verilator+rand+reset+2` starts from random
register contents, which shows any missing reset.

`tb_rake_top` runs the whole core at its default size:
1. It filters and decimates 600 ADC samples into the delay buffer.
2. It runs one finger end to end: descrambling at a 6-quarter-chip delay, then de-spreading of four SF16 codes over 4 symbols.
3. It runs a pilot correlation alongside a CMAC peak search.
4. It runs combining, butterflies and a feedback operation.
5. It reads every result back through the host port and compares it with a model built from the input samples and the code definitions.
6. It counts each mechanism and requires every one to have occurred: stalls, remaps, overlap of RISC and vector work, both clusters busy, every load mode, every operation and every code source.

`tb_rake_workloads` runs two receiver cases on the whole core and checks every finger
symbol and every combined symbol against a model:
- **Soft handover.** Six base stations, each with its own scrambling code and finger delay, and four SF16 codes. This takes 12.0 cycles/chip, against a budget of 19.79 at 76 MHz.
- **HSDPA.** One base station, four paths and 16 SF16 codes in four passes. This takes 24.15 cycles/chip.

For each path the program descrambles 64 chips and de-spreads four codes per pass. Then the
CMAC cluster combines the paths. The address generator uses stride `16·passes + 2` and a
circular length two short of `paths × stride`, so one vector per lane pair sums over paths.
The run is checked against the budget only for the soft handover case.

## What is this design's own

The architecture this core follows fixes the following:
- the cluster structure: 4-way short-multiplier ALU, 2-way CMAC with butterfly, per-cluster vector controller and load/store units, a load unit with a parallel mode and a quarter-fetch distribute mode, and a store unit with local feedback;
- the code sources;
- banks made of small single-port memories delivering four samples;
- per-bank AGUs and a special delay-buffer AGU;
- a statically scheduled crossbar that reconnects within two cycles;
- single issue;
- vector lengths 2–128;
- OSR 4;
- masking of idle inputs.

The following are choices made here:
- all widths;
- the instruction encoding and opcode set;
- the number and size of banks and the master list;
- the skewed delay-buffer placement;
- the address generator registers;
- the sliding-window reading of the one-item load mode;
- broadcast and feedback load modes;
- filter length and decimation;
- the WCDMA defaults of the scrambling generator;
- the host port.

Where the architecture is unclear about whether the clusters share one vector controller
and load/store unit, this design gives each cluster its own.

## Limits

- **The controller has no data-memory path.** It reaches the datapath only through configuration writes and status reads.
- **There is no DSP-instruction class separate from vector instructions.** A single-step vector instruction (length 1) serves for one-off complex operations.
- **Capacity at 76 MHz.** The budget is 19.79 cycles per chip (76 MHz / 3.84 Mcps). The soft handover case (six stations, one path each) fits at 12.0 cycles/chip. HSDPA with four paths and 16 codes does not fit: it needs 24.15 cycles/chip. Vector work alone is 19.7 cycles/chip. The rest comes from two limits: code numbers and store base addresses can only be rewritten while the cluster is idle, and combining starts after the last finger. Four paths for each of six base stations would need about 24 cycles/chip of vector ALU work alone.
- **Buffer sizes.** Each delay buffer holds at most 1024 samples (256 chips) per bank.
- **Two ordinary-bank rules.** On ordinary banks a 4-wide access always covers four consecutive elements. The AGU stride is counted in elements per access, so a parallel load that streams through a vector uses stride 4.
