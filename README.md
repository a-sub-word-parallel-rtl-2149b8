# Sub-word parallel DSP core for wireless baseband processing

Baseband receivers spend most of their cycles on a small set of kernels:
FFT butterflies for OFDM, add-compare-select and distance calculations for
Viterbi decoding, and convolutions (FIR filters, equalizers, matched
filters). The data comes in several formats: complex or real, 16-bit or
8-bit. This core handles all of them with **one block of four 16x16
multipliers** wrapped in a reconfigurable adder/accumulator network. The
same hardware can act as:

* a radix-2 decimation-in-frequency butterfly, `X = A + B`, `Y = (A − B)·W`,
  one per cycle, with twiddles `W` taken from an on-chip cos/sin ROM;
* a Viterbi add-compare-select unit, with decisions kept in a 32-bit queue;
* a squared-distance accumulator, two dimensions per cycle;
* a multiply-accumulate engine in one of four shapes. Each 16x16 multiplier
  can split into four 8x8 multipliers, which gives the modes below.

| mode     | operation per cycle          | useful products per cycle |
|----------|------------------------------|---------------------------|
| `CMAC16` | one 16x16 complex MAC        | 4 real 16x16              |
| `RMAC16` | four 16x16 real MACs         | 4 real 16x16              |
| `CMAC8`  | four 8x8 complex MACs        | 16 real 8x8               |
| `RMAC8`  | sixteen 8x8 real MACs        | 16 real 8x8               |

The real and 8-bit modes reach this parallelism with a particular FIR
schedule. Each cycle the products of one coefficient group and one sample
group feed several output samples at once: the current output and
neighbouring earlier and later outputs. Partial sums of later outputs are
carried from one filter iteration to the next. That schedule, described
below, is the hardest part of the design to follow.

The original chip ran at 68 MHz (0.35 µm CMOS). At that clock, one butterfly
per cycle is 68 M butterflies/s and sixteen 8x8 MACs per cycle are about
1.1 G MAC/s. The RTL keeps those per-cycle rates.

## Core organisation

```
            ctrl (decoded control word)            iaddr -> program memory
                 |                                   ^
   +-------------+----------------------+   +--------+-------+
   |  dag: two address registers        |   | prog_seq: PC,  |
   |  (addr0 -> bank 0, addr1 -> bank 1) |   | return stack,  |
   +------+-----------------------+-----+   | interrupt      |
          |                       |         +--------^-------+
   +------v------+         +------v------+           | flags
   | data_sram   |         | data_sram   |     +-----+-----+   +---------+
   | bank 0 (I)  |         | bank 1 (Q)  |     |   alu     |   | shifter |
   | 1K x 16     |         | 1K x 16     |     +-----^-----+   +----^----+
   +------+------+         +------+------+           |  regfile 16x16 |
          | rd0                   | rd1              +-------+--------+
          +-----------+-----------+                          |
                      v                                      v
       +--------------------------------------------------------------+
       | bfly_mac: A={AR,AI}  B={BR,BI}  W={cos,sin}                  |
       |  complex adder, complex subtractor, 4 x subword_mult,        |
       |  ACCR/ACCI/ACC-AUX (40 b), 8 x 24-b accumulators, acs_queue  |
       +--------------------------------------------------------------+
                      ^ W
       +--------------+---------------+      +-----------------------+
       | twiddle_rom: cos/sin 1K x 16 | <----| nco: phase accumulator|
       +------------------------------+      +-----------------------+
```

* **Two data banks, one for I and one for Q.** A complex 16-bit sample is
  stored as its real part in bank 0 and its imaginary part at the same (or
  another) address in bank 1. The data address generator (`dag`) produces
  both addresses in the same cycle, so a complex word, or any two 16-bit
  words, moves on the two data buses in one cycle. Reads are synchronous:
  data addressed in cycle *t* is on `rd0`/`rd1` in cycle *t+1*.
* **Operand routing.** `A` and `B` of the butterfly/MAC unit are loaded from
  the memory buses `{rd0, rd1}`, from two register-file read ports, or from
  the unit's own `X`/`Y` outputs. Memory write data comes from the register
  file or from `X`/`Y`, so butterfly results go straight back to the I/Q
  banks.
* **Twiddle ROM and NCO.** The ROM holds one full period of cos and sin in
  1024 entries of Q1.15. It is addressed either by an immediate (FFT
  twiddle index) or by the top 10 bits of the NCO phase accumulator. The NCO
  turns the same table into a phasor generator for carrier and phase
  recovery.
* **Scalar side.** A 16x16 register file, a 16-bit ALU with Z/N/C/V flags,
  a barrel shifter, and a program sequencer with conditional branches on the
  flags, an 8-deep call/return stack and one interrupt.

The instruction set is not part of this RTL. `dsp_top` takes a **decoded
control word** (`dsp_pkg::ctrl_t`) every cycle and drives the instruction
address `iaddr` out. An instruction decoder and a program memory map
`iaddr` to control words; the testbenches model both.

## The butterfly / complex MAC unit (`bfly_mac`)

### Datapath

The unit reads `AR, AI, BR, BI` (16 bits each, registered, loaded with
`ld_a`/`ld_b`) and the twiddle `W = cos + j·sin`. The four multipliers always
form the same cross products of an `x` pair and a `y` pair:

```
m0 = xr·yr    m1 = xi·yi    m2 = xr·yi    m3 = xi·yr
```

so `m0 − m1` and `m2 + m3` are the real and imaginary parts of a complex
product. For MAC, `CMUL` and `RMUL`, `x = A` and `y = B`. For the butterfly,
`x = A − B` and `y = W`. For the squared distance, `x = y = A − B`.

Every operation takes one cycle. It reads the `A`/`B` values held at the
start of the cycle; `X`, `Y`, the accumulators and the result latch update at
the clock edge that ends it. Loading the next operands and executing the
current operation overlap, so one operation issues per cycle.

| `op`     | result |
|----------|--------|
| `BFLY`   | `X = A+B`, `Y = (A−B)·W` (Q1.15, truncated). `scale` halves `A+B` and `A−B` first (per-stage scaling for FFTs). `conj_w` uses `cos − j·sin` (forward FFT). |
| `CADD`   | `X = A+B`, `Y = A−B` (halved with `scale`) |
| `CMUL`   | `Y = A·B`, Q1.15 |
| `RMUL`   | `X = AR·BR`, `Y = AI·BI`, full 32-bit products |
| `ACS`    | see below |
| `SQD`    | `ACCR += (AR−BR)² + (AI−BI)²` |
| `CMAC16`, `RMAC16`, `CMAC8`, `RMAC8` | see the FIR schedules below |
| `FLUSH`  | latch the results of the iteration in progress |

`X` and `Y` are 32-bit registers `{XH, XL}` and `{YH, YL}` (real part high).

### Sub-word multipliers (`subword_mult`)

Each 16x16 multiplier is built from four 9x9 signed multipliers working on
the byte halves. In 16-bit mode the low bytes are zero-extended, and
`hh·2¹⁶ + (hl + lh)·2⁸ + ll` is the signed 32-bit product. In split mode all
four bytes are sign-extended, and the four 16-bit products are used
separately.

### Add-compare-select

`A` holds the two path metrics `p0, p1`; `B` holds the branch metrics
`d0, d1`. The complex adder forms `s0 = p0 + d0` and `s1 = p1 + d1`, and the
subtractor forms `s1 − s0`. Its sign bit is the decision: 1 means the path
through `p1` has the smaller metric and survives. The decision is shifted
into bit 0 of the 32-bit `acs_q` for traceback. `X = {s0, s1}`,
`Y = {survivor, 15'b0, decision}`. Metrics wrap modulo 2¹⁶, and the sign of
the modular difference decides, which is the usual way to avoid
renormalisation.

### MAC modes and their FIR schedules

The notation is `Y(n) = Σ_k C(k)·X(n−k)`, with coefficients `C` and samples
`X`. An **iteration** is the run of MAC steps that finishes one group of
outputs. Its first step carries `first = 1`. On that step the unit does three
things in the same cycle:

1. copies the finished outputs of the previous iteration into the result
   latch `yout[0..3]` (`yvalid` is high in the following cycle);
2. restarts the accumulators of the new outputs;
3. moves the partial sums carried for later outputs into their accumulators.

The multipliers therefore never idle between iterations. After the last
iteration, `FLUSH` latches the final group. The first latch after a mode
change returns whatever the accumulators held before: discard it. Start a
filter with one warm-up iteration over zero samples so that the carried sums
begin at zero.

**`CMAC16` — one 16x16 complex MAC per cycle.** `A = C(k)`, `B = X(n−k)`;
`ACCR + j·ACCI += A·B`. One output per K cycles.
`yout = {ACCR, ACCI}`.

**`RMAC16` — four 16x16 real MACs per cycle.** Load two consecutive
coefficients into `A` and two consecutive samples into `B`:

```
step i:  A = {C(2i), C(2i+1)}      B = {X(n−2i), X(n−2i−1)}
  m0 + m1 = C(2i)X(n−2i) + C(2i+1)X(n−2i−1)   -> ACCR    (Y(n))
  m2      = C(2i)X(n−2i−1)                    -> ACC-AUX (Y(n−1), even taps)
  m3      = C(2i+1)X(n−2i)                    -> ACCI    (Y(n+1), odd taps)
```

After K/2 steps `ACCR = Y(n)` and `ACC-AUX = Y(n−1)`. The next iteration is
for `n+2`. Its first step moves `ACCI` (the odd-tap half of `Y(n+1)`) into
`ACC-AUX` and clears `ACCR` and `ACCI`. That gives two outputs per K/2
cycles. `yout = {Y(n), Y(n−1)}`.

**`CMAC8` — four 8x8 complex MACs per cycle.** Every 16-bit word holds an
8-bit complex value `{re, im}`. The same A/B loading as `RMAC16`
(`A = {C(k), C(k+1)}`, `B = {X(n−k), X(n−k−1)}`) gives four complex 8x8
products. Each goes to its own complex 24-bit accumulator:

```
acc0 += C(k)·X(n−k)      acc1 += C(k+1)·X(n−k−1)      -> Y(n) = acc0 + acc1
acc2 += C(k)·X(n−k−1)                                 -> Y(n−1)
acc3 += C(k+1)·X(n−k)                                 -> half of Y(n+1)
```

At the start of an iteration, `acc3` moves to `acc2`. That gives two complex
outputs per K/2 cycles.
`yout = {Re Y(n), Im Y(n), Re Y(n−1), Im Y(n−1)}`.

**`RMAC8` — sixteen 8x8 real MACs per cycle.** `A` and `B` each hold four
consecutive 8-bit values:

```
AR = C(k) C(k+1)   AI = C(k+2) C(k+3)   BR = X(n−k) X(n−k−1)   BI = X(n−k−2) X(n−k−3)
```

Each multiplier splits into byte products `hh, hl, lh, ll` (high byte first).
The 16 products are steered as follows:

| multiplier | hh | hl | lh | ll |
|---|---|---|---|---|
| m0 = AR·BR | Y(n) | Y(n−1) | Y(n+1) | Y(n) |
| m1 = AI·BI | Y(n) | Y(n−1) | Y(n+1) | Y(n) |
| m2 = AR·BI | Y(n−2) | Y(n−3) | Y(n−1) | Y(n−2) |
| m3 = AI·BR | Y(n+2) | Y(n+1) | Y(n+3) | Y(n+2) |

Seven 24-bit accumulators collect `Y(n)…Y(n−3)` and the partial sums of
`Y(n+1)…Y(n+3)`. At the start of the next iteration (for `n+4`) the three
partial sums move into the `Y(n−3)`, `Y(n−2)` and `Y(n−1)` accumulators:
relative to `n+4` they are those outputs. That gives four outputs per K/4
cycles. `yout = {Y(n), Y(n−1), Y(n−2), Y(n−3)}`.

K must be a multiple of 2 (`RMAC16`, `CMAC8`) or of 4 (`RMAC8`). Pad with
zero taps otherwise.

### Data layout that feeds the schedules

With `A` from one bus transfer and `B` from another, a MAC step needs two
cycles when both coefficients and samples come from memory. It needs one
cycle when the coefficients sit in the register file (short filters).
Example layout for `RMAC8`:

```
bank 0 word j = {X(4j+3), X(4j+2)}      bank 1 word j = {X(4j+1), X(4j)}
coefficient word i: bank 0 = {C(4i), C(4i+1)}, bank 1 = {C(4i+2), C(4i+3)}
iteration n = 4t+3, step i reads sample word j = t − i
```

Words at negative addresses (which wrap to the top of the bank) must be
zero for the filter start-up.

## FFT with the butterfly

An N-point radix-2 DIF FFT runs in place on the I/Q banks. For the pair
`(p, p+h)` in the stage of half-span `h`, the twiddle index is
`(p mod h)·1024/(2h)`. Use `BFLY` with `conj_w = 1` and `scale = 1` (each
stage halves, so the result is the DFT divided by N). The output is in
bit-reversed order. The unit can start one butterfly per cycle. Fed from
the two single-port banks, a butterfly needs four word reads and four word
writes, so the memory side sets the pace. The tests use seven cycles per
butterfly without overlap (8 points in `tb_dsp_top`, 64 and 1024 points in
`tb_fft_workload`). 1024 points is the largest length: it fills both banks
and uses every entry of the twiddle table.

## Control word and timing summary

`dsp_pkg::ctrl_t` fields, one word per cycle:

* `seq_op`, `cond`, `target` — next PC: next / jump / branch on
  `cond` (EQ, NE, LT, GE, CS, VS) / call / return / return from interrupt /
  hold. An enabled interrupt pushes the address the program would have gone
  to next and jumps to `IRQ_VECTOR` (4). It masks further interrupts until
  the return from interrupt.
* `imm` — immediate for register writes, ALU operand `b`, DAG loads, ROM
  index and NCO loads.
* `dag_ld`, `dag_md`, `dag_inc` — load address register / modifier from
  `imm`, or post-modify (address += modifier), for each of the two address
  registers.
* `mem_we[1:0]`, `mem_wsrc` — write banks 0/1 from the register file
  (`qa`, `qb`), `X` or `Y`.
* `ra`, `rb`, `rw`, `rf_we`, `rf_wsrc`, `bm_rsel` — register reads and
  write-back from ALU, shifter, memory bus 0/1, `imm`, a 16-bit half of
  `X`/`Y`, a `yout` word shifted right arithmetically by `shamt` (bits
  `[shamt+15:shamt]`, to return a fixed-point sum to 16 bits), or the ACS
  queue.
* `alu_op`, `alu_b_imm`, `flags_we`, `shf_op`, `shamt`.
* `ld_a`, `ld_b`, `a_src`, `b_src`, `bm_op`, `bm_first`, `bm_scale`,
  `bm_conj`.
* `rom_rd`, `rom_from_nco`, `nco_ld_freq`, `nco_ld_phase`, `nco_step`.

Latencies: memory and ROM reads take 1 cycle. DAG, NCO, register and flag
updates are visible the next cycle. A `bfly_mac` result appears the cycle
after its operation. `yout` changes, and `yvalid` is high, in the cycle after a
`first` or `FLUSH` step.

## What follows the original design and what is this design's own

Taken from the original architecture:

* the unit list and the bus structure;
* 1K-word I/Q data banks and 1K-word cos/sin ROMs used as both twiddle table
  and NCO table;
* the DIF butterfly with complex adder, subtractor and four multipliers;
* ACS on the adder/subtractor with the subtractor's sign bit stored in a
  32-bit queue;
* squared distance on the butterfly unit;
* splitting each 16x16 multiplier into four 8x8 ones;
* the operand pairing and the accumulator moves of all four FIR schedules;
* the accumulator widths (40-bit ACCR/ACCI/ACC-AUX, 24-bit single-precision
  accumulators);
* the per-cycle rates.

Chosen here, because the original gives no detail:

* the control word and operation encodings, and all operand and write-back
  multiplexers;
* Q1.15 twiddles rounded from `32767·cos/sin`, truncation of products, and
  optional per-stage halving;
* two's-complement wrap-around in every accumulator, with no saturation;
* the ACS decision polarity and queue shift direction;
* the result latch `yout` with `first`/`FLUSH`. The original chip had ten
  24-bit accumulators next to its three 40-bit ones. This core uses eight
  24-bit accumulators plus four 40-bit result registers. The exact use of
  the original's ten is unknown.
* the write-back of a `yout` word to the register file through a right
  shift by `shamt`;
* register file size (16x16), ALU operations and flags, shifter operations;
* the 16-bit PC, 8-entry return stack, interrupt vector and masking;
* DAG post-modify addressing (no bit-reversed or circular modes);
* synchronous, write-first single-port memories;
* a synchronous active-low reset for all registers except memories.

Not included:

* the instruction decoder and its instruction set;
* the program memory (off-core);
* pads and other chip-level parts.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog.

| testbench | what it checks |
|---|---|
| `tb_subword_mult` | 16x16 and 8x8 products against integer multiplication, corners included |
| `tb_bfly_mac` | BFLY/CADD/CMUL/RMUL/ACS/queue against integer models; SQD; streaming FIRs in all four MAC modes against direct convolution, with the cycle count of each schedule |
| `tb_acs_queue`, `tb_data_sram`, `tb_twiddle_rom`, `tb_nco`, `tb_dag`, `tb_regfile`, `tb_alu`, `tb_shifter` | each against a reference model or known values |
| `tb_prog_seq` | random next/jump/branch/call/return/RTI/hold and interrupts against a stack model, overflow included |
| `tb_dsp_top` | the whole core at full size, run by a program: loop with taken/untaken branches, an interrupt, a subroutine, an 8-point FFT (bit-exact and against a floating DFT), an 8-tap `RMAC8` FIR at one step per cycle, an ACS, an NCO phasor. Counts that each of these happened |
| `tb_fir_workloads` | full core: 8-bit complex FIR 4 taps x 8 samples, 8-bit real FIR 8 x 16 and 256 x 2048, every output checked; prints the cycle count |
| `tb_fft_workload` | full core: in-place 64- and 1024-point DIF FFTs of a two-tone signal with noise, bit-exact against a fixed-point model and within tolerance of a floating DFT divided by N |
| `tb_iir_workload` | full core: 8-tap real IIR (four feed-forward, four feedback taps) over 1000 samples at one output every five cycles; every sum of products bit-exact, outputs fed back through the register file, deviation from floating point |
| `tb_ciir_workload` | full core: complex IIR with four feed-forward and four feedback complex taps over 600 samples at one output every nine cycles; checked the same way |
| `tb_sqd_workload` | full core: nearest-codeword search, 64 codewords of 16 dimensions against a query in the register file; each squared distance exact, one every eight cycles |
| `tb_viterbi_workload` | full core: 8-state, rate 1/2 Viterbi decoding of 128 steps at one ACS per cycle; every decision bit and the final path metrics against a model, traceback from the decision queue, decoded message against the sent one |

The 256 x 2048 real FIR takes 65,663 cycles on this core, at two cycles per
MAC step with both operands from memory. The original design reported
70,656 cycles for the same filter, including its program overhead.

The 1024-point FFT takes 7 cycles per butterfly (35,840 cycles for 5,120
butterflies) in the control sequence the testbench uses: the butterfly unit
itself accepts one butterfly per cycle, but with single-port I/Q banks an
in-place butterfly needs two reads and two writes per bank, so at least four
cycles. The largest deviation from the exact DFT/N is about 3 LSB after ten
halving stages.

The IIR test shows how a recursive filter keeps the multipliers busy.
`RMAC16` adds two real products to `ACCR` per cycle, so eight taps take four
cycles. The newest output is used in the last of them: it is latched into
`yout` by the first MAC of the next output, written to the register file
shifted right by 14 in the cycle after, and loaded into `B` one cycle later.
With one idle cycle per output this gives K/2 + 1 cycles per sample.
The complex version uses `CMAC16`, one complex tap per cycle, and writes
the real and imaginary parts back in two successive cycles: 2K + 1 cycles
per sample. Eight coefficient and eight history registers fill the
register file, so K = 4 is the largest order with this operand placement.

The Viterbi test runs the add-compare-select in a four-deep software
pipeline: in one cycle the DAG steps to the next branch-metric pair, A and B
are loaded with the two predecessor path metrics (register file) and the two
branch metrics (I and Q banks), the ACS of the previous state runs, and the
survivor metric of the one before is written back. With eight states this
reaches one state per cycle without stalls, because a state's predecessors
are finished at least two cycles before the next step reads them. Path
metrics alternate between r0..r7 and r8..r15. The decision queue holds four
trellis steps and is read from the `acs_q` output every four steps;
traceback runs outside the core.

Running a testbench with Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_dsp_top \
    -y rtl -y tb +libext+.sv rtl/dsp_pkg.sv tb/tb_dsp_top.sv
./obj_dir/Vtb_dsp_top
```

Replace `tb_dsp_top` with any other testbench name. All simulations finish
in seconds. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/dsp_pkg.sv rtl/<module>.sv`.
The only lint warnings left are unused flag-position constants and unused
bits (upper `imm` bits in the DAG, the low bits of the ACS difference).

## Files

`rtl/dsp_pkg.sv` holds the types and the control word. Each other file in
`rtl/` is one module, named after the file. `dsp_top` is the top level;
`bfly_mac` instantiates `subword_mult` and `acs_queue`. `tb/` holds the
testbenches.
