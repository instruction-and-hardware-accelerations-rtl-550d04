# Speech-coder acceleration datapath (G.723.1 / G.729)

Low-bit-rate CELP speech encoders such as G.723.1 (6.3 and 5.3 kbit/s) and
G.729 (8 kbit/s) spend most of their cycles in a few patterns of 16/32-bit
fixed-point arithmetic. The worst of them, in the G.723.1 6.3 kbit/s encoder,
is the multi-pulse search for the fixed-codebook excitation. Its inner loop
runs up to 288 times per frame over 30 candidate positions:

```
for l = 0, 2, ..., 58:
    skip l if it is already occupied
    WrkBlk[l] -= Pamp * ImrCorr[ |l - Ploc_prev| ]      (saturating MSU)
    a = |WrkBlk[l]|
    if a > best: best = a; Ploc = l                     (compare, move, store index)
```

On a plain DSP the last four steps (absolute value, 32-bit compare, branch,
move, store of the loop index) take 3 to 8 cycles. The table fetch costs more
than one cycle too, because the address depends on an absolute value.

This RTL adds the hardware that removes both costs, plus a few smaller
instruction-level helpers:

| unit | file | what it adds |
|---|---|---|
| MAC / conditional-move datapath | `rtl/mac_cmove_dp.sv` | two 38-bit accumulators ACR1/ACR2 and a one-cycle `|ACR1|` compare-and-move with loop-index store |
| multiplier branch | `rtl/mult17.sv` | R1/R2, 17x17 multiplier, R3, guard; fractional or integer mode, x = y feed |
| offset calculation | `rtl/offset_calc.sv` | `|loop counter - REG|` in two adders |
| address generator | `rtl/agu.sv` | segment address + offset, or address + step |
| loop counter | `rtl/loop_counter.sv` | down-counter with a variable step, plus the index register |
| max / amax | `rtl/max16.sv` | `b = max(|a|, b)` or `b = max(a, b)` in one instruction |
| divider | `rtl/divider.sv` | DIV_S / 32-by-16 division, one quotient bit per cycle |
| normalizer | `rtl/normalizer.sv` | NORM_S / NORM_L leading-sign count |
| memories | `rtl/sram_1r1w.sv` | 16-bit data and coefficient memories |
| top | `rtl/g72x_accel_top.sv` | all of the above, wired together |

Shared widths, the instruction encoding and the saturation helpers are in
`rtl/g72x_pkg.sv`.

## The conditional move with loop index

This is the core of the design (`mac_cmove_dp`). The instruction `DP_CMOV`
does the whole `a = L_abs(a); if (a > b) { b = a; idx = l; }` sequence in one
issue slot:

1. **Absolute value in a 32-bit adder.** The low 32 bits of ACR1 go through a
   32-bit adder whose input is bit-inverted when the sign bit is set, with the
   sign bit as the carry in. That is a two's-complement negate for negative
   values and a pass-through otherwise. |0x80000000| is saturated to
   0x7fffffff, as the reference `L_abs` does. With `abs_en = 0` the adder is
   bypassed and ACR1 is compared as it is.
2. **Compare in the accumulator adder.** The 38-bit ACC adder, otherwise used
   for MAC/MSU, subtracts the candidate and ACR2. The sign bit of the
   difference is the decision, so no branch is needed.
3. **Move and index store.** The sign bit selects the value for the
   destination register (`dst`: ACR2, the usual reference, or ACR1). When the
   candidate wins and the instruction's `idx_st` bit is set, the datapath
   raises `idx_we` with the loop-counter value
   that was issued with the instruction (`idx_out`). The loop counter then
   writes that value into its index register. When the maximum goes to ACR2
   and `abs_en` is set, ACR1 also receives |ACR1|, because the reference loop
   overwrites its accumulator with its absolute value too.

### Why `>=` (the `ge` bit)

The C loop counts **up** and moves on a strict `>`. Among equal maxima it
therefore keeps the **lowest** position. A hardware loop counter counts
**down**: with `>` it would keep the highest position, and the result would
no longer match the reference bit for bit. With `ge = 1` the move happens on
`>=`: the lowest position is visited last and wins the tie. The loop counter
can keep counting down. The end-to-end testbench builds such a tie on
purpose. The `ge = 0` form (`>`) is still available.

### Pipeline

Every datapath instruction goes through the same three stages:

| edge | stage |
|---|---|
| k | operands into R1/R2, control into the pipe |
| k+1 | product into R3 |
| k+2 | ACC adder and saturation; ACR1/ACR2 written; `idx_we` registered |

All instructions, whether or not they multiply, take effect at edge k+2 and
in issue order. So there are no hazards between datapath instructions.
Throughput is one instruction per cycle, the conditional move included
(`tb_mac_cmove_dp` issues them back to back). A result is visible in the
cycle after edge k+2; the caller must leave that gap before it reads or
stores ACR1.

### Instruction word (`dp_ctrl_t`)

| field | meaning |
|---|---|
| `op` | `DP_NOP`, `DP_LDH` (ACR <= data << 16, sign-extended), `DP_LDL` (ACR[15:0] <= data), `DP_MUL`, `DP_MAC`, `DP_MSU`, `DP_CMOV`, `DP_CLR` |
| `dst` | 0: ACR1, 1: ACR2 |
| `frac` | 1: fractional product (<< 1, and -32768 * -32768 saturates to 0x7fffffff); 0: integer |
| `sq` | feed the x word to both multiplier inputs (autocorrelation) |
| `x_uns`, `y_uns` | operand is unsigned: the 17th multiplier bit is 0. Used for the low halves of 32x16 products |
| `sat` | saturate the ACC result to 32 bits; otherwise the 6 guard bits are kept |
| `abs_en`, `ge` | `DP_CMOV` only: take the absolute value first; move on `>=` |
| `idx_st` | `DP_CMOV` only: raise `idx_we` when the move happens. Clear it for a plain conditional move with no index |

## The table fetch: offset calculation and address generator

The correlation value needed in each iteration is `ImrCorr[|l - Ploc_prev|]`.
`Ploc_prev` does not change during the loop, so it is held in the register
**REG** in the top. `offset_calc` forms `l + ~REG + 1 = l - REG`. The sign bit
selects that value or its inverse, and a second adder adds the sign bit back
in. The result is the absolute distance, computed combinationally from the
loop counter.

`agu` adds two selected inputs into its address register:

| `a_sel` | `b_sel` | next address |
|---|---|---|
| 0 | 0 | segment + offset (table base + distance) |
| 1 | 1 | address + step (post-modify) |
| 0 | 1 | segment + address |
| 1 | 0 | step + offset |

With the ImrCorr base in the segment register and the offset taken from
`offset_calc`, each correlation fetch needs one address cycle and no
pointer arithmetic in software. The loop counter (`loop_counter`) counts down
from 58 in steps of 2. Its `last` flag marks the iteration with count 0, and
`done` rises after it.

## Top level and how to drive it

`g72x_accel_top` is the datapath part of a DSP. The program sequencer,
instruction decoder and general register file that would drive it are not
included. Instead, each unit is controlled by its own group of ports, one
operation per unit per cycle:

* datapath: `dp_issue`, `dp_ctrl`. x comes from the data memory read data, y
  from the coefficient memory read data, and the loop index from the loop
  counter.
* addressing: `seg_*`, `agu_*`, `ofs_sel` (0: `offset_calc`, 1: `ofs_in`),
  `ref_we`/`ref_in` for REG.
* loop: `lc_load`, `lc_init`, `lc_step`, `lc_dec`. `stored_idx` is the index
  register written by the conditional move.
* data memory (1024 x 16): read at the AGU address, or at `dm_raddr_ext` when
  `dm_rsel_ext` is set. Data returns one cycle after the read edge. It is
  written by the host port (`dm_we_ext` ...), or by `st_en`, which stores the
  high (`st_hi`) or low half of the saturated ACR1 at the AGU address. An
  assertion forbids both writes in one cycle.
* coefficient memory (1024 x 16): plain read and write ports.
* `mx_*` (max/amax, combinational), `div_*` (divider), `norm_*` (normalizer,
  combinational).

`tb/tb_g72x_accel_top.sv` is a complete example program. It runs the pulse
search one iteration at a time: address, load WrkBlk[l] high and low halves,
fetch ImrCorr through segment + offset, MSU, store back, `DP_CMOV` with
`abs_en` and `ge`, decrement. This schedule is sequential and takes 10 cycles
per position because the testbench waits for each result. A real program
would overlap iterations; the datapath accepts one instruction per cycle.

## Smaller units

* **max16**: `amax a, b` sets b to max(|a|, b), and `max a, b` sets b to
  max(a, b). The compare is strict `>`, and |-32768| saturates to 32767. The
  unit is combinational; writing b back is the register file's job.
* **divider**: restoring division, 15 iterations for a Q15 quotient. `done`
  pulses 16 clock edges after the start edge, with the quotient. In DIV_S mode
  (`long_mode = 0`) it computes num/den for 0 <= num <= den, like the
  reference `div_s`; num == den gives 0x7fff. With `long_mode = 1` the 32-bit
  numerator is divided by den * 65536 in the same way: a 32-by-16 division
  with a Q15 result. Operands outside the domain set `err`.
* **normalizer**: the number of left shifts that normalize a 16-bit
  (`long_mode = 0`) or 32-bit value. It gives 0 for 0 and 15/31 for -1, like
  `norm_s`/`norm_l`.

## What follows the source design and what is this implementation's own

Taken from the design description:

* ACR1/ACR2 and the 32-bit adder for the absolute value, fed from ACR1.
* The 38-bit ACC with carry in and saturation.
* The compare decided by the result's MSB.
* The control signal that stores the loop counter value.
* The 17x17 multiplier with R1/R2/R3 and guard stages, and the 16/32/33/38-bit
  bus widths.
* Fractional and integer multiply, and the x = y operand feed.
* The `>=` branch option for the decrementing loop counter.
* REG, the offset datapath `|loop counter - REG|`, and the segment
  address / step / offset address generator.
* A loop counter with step 2.
* The amax/max instructions.
* Hardware division at about one cycle per quotient bit, and a normalization
  instruction.

Choices made here, where the description is silent:

* The instruction encoding, the LDH/LDL loads, the optional saturation bit and
  the ACR1 store path to memory.
* The three-stage timing, and carrying the loop index down the pipeline.
* The multiplexer encodings of the address generator.
* The loop counter's end condition and interface.
* The memory depths (1024 words) and the synchronous read.
* The address and counter widths (16 bits).
* The DIV_32 algorithm and the divider's handshake.
* The use of the 17th multiplier bit for unsigned operands.
* An asynchronous active-low reset on all control and datapath registers. The
  memories are not reset.

Known limits:

* There is no instruction decoder or program sequencer, so whole encoders
  cannot run. Only the kernels that the units accelerate can run.
* Only the 32-bit conditional move is merged into one instruction. The 16-bit
  move with loop index (`max`/`amax` that also records a position) is left to
  software.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with an independent model written inside the testbench and
prints `TB_RESULT checks=N failures=M`:

* `tb_mac_cmove_dp`: 3000 random back-to-back instructions against a 64-bit
  integer model. The checks are exact at edge k+2, and include ties under `>`
  and `>=`, |0x80000000|, saturation and the guard bits.
* `tb_cmove_frame`: a frame-sized load. It issues 10869 multiply +
  conditional-move pairs back to back, the per-frame worst case of the
  6.3 kbit/s encoder. It checks the maximum, the index and that the run
  takes exactly 2 x 10869 + 2 cycles.
* `tb_mult17`: all operand modes, with a two-cycle latency check.
* `tb_agu`, `tb_offset_calc`, `tb_loop_counter`, `tb_max16`, `tb_divider`
  (including its latency), `tb_normalizer` and `tb_sram_1r1w`: the unit tests
  of the smaller blocks.
* `tb_g72x_accel_top`: three complete pulse searches at the default sizes,
  compared with a model of the original C loop (incrementing index, `>`). They
  cover a tie, saturation, occupied positions and positions above and below
  REG. The test also uses the max, divide and normalize units and an
  integer-mode x = y product. Each of these mechanisms is counted and must
  occur.

Running a test with Verilator 5 (the package goes first):

```
verilator --binary --timing --assert rtl/g72x_pkg.sv \
  rtl/mult17.sv rtl/mac_cmove_dp.sv rtl/agu.sv rtl/offset_calc.sv \
  rtl/loop_counter.sv rtl/max16.sv rtl/divider.sv rtl/normalizer.sv \
  rtl/sram_1r1w.sv rtl/g72x_accel_top.sv tb/tb_g72x_accel_top.sv \
  --top-module tb_g72x_accel_top
./obj_dir/Vtb_g72x_accel_top
```

For a unit test, replace the file list with the package, the unit (plus
`mult17.sv` for the datapath) and its testbench.
