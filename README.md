# Reconfigurable lifting DWT engine

This engine computes 2-D discrete wavelet transforms of an image in an
external frame memory. Both the **wavelet filter kernel** and the
**decomposition structure** are chosen at run time:

* A kernel is a list of up to four *lifting steps*. Each step updates one
  polyphase channel with a scaled sum or difference of two neighbours from
  the other channel. Every step runs on the same small core cell (the MCU).
  A kernel with more steps than there are cells is *folded*: each
  processing element (PE) runs several steps in turn and takes a new sample
  pair less often.
* A decomposition structure is a *program of passes*. One pass runs the
  1-D transform along the rows or along the columns of one subband. A
  dyadic transform, a full wavelet packet transform or any irregular packet
  tree is just a different list of passes.

Both descriptions sit in context memories. Each memory has fixed default
entries and user-writable RAM entries. Switching kernel or structure between
two transforms costs nothing beyond the start cycle.

With the default two PEs, the (5,3) kernel runs at 2 samples per clock. The
four-step (9,7) kernel is folded by two and runs at 1 sample per clock. At
50 MHz, the (5,3) rate is enough for a four-level full wavelet packet
transform of 720x576 video at 30 frames/s: simulated, a frame takes
1,660,411 cycles against a budget of 1,666,666.

## Block structure

```
                    AG context memory (PLA programs 0-2 | RAM program 3)
                                   | pass descriptor
                                   v
                   +------ WPT address generator ------+
                   | read addr            write addr   |
                   v                                   v
 frame  --->  Input Unit  --->  PE array  --->  Output Unit  ---> frame
 memory       (2 samples/rd)    PE0 -> PE1      (2 samples/wr)     memory
                                   ^
                                   | kernel context
                    PE context memory (PLA (5,3),(9,7) | RAM 4 entries)
```

| module | role |
|---|---|
| `rdwt_top` | wires everything; start/busy/done; frame memory ports |
| `dwt_pkg` | types, sizes, default kernels and programs |
| `mcu` | core cell `D = A + alpha*(B op C)` |
| `dwt_pe` | one PE: MCU, operand mux, feedback and lifting registers, phase FSM |
| `dwt_pe_array` | `NUM_PE` PEs in a chain; spreads the kernel's steps over them |
| `pe_context_memory` | kernels: PLA defaults plus RAM |
| `ag_context_memory` | pass programs: PLA defaults plus RAM |
| `addr_gen` | one address generator: two FSM/counter pairs and a row/column mux |
| `wpt_ag` | read and write address generators plus the pass sequencer |
| `input_unit`, `output_unit` | frame memory read and write interfaces |

## Lifting steps and the MCU

A line of `2M` samples is split into `s[n] = x[2n]` and `d[n] = x[2n+1]`.
There are two kinds of step:

* **Predict** (`TGT_ODD`): `d[n] += alpha * (s[n] op s[n+1])`
* **Update** (`TGT_EVEN`): `s[n] += alpha * (d[n-1] op d[n])`

Here `op` is `+` (`MCU_ADD`) or `-` (`MCU_SUB`). With `MCU_SINGLE` the step
uses only the same-index sample (`s[n]` or `d[n]`), which gives Haar-like
steps. The three modes are the three basic computing units of a lifting
architecture. The MCU is one adder/subtractor, one multiplier and one adder:

```
D = A + round( alpha * (B op C) )
```

Number formats (set in `dwt_pkg`):

* Samples are 16-bit signed (`C_DATA_W`).
* `alpha` is 16-bit signed with 12 fraction bits (`C_COEF_W`, `C_COEF_FRAC`).
* The product is rounded half up, and the sum wraps to 16 bits.

This rounding makes `alpha = -1/2` and `alpha = +1/4` produce the
integer-to-integer (5,3) transform exactly (the JPEG 2000 reversible
filter).

Line ends use whole-sample symmetric extension: `s[M] := s[M-1]` and
`d[-1] := d[0]`. Every line must therefore have an even number of samples.

The two PLA kernels:

| context | kernel | steps (alpha in Q12) | fold |
|---|---|---|---|
| 0 | (5,3) | predict -1/2 (-2048), update 1/4 (1024) | 1 |
| 1 | (9,7) | predict -1.586134342 (-6497), update -0.052980118 (-217), predict 0.882911076 (3616), update 0.443506852 (1817) | 2 |

The final (9,7) scaling by K and 1/K is **not** applied: the outputs are the
unscaled lifting coefficients. Apply K outside if you need it, or fold it
into later quantisation.

## Folding the steps onto the PE array (the core of the design)

A kernel with `S` steps runs on `NUM_PE` PEs with fold factor
`F = ceil(S / NUM_PE)`, which the context gives. PE `p` runs steps
`p*F ... p*F+F-1`.

Each PE has one MCU and a phase counter `0..F-1`:

* **Phase 0** runs the PE's first step on the pair arriving at the PE input.
  This is the only phase in which the PE takes a new pair (`in_ready`).
* **Phase k > 0** runs step k on the result of phase k-1. That result waits
  in the **feedback register**.
* After the PE's last step, the result goes to the **output register**.
  There it meets the next PE in that PE's phase 0. Every PE loads its
  configuration in the same cycle, so the phases of all PEs stay aligned.

The data needed between pairs is kept in **lifting registers**, one set per
step:

* **Predict step.** It needs `s[n+1]` before it can finish pair `n`, so pair
  `n` waits in the step's hold registers until pair `n+1` arrives.
  * At a line end, the held pair leaves in the step's next slot, using its
    own `s` as the mirrored neighbour.
  * That slot is always free: the first pair of the next line produces
    nothing when it arrives, because it waits in turn.
  * So lines stream back to back with no bubble.
* **Update step.** It keeps `d[n-1]` in a register. On the first pair of a
  line it uses `d[0]` instead.

Each pair carries `first`/`last` flags, set by the address generator, that
mark the line boundaries.

Measured rates, for an input that is always available:

| steps | fold | samples/cycle | MCU utilisation |
|---|---|---|---|
| 2, e.g. (5,3) | 1 | 2 | 100 % |
| 3 | 2 | 1 | 75 % |
| 4, e.g. (9,7) | 2 | 1 | 100 % |
| 1 | 1 | 2 | 50 % (second PE passes data through) |

Kernels whose lifting steps have more than two taps, such as some
factorisations of (13,7), must first be rewritten as two-tap steps.

## Decomposition programs and addressing

Coefficients are written back **in place**. After a pass over a subband:

* The low-pass result of each pair sits where the pair's even sample was.
* The high-pass result sits where the odd sample was.

A subband after `l` decompositions is therefore the set of samples at rows
`ro + k*2^l` and columns `co + m*2^l`, with offsets `ro, co < 2^l`. Its
pairs are samples `2^l` apart. Decomposing it again gives four subbands at
level `l+1`, with offsets `ro` or `ro + 2^l` and `co` or `co + 2^l`.

A pass descriptor (`pass_t`) has these fields:

* `dir`: row pass or column pass.
* `level`: `l`.
* `row_off`, `col_off`: the subband offsets.
* `last`: marks the last pass of the program.

Each address generator (`addr_gen`) works as follows:

* **FSM0 and counter 0** walk along the line, pair by pair. They start at
  the along-line offset and add `2^(l+1)` per pair.
* **FSM1 and counter 1** walk across the lines. They start at the other
  offset and add `2^l` per line.
* **The Mux** sends the two counters to the row and column address
  outputs, swapping them for column passes.
* The line length is `img_w >> l` for a row pass, or `img_h >> l` for a
  column pass.

The read generator advances on every read that the Input Unit issues. The
write generator advances on every pair that leaves the PE array.

The **pass sequencer** in `wpt_ag` starts both generators on each
descriptor. It waits until the write generator has finished and the last
write has reached the memory, then loads the next descriptor. This order
matters because a column pass must read what the row pass just wrote. Each
pass costs about 10-15 extra cycles of pipeline drain.

PLA programs (`prog_sel`):

| prog | structure | passes |
|---|---|---|
| 0 | one-level 2-D transform | 2 |
| 1 | three-level dyadic (only LL is split again) | 6 |
| 2 | four-level full wavelet packet (every subband is split) | 170 |
| 3 | RAM: up to 64 user descriptors, e.g. an irregular packet tree | - |

In program 2, subband `k` of level `l` has `row_off = sum k[2m+1] << m` and
`col_off = sum k[2m] << m`. Each subband gets a row pass followed by a column
pass. Image width and height must be multiples of `2^levels`. A 720x576
frame works for four levels, since the level-3 lines are 90 and 72 samples
long.

## Programming and running

1. Optionally write kernels into the PE context RAM (`pe_ctx_we`,
   `pe_ctx_waddr` 0..3). They are selected as `filter_sel` 2..5.
2. Optionally write pass descriptors into the AG context RAM (`ag_ctx_we`,
   `ag_ctx_waddr`). They are selected as `prog_sel` 3.
3. Set `filter_sel`, `prog_sel`, `img_w` and `img_h`, then pulse `start` for
   one cycle. `start` is ignored while `busy` is high.
4. The PE array loads the kernel in the start cycle. `busy` stays high until
   a one-cycle `done` pulse.

`pe_ctx_t` has these fields:

* `fold`: 1 or 2.
* `nsteps`: 1..4.
* `steps[0..3]`: each step is `{target, mode, coef}`, and `steps[0]` is
  applied first.

Choose `fold = ceil(nsteps / 2)`. An assertion in `dwt_pe_array` flags
contexts that do not fit.

### Frame memory interface

* **Read.** `fm_rd_en` requests two samples, at `fm_rd_row/col[0]` (the
  even sample) and `[1]` (the odd sample, `2^level` further along the line).
  The data must appear on `fm_rd_data[0..1]` in the next cycle.
* **Write.** `fm_wr_en` writes `fm_wr_data[0..1]` to `fm_wr_row/col[0..1]`
  at the clock edge.
* **Rate.** The unfolded kernel issues one read and one write per cycle, so
  the memory needs two-sample-wide read and write ports.

The memory itself is not part of this RTL. `tb/frame_mem_model.sv` is a
behavioural model of it.

Reset is asynchronous and active low.

## Departures and open points

These are choices of this implementation, not fixed by the architecture
it implements:

* The following are all choices of this design: the number formats, the
  rounding, the boundary rule, the neighbour convention of the steps, the
  in-place layout, the pass-descriptor format, and the handshakes between
  the blocks.
* The address generators start on the pass start event and advance on data
  transfers. They do not start at a programmed time slot, because the PE
  latency depends on the kernel.
* Only (5,3) and (9,7) are built-in kernels. The (9,3), (2,10) and (13,7)
  kernels fit the array (3 or 4 two-tap steps), but their lifting
  coefficients must be supplied through the RAM. The throughput test uses
  stand-in coefficients with the right step counts.
* The (9,7) K scaling is not applied (see above).
* Only the forward transform (analysis) has built-in contexts and a test.
  Inverse lifting has the same step structure. However, an exact inverse of
  the integer (5,3) transform would need a round-half-down option in the
  MCU, which is not built.
* The context RAM sizes (4 kernels, 64 pass descriptors) and the 10-bit
  row and column addresses are assumptions.

## Simulation

All files are SystemVerilog (IEEE 1800-2017). `rtl/dwt_pkg.sv` and, for
testbenches, `tb/dwt_ref_pkg.sv` must be read first. Example:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module rdwt_top_tb \
  -y rtl -y tb +libext+.sv rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/rdwt_top_tb.sv
./obj_dir/Vrdwt_top_tb
```

Every testbench prints `TB_RESULT checks=N failures=M`. Each compares the
hardware against `dwt_ref_pkg`, an array-based model that applies the same
integer lifting arithmetic to whole lines with no streaming.

| testbench | what it shows |
|---|---|
| `mcu_tb` | all modes against the formula; exact (5,3) integer steps |
| `dwt_pe_tb` | predict, update, folded, subtract, single-input and pass-through configurations on random lines; one pair per `fold` cycles |
| `dwt_pe_array_tb` | (5,3), (9,7), three-step and one-step kernels; samples per cycle and utilisation |
| `pe_context_memory_tb`, `ag_context_memory_tb` | default contents, full packet coverage, RAM write/read |
| `addr_gen_tb`, `wpt_ag_tb` | address sequences, pass ordering, done |
| `input_unit_tb`, `output_unit_tb` | pair assembly under stalls, in-place writes |
| `rdwt_top_tb` | 32x32 image: five transforms back to back (PLA and RAM kernels and programs, reconfiguration), bit-exact against the model, cycle bounds, and counts of each mechanism (unfolded/folded, stall, line-end extension, row/column passes) |
| `rdwt_table1_tb` | 64x64: the five kernel shapes of the performance table, measured samples/cycle |
| `rdwt_top_full_tb` | default parameters: 720x576, four-level full packet, (5,3), bit-exact, within the 30 frame/s budget at 50 MHz (about 2 s of simulation) |

Note on the synthesis report of `input_unit`: the first read address is the
generator's address unchanged, so those output bits are wired straight to
inputs.
