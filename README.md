# Register-less NULL Convention Logic: an eight-bit pipelined Kogge-Stone adder

NULL Convention Logic (NCL) is a clockless, quasi-delay-insensitive logic
style. Every bit travels on two wires (dual-rail), and a "NULL" spacer
separates every two DATA values, so a circuit can see for itself when its
result is complete. A conventional NCL pipeline puts a register of C-elements
between every pair of logic blocks so that a new wavefront cannot overrun the
one in front of it. Those registers and their completion detectors cost a
large share of the area and power.

This design removes them. Each logic block is built from power-gated (MTCMOS)
gates and is put to sleep between tokens. While a block sleeps, its output is
forced to NULL. The rule for waking and sleeping is chosen so that the block's
own output acts as the storage that the register used to provide. A block
evaluates the next DATA only after the previous NULL has travelled **two**
wavefronts ahead. It nullifies only after its DATA has travelled two
wavefronts ahead. The design applies this to an eight-bit adder with five
pipeline stages.

## Dual-rail encoding and gates

| (t, f) | meaning |
|--------|---------|
| (0, 0) | NULL: value not yet available |
| (0, 1) | DATA0 |
| (1, 0) | DATA1 |
| (1, 1) | never used |

`ncl_pkg::dr_t` is this pair. The design uses three kinds of gates:

* **Threshold gate THmn** (`th_gate`). Its output rises once at least M of its
  N inputs are 1. It falls only when all N inputs are 0, and keeps its value
  in between (hysteresis). TH22 is the C-element.
* **MTCMOS gate** (`mt_gate`). This is a power-gated gate with a Sleep-bar
  input `sleep_n`. When `sleep_n` is 0 the output is pulled to 0. When
  `sleep_n` is 1 the output rises as soon as its set function is true, and
  then holds 1 until the gate sleeps again. The set function is a positive
  sum of products of input rails, computed by the logic block that uses the
  gate. See "Why the gates hold" below.
* **MTNCL buffer** (`mtncl_buf`). This is a TH12 MTCMOS gate with both inputs
  tied. A plain wire cannot be put to sleep. Every signal that a block only
  forwards (carry-in, propagate bits, finished carries) therefore passes
  through one of these buffers, so it also drops to NULL when the block
  sleeps.

## The pipeline and its control

```
            I1           I2          I3          I4          I5          I6
 sender ==> [CD]   L1 ==>      L2 ==>      L3 ==>      L4 ==>      L5 ==> receiver
  a,b,cin    |      ^   |       ^   |       ^   |       ^   |       ^   |     |
             |      |   OR      |   OR      |   OR      |   OR      |   OR    |
          Kobar0  Sleep1 Ko1  Sleep2 Ko2  Sleep3 Ko3  Sleep4 Ko4  Sleep5 Ko5  ki (= Ko6)
```

Wavefront `Ii` is the input of stage `Si`, and `I(i+1)` is the output of
logic block `Li`. There are no registers: `I(i+1)` is the output of `Li`
itself. Each stage has one `rl_ctrl`, which does two things:

* **Completion by one OR gate.** When a block wakes, all of its gates start
  together. The output bit on the block's longest path is therefore the last
  to become DATA, and also the last to become NULL. An OR of that bit's two
  rails replaces a full completion detector: `Ko-bar(i)` = OR, and
  `Ko(i)` = NOT OR. `Ko(i)` = 1 means that `I(i+1)` is NULL.
* **Sleep control by one C-element.**
  `Sleep-bar(i) = C(Ko-bar(i-1), Ko(i+1))`.
  * The block wakes when DATA is at its input and NULL has reached `I(i+2)`.
  * It sleeps when NULL is at its input and its DATA has reached `I(i+2)`.

  Using `Ko(i+1)` rather than `Ko(i)` makes tokens keep a gap of one
  wavefront. Because of that gap, no register is needed.

### One token through a stage

Steps 1-7 below are the numbering that `tb_rlncl_ks_adder` uses in its
counters.

1. The block sleeps and its output is NULL. The next DATA reaches `Ii`, so
   `Ko-bar(i-1)` = 1. If `Ko(i+1)` is still 0, the block stays asleep and
   ignores the DATA. This is a **Step 1 wait**.
2. `Ko(i+1)` becomes 1: the previous NULL has reached `I(i+2)`. The block
   wakes.
3. The block's output becomes DATA.
4. The next NULL reaches `Ii`. The block is still awake and keeps its DATA
   output. This is a **Step 4 hold**.
5. `Ko(i+1)` becomes 0: the DATA has reached `I(i+2)`. The block sleeps.
6. The block's output becomes NULL.
7. Repeat from step 1 for the next token.

With five wavefronts `I2..I6`, at most three DATA tokens can be inside at
once: every other wavefront.

### Why the gates hold

The step order above has a consequence. The input of a block returns to NULL
(step 4) before the block is allowed to sleep (step 5). If an awake gate
simply followed its inputs, the block's DATA output would vanish at step 4.
When the next block is still busy, that DATA would be lost. In this design
each awake MTCMOS gate therefore keeps its 1 until it is put to sleep. This
is the design's own reading of the gate. A gate with only "set to 1" and
"hold 0" paths and no state would break the pipeline under back-pressure.

In RTL each held gate is a level-sensitive latch: reset by sleep, set by
its function. C-elements and THnn gates are latches too. Synthesis reports
186 latch bits for the adder:

* 180 gate outputs in L1-L5;
* 5 sleep C-elements;
* 1 input THnn gate.

Lint reports the handshake loop through `rl_ctrl` as circular logic. That
loop is the asynchronous circuit itself.

## The Kogge-Stone adder in five blocks

Carry-in is treated as the generate of position -1. `G[h:l]` and `P[h:l]` are
the group generate and propagate of bits l..h. `c[j]` is the carry into bit
j. The split into stages is fixed by the stage widths of the reference
implementation: 17, 24, 22, 18 and 9 dual-rail bits.

| block | work | output (`ncl_pkg` type) | bits | completion bit |
|-------|------|------------------------|------|----------------|
| `ks_l1` | g = a AND b, p = a XOR b; cin forwarded | `s1_t`: cin, g[7:0], p[7:0] | 17 | p[7] |
| `ks_l2` | span 1: c[1] = G[0:-1]; G/P[j:j-1], j=1..7 | `s2_t`: c[1:0], gg[7:1], pp[7:1], p[7:0] | 24 | gg[7] |
| `ks_l3` | span 2: c[2], c[3]; G/P[j:j-3], j=3..7 | `s3_t`: c[3:0], gg[7:3], pp[7:3], p[7:0] | 22 | gg[7] |
| `ks_l4` | span 4: c[4..7]; G[7:0], P[7:0] | `s4_t`: c[7:0], g7, p7, p[7:0] | 18 | c[7] |
| `ks_l5` | s[j] = p[j] XOR c[j]; cout = G[7:0] OR P[7:0]·cin | `s5_t`: cout, s[7:0] | 9 | s[7] |

The rail equations are the usual dual-rail ones (`ncl_pkg::dr_and`, `dr_xor`,
`dr_gen`). For example, for XOR the true rail is `a.t·b.f + a.f·b.t` and the
false rail is `a.t·b.t + a.f·b.f`. A rail rises only once its inputs are
DATA. A block wakes only when its whole input is DATA, so the equations do
not need to be input-complete.

The choice of critical bit in each block is this design's own. In the
zero-delay RTL every output bit of a block changes at the same instant.

## Top level: `rlncl_ks_adder`

| port | dir | meaning |
|------|-----|---------|
| `rst` | in | puts every stage to sleep, so all wavefronts become NULL |
| `a[7:0]`, `b[7:0]`, `cin` | in | dual-rail operands (`dr_t`) |
| `ko` | out | `Ko(1)`: 1 asks the sender for DATA, 0 for NULL |
| `sum[7:0]`, `cout` | out | dual-rail result |
| `ki` | in | `Ko(6)` from the receiver: 1 asks for DATA, 0 for NULL |
| `sleep_n[4:0]` | out | Sleep-bar of S1..S5, for observation |
| `ko_stage[5:0]` | out | `Ko(0..5)`, for observation |

The handshake is four-phase on both sides.

* **Sender.** Puts DATA on `a`, `b`, `cin` while `ko` = 1, and NULL after
  `ko` falls.
* **Receiver.** Reads `sum` and `cout` once all nine bits are DATA, then
  lowers `ki`. It raises `ki` again once they are NULL.

`Ko-bar(0)`, which wakes S1, comes from a full NCL completion detector
(`ncl_cd`) on the 17 input bits. The primary input is not the output of a
gated block, so the one-OR-gate shortcut does not apply there.

## Where this design departs from or adds to the reference

* The MTCMOS gates hold their 1 while awake (see above).
* The stage contents are derived from the stage widths. The gate-level
  netlist of each block is this design's own.
* The critical bit chosen in each block is this design's own.
* The input completion detector, `rst`, the `ki` receiver port and the
  observation ports are additions.
* The design has no timing. All gates are zero-delay. Throughput (up to
  900 MHz in the reference's 32-nm circuit), power and leakage saving are
  not modelled. Power gating appears only as the forced NULL of a sleeping
  block.
* Only the proposed register-less pipeline is built. The register-based NCL,
  MTNCL and fine-grain power-gated NCL pipelines that it is compared with
  are not included.

## Files

`rtl/`:
* `ncl_pkg.sv`: dual-rail type, wavefront structs and rail functions.
* `th_gate.sv`, `mt_gate.sv`, `mtncl_buf.sv`, `ncl_cd.sv`, `rl_ctrl.sv`:
  gates and control.
* `ks_l1.sv` ... `ks_l5.sv`: logic blocks.
* `rlncl_ks_adder.sv`: the top.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`.
`ks_ref_pkg.sv` works out every wavefront from integer arithmetic
(`G[h:l]` is the carry out of adding bits l..h). The stage testbenches
therefore do not share the design's prefix equations.

`tb_rlncl_ks_adder` runs the whole adder at its real size:

* 405 additions (corner cases, then random operands), plus three more in
  the stall phase.
* A sender and a receiver with random handshake delays.
* A stalled receiver, to check that exactly three tokens fit.
* Per-stage counts of wake-ups, sleeps, Step 1 waits and Step 4 holds. It
  checks every wake-up and sleep against the control rule.

It ends with `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the top folder, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ncl_pkg.sv tb/ks_ref_pkg.sv tb/tb_rlncl_ks_adder.sv \
  --top-module tb_rlncl_ks_adder -o sim && ./obj_dir/sim
```

Use the same command for any other testbench, with its own file and name.

The handshake loops settle in zero time inside the simulator's
combinational-loop iteration. Expect a `UNOPTFLAT` warning. Testbench
processes should wait on plain signals, not on function calls. They should
also not add event controls on the design's internal nets, since these change
how the simulator orders its settling. The end-to-end testbench watches the
internal handshake through the `ko_stage` port and by sampling.

## Changing the design

* **Different width.** The five blocks are written for eight bits:
  `WIDTH` = 8 and three prefix levels. A wider adder needs more prefix
  blocks, new wavefront structs in `ncl_pkg`, and more entries in the
  top's `crit` and control chain.
* **Different critical bits.** Edit the `crit[...]` assignments in
  `rlncl_ks_adder.sv`.
* **Gates without the hold.** To study them, change `mt_gate`. The
  end-to-end testbench then loses results as soon as the receiver is slow.
