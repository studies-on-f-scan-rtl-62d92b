# F-scan: scan paths through a circuit's own logic

Full scan puts a multiplexer in front of every flip-flop and chains the
flip-flops into shift registers. This costs area and test time, and it can
load states the circuit never reaches in normal operation, so the tester may
reject chips that would have worked (over-testing). **F-scan** (functional
scan) builds the scan paths at register-transfer level instead. It reuses
the paths that already exist between registers, through adders,
multiplexers and other operations:

* An **F-path** runs from a read node (a primary input or a register) to a
  write node (a register or a primary output). Every side input of an
  operation on the path is held at a constant during scan, and every
  multiplexer on it (an *assignment decision node*, ADN) is steered to the
  path.
* An **essential** F-path moves every value the destination can actually
  hold, and every error the source can actually carry. For example, `X <= In1 + 10` is
  essential: to load `v` into X, drive `v - 10`. A **complete** F-path
  passes any value unchanged, as a scan multiplexer does.
* Where a side input is not constant by itself, a **mask element** forces
  it during scan: 0 for adders, 1 or all-ones for multipliers and dividers,
  and `10…0` for modulo operations.
* An **F-scan-path** chains F-paths from a primary input, through registers,
  to a primary output. Every register lies on exactly one of them. There are
  `m = min(#PI, #PO)` paths, each `ceil(k/m)` registers long, where `k` is the
  number of registers. All bits of a word move in parallel, so one clock
  scans one whole register.
* All F-scan-paths are switched by one test pin. A second pin is needed only
  for a controller state register that has no path of its own.

Scan runs on the normal clock through logic that was synthesised with the
design. Scan-in and scan-out overlap, so a circuit whose paths are two
registers long needs `3·N + 2` clocks for `N` test patterns.

This repository gives synthesizable SystemVerilog for the method's worked
examples and for its hardware building blocks. It also includes the two
test-generation models built from the example circuit.

## Circuit E: the worked example

Circuit E has one data input `In1`, registers `X` and `Y`, and one output
`Out`:

```
      10   In1            In1    X                      Y
       \   /               |     |                      |
        (+) add1         [C0]    |   (mask, test=1 -> 0) |
         |                 \    /                       |
         |                  (+) add2                    |
         |                 /    \                       |
   ADN_X <-- add1, add2, X, 0    ADN_Y <-- add2, Y      ADN_Out <-- Y, 0
         |                       |                      |
         X                       Y                      Out
```

With `test = 1`, each ADN takes its F-path input and the C0 mask zeroes
`In1` at the second adder. The circuit then forms the F-scan-path
`In1 -> X -> Y -> Out`:

| clock | test | what happens                                               |
|-------|------|------------------------------------------------------------|
| t0    | 1    | `In1 = Y_pattern - 10` enters X                            |
| t1    | 1    | X moves to Y; `In1 = X_pattern - 10` enters X               |
| t2    | 0    | test phase: one normal clock captures the response in X, Y |
| t3    | 1    | Out shows the captured Y; next pattern's Y word enters X   |
| t4    | 1    | Out shows the captured X (now in Y); next X word enters    |

From t3 on, scan-out of one pattern overlaps scan-in of the next, so a
pattern costs 3 clocks. `Out` is the output of an ADN, not a register, so
it shows `Y` in the same clock.

In normal mode the ADNs are steered by the circuit's controller, which is
not part of this design. Its selects are module inputs (`x_sel_e`,
`y_sel_e`, `out_sel_e` in `fscan_pkg`). The encodings and the extra inputs
"hold" and "zero" are this design's choices. So is the 8-bit width, as the
example gives no width.

* `rtl/circuit_e_comb.sv`: adders, mask and ADNs (combinational).
* `rtl/circuit_e_fscan.sv`: adds registers X and Y (asynchronous
  active-low reset to 0).

## The controller's state register: initialize and hold

A state register usually has no path from a primary input or to a primary
output. It also has its own width. So it is given two extra connections
(`rtl/fscan_state_reg.sv`):

* `PI -> state`: the state ADN gets the primary input as an extra choice.
* `state -> PO`: the output ADN gets the state as an extra choice.

Two pins select the mode. The F-scan pin also serves as the hold pin:

| hold/scan | init | mode       | state register   | PO            |
|-----------|------|------------|------------------|---------------|
| 0         | 0    | normal     | next-state logic | normal output |
| 0         | 1    | initialize | loads `PI`       | present state |
| 1         | 0    | hold/scan  | holds            | scan output   |
| 1         | 1    | forbidden  | holds (asserted) | scan output   |

In `fscan_top`, this block wraps circuit E, so the full test sequence for
one pattern is:

```
initialize (state in, previous state out on Out)
  -> scan, scan (Y and X words in, previous response out, state held)
  -> test phase (one normal clock; state advances too)
  -> initialize -> scan, scan -> ...
```

That is `4·N + 3` clocks for `N` patterns. The initialize pin reaches only
the state and output ADNs. So during the initialize clocks the controller
selects must hold X and Y (`XSEL_HOLD`, `YSEL_HOLD`); the test sequence
applies them. The state's zero-extension onto PO, its 3-bit default width
and the hold in the forbidden combination are this design's choices.

## Mask elements

`rtl/fscan_mask.sv`, with `KIND` from `fscan_pkg::mask_kind_e`:

| KIND       | forced value when `scan = 1` | used on the side input of |
|------------|------------------------------|---------------------------|
| `MASK_C0`  | `0`                          | adder, subtractor         |
| `MASK_C1`  | `1`                          | multiplier, divider       |
| `MASK_CA1` | all ones                     | multiplier, divider       |
| `MASK_CQ`  | `10…0` (MSB only)            | modulo                    |

With `scan = 0` the element is transparent. It is written as a plain
multiplexer, so synthesis may fold it into the surrounding logic. The Cq'
mask limits which values can pass, so a path using it is essential only if
the register's values stay in that range.

## Slicing a register wider than its path

When a register is wider than its F-scan-path, it is cut into path-wide
slices that shift into each other through multiplexers
(`rtl/fscan_slice_reg.sv`). The defaults are the method's own example: a
16-bit register on an 8-bit path, scanned in two clocks. `scan_in` enters
the low slice and the high slice is `scan_out`. Scan-in and scan-out
overlap. In normal mode the register loads `d` when `en = 1`. The load
enable is this design's addition.

## Second example: the A/B circuit

`rtl/wcg_example_fscan.sv` implements the small circuit used to illustrate
F-path costs:

```
A <= (PI + B) mod 128      B <= A + 1      PO = B
```

It is made F-scannable along `PI -> A -> B -> PO`. A C0 mask on B at the
adder gives `A <= PI mod 128` during scan, which covers every value A can
hold. `+1` is invertible, so `B <= A + 1` is essential. B reaches PO
directly. A pattern (a, b) is scanned in as `PI = b-1`, then `PI = a`. A
captured A leaves on PO as `A + 1` one clock after the captured B. The
choice of path, the mask and the 8-bit width are this design's reading of
the example.

## Test-generation models

Both models are combinational and are built from `circuit_e_comb`. They are
netlists for an ATPG tool, not silicon. `fscan_top` carries them on their
own ports so they can be simulated against the real circuit.

**Stuck-at model (`rtl/circuit_e_ftgm.sv`).** The combinational part runs in
normal mode. Its pseudo-primary inputs (the register outputs) are driven
through *justification constraint modules*, and its pseudo-primary outputs
are read through *propagation constraint modules*. Each constraint module
is a copy of the F-path logic with the scan pin tied to 1, one copy per
clock of the test sequence:

* X is justified by `In1(t1) -> X`.
* Y is justified by `In1(t0) -> X -> Y`.
* The test phase uses `In1(t2)`.
* Y is propagated by `Y -> Out` at t3.
* X is propagated by `X -> Y -> Out` at t4.

An ATPG run on this model can only produce patterns that the F-scan-path
can deliver.

**Hybrid delay model (`rtl/circuit_e_hybrid_model.sv`).** The combinational
part is copied into two time frames. Frame 1's pseudo-primary outputs feed
frame 2's pseudo-primary inputs directly, and each frame has its own F-scan
enable.

* `fse1 = 1` gives a **skewed-load** pair: the launch pattern is the
  initialization pattern shifted one step along the path, with a new word
  from `In1`.
* `fse1 = 0` gives a **broad-side** pair: the launch pattern is the
  circuit's functional response.

Frame 2 captures in normal mode. The F-scan-paths lie inside the
combinational part, so no multiplexers are needed between the frames.
Scan runs at the normal clock, so neither mode needs a fast scan-enable.

## Top level

`rtl/fscan_top.sv` holds four parts side by side, all on one clock `clk`
and the asynchronous active-low reset `rst_n`:

* Circuit E with its state register. Ports start with `e_`:
  * the test pins are `e_test` and `e_init`;
  * the controller interface is `e_state`, `e_state_next` and the selects.
* The A/B circuit (`ab_`).
* The sliced register (`sl_`).
* The two models (`tg_`, `hy_`).

Parameters are `W = 8`, `STATE_W = 3`, `MOD = 128`, `SL_W = 16` and
`SL_PATH = 8`. Only 128, 16 and 8 come from the method's examples.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. The
reference equations used by the testbenches are in `tb/fscan_ref_pkg.sv`.
Run a testbench with plain Verilator, for example the end-to-end one:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fscan_pkg.sv tb/fscan_ref_pkg.sv tb/tb_fscan_top.sv \
  --top-module tb_fscan_top -o sim
./obj_dir/sim
```

What the testbenches check:

* `tb_fscan_top`, at the default sizes:
  * runs circuit E's full test sequence with its state register, including
    the `4·N + 3` clock count;
  * feeds the same inputs to the stuck-at model and requires the outputs
    that the circuit showed;
  * applies skewed-load and broad-side pairs to the circuit and compares
    the captured values with the two-frame model;
  * takes the A/B circuit and the sliced register through scan and test;
  * counts each of these mechanisms and fails if one never happened.
* `tb_circuit_e_fscan` tests the scan path alone, then 40 patterns with the
  `3·N + 2` clock count.
* `tb_wcg_example_fscan` does the same for the A/B circuit.
* The other testbenches compare each block against the reference equations
  with random stimulus.

## Scope and departures

* **Controllers.** The controllers of both example circuits are not
  modelled. Their selects and next state are ports, and the normal-mode ADN
  choices are assumptions.
* **Widths.** The widths of circuit E, the A/B circuit and the state
  register are assumptions, and all of them are parameters.
* **Case study.** The method's larger case study (a 32-bit data path) is
  not included.
* **Benchmarks.** The method was evaluated on the ITC'99 benchmark
  circuits, which are not included either. The blocks here are the pieces
  such a conversion uses: masks, F-path ADN controls, state-register
  handling and slicing.
* **Delay test model.** The later delay-test model is not included. It
  reorders tool-inserted full-scan chains along the F-scan-paths for a
  commercial ATPG flow.
* **Reset.** Reset behaviour is not specified by the method. Every register
  here resets asynchronously to zero.
