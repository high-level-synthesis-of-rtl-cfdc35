# Key-obfuscated datapath for f = e·(a·b)·(c·d)

This design protects an RTL datapath against reverse engineering by adding
**key multiplexers** to it. These are 2-input muxes whose select lines are key
bits, fed from primary inputs. Each mux cuts one datapath line. The original
line goes on one mux input and a different signal from the design (a *decoy*)
goes on the other. Only the correct key connects every original line, so only
the correct key makes the circuit compute its intended function. A wrong key
still produces a product, just not the right one, so the netlist alone does
not show what the circuit computes.

The muxes are placed only on lines of operations that are **off the critical
path** of the schedule. Those lines have slack, so the extra mux delay does not
lengthen the clock period or add a cycle. The controller is left unchanged:
the key only enters the datapath.

The RTL here puts that method into practice on a small example: the product
f = e·(a·b)·(c·d), computed with two multipliers and five registers in four
control steps.

## Schedule and binding

| step | M1                  | M2 (FIG6A)           | M2 (FIG6B)           |
|------|---------------------|----------------------|----------------------|
| cs0  | load a→R1, b→R2, e→R3, c→R4, d→R5 (both variants) | | |
| cs1  | op1: R1·R2 → R1 (t1) | –                   | op4: c·d → R4 (t3)   |
| cs2  | op2: R1·R3 → R1 (t2) | op4: c·d → R4 (t3)  | –                    |
| cs3  | –                   | op3: R1·R4 → R5 (f)  | op3: R1·R4 → R5 (f)  |

Operations 1, 2 and 3 lie on the critical path a → t1 → t2 → f and cannot move.
Operation 4 (c·d) can run in either cs1 or cs2. That freedom decides where the
keys can go, so the design has two variants (parameter `VARIANT`):

* **FIG6A**: op4 runs in cs2. Its inputs c and d, and the input e of op2,
  are not needed until cs2, so the keys sit on the **register loads**:
  * key0 on e → R3, with decoy c
  * key1 on c → R4, with decoy d
  * key2 on d → R5, with decoy c

  The correct key is `{k2,k1,k0} = 3'b100`. With any key the output is
  `f' = (k0?c:e) · (a·b) · (k1?d:c) · (k2?d:c)`.
* **FIG6B**: op4 runs in cs1, so its output t3 is not needed until cs3. The
  keys sit on the load of e (key0, as above) and on the **output of R4**
  (key1, with decoy: primary input e). The correct key is `{k1,k0} = 2'b10`,
  and `f' = (k0?c:e) · (a·b) · (k1 ? c·d : e)`.

In both variants the muxes sit inside the datapath. The controller is the same
one that would drive the unkeyed datapath with the same schedule.

## Where this RTL departs from, or adds to, the method's description

* **An extra operand selector on M2.** The published datapath feeds M2's
  second operand from R5 only. But op3 = t2·t3 needs R1 (t2) and R4 (t3) in
  the same step, while R5 holds d. This design adds a selector
  (`m2b_sel`: 0 = R5, 1 = R4 path) so that op3 can run.
  * In FIG6B, the key1 mux output feeds both M2 selectors. key1 therefore
    guards c at op4 and t3 at op3, which matches the keyed function above.
* **Handshake.** The description gives none. This design uses
  `start`/`busy`/`done`, described under "Interface and timing".
* **Data width.** The description gives none. `WIDTH` defaults to 16, and
  every product is kept modulo 2^WIDTH.
* **Load enables on the registers, synchronous active-low reset.** Neither is
  specified; both are this design's choices.
* **Other designs.** The method was also applied to larger filter and
  transform benchmarks with 32-bit keys. Their data-flow graphs and key
  placements are not available, so they are not built here. The
  non-obfuscated reference datapath is not built separately either: with the
  correct key, the keyed design behaves exactly like it.

## Interface and timing (`obf_fmul_top`)

| port            | dir | width  | meaning |
|-----------------|-----|--------|---------|
| `clk`, `rst_n`  | in  | 1      | clock; synchronous active-low reset |
| `start`         | in  | 1      | seen only while idle; a..e are loaded on this edge (cs0) |
| `a`..`e`        | in  | WIDTH  | operands |
| `key`           | in  | KEY_W  | key bits (3 for FIG6A, 2 for FIG6B); hold stable while busy |
| `busy`          | out | 1      | high in cs1..cs3 |
| `done`          | out | 1      | one-cycle pulse 4 clock edges after the start edge |
| `f`             | out | WIDTH  | result register R5; holds until the next start |

* A new `start` may be given in the same cycle that `done` is high.
* A `start` that arrives while busy is ignored.
* In FIG6B, a wrong key1 selects port `e` directly in cs1 and cs3. Hold `e`
  stable if you want repeatable wrong-key outputs.

Parameters: `WIDTH` (16), `VARIANT` (`obf_pkg::FIG6A`), and `KEY_W`, which is
derived from `VARIANT` and should not be overridden.

## Files

* `rtl/obf_pkg.sv`: the variant enum, the FSM states, the control-word struct
  `ctrl_t` (all load enables and selectors), and the key width and correct
  key per variant.
* `rtl/key_mux.sv`: the key multiplexer. The parameter `CORRECT_KEY` places
  the original line on mux input 0 or 1. The key bit drives the select.
* `rtl/dp_mult.sv`: the multiplier resource (M1, M2). It is single-cycle and
  combinational.
* `rtl/sel_reg.sv`: a register with a load enable and a 2-input source
  selector (R1..R5).
* `rtl/obf_datapath.sv`: the registers, multipliers, operand selectors and,
  per variant, the key muxes.
* `rtl/obf_controller.sv`: the four-state schedule FSM. It holds SVA checks:
  M2 writes at most one register per step, and `done` is a single pulse.
* `rtl/obf_fmul_top.sv`: the top level, which is the controller plus the
  datapath.

## Simulation

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_key_mux` | both mux placements with both key values |
| `tb_dp_mult` | products modulo 2^16 against a 64-bit reference |
| `tb_sel_reg` | random load, select and reset sequences against a model |
| `tb_obf_controller` | both variants' control words in every step; busy, done latency, start ignored while busy |
| `tb_obf_datapath` | the testbench plays the schedule itself; all keys of both variants against the keyed formulas |
| `tb_obf_fmul_top` | 400+ evaluations end to end, both variants, random inputs and keys, back-to-back starts, starts while busy, 4-cycle latency; each of these must occur |
| `tb_obf_fmul_top_full` | the top at default parameters: one correct-key and one wrong-key evaluation |

How to run one (here the end-to-end test):

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/obf_pkg.sv tb/tb_obf_fmul_top.sv --top-module tb_obf_fmul_top
./obj_dir/Vtb_obf_fmul_top
```

## How far to trust it

* All testbenches pass at the default parameters.
* Each testbench also fails on a deliberately broken copy of its module.
* The design was linted with `verilator -Wall` and elaborated with yosys/slang.
* It has not been synthesised to a cell library or timed.

## Changing it

* **Add a key bit:** instantiate another `key_mux` on a line that is not
  needed until a later control step. Set `CORRECT_KEY` to the bit value that
  should pass the original line, and widen `KEY_W`.
* **Move op4:** edit the `S_CS1`/`S_CS2` arms of `obf_controller`. The key
  positions must still sit on lines that have slack in the new schedule.
