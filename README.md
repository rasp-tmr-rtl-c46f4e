# Triple modular redundancy for c17 with a multiplexer-based majority voter

Triple modular redundancy (TMR) protects a circuit against a single upset
(a bit-flip or a stuck net inside one copy) by running three identical copies side
by side and voting on every output bit. As long as two copies agree, the voted
output is correct. This RTL is a complete TMR build of the small ISCAS'85
benchmark circuit **c17**, written the way an automatic TMR generator lays it out:

* three copies of c17, each able to take an injected fault;
* one majority voter per output port (N22 and N23), built from one AND gate,
  one OR gate and one 2:1 multiplexer instead of the usual three ANDs and an OR;
* a check environment that runs a fault-free golden c17 next to the TMR
  circuit and flags any difference on a pass/fail line, `cmp`.

Everything is combinational. There is no clock and no reset in the RTL. The
testbenches supply a clock only to pace the stimulus.

## The voter

For each output bit the three copies deliver T1, T2 and T3. The voter computes

```
N1 = T1 & T2          (goes to mux input 0)
N2 = T1 | T2          (goes to mux input 1)
V  = T3 ? N2 : N1
```

Why this is a majority function: if copy 3 says 0, the output can only be 1
when both other copies say 1. If copy 3 says 1, one more vote for 1 from
copy 1 or copy 2 is enough. The full truth table:

| T3 | T2 | T1 | N1 | N2 | V |
|----|----|----|----|----|---|
| 0  | 0  | 0  | 0  | 0  | 0 |
| 0  | 0  | 1  | 0  | 1  | 0 |
| 0  | 1  | 0  | 0  | 1  | 0 |
| 0  | 1  | 1  | 1  | 1  | 1 |
| 1  | 0  | 0  | 0  | 0  | 0 |
| 1  | 0  | 1  | 0  | 1  | 1 |
| 1  | 1  | 0  | 0  | 1  | 1 |
| 1  | 1  | 1  | 1  | 1  | 1 |

The three inputs are not symmetric. T3 drives the mux select, so the wiring
matters: in `tmr_top`, copy k always feeds input Tk. `mvc_voter` has a
`WIDTH` parameter (default 1) that builds one such voter per bit. The top file
uses 1-bit voters, one per output port.

## The c17 copies and fault injection

c17 has five inputs (N1, N2, N3, N6, N7), two outputs (N22, N23) and six
2-input NAND gates with four internal nets:

```
N10 = !(N1 & N3)    N11 = !(N3 & N6)    N16 = !(N2 & N11)
N19 = !(N11 & N7)   N22 = !(N10 & N16)  N23 = !(N16 & N19)
```

`c17` is the plain circuit, used as the golden reference. `c17_fi` is one
redundant copy. Two inputs let a testbench corrupt it:

| input        | values                                                  |
|--------------|---------------------------------------------------------|
| `fault_sel`  | fault location 0..3 = net N10, N11, N16, N19            |
| `fault_mode` | `FM_NONE`, `FM_FLIP` (invert), `FM_SA0`, `FM_SA1`       |

The fault replaces the net's value at its driver, so every gate that reads
the net sees the faulty value. Each copy has four fault locations, 12 in the
whole TMR circuit, selected by a 2-bit vector per copy (`faultIn1..3` at the
top). The enum and the `fault_apply()` helper live in `rasp_tmr_pkg`.

Not every fault is visible for every input pattern. A stuck-at-1 on N10 does
nothing while N1 & N3 is 0, for example. The testbenches therefore count how
often a fault really changed a copy's output. They require every location and
mode to do so at least once.

## The TMR top file

`tmr_top` has the generator-style structure: instances `inst_tmr1`,
`inst_tmr2`, `inst_tmr3` share the five inputs. Their outputs are nets
`N22_tmr1..3` and `N23_tmr1..3`. Two voters, `voter_N22` and `voter_N23`,
drive the top's N22 and N23. With all `fault_mode` inputs at `FM_NONE` it is
simply a triplicated c17.

What it guarantees: any combination of faults confined to **one** copy leaves
N22/N23 equal to the fault-free c17. Faults in two copies at once can get
through. That is expected of TMR and is exercised by the testbenches.

## The check environment (top level)

`tmr_sim_env` is the design's top. It wires `tmr_top`, a golden `c17` and
`golden_compare` together. All three see the same inputs.
`cmp = |({gold_N22, gold_N23} ^ {N22, N23})`, so `cmp` = 0 means the fault was
masked. The voted outputs are also brought out.

## Files

| file                      | content                                            |
|---------------------------|----------------------------------------------------|
| `rtl/rasp_tmr_pkg.sv`     | fault-mode enum, fault-site constants, `fault_apply` |
| `rtl/mvc_voter.sv`        | AND/OR/mux majority voter, `WIDTH` bits            |
| `rtl/c17.sv`              | golden c17                                         |
| `rtl/c17_fi.sv`           | c17 copy with fault injection                      |
| `rtl/tmr_top.sv`          | three copies plus one voter per output             |
| `rtl/golden_compare.sv`   | golden vs. TMR comparator                          |
| `rtl/tmr_sim_env.sv`      | top: TMR, golden, comparator                       |
| `tb/*_tb.sv`              | one self-checking testbench per module             |

## Verification

Every testbench compares against values it works out on its own: a truth
table, a two-level c17 formula, or a net-by-net fault model of c17 written in
the testbench. Each one ends by printing `TB_RESULT checks=N failures=M`.

* `mvc_voter_tb`: checks all 8 input combinations against the truth table
  above, then checks a 5-bit voter with random words.
* `c17_tb`: checks all 32 input patterns.
* `c17_fi_tb`: checks 32 patterns × 4 locations × 4 modes. Every location/mode
  pair must change an output at least once.
* `golden_compare_tb`: checks all 16 word pairs.
* `tmr_top_tb`: checks every single fault (3 copies × 4 locations × 3 modes)
  with all 32 patterns, then 2000 random multi-copy fault settings against
  the bitwise majority of three reference copies.
* `tmr_sim_env_tb` is the end-to-end run at default parameters. A 5-bit
  counter `e` drives the inputs, one pattern per 20 ns clock. The copy under
  test steps its fault number 0, 1, 2, 3 every four clocks. This repeats for
  each copy and each fault model, with `cmp` required to stay 0. A
  fault-free sweep and a double-fault sweep follow. The run counts masked
  corruptions in each copy, fault-free patterns, and double faults flagged
  by `cmp`, and fails if any of these never happens. Sample output (the
  double-fault sweep is random, so copy 3's count and the flagged count
  depend on the seed):

  ```
  copy 1: faults that corrupted it and were masked: 162
  copy 2: faults that corrupted it and were masked: 162
  copy 3: faults that corrupted it and were masked: 104
  fault-free patterns: 358, patterns flagged by cmp: 48, clock cycles: 864
  TB_RESULT checks=869 failures=0
  ```

To run one with Verilator 5 from the project root:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rasp_tmr_pkg.sv tb/tmr_sim_env_tb.sv --top-module tmr_sim_env_tb
./obj_dir/Vtmr_sim_env_tb
```

Swap in any other `*_tb` name. Each run finishes in well under a second.

## How far this follows the source design, and where it departs

Taken from the source design:

* the voter's gates, its mux polarity and its truth table;
* the c17 netlist;
* the top-file layout: three instances named `inst_tmr1..3`, one voter per
  output port, outputs suffixed `_tmr1..3`;
* the check set-up: TMR and golden in parallel, a comparator whose output is
  0 on a match;
* four faults per copy chosen by a 2-bit vector `faultIn`, with bit-flip and
  stuck-at faults.

This design's own choices:

* **Where the faults sit.** Which nets carry the four faults, and how a fault
  is applied, are not specified at the source. Here they are the internal
  nets N10, N11, N16 and N19, overridden at their drivers.
* **The separate `fault_mode` input.** It selects the fault model, and its
  `FM_NONE` code makes a copy fault-free. In the source scheme `faultIn = 00`
  already selects fault 0, so a 2-bit vector alone could not switch faults off.
* **One module for the three copies.** The source renames the three copies
  (`c17_1`, `c17_2`, `c17_3`) with suffixed port names. Here one module
  `c17_fi` is instantiated three times, and the suffixes appear on the
  top-file nets. The behaviour is the same.
* **The comparator as a module.** In the source set-up it belongs to the
  testbench. Here it is a synthesizable module, and the stimulus stays in the
  testbench.
* `mvc_voter`'s `WIDTH` parameter and `golden_compare`'s reduction are
  additions of this design.

Not included:

* **The TMR generator program itself.** It is software: it reads any Verilog
  module and writes such a top file. Only its output for c17 is given here,
  written by hand.
* **The TMR versions of other ISCAS'85/'89 and EPFL benchmarks.** Their
  netlists are not part of this design.
* **The fault-mask-ratio figure (50 %).** It is quoted for this voter, against
  42.86 % for the classical AND-OR voter. It comes from a fault analysis of
  the voter's internal nets that is not reproduced here.

## Changing the design

* To protect a different combinational module, do what `tmr_top` does:
  three instances, and one `mvc_voter` per output port. Use `WIDTH` for
  multi-bit ports. For a sequential module, vote each output port the same
  way. This design does not vote internal state; the source design does not
  either.
* New fault locations go into `c17_fi`. Wrap the net's driver in
  `fault_apply(value, fault_mode, fault_sel == SITE_x)` and widen
  `fault_sel_t` if there are more than four.
