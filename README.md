# Direct-access test architecture for a system-on-chip of benchmark cores

A system-on-chip made of many cores is hard to test, because most core pins
are buried inside the chip. This design gives every core a direct test path
from the chip pins. Three test pins do the job:

- `ENABLE` picks one core.
- The input bus `Z` carries that core's stimuli.
- The output bus `OUT` returns its response.

A demultiplexer steers `Z` to the chosen core and a multiplexer brings that
core's outputs back to `OUT`. Each core sits in a two-mode wrapper that cuts it
off from its neighbours while it is tested. Seen from the pins, the selected core
behaves as if it were a separate chip, so a pattern set written for the bare core
can be applied unchanged.

The cores are ISCAS-85 and ISCAS-89 benchmark circuits. Two of them are built
here as gate netlists: c17 (combinational) and s27 (sequential). Every wire of
both carries a fault-injection cell, so a single stuck-at fault can be switched on
from outside the core. Faults can then be injected and graded through the test
access mechanism. A four-stage autonomous LFSR is included as the on-chip form
of the random pattern generator.

Every part is plain, two-state, synthesizable SystemVerilog. Apart from the s27
flip-flops and the LFSR, the whole path is combinational.

## Test access mechanism (`tam_demux`, `tam_mux`)

`tam_demux` takes the `Z` bus and hands it to core port `ENABLE`; every other
port gets all zeros. `tam_mux` passes the response of core `ENABLE` to `OUT`.
A select value with no core behind it gives `OUT = 0`.

The bus widths come from the cores:

- `Z` is as wide as the core with the most inputs.
- `OUT` is as wide as the core with the most outputs.

A smaller core uses the low bits: bit *k* of its input port is `Z[k]`, and its
output bit *k* appears on `OUT[k]`. The bits above its own width read 0.

**Timing.** The path from `Z` to `OUT` is purely combinational. A response
is valid as soon as the selected core has settled. For s27 it is valid after
each clock edge on the CK bit.

## Wrapper and its two modes (`core_wrapper`)

Every core input has a 2:1 multiplexer that selects between two sources:

- the functional signal (`func_in`), or
- the test signal from the TAM (`tam_in`).

Every core output has a 1:2 demultiplexer that sends the response either to
the functional output (`func_out`) or back to the TAM (`tam_out`). The branch
that is not selected is held at 0.

All of these multiplexers share one enable:

- 0 is **normal mode**.
- 1 is **test mode**.

In `soc`, a wrapper is in test mode when the `test_mode` pin is 1 and `ENABLE`
names its core. All other wrappers stay in normal mode, so the rest of the chip
keeps running on its functional pins while one core is tested.

The wrapper has no bypass register and no instruction register. One core is
reached at a time over dedicated lines, so neither is needed.

## Fault-injection cells (`fault_mux`, `soc_pkg::fault_sel_e`)

A fault-injection cell is a four-input multiplexer placed at the driver of a wire,
so a fault reaches every gate the wire feeds. Its 2-bit select works as follows:

| select | wire value                     |
|--------|--------------------------------|
| 00     | fault-free (normal)            |
| 01     | stuck-at-1                     |
| 10     | stuck-at-0                     |
| 11     | fault-free (unused code)       |

Setting one select to 01 or 10 and leaving all others at 00 gives a
single-stuck-at fault machine. A fault sweep steps through every wire and both
values, applies the pattern set, and compares `OUT` with the fault-free
response.

## The two built cores

### c17 (`c17`)

c17 has six 2-input NAND gates. It has inputs N1, N2, N3, N6 and N7 and outputs
N22 and N23:

```
N10 = NAND(N1,N3)    N11 = NAND(N3,N6)    N16 = NAND(N2,N11)
N19 = NAND(N11,N7)   N22 = NAND(N10,N16)  N23 = NAND(N16,N19)
```

- Port `in_dat` is `{N1,N2,N3,N6,N7}`, with N1 in bit 4.
- Port `out_dat` is `{N22,N23}`.
- The 11 wire stems are numbered as follows. These 22 stuck-at faults are the
  collapsed fault list of c17.

```
fsel[0..4] N1 N2 N3 N6 N7    fsel[5..6] N22 N23    fsel[7..10] N10 N11 N16 N19
```

### s27 (`s27`)

s27 has three D flip-flops, two inverters, one AND, one NAND, two ORs and four
NORs:

```
G14 = NOT(G0)        G8  = AND(G14,G6)    G15 = OR(G12,G8)   G16 = OR(G3,G8)
G9  = NAND(G16,G15)  G10 = NOR(G14,G11)   G11 = NOR(G5,G9)   G12 = NOR(G1,G7)
G13 = NOR(G2,G12)    G17 = NOT(G11)
G5 <= G10, G6 <= G11, G7 <= G13   (rising edge of CK)
```

The clock and reset are ordinary bits of the input port, so the core can be
driven entirely through `Z`:

- `in_dat = {G0,G1,G2,G3,rst,CK}`: CK is `Z[0]` and rst is `Z[1]` when the
  core is driven through the TAM.
- The reset is asynchronous, active high, and clears all three flip-flops.
- To apply one vector, set G0..G3 with CK low, then raise CK. The state
  updates and the new G17 appears on `OUT[0]`.

There are 19 fault cells: the 6 inputs (including rst and CK), G17, and 12
internal stems:

```
fsel[0..5] G0 G1 G2 G3 rst CK   fsel[6] G17
fsel[7..18] G5 G10 G6 G11 G7 G13 G14 G8 G15 G12 G16 G9
```

A fault on G5, G6 or G7 acts on the flip-flop output.

Because CK and rst carry fault cells, faults on them are real clock or reset
faults. For example, CK stuck-at-1 applied while CK is low produces a clock edge
at the moment the fault is switched on.

## Configurations (`soc`, `soc_pkg`)

`soc` builds one system-on-chip. Its parameter `KIND` picks the core list. All
widths are derived from that list in `soc_pkg`:

- `ENABLE` width is ceil(log2(number of cores)).
- `Z` and `OUT` widths follow the widest-core rule given above.

| KIND        | cores in ENABLE order                                         | ENABLE | Z   | OUT |
|-------------|---------------------------------------------------------------|--------|-----|-----|
| `SOC_MIXED` | s27, s298, c17, c432                                          | 2      | 36  | 7   |
| `SOC_COMB`  | c17, c432, c499, c880, c1355, c1908, c2670, c3540, c6288, c74181 | 4   | 157 | 64  |
| `SOC_SEQ`   | s27, s298, s344, s349, s382, s400, s420, s444, s820, s1196    | 4      | 21  | 19  |
| `MIXED_1`   | s27, s298, s344, s349, c17, c1355, c1908                      | 3      | 41  | 32  |
| `MIXED_2`   | s444, s820, c880, c3540                                       | 2      | 60  | 26  |
| `MIXED_3`   | s420, s444, s820, c880, c3540, c6288, c74181                  | 3      | 60  | 31  |
| `MIXED_4`   | s349, s382, c432, c499, c74181                                | 3      | 41  | 32  |

Only c17 and s27 are built as netlists. For every other core, `soc` still
builds the wrapper and its TAM port, and brings the wrapper's core side out:

- `ext_core_in[k]` is what core *k* would receive.
- `ext_core_out[k]` takes its response.

A netlist, or a model, for any of those cores can be attached there without
touching the TAM.

The pin counts used for those cores are listed in `soc_pkg::core_in_pins` and
`core_out_pins`. For the sequential cores, the input count includes clock and
reset.

The ports `c17_fsel` and `s27_fsel` exist in every configuration. They are
unused where a configuration has no c17 or s27, and lint reports them as unused
there.

## Pattern generator (`alfsr`)

`alfsr` is a four-stage autonomous LFSR for p(x) = x^4 + x + 1. The register
shifts toward stage a0 on each rising clock edge. The new bit is a1 xor a0, and
the outputs Y3..Y0 are the stages a3..a0. From any non-zero state it runs through
all 15 non-zero states.

`WIDTH`, `TAPS` and `SEED` are parameters. A synchronous `rst` loads `SEED`,
which must be non-zero; an assertion checks this.

The LFSR is the on-chip alternative to sending random patterns from off chip.
In `soc_top` it has its own pins and is not wired to a TAM.

## Top level (`soc_top`)

`soc_top` puts three systems side by side: `SOC_MIXED`, `SOC_COMB` and `SOC_SEQ`,
plus the LFSR. Their pins carry the prefixes `mixed_`, `comb_`, `seq_` and
`lfsr_`.

Each SOC brings out these pins:

- its TAM pins: `enable`, `z`, `out`;
- `test_mode`;
- the functional pins of all its wrappers: `func_in`, `func_out`;
- the core-side pins of the wrappers of the cores not built here:
  `ext_core_in`, `ext_core_out`;
- the fault selects of the c17 and/or s27 it contains.

`SOC_COMB` holds no s27 and `SOC_SEQ` holds no c17. Their unused fault-select
inputs are tied to fault-free inside the top.

## Verification

Every testbench computes its expected values independently of the RTL. The
references are a behavioural gate model of c17 and an event model of s27 in
`tb_ref_pkg`, the wrapper equations, and the LFSR recurrence. Each testbench
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_fault_mux` | all four select codes with both data values |
| `tb_tam_demux`, `tb_tam_mux` | random routing for every select value, including values with no core behind them |
| `tb_core_wrapper` | both modes, random data; the unused branch of each output demultiplexer is 0 |
| `tb_c17` | all 32 input patterns, fault-free and under each of the 22 faults; a fixed 20-pattern random set must detect all 22 faults |
| `tb_s27` | directed reset and clock checks; 38 faults, each with 200 random clocked vectors against the reference model |
| `tb_alfsr` | recurrence, period 15, all non-zero states, seed reload |
| `tb_soc` | `SOC_MIXED`: c17 under every fault through the TAM; s27 clocked through `Z`; the other cores through their brought-out ports; isolation of unselected cores; normal mode |
| `tb_soc_top` | end-to-end at full size with no parameter overrides (see below) |
| `tb_workload_fault_sim` | s27 in `SOC_SEQ`: 14,999 random vectors for the fault-free core and each of the 38 faults; c17 in `SOC_COMB` with a 20-pattern and a 23-pattern random set |
| `tb_workload_mixed_socs` | `MIXED_1..MIXED_4`: every core through each TAM; c17 fault grading in `MIXED_1` |

`tb_soc_top` drives all three SOCs and the LFSR. It draws the c17 patterns from
the LFSR outputs, five bits at successive clocks. It counts each mechanism of the
architecture and fails if any count is zero:

- normal-mode operation and core selection;
- test access to cores that are not built here;
- stuck-at-0 and stuck-at-1 injection, and fault detection on `OUT`;
- clocking and reset of s27 through `Z`;
- select values with no core;
- wrapper isolation.

Measured results:

- **c17:** every one of its 22 faults is detected through the TAM, by all 32
  patterns and by the 20-pattern random set.
- **s27:** with 14,999 random vectors, 37 of its 38 faults are detected through
  the TAM. The one that escapes is rst stuck-at-0: the sequence applies reset
  only at its start. Leaving out the four clock and reset faults, 34 of 34 are
  detected.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary -j 0 \
  rtl/soc_pkg.sv rtl/fault_mux.sv rtl/tam_demux.sv rtl/tam_mux.sv \
  rtl/core_wrapper.sv rtl/c17.sv rtl/s27.sv rtl/alfsr.sv rtl/soc.sv rtl/soc_top.sv \
  tb/tb_ref_pkg.sv tb/tb_soc_top.sv --top-module tb_soc_top
./obj_dir/Vtb_soc_top
```

Replace `tb_soc_top` with any other testbench name. Every testbench finishes
in about a second.

The simulation is two-state. The testbenches wait 1 time unit before the first
stimulus and then step time by 1 unit per vector.

## Departures and choices

- **Unused bus bits are 0.** The original scheme leaves the unused bits of
  `Z` and of the unselected ports at high impedance. On a two-state on-chip
  bus they are driven to 0 instead.
- **Wrapper enable.** Each wrapper's enable is derived from `test_mode` and
  `ENABLE`. Only the selected core is in test mode. How the wrapper enable is
  driven inside the chip is not specified by the methodology.
- **Direction of the wrapper switches.** The wrapper follows the written
  description: a multiplexer at each input and a demultiplexer at each output.
  Some drawings of it label the input-side element a demultiplexer.
- **c432 output width.** c432 is given 7 outputs, as the `SOC_MIXED` bus
  (`OUT[6..0]`) and its pin table show. One sentence of the methodology calls it
  6.
- **s820 input width.** s820 is given 21 inputs, following the `SOC_SEQ` bus
  declaration. Its pin table says 20. This does not change any bus width.
- **Fault list size.** One fault cell per wire stem gives 38 s27 faults, two
  for each of its 19 wires. The published s27 results grade 34 faults. That
  count matches leaving the clock and reset wires unfaulted, and the workload
  testbench prints coverage both ways. The published coverage (30 of 34,
  88.23 %) is lower than the 34 of 34 measured here with the same number of
  random vectors; the random vectors themselves differ. The c17 list
  (22 faults) matches.
- **Core order of `MIXED_1..MIXED_4`.** Their core lists are the
  methodology's. The order on `ENABLE` follows the order the cores are listed in,
  which is this design's choice. Their bus widths follow from the widest-core
  rule.
- **The other 18 benchmark cores are not built.** Their netlists are not part
  of this design; each one's wrapper port is brought out instead.
- **LFSR reset.** The seed-loading reset is added here; the register as
  described has no input.
- **Fault simulation flow.** The original methodology drives the patterns and
  the fault sweep from a program running on a PC. Here the testbenches take
  that role, with the fault cells controlled from their ports.
