# One-cell SRAM as a switch-level, test-tool-friendly logic model

An SRAM cell is an analog circuit. A read works because the cell is strong
enough to pull a precharged bitline down. A write works because the write
driver is stronger than the cell's cross-coupled inverters and flips them.
The access transistors work in both directions. Gate-level test tools (ATPG,
fault simulators) cannot model any of this. They reject bidirectional
`tranif` switches, and plain two-valued gates cannot say "this driver beats
that one".

This design is a reduced SRAM with **one 6T cell on one bitline pair**,
together with its precharge/equaliser, write driver and sense amplifier. It
is written so that the analog interactions survive as logic:

* Every node carries a **drive strength** as well as a value. Contention is
  settled by strength, as in Verilog's switch-level semantics.
* Every bidirectional switch is made of **two unidirectional resistive MOS
  switches** that face opposite ways and share one gate. This covers the
  cell's two access transistors and the precharge equaliser.
* The whole model is plain two-state synthesizable SystemVerilog with
  input and output ports only: no `inout`, no `tran`, no x or z.

With one cell there is no row or column decoder. The word line, precharge,
write-enable and sense-enable controls are primary inputs.

## Nodes with strengths

`sram_pkg::sig_t` is the value of a node. It is a packed struct with three
fields:

| field | bits | meaning |
|---|---|---|
| `s` | 3 | strength, `S_HIGHZ`(0) … `S_SUPPLY`(7), the eight levels of the Verilog scale |
| `x` | 1 | unknown: two drivers of equal strength disagree |
| `v` | 1 | logic value, meaningful when `s != S_HIGHZ` and `!x` |

`resolve(a, b)` gives the wired result of two drivers. The stronger one wins.
If the strengths are equal and the values differ, the result is unknown.
`rmos_reduce()` applies the strength loss of a resistive switch, using the
Verilog `rpmos`/`rnmos` table:

| in | supply, strong | pull | large, weak | medium, small |
|---|---|---|---|---|
| out | pull | weak | medium | small |

The model works because its strengths form a fixed chain. Each default is a
parameter:

| driver | strength | reaches the far side of an access switch as |
|---|---|---|
| write driver (`WD_STRENGTH`) | strong | pull at the cell node: beats the inverter, so the write succeeds |
| cell inverter (`INV_STRENGTH`) | weak | medium on the bitline: beats the stored charge, so the read succeeds |
| bitline charge (`CHARGE_STRENGTH`) | small | small at the cell node: loses to the inverter, so a read does not disturb the cell |
| precharge pull-up (`PU_STRENGTH`) | strong | — |
| sense amplifier output (`OUT_STRENGTH`) | strong | — |

If you change one of these, keep the order. For example, an inverter at
pull makes the cell unwritable. A bitline charge at medium or above makes
reads fail.

## Bidirectional terminals without `inout`

A bidirectional device terminal is split into two struct ports:

* `*_env` (input) is what **everything else** on that net drives, with this
  block's own contribution left out.
* `*_drv` (output) is what **this block** drives onto the net.

A switch copies the environment of one side, lowered one strength step,
onto the other side. It never sees its own contribution coming back, so the
switch network has no combinational loop as long as the switches form a
tree. In this design they do: Q – BL – BLB – QB.

`bitline_net` is the net. It takes the drive of the precharge, the write
driver and the cell. It gives each bidirectional driver its environment, and
gives readers (the sense amplifier) the resolved value. It also keeps the
line's **charge** as a further driver of small strength, in the manner of a
`trireg`. A precharged bitline therefore stays at 1 after the precharge is
released, until the cell pulls it down.

## Storage and timing

The only state is in flip-flops:

* the two cell nodes Q and QB, in `core_cell`;
* one charge bit per bitline, in `bitline_net`.

Each rising edge of `clk` is one evaluation step of the switch network. On
that edge every storage node takes its resolved value. An unknown or
undriven node keeps its old value. The cross-coupled inverters therefore
close their loop through the flip-flops. A write from both bitlines lands in
one clock. A write from one side only settles in two clocks.

Operations on the top, `sram_1cell`:

| operation | controls | result |
|---|---|---|
| precharge | `pre_n=0` for 1 clock | BL = BLB = 1 (strong while driven, then held as charge) |
| write d | `wl=1 we=1 din=d` for 1 clock | `cell_q = d` after the edge |
| read | precharge, then `wl=1 sae=1` | in the same cycle, `dout` = Q and `doutb` = QB, both at strong |
| idle | `sae=0` | `dout.s = doutb.s = S_HIGHZ` |

`rst_n` is an asynchronous, active-low reset. It clears the cell (Q=0,
QB=1) and sets both bitline charges to 1.

## Blocks

| module | role |
|---|---|
| `sram_pkg` | `sig_t`, strength enum, `resolve`, `rmos_reduce`, `mos_pass` |
| `rmos_switch` | one resistive MOS, `P_TYPE=1` RpMOS (on at gate 0), `P_TYPE=0` RnMOS |
| `rtranif0_sub` | two RpMOS facing opposite ways: substitute for `rtranif0` |
| `rtranif1_sub` | two RnMOS facing opposite ways: substitute for `rtranif1` |
| `core_cell` | two inverters plus two `rtranif1_sub` access switches gated by `wl` |
| `precharge` | two PMOS pull-ups plus an `rtranif0_sub` equaliser, all on `pre_n` |
| `write_driver` | drives `din` / `~din` onto BL / BLB while `we` is high |
| `sense_amp` | two `bufif1`-style buffers from BL / BLB to `dout` / `doutb` while `sae` is high |
| `bitline_net` | resolves one bitline and holds its charge |
| `sram_1cell` | top: everything above on one bitline pair |

## What follows the original model and what is chosen here

The following parts come from the circuit this model describes:

* the set of sub-circuits;
* the 6T cell;
* the rtranif1 substitutes as access transistors;
* the rtranif0 substitute as the precharge equaliser;
* each substitute built from two oppositely mapped resistive MOS devices
  with a shared control;
* the two-buffer sense amplifier;
* input and output ports only at the top.

The following are this model's own choices:

* **All strength values.** Only the principle of tuning strengths is given.
* **The clocked evaluation** and the flip-flop storage of cell nodes and
  bitline charge. The original is an event-driven netlist with `rpmos`,
  `rnmos` and `bufif1` primitives.
* **The env/drv split of bidirectional ports.**
* **Simplified contention.** Strengths are single levels, not Verilog's
  ambiguous-strength ranges. An unknown node holds its old value instead of
  going to x.
* **Value-level inverters.** The inverters are value drivers, not
  MOS pairs.
* **The write driver's insides.** It is a complementary tri-state driver,
  because only its function is given.
* **The precharge pull-ups** are PMOS passing strong.
* **Names and extras:** the control signal names, the reset values and the
  debug output `cell_q`.

Gate-level primitives with real strengths (`rpmos`, `tranif`, `trireg`) are
not used. An ATPG flow that needs them has to map `rmos_switch` back onto
the primitive.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`.

* `tb_rmos_switch` checks every strength, value and gate level against the
  reduction table.
* `tb_rtranif0_sub` and `tb_rtranif1_sub` use random environments. They also
  check that a strong driver on one side overpowers a weak one on the other.
* `tb_core_cell` checks:
  * the reset state;
  * isolation while the word line is low;
  * a one-clock write;
  * a one-sided write;
  * a non-destructive read at medium strength;
  * that a pull-strength driver cannot flip the cell.
* `tb_precharge` checks the pull-ups, and checks the equaliser alone in both
  directions using an instance with its pull-ups disabled.
* `tb_sense_amp` and `tb_write_driver` check their truth tables.
* `tb_sram_1cell` runs the top at its defaults. It does a random mix of
  about 300 reads, writes and charge-hold checks against a one-bit reference.
  It counts each mechanism and fails if one never occurs: precharge,
  equaliser conducting, charge held, write that flips, write of the same
  value, read 0, read 1, and high-impedance outputs.

Each testbench has been checked against a deliberately broken copy of its
module and fails on it.

## Simulating

```sh
verilator --binary --timing --assert -Irtl \
  rtl/sram_pkg.sv tb/tb_sram_1cell.sv --top-module tb_sram_1cell
./obj_dir/Vtb_sram_1cell
```

To run another testbench, put its file and name in place of
`tb_sram_1cell`. Verilator finds the other modules in `rtl/` by name,
since each lives in a file of its own name. All testbenches finish in well under a second.
