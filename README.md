# Control-signal gating for datapath buses

Wide datapath buses are heavy capacitive loads, and much of their switching is
wasted: a register is reloaded, or a mux select flips, while nothing downstream
will look at the result. Control-signal gating removes that switching without
touching the data path at all. For every bus it works out, from control signals
only, when the bus is an *observability don't-care* (ODC): a cycle in which no
value on it can reach an observed output. It then gates the control input of the
steering module that drives the bus (a register enable, a mux select, a
tri-state enable) with that condition, so the bus keeps its old value and does
not toggle. The only added hardware is a few gates in the control section.

This repository contains synthesizable SystemVerilog for the gating primitives
and for two small 64-bit datapaths that use them, with self-checking
testbenches that measure the reduction in bus activity.

## Steering modules and their don't-cares

Modules of a datapath fall into two groups.

* **Computational modules** (adders, shifters, multipliers) have no control
  inputs. Their inputs are treated as always observable (ODC = 0), even where
  one operand could mask another, because exploiting that would need new logic
  on the data path.
* **Steering modules** pass one input, or none, to their output under control
  of a control signal. For these the input's don't-care is simply the inverse
  of that control signal:

| Module | Input is unobservable when | Gated control signal |
|---|---|---|
| Tri-state driver | `tri_en` is low | `tri_en & ~ODC(out)` in the same cycle |
| Register | `reg_en` was low in the previous cycle | `reg_en & ~ODC(out)` of the *next* cycle |
| Multiplexer, input k | `sel_k` is low | select flip-flops load only when `~ODC(out)` of the *next* cycle |

The ODC of a bus is built backwards from the outputs:

* at a module input: `ODC(in) = ODC_M(in) | AND over the module's outputs of ODC(out)`
* at a bus with several fanouts: `ODC(bus) = AND over fanouts of ODC(fanout)`

Only control-signal terms are kept, so the expressions stay small. Primary
outputs of the datapath count as always observed (ODC = 0) unless the
environment supplies something better.

### The one-cycle-early ODC

A register decides in cycle T-1 whether to load, but its output is used in
cycle T. The gating therefore needs the ODC of cycle T while still in cycle
T-1. This design takes it from the D inputs of the control flip-flops that will
hold cycle T's control values. Every register and mux-select gate in the RTL
therefore has an input named `odc_next`: it is high in cycle T-1 when the
output will be a don't-care in cycle T.

### The load-before-use contract

Gating a register's load is safe only if nobody reads the register later
without reloading it. The rule used here is: **an operand consumed in cycle T
must be loaded in cycle T-1**. This is the normal pattern of a pipelined
execute unit, where operand registers are written at issue and read in the
next stage. Under that rule the gated and ungated designs give the same
result in every observed cycle, and the testbenches check exactly that. A
design that keeps values in a gated register for several cycles needs a wider
ODC than the one built here, which looks only one cycle ahead.

## The example datapath (`csg_example_datapath`)

```
 tdata ─[TReg]── TBus ──┐0
                         MUX── RBus ──(+)──[tri-state]── out_bus
 idata ─[IReg]── IBus ──┘1    mux_sel    ^           sum_en
                                         SBus
```

Working back from the output (ODC 0, primary output):

* `ODC(RBus) = ~sum_en`
* `ODC(IBus) = ~mux_sel | ~sum_en`
* `ODC(TBus) =  mux_sel | ~sum_en`

`example_gating_ctrl` evaluates these on the next-cycle control values
`mux_sel_d` and `sum_en_d`. It produces three effects:

* IReg loads only if `ireg_en & mux_sel_d & sum_en_d`.
* TReg loads only if `treg_en & ~mux_sel_d & sum_en_d`.
* The `mux_sel` flip-flop holds its value while the next `sum_en` is 0, so RBus
  does not switch when the sum is not driven.

The output driver is not gated: its ODC is 0.

Timing of one operation:

| cycle | inputs | visible |
|---|---|---|
| T-1 | `tdata`/`treg_en`, `idata`/`ireg_en`, `mux_sel_d`, `sum_en_d` | enables after gating (`*_en_gated`) |
| T | `sbus` | `out_bus = operand + sbus`, `out_driven = 1` if `sum_en`; otherwise `out_bus` keeps its last value |

`out_bus` and the add are combinational in cycle T. Everything else is a
rising-edge flip-flop with a synchronous active-low reset `rst_n`.

## The fanout example (`csg_fanout_example`)

DBus feeds two places: input 0 of a mux (one-hot selects `sel0`/`sel1`), and an
adder with outputs Sum and Carry. The ODCs are:

* mux path: `ODC(Fanout0) = ~sel0 | ODC(MuxOut)`
* adder path: `ODC(Fanout1) = ODC(Sum) & ODC(Carry)`
* DBus: `ODC(DBus) = ODC(Fanout0) & ODC(Fanout1)`

So the DBus register skips a load only when neither path needs the value.
Mux input 1 is driven by a second gated register. Because both mux inputs can
be kept quiet, gating the select flip-flops is worthwhile too. The ODCs of the
three outputs are inputs of the block (`odc_*_next`, one cycle early). An
output is guaranteed correct in a cycle whose ODC was announced as 0. What
drives DBus and the second mux input is not fixed by the method: gated
registers are this design's choice.

## Module map

| Module | Role |
|---|---|
| `csg_pkg` | `DATA_W = 64` |
| `gated_reg` | register, `en_gated = en & ~odc_next` |
| `gated_sel_mux` | 2:1 AND-OR mux with one-hot select flip-flops loaded only when `sel_en & ~odc_next` |
| `gated_tristate_bus` | N tri-state drivers with `tri_en & ~odc`; AND-OR resolution plus a keeper that holds the last driven value (a two-state model of a bus holder) |
| `csg_adder` | W-bit adder with carry out |
| `example_gating_ctrl` | control flip-flop for `sum_en` and the ODC equations of the example datapath |
| `csg_example_datapath` | the TReg/IReg/mux/adder/tri-state datapath |
| `csg_fanout_example` | the two-fanout DBus example |
| `csg_top` | both datapaths side by side (`ex_*` and `fo_*` ports), sharing clock and reset |

Both datapath modules have a `GATING` parameter. The default is 1. Setting it
to 0 forces every ODC to zero, which gives the ungated reference circuit. The
testbenches use that reference as the activity baseline. Internal buses and the
applied enables are brought out as ports so that their switching can be
counted.

Assertions check that mux selects are one-hot or idle, and that at most one
tri-state driver is on.

## How far it has been verified

Each module has a self-checking testbench in `tb/` (`<module>_tb`). Each one
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. The datapath
tests drive random operation streams that obey the load-before-use contract.
They check every observed output of both the gated and the ungated copy
against a reference model. They also count each gating event and require every
kind to occur: a dropped TReg/IReg load, a held select, a kept output bus, and
a DBus load kept because only one fanout was observed. `csg_top_tb` runs the
full 64-bit top for 5000 cycles. In that run the gated copy toggled:

| bus | gated | ungated |
|---|---|---|
| TBus | 31,770 | 95,252 |
| IBus | 33,119 | 98,208 |
| RBus | 64,985 | 136,480 |
| DBus | 98,065 | 129,051 |

That is a 61 % reduction on the example datapath's internal buses. These
numbers depend entirely on the random stimulus: the sum is driven in 40 % of
cycles and loads are random. They are not a power estimate. Switching added in
the control logic is not counted.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/csg_pkg.sv tb/csg_top_tb.sv --top-module csg_top_tb
./obj_dir/Vcsg_top_tb
```

Replace `csg_top_tb` with any other testbench name to run that test. The
simulations take well under a second.

## Departures and limits

* Only the two small example datapaths are built. The method was originally
  evaluated on a 64-bit integer execute unit of a superscalar processor. That
  unit has 3 input buses, 2 output buses, 7 computational modules and 11
  steering modules (3 input registers, one 2:1 mux, one output register and 6
  tri-state drivers), but its netlist and control are not available. The
  benchmark programs it ran are therefore not reproduced.
* The CAD side of the method is not included: the topological traversal that
  derives ODCs and gated enables automatically. The gating equations in the RTL
  were derived by hand using the rules above.
* The ODC looks one cycle ahead only, with the load-before-use contract
  described above.
* High-impedance states are not modelled. A tri-state bus is an AND-OR of its
  drivers plus a keeper.
* Reset (synchronous, active low, to zero) and the zero output of a mux with no
  select line high are this design's choices.
