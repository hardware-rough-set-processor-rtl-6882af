# CORE-PHIDM: a parallel engine for the rough-set core of large decision tables

In rough-set theory a *decision table* is a set of objects. Each object has
condition attributes and one decision attribute. The *core* is the set of
condition attributes that cannot be dropped without losing the ability to
tell decision classes apart. It has a simple characterisation. Attribute `a`
is in the core exactly when some pair of objects has different decisions and
differs in `a` alone. In the language of the discernibility matrix, these are
the cells that hold a single attribute.

The usual algorithm builds the whole discernibility matrix, which has |U|²
cells. That does not fit on a chip for millions of objects. This engine never
stores the matrix. It works on pairs of table *parts* of up to `N_PART`
objects each. Two steps repeat:

* A host processor loads one part into a common memory, `RAM_cmn`. It loads
  up to `P_SUB` other parts into the local memories (`RAM_n`) of `P_SUB`
  identical *subCORE* blocks.
* The hardware compares every object of `RAM_cmn` with every object of each
  `RAM_n`. For each pair it checks every attribute at once, and it keeps the
  single-attribute results.

Each run's partial result is ORed into a `CORE` register. After the host has
gone through all pairs of parts, `CORE` holds the core.

The architecture (common RAM, subCORE blocks, and inside them the
comparators, singleton detectors, OR cascade and control logic) is taken from
the published CORE-PHIDM design, evaluated on a Stratix III FPGA with a NIOS II
soft processor as the host. Everything around that architecture is this
implementation's own choice, and is marked as such below. That covers the host
write port, the object counts, the run handshake, the cycle counter and the
part size.

## Object format

An object is one word of `N_COND+1` fields, each `ATTR_W` bits wide:

```
 bit  ATTR_W*(N_COND+1)-1                                        0
      | decision | cond N_COND-1 | ... | cond 1 | cond 0 |
```

The default word is 64 bits: sixteen 4-bit fields, that is 15 condition
attributes plus the decision in bits 63:60. Each attribute value is a 4-bit
code produced by discretising the data beforehand. Tables with fewer
attributes fill the unused condition fields with zeros. Two zero fields never
differ, so they never reach the core. Some example layouts:

* A poker-hand table (ten attributes) uses 44 bits.
* A 12-attribute clinical table uses 52 bits.
* The small binary example used in the tests (`ATTR_W = 1`, `N_COND = 4`) is a
  5-bit word with the decision in the MSB.

Two objects differ in attribute `a` if any bit of field `a` differs.

## Data path of one subCORE

```
             RAM_cmn (N_PART objects, all read in parallel)
               |obj0        |obj1               |objN-1
   RAM_n ---> [CB]  ------> [CB]  ----  ...  -> [CB]        <- y broadcast
     |  ^       |             |                   |
   MUX_n|     [SD]          [SD]                [SD]
     ^  |       |flag,word    |                   |
 Control        v             v                   v
  Logic     0 ->[OR]-------->[OR]----- ... ---->[OR]--> TEMP --> OR into CORE
```

* **Control logic** (`subcore_ctrl`) steps an index through `0 .. count-1`,
  one per clock.
* **MUX_n** (`mux_n`) picks that object `y` from `RAM_n` (`ram_n`) and
  broadcasts it to all `N_PART` comparators.
* **CB** (`cb`): comparator `i` compares `y` with object `i` of `RAM_cmn`.
  Its output has one bit per condition attribute, set where the codes differ.
  If the two decisions are equal, or if slot `i` of `RAM_cmn` is empty, the
  whole word is zero. So the "different decision classes" test of the
  algorithm is folded into the comparator.
* **SD** (`sd`) is the singleton detector. It passes the word only if exactly
  one bit is set; otherwise it outputs zero. Its one-bit flag enables the
  matching OR stage.
* **OR cascade** (`or_cascade`): each stage computes
  `OUT = IN_SD ? (IN_PREV | IN_CB) : IN_PREV`. The last output is the
  sub-core found in this cycle. `TEMP` registers it.

In one clock a subCORE therefore settles `N_PART` object pairs over all
attributes. The attribute loop of the software algorithm costs no time. The
chain is written as a chain, as described; synthesis may rebalance it into a
tree.

Which side is broadcast is a choice. Here the objects of `RAM_cmn` feed the
comparators in parallel, and `RAM_n` is scanned. The block-diagram
description says this, while the worked example speaks of scanning the common
RAM. Both compare the same set of pairs.

## The engine and its host

`core_phidm` holds `RAM_cmn` (`ram_cmn`), `P_SUB` subCOREs and the `CORE`
register. Each cycle it ORs together the `TEMP` outputs of all subCOREs and
ORs the result into `CORE`. `TEMP` is zero when it holds no result. `CORE`
keeps accumulating across runs until `clear_core`.

The host runs the outer loops. For a table of `n` objects cut into
`m = ceil(n / N_PART)` parts:

```
clear_core
for i in 0 .. m-1:
    load part i into RAM_cmn                  (cmn_count = its size)
    for j = i, i+P_SUB, i+2*P_SUB, ... < m:
        load parts j .. j+P_SUB-1 into RAM_1 .. RAM_P_SUB
        (a subCORE with no part left gets sub_count = 0 and sits the run out)
        pulse start, wait for done
core is the result
```

Only pairs of parts with `j >= i` are compared, because the matrix is
symmetric. A part is also compared with itself. That covers every pair of
objects, and an object's comparison with itself gives zero. The last part may
be shorter than `N_PART`: the counts mask its empty slots, so no padding is
needed. `tb/tb_core_phidm.sv` and `tb/tb_workloads.sv` contain this host
procedure as SystemVerilog tasks.

### Interface of `core_phidm`

| signal | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low (control state and `CORE`; memories are not reset) |
| `wr_en`, `wr_sel`, `wr_addr`, `wr_data` | in | 1, clog2(P_SUB+1), clog2(N_PART), object | write one object; `wr_sel` 0 is `RAM_cmn`, `k` is `RAM_k` |
| `cmn_count`, `sub_count[k]` | in | clog2(N_PART+1) | valid objects in each memory; hold them stable during a run |
| `start` | in | 1 | pulse; accepted while `busy` is 0 |
| `clear_core` | in | 1 | pulse while idle: clears `CORE` and the cycle counter |
| `busy`, `done` | out | 1 | `busy` from the cycle after `start` until `done`; `done` is a one-cycle pulse |
| `core` | out | N_COND | bit `a` set means condition attribute `a` is in the core |
| `busy_cycles` | out | 48 | cycles spent busy since the last clear (time measurement unit, `cycle_timer`) |

Assertions in `core_phidm` flag a write or a `start` while `busy`.

### Timing

* A run takes `max(sub_count) + 2` cycles from the clock edge that samples
  `start` to the edge after which `done` is high.
* Object `y = i` of every `RAM_n` is compared in cycle `i+1`.
* Its `TEMP` is merged into `CORE` one cycle later.
* A final cycle detects that nothing is left in flight.
* A run settles up to `P_SUB × N_PART × N_PART` object pairs, 16 384 at the
  defaults.
* Writes take one object per clock, so loading the parts usually costs more
  cycles than the comparisons. For example, the 10 000-object test table
  needs 206 640 busy cycles and about 1.02 M cycles including the writes.

Work for a whole table grows as n²/(N_PART·P_SUB). For one million objects
at the defaults that is 30.5 M runs and about 2.0·10⁹ busy cycles (40 s at
50 MHz), before the cost of loading. The published measurements with a soft
processor doing the loading are several times longer for this reason.

## Parameters

| parameter | default | origin |
|---|---|---|
| `ATTR_W` | 4 | four-bit attribute codes, as in the evaluated system |
| `N_COND` | 15 | 64-bit object words (evaluated system) = 16 fields minus the decision |
| `N_PART` | 64 | objects per part; **this design's choice** (the example uses 12). 64 comparators per subCORE are in line with the logic cost per subCORE reported for the FPGA build |
| `P_SUB` | 4 | number of subCOREs; the evaluated system was built with 1, 2 and 4 |

`rtl/rs_pkg.sv` holds the defaults. Every module takes the same parameters,
so the engine can be built for the binary example (`ATTR_W=1, N_COND=4,
N_PART=12, P_SUB=1`) or for any other size.

Resource notes:

* At the defaults, `RAM_cmn` and each `RAM_n` are register arrays of 64 × 64
  bits, about 20 k flip-flops in total.
* `RAM_cmn` must be read in parallel, so it cannot be a block RAM.
* `RAM_n` is read through a multiplexer. It could be replaced by a one-port
  RAM with a registered read if one cycle of latency is added to the control
  logic.

## Files

| file | content |
|---|---|
| `rtl/rs_pkg.sv` | default sizes, word-width helper |
| `rtl/core_phidm.sv` | top: RAM_cmn, subCOREs, CORE register, run sequencing, cycle counter |
| `rtl/ram_cmn.sv` | common part memory with parallel read and slot enables |
| `rtl/subcore.sv` | subCORE generator block |
| `rtl/ram_n.sv`, `rtl/mux_n.sv`, `rtl/subcore_ctrl.sv` | local part memory, object multiplexer, index sequencer |
| `rtl/cb.sv`, `rtl/sd.sv`, `rtl/or_cascade.sv` | comparator, singleton detector, gated OR cascade |
| `rtl/cycle_timer.sv` | saturating busy-cycle counter |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_core_phidm.sv` | end-to-end test at default size (see below) |
| `tb/tb_example.sv` | the 12-object binary example through the whole engine in its own configuration |
| `tb/tb_configs.sv`, `tb/core_phidm_host.sv` | engines with 1, 2 and 4 subCOREs on the same 700-object table, each with its own host procedure |
| `tb/tb_workloads.sv` | poker-hand tables (1 000, 2 500, 5 000 objects) and repeated 107-row tables (1 000 to 10 000 objects) at default size |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. The expected values are computed independently in the testbench:
from the definition of the core, field by field, or by `$countones`. The main
tests:

* `tb_core_phidm` runs the engine with all parameters at their defaults. The
  testbench acts as the host and processes two tables:
  * 300 objects, whose decision ignores attributes 6..9. These attributes must
    stay out of the core, and the last part is short.
  * A 107-row base repeated to 1 000 objects, whose reference is computed on
    the base alone.

  It checks the latency of every run and the busy-cycle counter. It also
  counts and requires each mechanism: a short part, an idle subCORE, a
  singleton entry, a multi-attribute entry rejected, an equal-decision
  single-difference pair masked, the core growing over runs, and a clear.
* `tb_subcore` and `tb_example` replay the binary example. The first `TEMP` is
  `0111` (object 1 against all twelve), and the final core is `1111`.
* `tb_workloads` builds real poker hands with their hand class (nothing to
  royal flush) as the decision, and repeated tables of the clinical kind. The
  clinical rows are synthetic, because the original data is not bundled.
* `tb_configs` runs engines with 1, 2 and 4 subCOREs on one table. All three
  must give the reference core.
  * Busy time falls by 1.83× and 3.14× relative to one subCORE.
  * Time including object loading, which the host does one object per clock
    here, falls only by 1.27× and 1.47×. With more subCOREs, copying the data
    becomes the limit.

For each module, a copy with one deliberate bug was checked to make its
testbench fail.

To run a test with Verilator 5 (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert --top-module tb_core_phidm \
    -y rtl -y tb +libext+.sv -Irtl rtl/rs_pkg.sv tb/tb_core_phidm.sv -o sim
./obj_dir/sim
```

Replace `tb_core_phidm` by any other testbench name. The default-size tests
build in about 15 s and run in a few seconds.

## Limits and departures

* **The host processor and its bus are not included.** They are replaced by a
  plain write port with one object per clock. The testbenches implement the
  host's loops.
* **Equal decisions are masked in the comparator.** The comparator outputs
  zero for a pair with equal decisions. The example's comparator words show
  this, although the component description mentions only the attribute test.
* **The part size `N_PART` is chosen here.** The counts, `start`/`busy`/`done`
  and `clear_core` are this design's own additions.
* **The time measurement unit is this design's own form.** It was only named
  in the source; here it is a 48-bit saturating counter of busy cycles.
* **Only consistent tables without missing values are handled.** Two identical
  objects with different decisions give an all-zero word and add nothing.
