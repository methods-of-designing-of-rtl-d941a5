# Compositional microprogram control units (CMCUs)

A control unit steps through a control algorithm, given as a flow-chart. Each
*operational vertex* of the flow-chart issues a set of microoperations `Y`. Each
*conditional vertex* tests one logic condition `x` and picks the next vertex.
Written as a plain finite-state machine, every vertex is a state, and the output and
next-state logic grow with the flow-chart.

A compositional microprogram control unit divides this work between a memory and a
very small state machine:

* The operational vertices are grouped into **operational linear chains (OLCs)**.
  An OLC is a run of vertices that always follow one another.
* Each chain is stored at consecutive addresses of a **control memory CM**, one
  microinstruction per vertex.
* A **counter CT** supplies the address. Inside a chain it only counts up.
* Logic is needed only at the **output** of a chain, where the next vertex depends on
  the conditions. There a **combinational circuit CC** computes the address the
  counter loads next.

So the state machine tracks chains, not vertices. The microinstructions carry no
next-address field.

This repository holds four variants of this structure in synthesizable
SystemVerilog. All four run the same example microprogram.

## The four structures

| unit | module | what CC computes | what else is in the path |
|---|---|---|---|
| U_MM, mutual memory | `cmcu_umm` | `T = f(X, A)`, the load address, from the whole address `A` | none |
| U_FD, function decoder | `cmcu_ufd` | `Z = f(X, A)`, a short code of the target chain input | FD memory: `T = f(Z)` |
| U_OI, outputs identification | `cmcu_uoi` | `T = f(X, Q)` from a few address bits `Q` | none |
| U_OIFD, both | `cmcu_uoifd` | `Z = f(X, Q)` | FD memory: `T = f(Z)` |

```
U_MM    X,A -> CC -T-> CT -A-> CM -> Y          (y0, yk from CM back to CT)
U_FD    X,A -> CC -Z-> FD -T-> CT -A-> CM -> Y
U_OI    X,Q -> CC -T-> CT -A-> CM -> Y          (Q = some bits of A)
U_OIFD  X,Q -> CC -Z-> FD -T-> CT -A-> CM -> Y
```

All four variants aim to shrink CC, the only part that has to be built from logic
gates or LUTs. The two memories can go into memory blocks.

* **Function decoder.** An R-bit address has R output functions. The chain inputs
  that can be jumped to are numbered instead, using `ZW = ceil(log2(count))` bits.
  CC then outputs only that number, and a small memory FD translates it back into an
  address. The cost is a second memory.
* **Outputs identification.** CC only matters when the counter sits at a chain
  output. So CC needs only enough address bits to tell the chain outputs apart,
  not all R bits. These bits are `Q`. Addresses must be assigned so that a small `Q`
  exists. The bits are chosen with the parameter `Q_MASK`. `Q` is made of the masked
  bits of `A`, lowest selected bit first.

`cmcu_top` places the four units side by side, each with its own ports. They are
alternative realisations of the same algorithm and do not talk to each other. Given
the same start and conditions, all four produce the same `Y` on every clock.

## Microinstruction and counter rules

A CM word has `N+2` bits: `{yk, y0, y_N .. y_1}`. The microoperations are one-hot
coded, one bit per microoperation.

| bits | meaning |
|---|---|
| `y0 = 1` | the next vertex is the next one in this chain: increment the address |
| `y0 = 0`, `yk = 0` | chain output: load the address `T` from CC (or from FD) |
| `yk = 1` | last microinstruction: stop fetching (`y0` must be 0, which is asserted) |

The counter `cmcu_ct` holds the address `A` and a fetch flip-flop, `busy`. On each
rising clock edge:

```
idle:               start -> A = A_START, busy = 1        (start is ignored while busy)
busy and yk = 1:    busy = 0, A holds
busy and y0 = 1:    A = A + 1
busy, otherwise:    A = T
```

Timing seen at a unit's ports:

* A single microinstruction is executed per clock. A jump between chains costs no
  extra clock, because CM and FD are read combinationally.
* `start` is sampled while the unit is idle. One clock later, `y` shows the first
  microinstruction.
* The conditions `x` are used on the clock edge that ends a chain-output
  microinstruction. They must be stable before that edge.
* `busy` is high on every clock on which `y` is valid, the last microinstruction
  included. `busy` falls on the next clock.
* `y` is forced to zero while idle.
* `rst_n` is asynchronous and active low. It puts `A = A_START` and makes the unit
  idle.

## The example microprogram

The tables in `cmcu_pkg` encode one small flow-chart. It has 11 operational vertices
`b1..b11`, conditions `x1..x3` (`x[0]..x[2]`) and microoperations `y1..y8`.

| chain | vertices | addresses | at its output |
|---|---|---|---|
| a1 | b1 b2 b3 | 0-2 | b3: `x1` → b4; `!x1 & x2` → b7; `!x1 & !x2` → b8 |
| a2 | b4 b5 b6 | 3-5 | b6: `x2` → b8; `!x2` → b10 |
| a3 | b7 b8 b9 | 6-8 | b9: `x3 & x1` → b2; `x3 & !x1` → b4; `!x3` → b10 |
| a4 | b10 b11 | 9-10 | b11 → end (`yk`) |

Some jumps enter a chain in its middle (b2, b8). This is allowed: any vertex that is
reached from outside its chain is an *input* of that chain.

* **Function decoder codes.** The inputs reached from chain outputs are b2, b4, b7,
  b8 and b10. Their codes `Z` are 0 to 4, so `ZW = 3`.
* **Outputs identification.** The chain outputs are at addresses 2 (`0000_0010`),
  5 (`0000_0101`) and 8 (`0000_1000`). Bits A3 and A0 already tell them apart, so
  `Q_MASK = 8'b0000_1001` and `QW = 2`. Plain consecutive addressing is enough here.
  Larger flow-charts usually need the addresses rearranged so that a short `Q` exists.
  Address 10 (b11) has the same `Q` as b9, which is harmless: the counter stops on
  `yk` and ignores `T`.

The default address width `R = 8` gives a 256-word CM, of which the example uses 11
words. A flow-chart with up to 256 operational vertices therefore fits in CM. The FD
and the CC table, however, are sized for the example.

## Loading a different microprogram

Every unit takes the whole microprogram as parameters, so no RTL has to change:

* `CM_INIT[2**R]`: one `{yk, y0, Y}` word per vertex. Each chain's vertices go at
  consecutive addresses. `y0 = 1` everywhere except at chain outputs and the last
  vertex.
* `ROW_A` or `ROW_Q`, `ROW_XMASK`, `ROW_XVAL`, `ROW_T` or `ROW_Z` (`ROWS` entries): the
  transition table of CC, one row per product term. A row fires when the key (A or Q)
  equals its key and `(x & XMASK) == XVAL`. The outputs of all rows that fire are
  ORed, so the rows belonging to one chain output must be mutually exclusive. When
  nothing fires, the output is 0.
* `FD_INIT[2**ZW]`: the address of each chain input, indexed by its code.
* `R`, `N`, `L`, `ZW`, `QW`, `Q_MASK`, `A_START`: the sizes, the Q bits and the first
  address.

Synthesis turns the CC table into the sum-of-products logic of the excitation
functions, and the CM and FD arrays into ROMs.

## Files

| file | content |
|---|---|
| `rtl/cmcu_pkg.sv` | sizes and the example microprogram (CM image, CC tables, FD contents) |
| `rtl/cmcu_cc.sv` | combinational circuit CC, driven by the transition table |
| `rtl/cmcu_ct.sv` | address counter with its fetch flip-flop |
| `rtl/cmcu_cm.sv` | control memory (ROM, combinational read) |
| `rtl/cmcu_fd.sv` | function decoder (ROM, combinational read) |
| `rtl/cmcu_umm.sv`, `cmcu_ufd.sv`, `cmcu_uoi.sv`, `cmcu_uoifd.sv` | the four units |
| `rtl/cmcu_top.sv` | the four units side by side |
| `tb/cmcu_ref_pkg.sv` | reference walk of the example flow-chart, vertex by vertex |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. To run the
end-to-end test:

```
verilator --binary --timing --assert -Mdir obj_top \
  rtl/cmcu_pkg.sv tb/cmcu_ref_pkg.sv rtl/cmcu_cc.sv rtl/cmcu_ct.sv rtl/cmcu_cm.sv \
  rtl/cmcu_fd.sv rtl/cmcu_umm.sv rtl/cmcu_ufd.sv rtl/cmcu_uoi.sv rtl/cmcu_uoifd.sv \
  rtl/cmcu_top.sv tb/tb_cmcu_top.sv --top-module tb_cmcu_top
obj_top/Vtb_cmcu_top
```

The other testbenches build the same way, each with its module and the modules that
module uses.

How the design is checked:

* **Against an independent reference.** The checks do not reuse the RTL's tables.
  `cmcu_ref_pkg` walks the flow-chart by vertex number and knows nothing of
  addresses, chains or tables. The unit testbenches and `tb_cmcu_top` compare `y`
  and `busy` with this walk on every clock, over thousands of runs with random
  conditions.
* **Mechanism coverage.** `tb_cmcu_top` runs all four units at their default
  parameters, each with its own random start times and conditions. For every unit it
  requires at least one start, in-chain increment, end and ignored start, and every
  jump of the flow-chart. It prints how often each happened.
* **Unit checks.** `tb_cmcu_cc` tries every key with every condition vector, for
  both the A-keyed T table and the Q-keyed Z table. `tb_cmcu_cm` and `tb_cmcu_fd`
  read every word. `tb_cmcu_ct` checks the counter against a model under random
  stimulus, including an asynchronous reset in the middle of a run.

## What is fixed by the method and what is chosen here

**Taken from the CMCU method:**

* the four structures and what each CC computes;
* the microinstruction format of `N+2` bits, with `y0` and `yk`;
* increment inside a chain, and a load from CC (or FD) at a chain output;
* the counter set to the first address at the beginning;
* stopping on `yk`;
* the function decoder as a memory.

**Chosen in this design:**

* **Sizes and contents.** The example flow-chart with all its tables, and the default
  sizes (`R = 8`, `N = 8`, `L = 3`, `ZW = 3`, `QW = 2`).
* **Word layout.** The bit order `{yk, y0, Y}` of a CM word.
* **Control interface.** The `start`/`busy` handshake. `busy` is realised as a fetch
  flip-flop, `start` is ignored while busy, and `y` is forced to zero while idle.
* **Reset.** An asynchronous active-low reset.
* **Memory reads.** CM and FD are read combinationally. On an FPGA with
  synchronous-read memory blocks, the address register of the memory block would take
  the counter's place, or one clock would be added per microinstruction.
* **Form of CC.** CC is written as a transition table. The method only states the
  functions CC computes.
* **Choice of Q.** `Q` is found from the plain consecutive addresses of the example.
  The special address assignment that makes `Q` small for large flow-charts is not
  done here. It has to be worked out outside the RTL and given through `CM_INIT`,
  `Q_MASK` and the tables.

**Not included:**

* The finite-state-machine implementation that these structures are usually compared
  against.
* The synthesis flow that derives the tables from a flow-chart (chain partitioning,
  address assignment, coding of the chain inputs). The RTL takes the result of that
  flow as parameters.
