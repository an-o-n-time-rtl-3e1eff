# Discrete relaxation engines for the consistent labeling problem

This RTL solves the consistent labeling problem by discrete relaxation. You
have `N` objects and `M` possible labels, for example regions of an image and
the colours they might have. Each object starts with a set of candidate
labels. A compatibility relation says which label of one object can coexist
with which label of another. Relaxation discards every label that has no
compatible partner at some other object. It repeats until a whole pass
discards nothing. What is left is the largest arc-consistent labeling
contained in the starting one.

Written as Boolean algebra, the update for label `k` of object `i` is

```
l_ik  <-  AND over j of ( OR over p of ( l_jp & l_ik & C_ij(k,p) ) )
```

`C_ij(k,p) = 1` when label `k` at object `i` is compatible with label `p` at
object `j`. `C_ii` is normally the identity. For that reason the term for
`j = i` simply returns `l_ik`.

The repository holds two engines for this rule. They share the processing
cell and the controller.

| engine | how the data move | cycles per iteration (default 8 x 8) | compatibility data |
|---|---|---|---|
| **DRA2** (`dra2_system`) | the labeling circulates through a shift register past a fixed array | `N*M` (64) | one `C_ij` shared by all pairs of different objects, plus `C_ii` |
| **DRA3** (`dra3_system`) | the labeling stays in a RAM; a switch configuration moves past it | `2*N` (16) | one `M x M` matrix per ordered object pair |

`dra_top` holds both engines side by side. They share clock and reset and
nothing else.

## The processing cell and the array

A single inner `OR` of the rule is one processing element, `dra_cell`. It
receives three things:

- the `M` label bits of one object `j`, on vertical wires;
- the bit `b_k = l_ik`, broadcast along row `k`;
- row `k` of a compatibility matrix.

It returns `Out(j,k) = OR_p(l_jp & b_k & C(k,p))`. The logic is written as two
levels of NOR: each term is the NOR of the complemented operands, and the terms
are combined by a NOR and an inverter.

The cells are arranged as `N` columns (objects) by `M` rows (labels). An `AND`
across row `k` gives the new `l_ik`. So one evaluation of the array
relaxes all `M` labels of one object `i` at once.

Where does `b_k` come from? One cell per row, called **Cell-A**, takes label
`k` of the object it sees and drives it onto the row wire. All the other
cells (**Cell-B**) only listen.

An object's new vector is written back at once, so the objects after it in
the same pass already see it. A pass is therefore closer to Gauss-Seidel than
to Jacobi, and it usually needs fewer passes.

## DRA2: the circulating labeling

```
            Lambda in ->[ 64-bit L shift register (LSR)  | L_i field ]-> L out
                          |64 label bits down        ^ 8 new bits up
   C_ij (8x8 SR) ->[      8 x 8 SIMD array (Cell-B ... Cell-B Cell-A) ]<- C_ii (8x8 SR)
                          control: comparator over the L_i field, timer,
                                   States register, FSM
```

Bit `j*M+p` of the LSR is label `p` of the object presented at array column
`j`. Column 0 is the rightmost column and holds the Cell-As. The rightmost
`M`-bit field is the object being relaxed.

The register rotates right by one bit per clock. After `M` clocks the next
object's vector is in the field, and the one just processed has wrapped round
to the top. So at row step `i`, column `c` sees object `(i + c) mod N`. Column
0 always holds object `i` itself, which is why it gets `C_ii` and all other
columns get `C_ij`.

A row step is `M` cycles:

1. **Updating** (1 cycle). The array output (the new `L_i`) is compared with
   the old field. The result, row-eq, goes into the States register. The new
   vector replaces the field and the first shift happens in the same clock.
2. **Systolic Shifting** (`M-1` cycles). The register keeps rotating.

An iteration is `N` row steps, or `N*M` cycles. The timer's tagged bit marks
its last cycle, after which `l_11` is back in the field. Because the array has
only one `C_ij`, DRA2 covers problems where every pair of different objects
obeys the same relation. Region colouring of mutually neighbouring regions is
one example.

## DRA3: the moving architectural wavefront

DRA3 turns DRA2's scheme around. The labels stay in a static RAM
(`dra3_label_ram`), and word `j` always drives the vertical wires of column
`j`. Each array position is a module `M_jk` (`dra3_module`), which contains
three parts:

- the same processing cell;
- a small row-readable RAM (`dra3_cram`): word `i` holds `C_ij(k,1..M)`;
- a switching node `SN_jk`, which puts `l_jk` onto the horizontal wire `b_k`
  when column `j` is selected.

A one-hot ring register (`dra3_wavefront`) selects one column per row step.
That selected set of switches is the architectural wavefront. Bit 0 is the
rightmost column, object 1. The selection moves from right to left, one
column per row step, and wraps round after `N` steps. At row step
`i`, three things happen together:

- the `SN` switches of column `i` drive `b_k = l_ik`;
- every module RAM is read at address `i`, so each module holds `C_ij(k,:)`
  for its own `j`;
- the bus switches `BS_i` of the same column steer the array's output back
  into word `i`.

The compatibility data therefore sit in plain index order. They never move,
and no reordering is needed when they are loaded.

A row step is one Updating cycle (compare, then write through `BS_i`) and one
Shifting cycle (the wavefront moves one column). An iteration takes `2*N`
cycles, whatever `M` is. Each object pair has its own matrix, so any binary
constraint problem of this size can be run. That includes region colouring
with an arbitrary neighbour graph: for pairs that are not neighbours, set
`C_ij` to all ones.

The old `L_i` that the comparator needs is just the vector on the `b` wires.

## Controller

`dra_control` is used unchanged by both engines. It holds four units:

- `dra_comparator`: compares the new and old vectors and produces row-eq;
- `dra_timer`: tracks the row index, the phase in the row step, the tagged
  bit, and a counter for the load and unload phases;
- `dra_state_sr`: an `N`-bit register of the last `N` row-eq bits; its
  all-eq output is high when all of them are 1;
- `dra_fsm`: the state machine below.

The parameter `STEP` sets the length of a row step: `M` for DRA2, 2 for DRA3.

| code | state | what happens |
|---|---|---|
| 0000 | Reset | wait for `start` |
| 0001 | Input All | the host loads labels and compatibility data (`in_ready` high) |
| 0010 | Stop S2 | input shifting stops |
| 0011 | Iteration Entrance | timer, States register and wavefront cleared |
| 1001 | Waiting | one cycle for the array to settle |
| 0100 | Updating | new `L_i` compared and written back |
| 0101 | Systolic Shifting | rotate (DRA2) or advance the wavefront (DRA3) until the row step ends |
| 0110 | Completion | converged |
| 1010 | Waiting | one cycle |
| 0111 | Output | the result is unloaded |
| 1000 | Ending | `done` high until reset |

The relaxation leaves the Updating/Shifting loop only on a tagged cycle, the
last of an iteration, while all-eq is high. That means every object came out
of the iteration unchanged. The States register is cleared on entry, so a
stale result cannot end the run.

The rule only ever removes labels, so the loop always ends. It takes at most
`N*M + 1` iterations. `iterations` reports the count, including the final
iteration that changed nothing.

## Host interfaces and timing

All registers use the rising edge of `clk`. `rst_n` is an asynchronous reset,
active low. Pulse `start` for one cycle in state Reset. During Input All,
`in_cnt` tells the host which item to drive in the current cycle.

**DRA2 (serial).** Three bit streams are loaded in parallel, all row-major:

- `lam_in`: the initial labeling `l_11, l_12, ..., l_NM`, during the first
  `N*M` cycles;
- `cij_in` and `cii_in`: the two matrices `C(1,1), C(1,2), ..., C(M,M)`,
  during the first `M*M` cycles.

The load lasts `max(N*M, M*M)` cycles. The result leaves on `l_out`, row-major,
while `l_out_valid` is high. From the first Input All cycle to the first
`done` cycle:

```
max(N*M, M*M) + 3 + iterations*N*M + 2 + N*M   cycles
```

**DRA3 (one `M`-bit word per cycle on `in_data`).** The load is `N + N*N*M`
words:

- words `0..N-1`: `L_1..L_N` (bit `p` is label `p+1`);
- word `N + (i*N + j)*M + k`: row `k` of `C_ij` (bit `p` is `C_ij(k+1,p+1)`).

The result leaves as `L_1..L_N` on `out_data` while `out_valid` is high.
Latency:

```
N + N*N*M + 3 + iterations*2*N + 2 + N   cycles
```

At 8 x 8 an iteration is 64 cycles on DRA2 and 16 on DRA3. The published
targets were a 120 ns clock for DRA2 (3 um NMOS) and at least 500 MHz for
DRA3 (1 um GaAs). At those clocks an iteration would take about 7.7 us and
32 ns.

## How far this follows the original architecture

These parts follow it:

- the cell equations and their two-level NOR form;
- the Cell-A/Cell-B array, with the row broadcast and the row AND;
- the 64-bit circulating register: its bit order, its one-place-per-clock
  right rotation, and an `N*M`-cycle iteration;
- the two compatibility register sets, `C_ij` and `C_ii`;
- the comparator, the `N`-bit States register and all-eq;
- the tagged bit at the end of an iteration;
- the FSM's eleven states and their codes;
- DRA3's modules (PE plus row-readable RAM), the SN and BS switches, the static
  label RAM and the one-column-per-step wavefront.

These are choices of this design, because the original leaves them open:

- The host protocols, the bit and word orders, and the load and unload
  timing.
- Reset behaviour.
- The conditions on the FSM's transitions. The state graph gives only the
  order of the states.
- Self-timed handshakes are replaced by one synchronous clock. Every
  non-looping state lasts one cycle.
- In DRA2, the parallel load of the new vector is merged into the first shift
  of the row step. This gives exactly `N*M` cycles per iteration.
- The tagged bit is taken as "last cycle of the iteration". The original
  describes it as an AND of the `l_11` position and the 64th timer count.
- DRA3's row step is two cycles, because it reuses the DRA2 state loop.
- DRA3's C RAM is read asynchronously, and its label RAM is a bank of
  registers.
- DRA3's comparator reads the old vector from the broadcast wires.
- Analog switches are modelled as gated drivers onto an OR-ed wire.

Some things are not included:

- the host computer;
- the separate pre-shuffling chip of an earlier DRA3 candidate (the version
  built here makes it unnecessary);
- pads and layout.

The conventional single-processor design (DRA1) that both engines improve on
is not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. `tb/tb_dra_ref_pkg.sv`
is the software reference for the tests. It applies the rule pass by pass, in
the same object order as the hardware.

- `tb_dra2_system` and `tb_dra3_system` run the three-region colouring example
  (region 1 red, region 3 blue, all regions different) on a 3 x 3 instance.
  The result must be red, green, blue after 2 iterations. They then run twelve
  random 8 x 8 problems, compared bit for bit, with the iteration count and
  the exact cycle latency checked. DRA3's problems use random neighbour graphs
  and fully random per-pair matrices.
- `tb_dra_top` runs both engines at the default size on the same problems and
  requires identical results. The problems include a "ladder" matrix that
  needs several iterations and an already consistent labeling that converges
  in one. The test also counts that each mechanism happened: serial and word
  loads, changed rows, multi-iteration and single-iteration runs, the
  wavefront wrapping round, convergence exits and unloads.
- `tb_dra_sizes` (with its helper `tb_dra_size_run`) runs DRA2 with 16 objects
  x 8 labels and DRA3 with 16 x 16. Each gets colouring, random and chain
  problems. A chain problem strips one label per pass and so runs for many
  iterations. Results, iteration counts and cycle counts are checked.
- The block tests check each unit against an independent model: cells, array,
  registers, timer, States register, FSM sequence, control-module latency,
  RAMs and wavefront.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dra_pkg.sv tb/tb_dra_ref_pkg.sv tb/tb_dra_top.sv --top-module tb_dra_top
./obj_dir/Vtb_dra_top
```

For another test, replace `tb_dra_top` with its name. To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/dra_pkg.sv rtl/dra_top.sv
```

Lint reports unconnected pins (cell pass-through outputs that the array does
not need) and a reset used both in flip-flops and in assertion `disable iff`
clauses. Neither is a circuit problem.

## Changing the size

`N` (objects) and `M` (labels) are parameters at every level. Both must be
at least 2. The testbenches use 3 x 3, 8 x 8, 16 x 8 (DRA2) and 16 x 16
(DRA3). Other sizes depend on these limits:

- The `in_cnt` counters are 16 bits wide. DRA3's load is `N + N*N*M` words,
  which fits up to about `N = M = 32`.
- The reference package used by the 8 x 8 tests is sized for at most 8 x 8.
  `tb_dra_size_run` has its own reference, which works at any size.
- Simulation build cost grows fast with size. In Verilator, DRA2 at 16 x 16
  took more than six minutes to compile. The C++ compiler ran out of memory on
  the 32 x 32 DRA2 model while sharing a 16 GB machine with other builds.

DRA3's compatibility storage grows as `N*N*M*M` bits: 4096 at 8 x 8.

## Files

- `rtl/dra_pkg.sv`: state encoding.
- Shared parts: `rtl/dra_cell.sv` and `rtl/dra_control.sv` (comparator,
  timer, States register, FSM).
- DRA2: `rtl/dra2_cmr.sv`, `rtl/dra2_lsr.sv`, `rtl/dra2_simd_array.sv`,
  `rtl/dra2_system.sv`.
- DRA3: `rtl/dra3_cram.sv`, `rtl/dra3_module.sv`, `rtl/dra3_array.sv`,
  `rtl/dra3_label_ram.sv`, `rtl/dra3_wavefront.sv`, `rtl/dra3_system.sv`.
- `rtl/dra_top.sv`: both engines.
- `tb/`: one testbench per module, the reference package, and the larger-size
  bench `tb_dra_sizes` with its helper `tb_dra_size_run`.
