# Ring-connected matrix-vector multiplier driven by a SAT-found mapping

This design computes `Istim = W · Is`, a matrix-vector product, on a small ring of
identical cores. Each core can do one multiply-add per time cycle and can pass one
datum to its neighbour. The hardware makes no scheduling decisions of its own.
Before a run, every core receives a *mapping*: a table that says, for each time
cycle, which product `w[y][x]·Is[x]` the core computes and which datum it sends on.
The mapping is computed offline by asking a SAT solver for an input that satisfies
a constraint circuit. That circuit is also part of this RTL (`mapping_checker`).

Because the mapping can leave out products whose weight is zero, a sparse matrix
needs fewer time cycles than a dense one on the same ring. One example is an 8×8
matrix with 27 zeros on 4 cores: mapping it as if it were dense takes 16 cycles, the sparse mapping takes 10.

## The ring

```
        core 1 ──► core 2 ──► ... ──► core C
          ▲                             │
          └─────────────────────────────┘
```

* Data moves in one direction only, from core `c` to core `c+1`, and from the last
  core to the first. Nothing moves backwards.
* Each core sends at most one datum per time cycle and receives at most one.
  The datum is either a vector element `Is[x]` or a partial sum `Istim[y]`.
* One time cycle is one clock period.

## Inside a core (`ring_core`)

A core has:

* `R` data registers (`core_regfile`). They hold the `Is` and `Istim` values that
  are on the core. A mapping keeps at most `ceil((X+Y)/C)` data on a core at a time,
  so `R` is set to that number. For 16×16 on 16 cores, `R = 2`.
* A weight store and a program store, each with one entry per time cycle.
* A combinational multiply-add unit (`core_alu`): `Istim ← w·Is + Istim`.

While the ring runs, in time cycle `t` each core does the following:

1. It reads instruction `t` and weight `t`.
2. If `mac_en` is set, the ALU computes `w(t)·regs[is_sel] + regs[acc_sel]`.
   The result goes back into `regs[acc_sel]` at the clock edge.
3. If `send_en` is set, `regs[send_sel]` goes out on the link at the end of the
   cycle. If that register is the one the ALU updates in this cycle, the new sum
   is sent. This bypass is needed: a mapping may finish a partial sum on one core
   and move it on in the same cycle.
4. A datum arriving from the previous core is written into `regs[recv_sel]` at the
   same edge. It can be used on this core from cycle `t+1`. The arriving datum may
   take the register of the datum leaving in the same cycle. It has priority over
   the ALU write. An assertion checks that this only happens when the ALU result is
   the value being sent away.

The instruction word (`ring_pkg::core_instr_t`, 18 bits) is:

| field      | bits | meaning                                      |
|------------|------|----------------------------------------------|
| `mac_en`   | 1    | do a multiply-add this cycle                 |
| `is_sel`   | 4    | register that holds `Is[x]`                  |
| `acc_sel`  | 4    | register that holds `Istim[y]`, and receives the new sum |
| `send_en`  | 1    | send a datum to the next core                |
| `send_sel` | 4    | register to send                             |
| `recv_sel` | 4    | register for the datum arriving this cycle   |

The mapping only says where data sit and what moves. Register numbers have to be
assigned to it, for example with the allocator in `tb/tb_map_pkg.sv`.

## Top level (`ring_mv`) and how to drive it

| port group | use |
|---|---|
| `ld_en, ld_core, ld_sel, ld_addr, ld_data, ld_instr` | While idle, write one word per clock: a data register (`LD_REG`), the weight of time cycle `ld_addr` (`LD_WEIGHT`), or its instruction (`LD_INSTR`). |
| `start, n_cycles` | A one-clock pulse runs `n_cycles` time cycles. `start` is ignored while `busy`. |
| `busy, done` | `busy` is high for exactly `n_cycles` clocks. `done` pulses in the clock after. |
| `rd_core, rd_addr, rd_data` | Combinational read-back of any register. |
| `chk_*` | Inputs and verdict of the constraint circuit, which is independent of the datapath. |

A run goes like this:

1. Reset.
2. Load each `Is[x]` into a register of its start core. Registers of partial sums
   start at zero after reset.
3. Load the weights and instructions.
4. Pulse `start` with `n_cycles = T`.
5. Wait for `done`.
6. Read each `Istim[y]` from where the mapping left it.

Latency is exactly `T` clocks of computation. For the 16×16 product on 16 cores
that is 16 clocks for 256 multiply-adds.

Reset is asynchronous and active low. It clears the data registers and the
sequencer. The weight and program stores are not reset.

## The constraint circuit (`mapping_checker`)

The inputs are six families of binary variables for a `Y×X` matrix on `C` cores
over `T` cycles:

* `w[y][x](t,c)`: the weight is used on core `c` in cycle `t`.
* `w[y][x]Is[x](t,c)`: the product is computed there.
* `Is[x](t,c)` and `Istim[y](t,c)`: the datum is on that core.
* `Is_next` and `Istim_next`: the datum moves to core `c+1` after cycle `t`.

The output `ok` is 1 exactly when these variables describe a mapping the ring can
execute. The constraints fall into four groups, each with its own output:

* **mapping** (`ok_map`):
  * Each non-zero weight and each product is used exactly once.
  * Each `Is[x]` and each `Istim[y]` is on exactly one core in every cycle.
  * `Istim[x]` ends on the core where `Is[x]` started.
* **transfer** (`ok_transfer`):
  * A datum on core `c` in cycle `t` is on core `c` or `c+1` in cycle `t+1`.
  * It came from core `c` or `c-1`.
  * A move flag is set exactly when the datum goes from `c` to `c+1`.
  * No moves are flagged after the last cycle.
* **sum of products** (`ok_sop`): a product needs its weight, `Is[x]` and
  `Istim[y]` on its core in that cycle.
* **resources** (`ok_res`), per core and cycle:
  * at most one product;
  * at most `REG_MAX = ceil((X+Y)/C)` data;
  * at most one move on the outgoing link.

Sparse matrices: the `nz` input masks out the variables of zero elements. Their
"used once" and "operands present" constraints are dropped, and they do not count
towards the one-product-per-ALU limit.

A mapping is obtained by synthesizing this module with `nz` fixed to a matrix
pattern, then asking any SAT solver for an input that makes `ok = 1`. The sparse
mappings in `tb/tb_map_pkg.sv` were found this way.

The default size is `X = Y = T = C = 4`. The top-level instance has its own size
parameters (`CHK_*`). A 16×16, 16-core, 16-cycle instance is a legal setting. It has
131,072 weight and product inputs, which is fine as a SAT problem but slow to
simulate.

## Where the design goes beyond the description it follows

The ring, the one-datum-per-link rule, the one-multiply-add ALU, the register
bound and all constraints come from the formulation. These parts are this design's
own choices:

* 32-bit signed data for weights, vector elements and sums. Arithmetic wraps.
* One weight per time cycle in a per-core store, rather than one per matrix element.
* The instruction encoding and the per-core program store.
* Host load and read ports, the start/done sequencer, and the register write
  priority.
* Reading `[(X+Y)/C]` as a ceiling.
* The end-placement rule `Is[x] ↔ Istim[x]`, applied to equal indices only.
* No moves allowed after the last cycle.

The offline part, the SAT solver and the program that turns its answer into a
mapping, is software. It is not in this RTL.

## Default configuration and other sizes

The defaults are `C = 16`, `R = 2`, `T_MAX = 16`: a 16×16 matrix on 16 cores in 16
cycles. A mapping is made for a ring of one exact size. Other configurations
therefore need an instance with `C` equal to the number of cores,
`R ≥ ceil(2N/C)` for an N×N matrix (4 for sparse 8×8 on 4 cores), and
`T_MAX ≥ T`. For example:

* 3×3 on 2 cores in 5 cycles: `C=2, R=3, T_MAX=5`.
* 8×8 on 4 cores in 16 cycles: `C=4, R=4, T_MAX=16`.

`ring_pkg::REG_IDX_W = 4` caps `R` at 16.

## Files

* `rtl/ring_pkg.sv`: shared types: data word, instruction word, link, load select.
* `rtl/core_alu.sv`, `rtl/core_regfile.sv`, `rtl/ring_core.sv`: one core.
* `rtl/ring_sequencer.sv`: time-cycle counter.
* `rtl/ring_mv.sv`: the top level: ring, sequencer, constraint circuit.
* `rtl/mapping_checker.sv`: the constraint circuit.
* `tb/tb_map_pkg.sv`: mapping tables (4×4 dense, 3×3 dense on 2 cores, sparse 4×4,
  sparse 8×8), the data-flow follower and register allocator that turn a table into
  instructions, and the regular 16×16 mapping.
* `tb/tb_ring_harness.sv`: loads a mapping, runs it, checks results against a direct
  product, and exercises the constraint circuit.
* `tb/tb_ring_mv.sv`: end-to-end test on several ring sizes. It also counts the
  mechanisms that occurred: idle ALU, `Is`/`Istim` transfers, bypass, register
  reuse, wrap-around transfer, constraint rejection, sparse runs.
* `tb/tb_ring_mv_full.sv`: one 16×16 product at the default parameters.
* `tb/tb_core_alu.sv`, `tb_core_regfile.sv`, `tb_ring_core.sv`,
  `tb_ring_sequencer.sv`, `tb_mapping_checker.sv`: unit tests.

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

## Simulating

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ring_pkg.sv tb/tb_map_pkg.sv tb/tb_ring_mv.sv --top-module tb_ring_mv
./obj_dir/Vtb_ring_mv
```

Replace `tb_ring_mv` with any other testbench name. The unit tests for the ALU and
sequencer do not need `tb_map_pkg.sv`. Each build takes well under a minute, and
each simulation under a second.

To add a mapping, write it as a table of `op(t, c, y, x, send_kind, send_id)` calls
in `tb_map_pkg.sv`, set the start cores `is_c0`/`st_c0`, and run it with a
`tb_ring_harness` of matching size. `build()` reports an inconsistent table before
anything is simulated.
