# Hybrid fixed-priority / round-robin bus arbiter

A shared on-chip bus carries one master's transfer at a time, so an arbiter
has to decide who goes next. The two textbook policies fail in opposite ways:

* **Fixed priority** lets the important master have as much of the bus as it
  wants. The last master in the chain starves: it loses every tie.
* **Round-robin** never starves anyone. It also cannot favour anyone, so every
  master gets the same share whatever its importance.

The hybrid arbiter combines the two. Masters that do similar work, or matter
equally, go into one **group**. Groups are ranked by fixed priority, and the
masters inside a group take turns round-robin. The default configuration has
six masters in three groups:

```
   {M0}  >  {M1, M2}  >  {M3, M4, M5}
  group 0    group 1       group 2
  (alone)   (M1 <-> M2)  (M3 -> M4 -> M5 -> M3)
```

With this grouping, M0 gets as much bus time as it would under pure fixed
priority. M1 and M2 get equal shares, as do M3, M4 and M5. Because M3–M5 rotate
among themselves, none of them is the "last master" that never wins. The
bottom group as a whole still comes last.

## How a decision is made

The decision is combinational (`hybrid_arb_core`):

1. Each group has its own round-robin arbiter (`rr_group_arbiter`). It
   remembers the group's last winner and picks the first requesting master
   after it, in index order, wrapping around.
2. Among the groups that have a request, the one with the lowest index wins.
   Its round-robin winner is the decision.
3. Only the winning group's "last winner" pointer moves, and only when the
   decision is actually turned into a grant. So a group that keeps losing to a
   higher group keeps its turn order. When it next wins, the master whose turn
   it was is served.

Example with M0 idle and everyone else requesting: M1, M2, M1, M2, … are
served, and group 2 waits. When group 1 falls silent, group 2 serves M3, M4, M5,
M3, … in turn. If M0 requests at any arbitration, it wins.

### Configuring the groups

Groups are runs of consecutive master indices, listed highest priority first.
Bit *m* of the parameter `GROUP_START` is set when master *m* starts a new
group. Bit 0 must be set.

| `GROUP_START` (6 masters) | groups                  | behaviour            |
|---------------------------|-------------------------|----------------------|
| `6'b001011` (default)     | {M0} {M1,M2} {M3,M4,M5} | hybrid               |
| `6'b111111`               | six groups of one       | pure fixed priority  |
| `6'b000001`               | one group of six        | pure round-robin     |

To give a master a different priority, wire it to a different index, or
change the group boundaries.

## Bus ownership and timing

`arb_bus_ctrl` wraps the decision in the bus's life cycle. The bus is always in
one of three phases (`arb_pkg::bus_state_e`):

| `bus_state` | phase    | meaning                                               |
|-------------|----------|-------------------------------------------------------|
| 0           | BUS_IDLE | no owner, no request                                  |
| 1           | BUS_ARB  | requests pending, arbitration cycles being spent      |
| 2           | BUS_EXEC | one master owns the bus, and its transfer is running  |

* Arbitration takes `ARB_CYCLES` cycles (default 1). In the last of them, the
  core's decision is registered as `grant`.
* The grant is held for the whole transfer, whatever the other masters request.
  There is no pre-emption. The transfer covers the burst and the slave's access
  latency. The bus or slave side marks the transfer's last cycle with a
  one-cycle `xfer_done`.
* In the cycle after `xfer_done` the grant is gone. If any other master is
  requesting, a new arbitration starts at once (BUS_ARB). Otherwise the bus
  goes idle.

Cycle-exact consequences with `ARB_CYCLES = 1`:

```
idle bus:      req rises in cycle t            -> grant from cycle t+1
back-to-back:  xfer_done in cycle t            -> cycle t+1 arbitrates,
                                                  next grant from cycle t+2
```

Each transaction therefore costs one arbitration cycle of bus time on top of its
transfer.

**Rules for masters.** Hold `req` until granted. Drop it no later than the
cycle after your `xfer_done`. In the `xfer_done` cycle itself, the finishing
master's request is ignored when the arbiter decides whether to re-arbitrate.
If the master is still requesting a cycle later, it competes again as a new
request.

Assertions in `arb_bus_ctrl` check three rules:

* the grant is one-hot or zero;
* a grant exists exactly in BUS_EXEC;
* the grant does not change until `xfer_done`.

## Top-level interface (`hybrid_arbiter`)

| port        | dir | width                | meaning                                        |
|-------------|-----|----------------------|------------------------------------------------|
| `clk`       | in  | 1                    | clock, rising edge                             |
| `rst_n`     | in  | 1                    | asynchronous active-low reset: idle, no grant, master 0 of each group first |
| `req`       | in  | `N_MASTERS`          | bus requests                                   |
| `xfer_done` | in  | 1                    | last cycle of the owner's transfer             |
| `grant`     | out | `N_MASTERS`          | registered one-hot grant                       |
| `grant_idx` | out | `$clog2(N_MASTERS)`  | owner index (meaningful in BUS_EXEC)           |
| `bus_state` | out | 2                    | phase, see above                               |

| parameter     | default      | meaning                              |
|---------------|--------------|--------------------------------------|
| `N_MASTERS`   | 6            | number of masters                    |
| `GROUP_START` | `6'b001011`  | group boundaries, see above          |
| `ARB_CYCLES`  | 1            | cycles per arbitration               |

The address/data multiplexing of the bus itself is not part of this block. It
would be steered by `grant_idx`. The same holds for the address decoder and the
slaves.

## Measured behaviour

`tb/tb_bus_utilization.sv` builds three copies of the same system: six masters,
four SDRAM-controller slaves and this arbiter. One copy is grouped as fixed
priority, one as round-robin and one as hybrid. The copies run for 10,000,000
cycles, which takes about 12 s in Verilator. Each master model repeats the
same loop:

* idle for a uniform 0–40 cycles;
* request a burst of 1, 4, 8 or 16 beats to a random slave and row.

The slave model adds an SDRAM access latency of 3 to 17 cycles: CAS latency,
plus row miss, plus refresh. The masters together ask for more than the bus can
carry. The table gives each master's share of bus cycles:

| master | fixed priority | round-robin | hybrid |
|--------|---------------:|------------:|-------:|
| M0     | 33.1 %         | 15.7 %      | 33.1 % |
| M1     | 29.2 %         | 15.6 %      | 25.5 % |
| M2     | 21.8 %         | 15.7 %      | 25.5 % |
| M3     |  8.8 %         | 15.7 %      |  3.3 % |
| M4     |  1.0 %         | 15.7 %      |  3.3 % |
| M5     |  0.03 %        | 15.6 %      |  3.3 % |

The average wait from request to grant, in cycles:

* **Fixed priority:** M0 10.6. M5 waits about 50,000, which is starvation.
* **Round-robin:** about 63 for every master.
* **Hybrid:** M0 10.6, M1 and M2 24.5, M3–M5 425.

In all three cases the bus is owned about 94 % of the time. The rest is the one
arbitration cycle between transactions.

These numbers show the intended behaviour:

* under hybrid, M0 keeps its fixed-priority share;
* equal masters get equal shares;
* nobody is locked out.

The exact percentages depend on the traffic model, which is an assumption (see
below). A longer idle time shifts bus time towards the lower groups: with 0–60
idle cycles, hybrid gives about 27 / 23 / 7 %.

## What is given and what is chosen here

These parts come from the policy itself:

* the grouping;
* fixed priority between groups and round-robin inside them;
* the default six-master grouping;
* the sequence of arbitration, then a transfer held to completion, then
  re-arbitration or idle, with a configurable number of arbitration cycles.

These are this implementation's choices:

* Rotation order inside a group is ascending index with wrap-around. The round-robin pointer
  moves only when its group wins.
* The group encoding `GROUP_START` restricts groups to consecutive indices.
* `ARB_CYCLES` defaults to 1.
* The `xfer_done` handshake and the rule that the finishing master is ignored
  in its last cycle are this design's own.
* Reset state: idle, and master 0 of each group is served first.
* The arbitration cycle is not overlapped with the previous transfer. Pipelined
  arbitration, as in AMBA AHB, would win back the ~6 % of bus time that goes to
  arbitration, but it would change the timing above.
* The traffic and SDRAM timing in the testbenches (idle 0–40 cycles, CL = 3,
  tRP = tRCD = 3, tRFC = 8, refresh every 780 cycles) are typical values, not
  measured ones.

Not provided:

* time-slot (TDMA) and lottery arbiters, which are other policies one might
  compare with;
* the bus fabric, masters and SDRAM controllers. Behavioural models of the
  masters and slaves exist only in `tb/`.

## Files

| file                       | content                                                     |
|----------------------------|-------------------------------------------------------------|
| `rtl/arb_pkg.sv`           | bus phase enum                                              |
| `rtl/rr_group_arbiter.sv`  | round-robin arbiter for one group                           |
| `rtl/hybrid_arb_core.sv`   | per-group round-robin + fixed priority between groups       |
| `rtl/arb_bus_ctrl.sv`      | arbitration / transfer sequencing, grant register, assertions |
| `rtl/hybrid_arbiter.sv`    | top level                                                   |
| `tb/tb_rr_group_arbiter.sv`, `tb/tb_hybrid_arb_core.sv`, `tb/tb_arb_bus_ctrl.sv` | unit tests against independent reference models |
| `tb/tb_hybrid_arbiter.sv`  | end-to-end test at default parameters with master and SDRAM models; checks every decision and the timing, and requires each mechanism to occur |
| `tb/tb_bus_utilization.sv` | fixed priority / round-robin / hybrid comparison, 10 M cycles |
| `tb/bus_system_model.sv`, `tb/bus_master_model.sv`, `tb/sdram_slave_model.sv` | behavioural system, master and SDRAM-slave models |

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/arb_pkg.sv tb/tb_hybrid_arbiter.sv --top-module tb_hybrid_arbiter
./obj_dir/Vtb_hybrid_arbiter
```

Replace `tb_hybrid_arbiter` with any other testbench name. Lint a module with:

```
verilator --lint-only -Wall -y rtl rtl/arb_pkg.sv rtl/hybrid_arbiter.sv
```

Verilator reports one SYNCASYNCNET warning. It comes from the assertions'
`disable iff (!rst_n)`, which uses the asynchronous reset in a synchronous
context. It does not affect the logic.
