# Dual mode AHB arbiter for three bus masters

When several processors share one AMBA AHB bus, an arbiter decides who owns
it. Chips usually hard-wire a single policy. *Fixed priority* serves important
masters first but can starve the others. *Round robin* is fair but ignores
importance. Changing the policy later means redesigning the chip.

This arbiter contains both policies and picks one at run time from a single
bit, `arbiter_mode`, which firmware sets in a control register:

| `arbiter_mode` | scheme | who gets the bus |
|---|---|---|
| 0 | fixed priority | M1 before M2 before M3 |
| 1 | round robin | each master in turn, tracked by a 2-bit priority counter per master |

Under both schemes a master that has the bus keeps it until its burst is over.
The arbiter sees this on the master's own `HTRANS`: the master holds the bus
while `HTRANS` is not IDLE. A request from a higher-priority master never cuts
a burst short.

The arbiter comes with a small AHB interconnect for three masters and four
slaves. It has an address/control multiplexer, a write data multiplexer, an
address decoder and a read data multiplexer, so the whole bus can be
simulated end to end.

## Block structure

```
                      +--------------------- dual_mode_arbiter ----------------------+
HBUSREQ1..3 --------->| fixed_priority_arbiter --hgrant_FP, hmaster_FP--+            |
HTRANS_M1..3 -------->|                                                  +-> grant_  |--> HGRANT1..3
arbiter_mode -------->| round_robin_arbiter   --hgrant_RR, hmaster_RR--+    controller|--> HMASTER[3:0]
                      +--------------------------------------------------------------+
                                                                        |
 masters' HADDR/control --> addr_ctrl_mux (by HMASTER) --> slaves ------+--> ahb_decoder --> HSEL1..4
 masters' HWDATA ---------> wdata_mux (by HMASTER of the last phase) --> slaves
 slaves' HRDATA/HREADYOUT -> rdata_mux (by the data-phase slave) --> HRDATA, HREADY to masters
```

`ahb_mp_system` is the top and wires all of this together. `dual_mode_arbiter`
is the arbiter on its own. Its ports are `HCLK`, `HRESETn`, `HBUSREQ1..3`,
`HTRANS_M1..3[1:0]`, `arbiter_mode`, `HGRANT1..3` and `HMASTER[3:0]`, and it
can be used without the rest. `HMASTER` is `0001`, `0010` or `0011` for M1, M2
or M3, and `0000` when no master holds the bus.

## The request pipeline and what a master must do

The path from a request to a grant goes through three registers:

1. Each arbiter registers the requests (`hbusreq_a`) before its state machine
   looks at them.
2. The state machine registers its decision in its state register. Its grant
   outputs are decoded from that state.
3. The grant controller registers the grant of the active arbiter once more
   before it leaves the block.

In fixed priority mode, a request that is high at rising edge *k* is seen in
`HGRANTx` and `HMASTER` after edge *k+2*:

| rising edge | k | k+1 | k+2 |
|---|---|---|---|
| what happens | request registered | state M*x*_FP | `HGRANTx`=1, `HMASTER`=*x* |

`HTRANS_Mx` is used as it comes, without a register. A state machine stays with
a master only while that master's `HTRANS` is not IDLE. This has one
consequence for the masters, and the testbench's master model follows it:

* **Present the first transfer while waiting.** A master raises `HBUSREQx` and
  at the same time drives its first NONSEQ transfer on its own outputs. The
  state machine chooses it while `HTRANS_Mx` is not IDLE. If the master waited
  in IDLE, the machine would drop it again at once.
* **Your transfer is on the bus while your grant is high.** `HGRANTx` and
  `HMASTER` change in the same cycle, and `HMASTER` steers the address
  multiplexer. So a master's current transfer is on the bus in every cycle in
  which its `HGRANTx` is high. It advances at each rising edge where `HREADY`
  is also high.
* **End the burst with IDLE and a gap.** After its last transfer, a master
  drives IDLE and keeps `HBUSREQx` low for at least two cycles. Because of the
  grant register, `HGRANTx` falls two edges after `HTRANS` returns to IDLE.
  The gap keeps the master from reading that stale grant as a new one.

BUSY cycles and slave wait states do not end a burst: `HTRANS` stays non-IDLE
through them. The arbiter does not look at `HREADY`.

## Fixed priority state machine

| state | code | leaves when | to |
|---|---|---|---|
| IDLE | 00 | registered HBUSREQ1 | M1_FP |
| | | HBUSREQ2 and not HBUSREQ1 | M2_FP |
| | | HBUSREQ3 and not HBUSREQ1/2 | M3_FP |
| M*x*_FP | 01/10/11 | HTRANS_M*x* = IDLE | IDLE |

Between two masters the machine always passes through IDLE. The state code is
also the master number, so `hmaster_FP` is simply the state.

## Round robin with priority counters

This is the least obvious part. The state machine has the same four states
(`IDLE`, `M1_RR`, `M2_RR`, `M3_RR`, with codes 00/01/10/11). Each master also
has a 2-bit priority counter. A master is granted only while the machine is in
its state **and** its counter reads `11`.

* **Counting up.** A counter goes up by one in each cycle in which its
  master's registered request is high and the master is not being served. It
  stops at `11`. A master that has waited three cycles is therefore *due*.
* **Dropping to the bottom.** When the machine leaves a master's state after
  granting it, that master's counter returns to `00`. If the master asks again
  at once, everyone already waiting is due before it is.
* **Moving on.** A granted master keeps the bus while its `HTRANS` is not
  IDLE. When it ends, the machine goes directly to the next due requester, with
  no IDLE cycle in between. Ties are broken in the order M1 → M2 → M3 → M1,
  starting after the master just served. If no other master is due, the
  machine goes back to IDLE.
* **From IDLE.** The machine goes to a due requester if there is one.
  Otherwise it goes to any requester, again in that cyclic order after the
  last master served. There it waits for the master's counter to reach `11`.
  If another requester becomes due first, the machine switches to that one.
  It leaves the waiting state when the master withdraws (request low or
  `HTRANS` IDLE).

Take a master that asks on an idle bus with its counter at `00`, and whose
request is high at edge *k*. The round robin machine grants it after edge
*k+3*: the request is registered and counts to `01`, `10` and `11` on the
next three edges. `HGRANTx` follows one edge later, after *k+4*. Under full load from all
three masters, the bus rotates M1, M2, M3, M1, … with direct hand-overs.

The counters run in both modes. While fixed priority is active, waiting
masters reach `11`. After a switch to round robin they are served in the
cyclic order.

## Switching modes safely

`arbiter_mode` may change at any time, even during a burst. Two rules make
sure the two schemes never grant at the same moment:

* The fixed priority machine may start a new service only when
  `arbiter_mode = 0` **and** the round robin machine is in IDLE. For the
  round robin machine it is the other way round.
* A master that has been granted is always allowed to finish its burst,
  whichever mode is selected by then.

After a mode change, the new scheme takes over at the first moment the bus is
free. The grant controller passes on the grants of whichever arbiter is
granting, which is at most one.

## Data path

* `addr_ctrl_mux` forwards `HTRANS`, `HADDR`, `HWRITE`, `HSIZE`, `HBURST` and
  `HPROT` (the `ahb_ctrl_t` struct) of master `HMASTER`. With no master it
  forwards an IDLE transfer.
* `wdata_mux` selects `HWDATA` by a copy of `HMASTER` taken at each edge with
  `HREADY` high. This is because write data follows its address by one phase.
* `ahb_decoder` selects slave `HADDR[31:30] + 1`: four equal regions.
* `rdata_mux` remembers which slave owns the data phase, from the address
  phase of a NONSEQ/SEQ transfer. It returns that slave's `HRDATA` and
  `HREADYOUT` as `HRDATA` and `HREADY`. With no slave in the data phase it
  returns 0 and ready.

Widths: 32-bit address and data, 4-bit `HMASTER`, three masters, four slaves.
The number of masters is fixed at three, because both state machines have one
state per master. `DATA_W` and `N_SLAVES` are parameters of the top.

## Where this RTL goes beyond the original description

The original design gives the states, their codes and their transitions, the
2-bit priority counters, the rule that a master is granted at counter `11`,
the two sampling stages and the block split. The following points are this
implementation's own choices:

* how the counters count: +1 per waiting cycle, stop at `11`, clear when
  service ends;
* the cyclic tie-break, and waiting in a master state until its counter
  reaches `11`;
* the mode-change interlock;
* how the grant controller chooses between the two arbiters;
* the rule that masters present their first transfer while waiting, and the
  two-cycle gap after a burst;
* the address map, and the data-phase handling of the write and read data
  multiplexers;
* reset: synchronous and active low, clearing every register.

Also note:

* The grant comes three edges after a request, because the requests and the
  grants are each sampled once. A textbook AHB arbiter is one cycle faster.
* There is no early hand-over. A textbook AHB arbiter grants the next master
  while the last address of the current burst is still on the bus. Here the
  state machines re-arbitrate only after the owner's `HTRANS` has returned to
  IDLE. Say a burst's last transfer is on the bus in cycle *c*. The next
  master's first transfer then appears in cycle *c+4* under fixed priority
  (through IDLE) and in cycle *c+3* under round robin (direct hand-over).
* `HLOCK`, `HBURST`, `HREADY` and split responses do not affect arbitration.
  A locked sequence is not protected.
* The firmware control register that holds `arbiter_mode` is not included.
  `arbiter_mode` is a top-level input.
* After generic synthesis the arbiter needs 20 flip-flops. It has 11 inputs
  plus the clock, and 7 outputs. The original design was fitted to a
  72-macrocell CPLD and used 27 registers there. This implementation has not
  been run through a CPLD fitter.

## Files

`rtl/`:

| file | contents |
|---|---|
| `ahb_arb_pkg.sv` | `htrans_e`, `arb_state_e`, `ahb_ctrl_t`, constants, `rr_pick` (cyclic search) |
| `fixed_priority_arbiter.sv`, `round_robin_arbiter.sv`, `grant_controller.sv` | the three parts of the arbiter |
| `dual_mode_arbiter.sv` | the arbiter |
| `addr_ctrl_mux.sv`, `wdata_mux.sv`, `ahb_decoder.sv`, `rdata_mux.sv` | interconnect |
| `ahb_mp_system.sv` | top: arbiter and interconnect |

`tb/`:

* `tb_<module>.sv` is the self-checking testbench of each module.
* `tb_request_orders.sv` puts every order of one, two or three requests
  through the arbiter, in both modes.
* `ahb_master_bfm.sv` and `ahb_slave_mem.sv` are behavioural models of a
  master and of a memory slave with random wait states.
* `ref_arbiters.sv` is a behavioural reference model of both schemes.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, for the full system at its default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ahb_arb_pkg.sv tb/tb_ahb_mp_system.sv --top-module tb_ahb_mp_system
./obj_dir/Vtb_ahb_mp_system
```

To run another testbench, replace `tb_ahb_mp_system` with its name.

What the testbenches establish:

* **Unit testbenches.** Each checks its module cycle by cycle, against
  hand-worked directed cases and against `ref_arbiters.sv` under random
  bursts. This includes the grant latencies given above and the fairness of
  round robin under full load.
* **Request-order sweep.** `tb_request_orders` raises requests alone, in
  pairs and all three, together or one cycle apart in every order, in both
  modes. It checks the service order and the hand-over time given above.
* **System testbench.** It runs 20,000 cycles of random read/write bursts
  from three masters to four slaves with wait states, and flips
  `arbiter_mode` at random. Every read is compared with what its master
  wrote. It also checks that at most one grant is high, that `HMASTER` agrees
  with the grants, and that the bus carries the owner's address. It counts
  each mechanism and fails if one never happens:
  * fixed priority choosing among requesters;
  * a higher-priority master held off by a burst;
  * round robin hand-over;
  * a mode change during a burst;
  * BUSY cycles;
  * wait states.

## Changing it

* **Priorities.** The fixed priority order is the `if` chain in the IDLE
  state of `fixed_priority_arbiter`.
* **Counters.** The counter rule is the `prio_next` block of
  `round_robin_arbiter`.
* **Address map.** Edit `ahb_decoder`. The slave model in `tb/` indexes words
  by `HADDR[13:2]`.
* **Fewer pipeline stages.** Decode the state machines' grants from their
  next state instead of their state. This removes one cycle of latency, but
  the two-cycle gap after a burst must then be rechecked.
