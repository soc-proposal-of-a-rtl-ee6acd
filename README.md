# Flying master bus for an AHB system-on-chip

On an ordinary shared bus only one transfer moves at a time: when two
masters want two different slaves, one of them waits for the arbiter even
though both slaves are free. The flying master bus gives one master (the
*flying master*, normally the processor) a private path to every slave. Its
transfers skip the shared bus and its arbiter, so a flying-master transfer
to one slave runs at the same time as a shared-bus transfer to another.
Only when both want the same slave does anyone wait, and that is settled
locally in a small wrapper in front of the slave.

The logic added to a plain AHB system is two kinds of wrapper, built from
multiplexers and a few flip-flops:

* a **flying master wrapper** between the flying master and the slaves;
* one **slave wrapper** per slave, between the slave, the shared bus and the
  flying master wrapper.

The shared bus, its arbiter, the masters and the slaves are ordinary AMBA AHB
(32-bit address and data).

```
             flying master (M1)                M2 .. M4
                    |                              |
              fm_wrapper                    ahb_arbiter + ahb_shared_bus
          (decoder, read muxes)              (one transfer at a time)
                    |  HSEL_s[x]                   |  HSEL_x_Bus
        +-----------+-----------+------------------+----------+
        |                       |                             |
  slave_wrapper 0         slave_wrapper 1   ...         slave_wrapper 3
        |                       |                             |
     slave 0                 slave 1                       slave 3
```

## Files

| file | what it is |
|------|------------|
| `rtl/flybus_pkg.sv` | AHB encodings, `ahb_ctrl_t` (address-phase bundle), `arb_policy_e` |
| `rtl/fm_wrapper.sv` | flying master wrapper |
| `rtl/slave_wrapper.sv` | slave wrapper: selection, multiplexers, HREADY generation |
| `rtl/ahb_arbiter.sv` | shared-bus arbiter: fixed priority, round-robin, TDMA, lottery |
| `rtl/ahb_shared_bus.sv` | shared-bus multiplexers and address decoder |
| `rtl/flying_bus_top.sv` | the system, with masters and slaves brought out as ports |
| `tb/ahb_traffic_master.sv`, `tb/ahb_mem_slave.sv` | behavioural master and memory slave models |
| `tb/flybus_bench.sv` | a complete system with four masters and four slaves, for the performance test |
| `tb/tb_*.sv` | self-checking testbenches |

## The slave wrapper: who gets the slave

This is the part to understand. Each slave wrapper sees two would-be users:
the flying master (select `HSEL_S[x]` from the flying master wrapper) and the
shared bus (select `HSEL_x_Bus` from the bus decoder). A side *requests* the
slave when its select is high and its HTRANS is not IDLE. The HSEL selection
then grants at most one side per cycle:

1. **The flying master has priority.** If both sides request, the flying
   master wins.
2. **A shared-bus burst is not broken.** While the shared bus is in the middle
   of a burst on this slave (bus HTRANS is SEQ or BUSY), the flying master is
   held until the burst ends. This is the "hold" case: the flying master
   waits for the bus master's ongoing transfer to the same slave.
3. **No switch during an open data phase.** A side is not granted while the
   other side still has a data phase on the slave. Switching therefore costs
   at most one cycle. The slave never sees the other side's ready end its
   data phase.

A held side is stalled the AHB way: its HREADY is pulled low, so its address
phase is extended. The wrapper drives two ready lines:

* `HREADYoutSM` (to the flying master) carries the slave's HREADY while the
  flying master owns the data phase. It is high otherwise, and low while the
  flying master is held.
* `HREADYoutBus` (to the shared bus) does the same for the shared bus.

Each master side ANDs the ready lines of all slave wrappers. A line that is
not involved reads high, so the AND equals the usual data-phase ready
multiplexer. It also lets a wrapper stall a side's address phase even when
that side's data phase is on another slave.

The slave's inputs come through the wrapper:

* The address-phase signals (HADDR, HTRANS, HWRITE, HSIZE, HBURST, HPROT,
  HLOCK) come from the granted side. HTRANS is forced to IDLE and HSELout is
  low when no side is granted.
* HWDATA comes from the side that owns the data phase. One register bit,
  `dp_fm`, records which side that is.
* The slave's HREADY input is the combined ready of the side it serves.

HRDATA and HRESP go back unchanged to both sides. The slave model must not
make its HREADYOUT depend combinationally on its HREADY input; no AHB slave
does.

## The flying master wrapper

* **Decoder.** It turns HADDR into a one-hot `HSEL_s`, enabled while HBUSREQ
  is high or HTRANS is not IDLE. The second condition is needed because an
  AHB master lowers HBUSREQ together with its last address.
* **Forwarding.** Address, control and write data go unchanged to every
  slave wrapper.
* **Grant.** `HGRANTout` equals HBUSREQ in the same cycle, so the flying
  master's request always lasts exactly one cycle. Contention is resolved
  in the slave wrappers, not here.
* **Read path.** HRDATA and HRESP are multiplexed from the slave selected by
  the last accepted active address. This is a registered copy of `HSEL_s`,
  because AHB read data arrive one cycle after the address.
* **Ready.** HREADY is the AND of the slaves' `HREADYoutSM` lines.

## Shared bus and arbiter

`ahb_shared_bus` is a standard AHB interconnect:

* The address multiplexer is selected by HMASTER.
* The write-data multiplexer is selected by HMASTER registered on HREADY.
* The decoder produces `HSEL_x_Bus`.
* The read multiplexer is selected by the slave of the data phase.

`ahb_arbiter` grants one master of the shared bus. The owner keeps the bus
while its HBUSREQ is high. Once the owner has dropped HBUSREQ, HREADY is high
and somebody requests, a new owner is chosen and granted at the next edge.
HMASTER follows one HREADY edge later. With no requests the last owner stays
granted.

The policy is chosen at run time with the `policy` input:

| policy | rule |
|--------|------|
| `ARB_FIXED` | lowest index wins |
| `ARB_RR` | first requester after the previous owner |
| `ARB_TDMA` | wheel of `sum(SLOTS)` slots, master *i* owning `SLOTS[i]` consecutive slots; one step per arbitration; slot owner wins if requesting, else round-robin |
| `ARB_LOTTERY` | master *i* holds `TICKETS[i]` tickets; a 16-bit LFSR (x^16+x^14+x^13+x^11+1) draws a number below the tickets of the requesting masters |

The arbiter's own defaults are weights 3,1,1,1 for four masters. In
`flying_bus_top` the arbiter serves only M2..M4, with weights 1,1,1.

## Address map and sizes

Slave *x* answers the addresses whose bits `[SEL_LSB +: log2(NS)]` equal *x*.
With the defaults, that is `HADDR[29:28]` and 256 MB per slave. Addresses
alias: there is no default slave.

`flying_bus_top` parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `NBM` | 3 | masters on the shared bus (with the flying master, four masters) |
| `NS` | 4 | slaves |
| `SEL_LSB` | 28 | lowest address bit of the slave index |
| `SLOTS`, `TICKETS` | `'{1,1,1}` | TDMA slots / lottery tickets of the bus masters |

Ports (all plain signals or packed arrays of `ahb_ctrl_t`):

* `fm_*` is the flying master's AHB port.
* `m_*` are the shared-bus master ports: per-master `ctrl`, `hwdata`,
  `hbusreq` and `hgrant`, plus a shared `hready`, `hresp` and `hrdata`.
* `s_*` are the slave ports: per slave `ctrl`, `hwdata`, `hsel`, the slave's
  `hready` input, and its `hreadyout`, `hresp` and `hrdata`.
* `fm_held`, `bus_held` and `arb_event` are for observation.

The reset, `hresetn`, is asynchronous and active low.

## Timing

* The flying master is granted in the cycle it requests. It drives its first
  address one cycle after raising HBUSREQ, unless a slave wrapper holds it.
* A shared-bus master waits at least one arbitration cycle after the owner
  lets go. It then sees HGRANT together with HREADY and drives its address
  in the next cycle.
* Both wrappers are combinational from their inputs to their outputs, apart
  from the data-phase registers. The flying master's path to a slave adds
  no cycle.

## Simulating

With plain verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/flybus_pkg.sv tb/tb_flying_bus_top.sv --top-module tb_flying_bus_top
./obj_dir/Vtb_flying_bus_top
```

Replace the testbench name to run another one. Every testbench prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | what it checks |
|-----------|----------------|
| `tb_fm_wrapper` | decoder, grant, forwarding, ready AND, read multiplexer against a reference, random stimulus |
| `tb_slave_wrapper` | the selection rules above, multiplexers and ready lines against a reference; every contention case must occur |
| `tb_ahb_arbiter` | winner at each arbitration for fixed priority, round-robin and TDMA; lottery wins within 15 % of their expected count |
| `tb_ahb_shared_bus` | multiplexers, decoder, ready, against a reference |
| `tb_flying_bus_top` | whole system at default size; see below |
| `tb_flybus_workload` | the performance experiment; see below |

`tb_flying_bus_top` drives the system with the flying master, three bus
masters and four memory slaves. Two of the slaves have SDRAM-like wait
states. Random traffic runs for 20,000 cycles under each policy. The test
checks:

* every read beat returns what its master wrote;
* the flying master always waits exactly one request cycle;
* contention is always resolved to exactly one side;
* each mechanism happened at least once: concurrent transfers, the flying
  master held by a bus burst, the bus held by the flying master, wait
  states, and arbitration under each of the four policies.

## Performance

`tb_flybus_workload` runs the same random traffic through two systems:

* the flying bus, with M1 as the flying master;
* a conventional bus, the same RTL with all four masters on the shared bus
  and weights 3,1,1,1.

Traffic: idle gaps of 0..30 cycles (mean 15) between transactions of 1, 4,
8 or 16 beats. Each policy runs for 1,000,000 cycles, once with SDRAM-like
slaves and once with SRAM-like slaves. The SDRAM-like slaves have 4 wait
states per NONSEQ transfer, a value this test chooses. The SRAM-like slaves
have none.

Measured results (data beats in 1,000,000 cycles, all four masters
together):

| slaves | policy | shared bus | flying bus | gain | efficiency shared / flying |
|--------|--------|-----------|-----------|------|-------------------|
| SDRAM-like | fixed | 585838 | 748765 | +27.8 % | 0.20 / 0.29 |
| SDRAM-like | round-robin | 585690 | 749425 | +28.0 % | 0.20 / 0.29 |
| SDRAM-like | TDMA | 585790 | 748206 | +27.7 % | 0.20 / 0.29 |
| SDRAM-like | lottery | 585854 | 748692 | +27.8 % | 0.20 / 0.29 |
| SRAM-like | fixed | 803931 | 941256 | +17.1 % | 0.38 / 0.52 |
| SRAM-like | round-robin | 804069 | 940222 | +16.9 % | 0.38 / 0.52 |
| SRAM-like | TDMA | 804883 | 941310 | +16.9 % | 0.38 / 0.52 |
| SRAM-like | lottery | 804147 | 940643 | +17.0 % | 0.38 / 0.52 |

Efficiency is data cycles divided by data + slave-wait + request + hold
cycles.

On the flying bus the flying master's request is always one cycle.
Under fixed priority, the lowest-priority master M4 waits 57 cycles on
average on the shared bus but 20 with SDRAM-like slaves. With SRAM-like
slaves the figures are 22 and 10.

The pattern matches the published evaluation of this architecture: gains
are larger with slow slaves, roughly independent of the policy, and the
flying master always gets the bus after one request cycle. The published
gains are 25 % to 40 %. They came from a transaction-level model with its
own slave latencies, not from this RTL, so the numbers are not expected to
match.

## Departures and open points

* **Data-phase registers.** Both wrappers keep one small register for the
  AHB data phase: the registered slave select in the flying master wrapper,
  and `dp_valid`/`dp_fm` in the slave wrapper. The original description
  draws only multiplexers, with one select for both address and data
  signals. That is not enough for AHB's pipelined write and read data, so
  these wrappers are somewhat larger than the roughly 124 and 164 gates
  reported for the original.
* **Ready as AND.** The flying master wrapper's HREADY "multiplexer" is an
  AND of the per-slave ready lines.
* **Gated HSELout.** HSELout is the OR of the two selects, each gated by its
  grant.
* **Assumed priority details.** The rule that a shared-bus burst in progress
  is finished before the flying master gets the slave is this design's
  reading of the hold behaviour. So is the rule that a side is held while
  the other has a data phase open.
* **Arbiter internals.** The original takes its arbitration schemes from the
  literature. This design chose the TDMA wheel order (contiguous slots),
  the lottery LFSR and the one-cycle arbitration.
* **Not modelled.** There are no SPLIT or RETRY responses, no default slave,
  and HLOCK has no effect on the flying master's priority.
* **Outside the RTL.** The masters and the SDRAM and SRAM controllers are
  outside the RTL. `tb/` has behavioural stand-ins.
