# Fault-secure five-port NoC switch

A network-on-chip switch that notices its own errors while it runs. Any fault
that changes what the switch sends, or the state it moves to, should raise the
switch's error port in the same cycle, so that neighbours and the network
interface can start recovery before a corrupted or misrouted packet spreads.

Duplicating the whole switch and comparing the copies would do this, but it
costs several times the area of the switch. This design uses two cheaper
mechanisms instead:

1. **Flit code.** Every flit carries a parity bit that the sender computes.
   A *flit checker* at every output port recomputes it. This covers the
   incoming links, the input buffers and the crossbar data path.
2. **Parity CED of the control logic.** Some faults slip past the flit code.
   Routing, arbitration and reservation faults send flits to the wrong place,
   stall them, or corrupt internal state, and the flits keep a valid check
   bit. Some data-path faults also corrupt an even number of bits. The control
   logic, called the *critical region* here, is therefore watched by a
   multi-bit parity code. Its outputs are split into 43 parity groups. A
   *prediction* path computes the parity each group should have. *Parity
   trees* compute the parity the group actually has. A *two-rail checker*
   compares the two.

The error port is the OR of the five flit checkers and the CED. The largest
parity tree is also used for manufacturing test: scan chains are arranged by
parity group, and in test mode the tree turns the chain outputs into one
compacted bit per group and shift cycle.

## Structure

```
 in link i ──► input_fifo ──front flit──► crossbar ──► flit_checker ──► out link o
 (flit, chk,       │                         ▲             │ flit_err[o]
  valid/ready)     │ head/tail, destination  │ sel         ▼
                   └──────► switch_ctrl_comb ┘           ┌────┐
                            (XY route, round-robin,      │ OR ├──► error
                             wormhole reservation)       └────┘
                              ▲ state    │ outputs + next state ▲
                              └─ out_st ◄┤                      │
                                         ├──► ced_critical_region ── ced_err
                                         │         ▲ test_in  └─ compact_out
                                         └──► scan_compactor ─┘ (scan_out)
```

| Module | Role |
|---|---|
| `fs_noc_pkg` | Port numbering, flit type, control input/output structs, group count |
| `fs_noc_switch` | Top: wires everything, holds the control state register |
| `input_fifo` | Per-input flit buffer, depth 4 |
| `xy_route` | XY routing function |
| `rr_arbiter` | Combinational round-robin arbiter with a one-hot pointer |
| `switch_ctrl_comb` | All control logic, purely combinational (the critical region) |
| `crossbar` | 5 × 5 AND-OR multiplexer for whole flits |
| `flit_encoder` | Even-parity check-bit generator (sender side and inside checkers) |
| `flit_checker` | Recomputes and compares the check bit of a valid output flit |
| `parity_groups` | XOR trees, one per parity group |
| `two_rail_checker` | Tree of totally self-checking two-rail cells |
| `ced_critical_region` | Prediction, parity trees and two-rail checker of the control logic |
| `scan_compactor` | Group-ordered scan chains; their outputs feed the largest CED parity tree |

## Links and flits

Each port has a link in each direction. A link carries an 11-bit `flit_t`
(`head`, `tail`, `chk`, 8 `data` bits), a `valid` signal and a `ready`
signal going back. A flit moves in a cycle in which both `valid` and `ready`
are high. `chk` is the XOR of the data bits. The head flit carries the
destination: x in `data[2:0]` and y in `data[5:3]`, enough for an 8 × 8 mesh.
Ports are numbered 0 local, 1 north, 2 east, 3 south and 4 west. East means a
larger x and north a larger y. The switch position comes in on `my_x`/`my_y`.

The head and tail bits are sideband signals and are not covered by the parity
bit. An error on them reaches the control logic, and the CED has to catch it
there.

## Control logic and its timing

`switch_ctrl_comb` contains no flip-flops. Its state comes in as an input and
its next state goes out as an output, next to its real outputs. The state is
kept per output port: `locked`, a one-hot `owner` and a one-hot round-robin
`ptr`. This makes the next state plain outputs of a combinational block, so
the CED can check it like any other output. `fs_noc_switch` holds the state
register `out_st`.

Rules, evaluated every cycle:

* An input whose front flit is a head flit requests the output that XY routing
  picks: x first, then y, then local.
* A free output grants one requester in round-robin order, starting at its
  pointer. The pointer then moves just past the winner. The output is
  reserved (`locked`) from the grant on, even if the flit cannot move yet, so
  a flit that is being offered never changes.
* A reserved output selects its owner in the crossbar. It asserts
  `out_valid` whenever the owner's buffer is not empty. A flit moves, and the
  owner's buffer pops, when the downstream `ready` is high.
* When a tail flit moves, the output is free again in the next cycle.
  A one-flit packet (head and tail both set) is granted and released in the
  same cycle.

Latency: a flit accepted at clock edge *t* sits at the buffer front after that
edge. If its output is free and downstream is ready, it leaves in the same
cycle and is taken at edge *t+1*. Throughput is one flit per cycle per
output.

## Error detection in detail

**Flit checkers** see the data leaving every output port. A checker raises
`flit_err[o]` when `out_valid[o]` is high and the parity of the data differs
from `chk`. It catches any odd number of bit errors on the way from the
sender: the link, the buffer storage and the crossbar multiplexers.

It cannot catch everything. Take a crossbar multiplexer whose select input
is stuck so that it ORs two flits together. The result can have correct
parity. It also cannot catch a flit sent to the wrong port, or a wrong
handshake. Those faults sit in the control logic or on its outputs.

**Critical-region CED** (`ced_critical_region`). The 90 output bits of
`switch_ctrl_comb` make up the vector `v`:

* `out_valid`: 5 bits
* crossbar selects: 25 bits
* buffer pops: 5 bits
* next state: 55 bits

The groups are formed in two steps. First, `fs_noc_pkg::ctrl_order`
rearranges the outputs by output port. Each port gets a 17-bit slice
(`out_valid`, its 5 select bits, its 11 next-state bits). The five slices
come first, then the 5 pop bits. Second, bit `k` of that order goes to group
`k mod 43`, so each group holds 2 or 3 bits.

43 is larger than a slice, so no two members of a group come from the same
output port. The arbiter and state of one output port drive only that port's
slice. A fault there therefore shows up in several groups, and in at most one
bit of each. Take a routing fault that moves a request from one port to
another. It changes bits 17, 34, 51 or 68 positions apart, which are never in
the same group. Only the pop bits depend on every port.

The module contains:

* prediction logic: its own copy of the control function fed with the same
  inputs, reduced to the 43 group parities. A synthesis tool is expected to
  shrink this to the parity functions alone.
* parity trees over the outputs the switch actually uses.
* a two-rail checker over the 43 pairs (computed parity, inverted predicted
  parity). A pair is a valid code word when its two rails differ. The
  checker's output pair (`z0`, `z1`) stays complementary only while every
  pair is valid. `error` is `z0 == z1`. The checker cells also signal their
  own single faults this way.

What this guarantees, and what it does not:

* **Always detected:** an error on any single output bit of the control
  logic. Such an error flips exactly one group parity.
* **Can be missed:** an error on an even number of outputs in the same group.
  A fault in logic that several members of a group share can cause this.
  The grouping used here is fixed and was worked out by hand from the RTL
  structure. It is not produced by a fault analysis of a gate netlist. After
  synthesis, logic can be shared across slices (the routing lines and the
  pop bits, for example), so it is not proven fault-secure. A fault-secure
  implementation would derive the groups from the synthesized netlist.
  Only `ctrl_order` would change, because both the CED and the scan capture
  use it.
* The prediction copy shares its inputs with the real logic. An error that
  arrives on those inputs, for example a corrupted head bit from a buffer,
  reaches both copies. The CED does not see it. Only the flit code or its
  later effects can.

**Error port.** `error = ced_err | (|flit_err)`. It is combinational and valid
in the cycle in which the wrong value appears. It is not stored: if recovery
needs a sticky flag, register it outside.

## Test response compaction

`scan_compactor` holds `SCAN_CHAINS` = 3 parallel chains. When `test_capture`
is high, the chains load the 90 control outputs and the checked bits of the
five output flits (8 data bits and `chk` each, 45 bits). The placement works
like this:

* Position *t* < 43 of chain *c* holds bit `t + 43·c` of the group order
  (`ctrl_order`), as long as that bit exists. So position *t* holds all
  members of parity group *t*.
* Groups 4 to 42 have only two members, which leaves 39 positions free in
  chain 2. The flit bits fill them in order. The 6 flit bits that are left
  over go into two more positions, 43 and 44. This keeps the three chains the
  same length, 45 cells.

The three chain outputs (`scan_out`) then show one position per shift cycle.
No extra compactor tree is needed. Group 0 (bits 0, 43 and 86 of the group
order) is the largest group, with 3 members. When `test_mode` is high, a
multiplexer in `ced_critical_region` replaces the inputs of its parity tree
with `scan_out`, and `compact_out` is that tree's output. Right after capture,
`compact_out` is the parity of position 0. After *s* shifts (`test_shift`) it
is the parity of position *s*. Reading the 135 captured bits takes 45 cycles
and 45 output bits. `ced_err` means nothing while `test_mode` is high. Keep
`test_mode` low in normal operation.

The chains are a capture register next to the functional flip-flops. They
are not the functional flip-flops themselves, and the buffer contents are not
in them. `scan_out` also gives the raw chain bits for diagnosis. With a wider
`FLIT_T` the chains get longer: the number of chains stays 3, the size of
the largest group.

## Parameters

| Name | Where | Default | Meaning |
|---|---|---|---|
| `NUM_PORTS` | package | 5 | ports (local + 4 mesh directions) |
| `FLIT_W` | package | 8 | data bits of the default flit type `flit_t` |
| `FLIT_T` | `fs_noc_switch`, `crossbar` | `fs_noc_pkg::flit_t` | flit type, a packed struct `{head, tail, chk, data}` |
| `COORD_W` | package | 3 | mesh coordinate bits |
| `NUM_GROUPS` | package | 43 | parity groups over the control outputs |
| `FIFO_DEPTH` | `fs_noc_switch` | 4 | input buffer depth |
| `SCAN_CHAINS` | `fs_noc_switch` | 3 | ⌈90 / 43⌉, size of the largest group |

To build a wider switch, pass a struct with a wider `data` field as `FLIT_T`.
It must keep the field order `head, tail, chk, data`. The buffers, crossbar
and flit checkers follow its width. The control logic and the CED do not
change, because the destination only uses the low six data bits.
`tb_flit_widths` runs the switch with 16, 32, 64 and 128 data bits.
`NUM_PORTS` is tied to the five-direction XY router.

## Departures and limits

* The parity-group assignment is fixed (see above). Fault-secureness holds
  for single-bit output errors, not for every internal single fault.
* The critical region is the whole control logic, not a subset chosen by
  fault analysis.
* A fault inside a crossbar multiplexer can merge two flits, for example by
  ORing them. If the merged flit has an even number of wrong bits, the flit
  checker misses it. The CED checks the select lines but not the
  multiplexer's internal gates. A netlist-level analysis would move those
  gates into the critical region.
* Only the parity flit code is implemented. Stronger codes (Hamming, Berger,
  Hsiao, CRC) would replace `flit_encoder`/`flit_checker`.
* Buffer depth, link handshake, flit format, reset behaviour and the test
  interface are this design's own choices.
* The buffers are plain storage with no checking of their own, apart from the
  check bit stored with every flit.

## Simulation

Every testbench in `tb/` checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. Example for the whole switch:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/fs_noc_pkg.sv tb/tb_fs_noc_switch.sv --top-module tb_fs_noc_switch
./obj_dir/Vtb_fs_noc_switch
```

`tb_fs_noc_switch` runs the switch at its default parameters in five phases:

1. It measures one-flit latency.
2. It sends random and hot-spot wormhole traffic under random back-pressure.
   A per-(output, input) scoreboard checks order, integrity and that packets
   are not interleaved. The test counts arbitration among several requesters,
   back-pressure, full input buffers and reserved outputs waiting for a
   flit, and fails if any of them never happens.
3. It injects link errors and checks that each one is flagged.
4. It forces 1 to 3 bit errors onto the control outputs for single cycles.
   Every error that changes a group parity must raise `ced_err` and `error`.
5. It captures the control outputs and output flits, shifts them out in test
   mode and checks every compacted bit and chain output.

`tb_flit_widths` runs four switches side by side with 16-, 32-, 64- and
128-bit flits. It sends random traffic and injected link errors through each
one.

The block testbenches (`tb_xy_route`, `tb_rr_arbiter`, `tb_switch_ctrl_comb`,
`tb_crossbar`, `tb_input_fifo`, `tb_flit_checker`, `tb_two_rail_checker`,
`tb_ced_critical_region`, `tb_scan_compactor`) check each module against
independent reference models, some exhaustively. Each has a watchdog that
counts a failure if the test does not finish.
