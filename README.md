# XCCC: a cube-connected-cycles network that survives one PE fault per cycle

A cube-connected-cycles network CCC(h, k) replaces each node of a
k-dimensional hypercube by a cycle of h processing elements (PEs). Each PE has
three ports: F and B link it to its neighbours in the cycle, and L links the
PE at position p < k to the PE at the same position in the cycle whose number
differs in bit p. Each PE has a fixed number of ports, and the layout is
regular. The drawback is that a single failed PE breaks both its cycle and one
hypercube dimension.

The XCCC, written XCCC(h+1, k), adds two things:

* **A spare PE per cycle**, placed directly above the k dimensional PEs. When
  a PE fails, the PEs above it in the cycle each move down one role, up to
  the spare. The working PEs then form the same CCC(h, k) again.
* **Cross connections.** Each PE at position p < k gets a U port that
  reaches the D port of the PE at position p+1 in the partner cycle. The two
  cross connections between a pair of partner cycles cross each other. A
  control switch sits at the crossing; the two wires and the switch together
  are a *switch connection pair* (SCP). After a role shift, the shifted PE uses
  its D port to reach its old lateral partner. An SCP can also stand in for a
  broken F/B or L link.

With no fault present, every SCP is set straight across. The U links then
act like a butterfly network on top of the CCC, so a broadcast reaches the
farthest cycle in k hops rather than 2k-1.

This repository holds synthesizable SystemVerilog for the network, the
reconfiguration control, the broadcast rule and a pipeline that runs two
recursive-doubling reductions at once. The PE core is not included,
because the architecture does not define what a PE computes. Each PE slot
instead brings its ports out to the top level.

## Addressing

A PE is named (c, q): c is its cycle, 0 .. 2^K-1, and q is its physical slot,
0 .. H. Each cycle has H+1 slots.

| slots       | role                             | ports                          |
|-------------|----------------------------------|--------------------------------|
| 0 .. K-1    | dimensional PEs                  | F, B, L, U (and D from slot 1) |
| K           | the spare                        | F, B, D                        |
| K+1 .. H    | the remaining upper PEs          | F, B                           |

The partner cycle of c at dimension p is `c ^ (1 << p)`. The **logical**
position of a working PE is the number of working slots below it in its
cycle. The guarantee the design keeps is this: after any tolerated set of
faults, the working PEs, numbered by logical position, are wired exactly as
CCC(H, K).

The default parameters are `H = 4`, `K = 3`, `W = 16`. This gives XCCC(5,3):
8 cycles of 5 slots and 12 SCPs. It is the example network that the
architecture is worked through on.

## Switch connection pairs

The SCP of dimension p between cycles ca (bit p clear) and cb has four
terminals:

    a_hi = D of (ca, p+1)      b_hi = D of (cb, p+1)
    a_lo = U of (ca, p)        b_lo = U of (cb, p)

| state     | joins                        | used for                                             |
|-----------|------------------------------|------------------------------------------------------|
| `SCP_X`   | a_lo-b_hi, b_lo-a_hi         | cross connections; also a shifted PE reaching the old partner |
| `SCP_V`   | a_lo-b_lo, a_hi-b_hi         | replacing an L link (two U ports); joining two shifted PEs (two D ports) |
| `SCP_SUP` | a_lo-a_hi, b_lo-b_hi         | replacing the F/B link between slots p and p+1 of one cycle |
| `SCP_OFF` | nothing                      | a pair that is not in use                            |

`SCP_SUP` is the state drawn as a sideways "U". `SCP_OFF` is this design's
own addition: it represents a disabled pair.

## PE bypass

Four switches surround every PE (`pe_bypass`). Switch 1 connects the PE to
its lateral link, switch 2 to the F side and switch 3 to the B side. Switch 4
joins the B side directly to the F side. A working PE has switches 1 to 3
closed. An isolated PE (one that failed, or an idle spare) has only switch 4
closed, so traffic passes through its slot. The bypass path takes the
neighbour's own output rather than its bypassed output. This way the ring
never forms a combinational loop. The price is that the path only spans one
isolated slot, which is all a successful reconfiguration ever leaves in a
cycle.

## Reconfiguration

`xccc_reconfig` holds one `pe_reconfig_ctrl` per slot and one state register
per SCP. It accepts one fault report at a time, on `fault_valid`,
`fault_kind`, `fault_c` and `fault_q`, and only while `fault_ready` is high.

**Performance mode.** After reset no fault is known. Every SCP reads as X,
and the raw U and D ports are available to the PEs. The first fault report
switches to fault-tolerant mode for good. Every SCP is then off until the
procedure enables it.

**A PE fault at slot f < K.** The failed PE is bypassed. A token then starts at
slot f+1 and climbs one slot per clock up to the spare. Each PE holding the
token does the following:

1. *(Dimensional PEs only.)* If its L link is active, it deactivates it.
   Otherwise it is already reaching the other cycle over U, because an earlier
   reconfiguration of that cycle made it do so. In that case it releases U.
   Its flag `sw_on` was already set when U took over the lateral link.
2. If its D port is already active, the reconfiguration fails. Otherwise it
   activates D and sets the SCP below it. The state is X if the predecessor's
   `sw_on` is false, and V if it is true. X means the partner role still sits
   at the partner cycle's slot below, reached over U. V means the partner
   cycle has shifted too, so its role-holder is reached over D.
3. With X, it tells the PE at the far U end to activate U, drop L and set
   `sw_on`. If that U already replaces a broken F/B link, the
   reconfiguration fails.

The spare performs steps 2 and 3 only, and becomes active. The controller is
busy for K - f clocks, so faults at higher dimensions involve fewer PEs.

A fault in the spare itself only bypasses it. A fault above the spare (slots
K+1 .. H) bypasses the failed PE and enables the spare with no procedure,
because those slots have no lateral links. A second PE fault in a cycle is
reported as a failure.

**Worked example** (XCCC(5,3)):

1. PE(1,1) fails. PE(1,2) takes over logical position 1 and reaches
   PE(3,1) over the dimension-1 SCP (X). PE(3,1) switches its lateral link
   from L to U and sets `sw_on`.
2. The spare of cycle 1 takes over logical position 2 and reaches PE(5,2)
   over the dimension-2 SCP (X). PE(5,2) switches from L to U and sets
   `sw_on`.
3. PE(5,0) then fails. PE(5,2) finds its L inactive, releases U and keeps
   `sw_on`. The spare of cycle 5, seeing `sw_on` set below it, sets the
   dimension-2 SCP between cycles 1 and 5 to V. The two spares are now joined
   D to D.

**Link faults.**

* When the F/B link between (c, q) and (c, q+1) fails (q < K), the lower PE
  sends F over U and the upper PE sends B over D, with their SCP in the
  sideways-U state.
* When the L link between (c, q) and its partner fails, both ends use U with
  the SCP in V.
* Either fault needs an SCP that is still unused. Links with no SCP (F/B links
  at or above slot K) cannot be repaired, and such a report is a failure.

The `fail` output is sticky until reset. The `events` output pulses once per
role shift, `sw_on` path, X/V/sideways-U setting, step-3 notice, spare
enable and failure.

**Port steering.** Each slot has a `pe_port_steer` cell. It moves the PE's
logical F, B and L traffic onto whichever physical port (F, B, L, U or D) the
controller says carries it. A PE core therefore always talks on logical ports
and never needs to know how it was rewired.

## Broadcast in the fault-free network

`xccc_bcast_net` places one `bcast_node` on every working PE, with H per
cycle, and links them as the fault-free XCCC. A message carries a *weight* and
a *count*.

* **Originating PE:** sets weight to -1 and sends the message over F with
  count ceil((H-1)/2), over B with count floor((H-1)/2), and over U.
* **PE receiving over D:** sets weight to its own position and sends over F,
  over B (same counts) and over U, if it has a U port.
* **PE receiving over F or B:** sends over U if its position is above the
  weight. It then decrements the count and passes the message on in the same
  direction if the count is still above 0.

Every cycle is entered exactly once, and every PE receives exactly one copy.
One hop takes one clock. A broadcast from PE(0,1) of XCCC(5,3) takes 6
clocks. Over all origins it takes K + ceil((H-1)/2) to K + 2*ceil((H-1)/2)
clocks (5 to 7 here). A plain CCC(4,3) needs 7 to 9.

The broadcast layer can only start in performance mode. It exists only for
H > K, because with H = K the last U link would land on the idle spare.

## Two reductions at once

A recursive-doubling reduction (sum, minimum, maximum) over the 2^K cycles
takes one step per dimension. At step p, PE(c, p) swaps its partial result
with its partner PE(c xor 2^p, p) over L and combines the pair. After K steps
every cycle holds the full result. In a plain CCC the combined value climbs
to the next dimension over F. The XCCC has a second way up: U of PE(c, p)
lands on D of PE(c xor 2^p, p+1). Both ends of an L link hold the same value
after the swap, so sending it over U is as good as sending it over F.

`xccc_dual_rd` uses this to run two data sets at once. Set A climbs over F/B
and set B over U/D, and both share the L links. Every PE then receives two
words per step, one on B and one on D. The design's own choices:

* the combining rule (swap, combine, send up), which the architecture leaves
  open;
* an L link wide enough for one word of each set per step;
* sum modulo 2^W, and unsigned minimum and maximum;
* one clock per step, fully pipelined, with results at slot K (free in the
  fault-free network) K+1 clocks after entry;
* the operation travels with the data, so it may change on every clock.

The pipeline needs the cross connections, so the top accepts input only in
performance mode.

## Top level, `xccc_top`

| group | signals |
|---|---|
| fault reports | `fault_valid`, `fault_kind` (`FLT_PE`, `FLT_FB`, `FLT_L`), `fault_c`, `fault_q`, `fault_ready` |
| status | `ft_mode`, `busy`, `fail`, `events[7:0]`, `scp_state[K][2^K]`, `pe_active`, `l_act`, `u_act`, `d_act` |
| PE core ports per slot | `pe_{f,b,l}_out/_in` (logical links), `pe_x{u,d}_out/_in` (raw U/D, performance mode) |
| fault injection | `fb_dead[c][q]` (link q to q+1), `l_dead[c][q]`: cut links in the data plane for testing |
| broadcast | `bc_start`, `bc_c`, `bc_p`, `bc_data` in; `bc_reached`, `bc_weight`, `bc_rx_data`, `bc_done`, `bc_steps`, `bc_dup` out |
| dual reduction | `rd_in_valid`, `rd_in_op` (`RD_SUM`, `RD_MIN`, `RD_MAX`), `rd_in_a[2^K]`, `rd_in_b[2^K]` in; `rd_out_valid`, `rd_out_op`, `rd_out_a`, `rd_out_b` out |

Timing:

* The data plane is combinational: a word on a PE output reaches the
  connected input in the same clock.
* Reconfiguration takes one clock per PE involved.
* A broadcast takes one clock per hop.
* A pair of reductions takes K+1 clocks, and a new pair may enter every
  clock.
* Reset is asynchronous and active low.

Files, bottom-up:

| file | what it is |
|---|---|
| `rtl/xccc_pkg.sv` | enums for switch states, fault kinds and lateral routes; the broadcast message struct; helpers |
| `rtl/scp_switch.sv` | one SCP control switch (combinational) |
| `rtl/pe_bypass.sv` | the four switches around a PE |
| `rtl/pe_port_steer.sv` | logical-to-physical port steering |
| `rtl/pe_reconfig_ctrl.sv` | per-PE reconfiguration state and procedure |
| `rtl/xccc_reconfig.sv` | all controllers, SCP states, fault-report handling |
| `rtl/xccc_fabric.sv` | links, bypass cells and SCPs of the whole network |
| `rtl/bcast_node.sv`, `rtl/xccc_bcast_net.sv` | broadcast rule and network |
| `rtl/xccc_dual_rd.sv` | two pipelined recursive-doubling reductions |
| `rtl/xccc_top.sv` | everything together |

## Choices this design makes

These points are not fixed by the architecture:

* **`sw_on` is set by the step-3 notice, not by step 1.** A PE sets `sw_on`
  when another cycle's step 3 makes it activate its U. This is exactly the
  case where the partner cycle has shifted, so the successor must pick V. Two
  cases show why step 1 alone is not enough. If a failed PE was using its U
  because of a notice, its successor must still pick V. If a PE's L is
  inactive only because its L link broke, the partner cycle did not shift,
  and X is correct. The testbenches check both: PE(1,1) then PE(3,1), and
  L(0,1) then PE(0,0).
* **A notice to a U already used for a lateral link is accepted.** Only a U
  that replaces a broken F/B link makes step 3 fail. A U that replaces a
  broken L link already reaches the same partner cycle.
* **No notice in the V state.** In the V state, step 3 sends no notice,
  because the far end is a D port that is already active.
* **Unequal broadcast counts.** The F and B hop counts differ when H is even,
  and the U decision is taken on every arrival regardless of the count. Equal
  counts, or a U decision that depends on the count, would send duplicate
  copies or miss cycles in the 4-PE example.
* **One fault report at a time.** Cycles are not reconfigured concurrently.
* **Sizes.** Word width 16 bits and broadcast field widths 8 bits.
  Asynchronous active-low reset.
* **Leaving fault-tolerant mode** only happens through reset.
* **Fault detection** is outside the design: faults arrive as reports.

Not built:

* the PE core (never specified);
* the PE-to-PE routing algorithm, which comes from other work;
* the folded chip layout.

Limits worth knowing:

* The procedure is exactly as strong as the one it follows. Some fault
  sequences that mix a link fault with a later PE fault in the same cycles
  are not handled beyond what the three steps do.
* The bypass spans one isolated slot per cycle.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run one with Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/xccc_pkg.sv tb/tb_xccc_top.sv \
        --top-module tb_xccc_top -Mdir obj_top && ./obj_top/Vtb_xccc_top

For the broadcast network test, add `tb/bcast_net_harness.sv` to the file list.

| testbench | what it shows |
|---|---|
| `tb_scp_switch` | all four states against a pairing table |
| `tb_pe_bypass` | normal and isolated switch settings |
| `tb_pe_port_steer` | every routing combination |
| `tb_pe_reconfig_ctrl` | each step, the `sw_on` path, link requests, failures, token timing |
| `tb_xccc_reconfig` | the worked multiple-fault example, switch settings, busy time K - f, failure cases |
| `tb_xccc_fabric` | random isolation, SCP states and broken links against a reference model |
| `tb_bcast_node` | each forwarding case |
| `tb_xccc_bcast_net` | broadcasts from every PE for XCCC(5,3), (7,3), (6,4): one copy each, weights, step bounds, 6 steps from PE(0,1) |
| `tb_xccc_dual_rd` | hand-worked sums, minima and maxima, then 300 clocks of random sets against a plain loop, with exact latency |
| `tb_xccc_top` | default-size end-to-end run (details below) |

`tb_xccc_top` runs the default-size network end to end:

* performance-mode cross connections, a broadcast and two back-to-back
  reductions;
* the worked fault sequence with the broken links cut in the data plane;
* a check after every report that the working PEs form CCC(4,3);
* the expected failure when PE(6,0) fails afterwards;
* a count of every mechanism.

Larger sizes such as XCCC(5,4) or XCCC(9,8) are a parameter change:
`-GH=8 -GK=8` on the top.
