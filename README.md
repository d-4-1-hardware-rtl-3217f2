# Partitionable, runtime-reconfigurable mesh NoC with QoS, and a hardware event monitor

This RTL implements two hardware facilities for a virtualised many-core accelerator:

1. **An on-chip network (NoC) that can be split into isolated partitions and re-routed while traffic is running.**
   - It is a 2D mesh of 5-port wormhole switches.
   - Routing is logic-based (LBDR): each switch has a few configuration bits instead of a routing table.
   - Each switch holds two banks of routing bits, an old one and a new one.
   - **OSR-Lite**, a token protocol, moves the network from the old bank to the new bank link by link, without stopping traffic.
   - Packets carry a 3-bit priority, and every output port uses a priority-class round-robin arbiter.
   - A per-port *circuit* entry can reserve a link for one destination.
2. **A multi-counter event monitor.**
   - Slices of programmable event filters and 32-bit event counters.
   - A free-running timer with per-slice timestamps.
   - A switching-activity counter and a moving-average statistic counter.
   - A privileged register interface.

The top, `vertical_top`, places the two side by side. The 4x4 mesh is `noc_mesh` and the 4-slice monitor is `monitor_block`. All ports are brought out. Nothing is built for the platform manager that computes new routing functions, or for the control network that delivers them. Their place is taken by the per-switch configuration ports `cfg_we`/`cfg_new`.

## Module map

| module | role |
|---|---|
| `noc_pkg` | port indices, flit/header/LBDR-bit types |
| `lbdr` | routing logic of one input port (combinational) |
| `prio_rr_arbiter` | priority-class round-robin arbiter |
| `osr_input_port` | 2-flit input buffer, two LBDR units, input epoch |
| `osr_output_port` | arbiter, crossbar mux, 6-flit output buffer, output epoch and token |
| `noc_switch` | 5 input and 5 output ports, two configuration banks, epoch commit |
| `noc_mesh` | DIM_X x DIM_Y switches, links, tokens and neighbour routing bits |
| `event_filter` | mask / pattern / trigger-mask filter |
| `event_counter` | 32-bit counter, overflow, interrupt, control register with privilege |
| `moving_average` | 8-entry sliding-window sum and average |
| `switching_activity_counter` | counts bit toggles on a bus |
| `monitor_block` | slices of filter + counter + timestamp, timer, activity, average, registers |
| `vc_multiswitch` | three-VC switch: one `noc_switch` per virtual channel behind shared links (standalone, not used by the mesh) |
| `vertical_top` | NoC and monitor side by side |

## Flits, headers and ports

A flit is `{head, tail, data[31:0]}`. Links use stall/go flow control:
- `valid` goes forward with the flit.
- `stall` comes back.
- A flit moves on every edge where `valid && !stall`.

The header flit's data holds:

| bits | field |
|---|---|
| [3:0] | destination x |
| [7:4] | destination y |
| [10:8] | priority, 0 lowest, 7 highest |
| [11] | message type: 0 local (inside the partition), 1 global (to or from shared resources) |
| [31:12] | free for the upper layers |

Only the widths come from the source description: 4+4-bit destination, 3-bit priority, 32-bit flit. The field positions are this design's choice.

Port order everywhere is N=0, E=1, W=2, S=3, L=4. The end node is L. x grows to the east and y grows to the south. Switch *n* of the mesh sits at (n % DIM_X, n / DIM_X).

## LBDR routing, partitions and circuits

Each switch stores one `lbdr_cfg_t` per bank:
- `r_local`, `r_global`: eight routing bits `{ne, nw, en, es, wn, ws, se, sw}`. Bit `xy` = 1 allows a packet that leaves through port x to turn to y at the next switch.
- `c_local`, `c_global`: four connectivity bits `[N, E, W, S]`. Bit 1 means a usable link exists on that side.
- `circ[5]`: one circuit entry per input port: enable, 4+4-bit destination, 3-bit output port.

Routing a header works in three steps:
1. Compare the destination with the switch coordinates to find the quadrant (N', E', W', S').
2. Apply the usual LBDR equations: straight if aligned, and a turn only if the routing bit allows it.
3. Mask the result with the connectivity bits.

The header's message-type bit drives two multiplexers. One picks the global or local routing bits, the other the global or local connectivity bits. This allows:
- **Partitions.** The local connectivity bits are cleared at the partition's edge, so local traffic cannot leave it.
- **Shared resources.** Global messages see the global bits and can still cross the edge.
- **Per-partition routing algorithms.** Global traffic keeps its own routing bits.

If the circuit entry of the input port is enabled and the destination matches, the circuit's output port is forced. The intended use is to clear the reserved link's connectivity bit in all other switches, so that only the circuit's owner uses the link.

If two outputs are allowed, as in an adaptive configuration, the first in N, E, W, S, L order is taken. `unroutable` flags a configuration with no legal output.

## OSR-Lite reconfiguration (the part to read carefully)

A reconfiguration loads a new set of routing bits while packets keep flowing. The rule that keeps it deadlock-free: **no link carries a packet routed with the new bits until every packet routed with the old bits has left that link.** Each port has an *epoch* bit that says which bank its packets use. A *token* travels link by link behind the last old packet.

**Loading.**
- `cfg_we` writes `cfg_new` into the idle bank and sets the switch's reconfiguration flag (`reconf_pending`). The idle bank is the one not named by `sw_epoch`.
- The bank in use stays in force for old packets.
- Each switch whose bits change gets its own write. The writes can arrive at different times.

**Input port.** It moves to the new epoch when both of these hold:
- it has an *effective token*;
- no header of the old epoch is still in its buffer.

A header's epoch is a tag stored with every buffer entry. Flits that arrive after the upstream token are tagged new. The port's epoch picks the bank used to route its head packet, LBDR0 or LBDR1. Cases:
- **Local port.** It gets its token with the flag, because injected packets can take the new routing at once.
- **Token before the new bits.** If the upstream token arrives before this switch has the new bits, the port stalls its link and hides its head from the arbiters until the flag is set.
- **Effective token** = (token from upstream AND Cbit) OR (flag AND NOT Cbit). Cbit is the port's local connectivity bit in the new bank. A port facing a missing link, or the edge of a partition, therefore moves on the flag alone.

**Output port.**
- **Arbitration.** The arbiter serves a header only if the header's input epoch equals the output's epoch. New packets wait until the output has moved.
- **When it moves.** The output moves once all of these hold:
  - every input that could reach it under the *old* routing has moved;
  - no packet holds it;
  - its output buffer is empty.
- **Token.** It then raises its token: `tok_out = moved AND Cbit`. This keeps the token inside the partition being reconfigured.

**Which inputs can reach an output under the old routing.**
- Straight paths and the local port always can.
- A turn depends on the routing bits of the neighbour the packet came from. For example, a packet that enters from the south can leave east only if the south neighbour allows north-then-east (`ne`).
- Every switch therefore receives its four neighbours' current routing bits (`rbits_cur`/`nb_rbits`).
- The dependency matrix is latched while no reconfiguration is pending.

**Commit.** When all ten ports of a switch have moved:
- the new bank becomes the bank in use (`sw_epoch` toggles);
- the flag clears;
- all ports are back in the same epoch.

Tokens are levels: a token is high from the moment its output moves until its switch commits. The input side remembers a rising token until it has moved.

**Timing.**
- A flit, and equally a token, takes one cycle in the switch (input to output buffer) and one cycle on the link.
- With no traffic and XY as the old routing, the last switch commits **4(D-1)+3** cycles after the configuration write: 15 cycles for 4x4 and 31 for 8x8, both checked in simulation. A token chain costs 2 cycles per hop along a row, then along a column, plus one cycle at each end.
- The source description gives 4·D·(D−1)−1 cycles (223 for 8x8) for its own Segment-Based routing. That figure is not reproduced here, because the routing bits of that algorithm are not available.
- Under load, the time grows with the traffic that has to drain. On 8x8 with 5-flit packets, `tb_osr_propagation` measures 31, 43 and 70 cycles at the three injection rates it uses.

**Local reconfiguration.** Write only the switches of one partition. Their edge ports face cleared connectivity bits, so:
- they move without a token from outside;
- their tokens never leave the partition;
- switches outside the partition never see the flag, and their traffic is not stalled.

**Restrictions of this implementation.**
- A switch accepts a new `cfg_we` only after its previous reconfiguration has committed. Reconfigurations must not overlap.
- After reset both banks are all zeros: no links and no turns. The first configuration is loaded with the same protocol, by writing every switch.

## Priority-class round robin

Each output arbiter handles a request in two steps:
1. Filter the requests down to the highest priority present.
2. Run round robin among those.

The round-robin state (last winner) is kept separately for each of the 8 levels. A level that is interrupted by higher-priority traffic therefore resumes its circular order where it left off. A grant is given only on a packet's header. The output then stays locked to that input until the tail flit (wormhole switching). `cur_level` reports the level of the latest grant.

## Switch timing and buffers

- **Input buffer:** 2 flits, with stall when full.
- **Crossbar and arbiter:** combinational from the input head to the output buffer write.
- **Output buffer:** 6 flits. It drives the link directly from its head entry.
- **Latency:** a flit entering a switch is written into an output buffer at the next edge and crosses the link at the following edge.
- **Sizes:** the 32-bit flits and the 2/6-flit buffer depths follow the source description. `IN_DEPTH`, `OUT_DEPTH`, `DIM_X` and `DIM_Y` are parameters.
- **Address range:** coordinates are 4 bits, so meshes up to 16x16 can be addressed.

## Virtual channels by switch replication

`vc_multiswitch` gives a switch with virtual channels without rebuilding the switch. It places `NVC` copies of `noc_switch` (default 3) side by side, one per channel:

- VC0 carries traffic inside a partition. It is the channel meant to be reconfigured at run time.
- VC1 and VC2 carry requests to and responses from the shared L2. Two channels avoid protocol deadlock between requests and responses.

Each copy keeps its own buffers, LBDR banks and epochs. Only the five physical links are shared.

A link carries `valid`, a VC number and the flit. It carries back one stall wire per VC, so a blocked channel never holds up another. OSR-Lite tokens and neighbour routing bits also run per VC, and each copy has its own configuration port. A caller that reconfigures only VC0 simply never writes the others.

Each cycle, every output link chooses among the VCs that have a flit for it and whose downstream VC is not stalled:

- a packet of higher priority wins, whatever its VC;
- at equal priority, the higher VC index wins, so L2 traffic goes before VC0.

A VC's priority is read from its head flit and held until the tail. Flits of different VCs may interleave on a link. Within one VC, packets stay whole. The choice is combinational after the output buffers, so latency equals that of `noc_switch`.

The replication, the shared links and the rule between VC0 and the L2 channels follow the source. The per-VC stall wires, the VC field and the order of VC1 and VC2 at equal priority are this design's choices. The source states the channel count once as two and once as three; three is the default here.

## Monitor block

Each slice is an `event_filter`, an `event_counter`, an optional ID comparison and a last-event timestamp.

**Filter.** `match = (Vmask & (Vpattern ^ Vdata)) == 0`. The not-equal mode uses `!= 0` instead. The qualified triggers are `VtrigMask & Vtrigger & match`.

**Modes.**
- **Mode A:** the counter counts qualified triggers. If the ID filter is on, they must also come with a matching `cur_id`.
- **Mode B:** the counter counts its selected raw triggers and ignores the filter.

**Counter control register:**

| bits | field |
|---|---|
| 0 | software reset (write 1; reads as 0) |
| 1 | enable |
| 2 | interrupt enable |
| 7:4 | trigger select |
| 9:8 | privilege level |

- The counter adds one per cycle in which any selected trigger is high.
- Wrapping from all ones sets the overflow flag. With the interrupt enabled it also raises the interrupt.
- Reading the counter value clears the interrupt.
- An access with `priv` below the slice's level reads 0 and cannot write.

**Register map (word addresses):**

| address | register |
|---|---|
| 16·s + 0 | control |
| 16·s + 1 | value |
| 16·s + 2 | overflow |
| 16·s + 3 | Vmask |
| 16·s + 4 | Vpattern |
| 16·s + 5 | {id_en[10], mode_b[9], cmp_ne[8], VtrigMask[3:0]} |
| 16·s + 6 | ID |
| 16·s + 7 | timestamp of the last counted event |
| 0xF0 | timer |
| 0xF1 | switching activity |
| 0xF2 | moving average |
| 0xF3 | moving sum |
| 0xF4 | write bit 0 to clear activity and average |

**Moving average.** The sum is updated by one subtraction and one addition per sample, using an 8-entry circular buffer: Sum ← Sum − x(t−8) + x(t). The average is Sum/8, a shift.

**Switching activity.** Each enabled cycle adds the number of toggled bits between the current and the previous bus value. The counter saturates.

The widths of the counter, the control fields, the window size and the four triggers follow the source description. The register map, the 4-slice count, the 16-bit ID and sample widths, the not-equal mode and the saturation are this design's choices.

## Where this design departs from, or adds to, the source description

- **Old-header detection.** The source counts stored old-epoch headers with a 2-bit counter. Here each input-buffer entry carries an epoch tag. This gives the same "old headers present" signal, and also marks which flits arrived after the token.
- **Old-routing dependencies.** The source does not say how they are derived. Here they come from the neighbours' routing bits, delivered on dedicated wires.
- **Output drain.** An output moves only when its buffer is empty and no packet holds it.
- **Overlapping reconfigurations.** These are not supported.
- **Configuration word.** Each switch's word also carries the circuit entries and the global routing bits, so it is wider than the 17 bits per switch that the source's control network carries.
- **Not built:**
  - a mesh of the virtual-channel switch, and the network interfaces that would choose a VC per message (the `vc_multiswitch` switch itself is built and tested on its own);
  - the control network or ring that delivers new bits and LBDR_en;
  - the central manager;
  - the centralised latency-monitoring unit.
- **Monitor connection.** The monitor is not tied to a particular NoC signal at the top. The end-to-end testbench connects it to node 5 of the mesh.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. To build and run one with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/noc_tb_pkg.sv tb/tb_vertical_top.sv --top-module tb_vertical_top
./obj_dir/Vtb_vertical_top
```

| testbench | what it checks |
|---|---|
| `tb_lbdr` | all switch/destination pairs for XY and YX, each turn bit alone, connectivity and global bits, circuit override |
| `tb_prio_rr_arbiter` | cycle-by-cycle against a reference model, priority ordering, per-level fairness |
| `tb_osr_input_port` | buffering, epoch held while old headers remain, token memory, stall before the new bits, local port, unconnected port |
| `tb_osr_output_port` | priority order, wormhole lock, 6-flit limit, epoch gating, move after dependent inputs, token masked by Cbit |
| `tb_noc_switch` | random traffic on all ports against XY, a reconfiguration to YX, then YX traffic |
| `tb_noc_mesh` | 4x4 packet integrity; idle reconfiguration (15 cycles); two reconfigurations under load; local reconfiguration; circuit; global message across a partition edge |
| `tb_event_filter`, `tb_event_counter`, `tb_moving_average`, `tb_switching_activity_counter` | reference-model comparisons |
| `tb_monitor_block` | the four slice configurations, overflow and interrupt, privilege, timestamp, activity, average |
| `tb_vc_multiswitch` | one three-VC switch with random VCs and priorities on all links: XY routes, VC kept, packets whole, the link arbitration rule every cycle |
| `tb_vertical_top` | the whole default design end to end: the mesh tests, the monitor watching node 5, a priority check on every arbiter of switch 5, one `MECHANISM` line per mechanism |
| `tb_osr_propagation` | 8x8 mesh: idle reconfiguration in 31 cycles, loaded reconfiguration at three injection rates with 5-flit packets |
| `tb_qos_hotspot` | 15 masters to one slave on 4x4; a far master at priority 7 gets its mean latency cut (about 1280 → 330 cycles) |

Synthesised with a generic flow, the default top comes to about 30,000 word-level cells and 25,000 flip-flop bits. Almost all of it is the 16 switches.
