# A slotted ATM layer switch with a TDM bus fabric

This is a synthesizable SystemVerilog model of an ATM layer switch for N ports (8 by default).
Each port takes 53-byte cells bit-serially from a physical layer and gives them back bit-serially.

In between, the switch does the following:

- It sorts cells by their header: user, signalling, management (OAM), ILMI or unassigned.
- It looks user and OAM cells up in a content-addressable route table and rewrites their VPI/VCI.
- It polices each connection against its traffic contract.
- It copies multicast cells.
- It moves user cells across a shared time-division (TDM) bus.
- It queues cells at the output port in eight priority classes with selective CLP discard.

Signalling, management and ILMI cells leave the data path on their own buses. They go to
processors that run software, which this RTL does not contain. Those processors reach the
switch through top-level ports, and they load the connection tables over a bit-serial control
bus.

The design is hybrid input/output buffered. Each input port holds a small FIFO in front of the
fabric. Each output port holds a 64-cell buffer shared by eight priority classes.

## Time: cell slots, hclk and dclk

Everything happens in fixed cell slots. The switch has a single clock, `pclk`. `slot_timer`
counts 512 `pclk` cycles per slot and derives two timing signals from the count:

| signal | meaning |
|---|---|
| `hclk` | the slot clock; high for the first 480 cycles of a slot, low for the last 32 |
| `dclk` | `pclk`/4; paces the route table handshake |

All three are distributed as a timing bundle `tmg_t` with these fields:

- `hclk`
- `rise`: the slot start
- `fall`: the falling edge of `hclk`
- `dtick`: one cycle in four
- `phase`: the cycle number within the slot

Blocks use these as enables. `hclk` and `dclk` are also top-level outputs for the physical
layer.

At 155 Mb/s ports (149.76 Mb/s of cells) a slot lasts 2.83 µs, so `pclk` is about 5.5 ns. A
serial cell needs 424 of the 512 cycles.

A cell moves one stage per slot:

| slot | what happens |
|---|---|
| S | The cell arrives serially. Its header is sorted and looked up. At the fall of `hclk` the decision is latched. |
| S+1 | The cell goes on the port's internal bus to its handler. A user cell reaches the user FIFO and, if the TDM bus grants it, the output buffer. |
| S+2 | The output port's next physical layer request sends it. |

So an uncongested cell leaves between 2 and 3 slots after it arrived.

## Cell formats

**Serial line.** 424 bits, most significant bit of the header first:

- GFC 4 bits
- VPI 8 bits
- VCI 16 bits
- PT 3 bits
- CLP 1 bit
- HEC 8 bits
- 384 payload bits

The HEC belongs to the physical layer. It is ignored on input and sent as zero on output.
`indicate` is high while the bits arrive. Bit *k* of a cell is sampled in the cycle whose slot
phase is *k*.

**Internal 16-bit buses.** A cell is 27 words:

| word | contents |
|---|---|
| 0 | `{routing tag, header[31:24]}` |
| 1 | `header[23:8]` |
| 2 | `{header[7:0], 8'h00}` |
| 3–26 | the 24 payload words |

**Routing tag.** 8 bits (`rtag_t`): `{output port[3:0], priority class[2:0], CLP}`.

- The CLP copy lets the output buffer make its discard decision without decoding the header.
- Class 7 is served first.
- The tag `8'hFF` in a route entry marks a configurable ILMI connection.

## Input port (`sim`, one per port, gathered in `input_module`)

### Serpar

`serpar` shifts the serial payload into one of two 24-word buffers, while the header goes to
the sorter. A buffer is either:

- released word by word onto the internal bus with `d_ok`, or
- dropped with `d_rst`.

### Cell sort

`cell_sort` is the heart of the port.

**Preliminary decision.** Made after 32 header bits from the pre-defined UNI headers:

- unassigned cells are dropped;
- signalling (VPI 0, VCI 5) and ILMI (VPI 0, VCI 16) cells need no lookup;
- user cells and OAM cells (VP OAM on VCI 3/4, VC OAM with PT 100/101) go to the route table.

**Route table exchange.** The sorter sends the 28-bit identifier in two words and reads back a
status and three words holding the new tag and header. Each step is one `dclk` tick.

**Final decision.** Latched at the fall of `hclk`:

| cell | result |
|---|---|
| user cell | goes to the user FIFO, or to the multicast unit |
| table error | the header alone goes to the local management unit |
| OAM cell | sent to the local management unit, or passed through the fabric, by the cell type and whether the table found a VP or VC switch |
| VC end-to-end OAM cell that passes | counted as monitored |

The policer's verdict sets CLP, or turns the cell into a discard. Finally CLP is copied into
the routing tag.

**Sending.** At the next slot start the sorter sends the cell on `sbus` with its type
(`stype`):

1. three header words from the sorter;
2. the 24 payload words that serpar drives.

Afterwards it lends `sbus` to the multicast unit, but only when the user FIFO has room and the
slot has time left.

### Route table

`route_table` is a CAM of `ENTRIES` entries. Each entry holds an incoming identifier, a routing
tag and an outgoing identifier.

**First search** (GFC + VPI):

| matches | result |
|---|---|
| 0 | table error |
| 1 with zero incoming VCI | VP switch: the new VPI, the old VCI kept |
| 1 otherwise | VC switch |
| several, all with zero VCI | VP multicast |
| several otherwise | second search |

**Second search** (GFC + VPI + VCI):

| matches | result |
|---|---|
| 0 | error |
| 1 | VC switch |
| more | VC multicast |

### Traffic

`traffic` snoops the same header transfer. It polices the connection with the Generic Cell Rate
Algorithm (virtual scheduling). Time is counted in slots, with an increment and a limit per
connection. A nonconforming cell is tagged if its entry is in tag mode and the cell has CLP=0.
Otherwise it is discarded.

### Multicast

`multicast` keeps the payload of one multicast cell. It holds its own copy of the CAM, loaded by
the same commands. For each matching entry, up to one per output port, it asks the sorter for
`sbus` and sends a copy with the new header and tag into the user FIFO. A VP multicast copy
keeps the cell's VCI.

### Local SM

`local_sm` queues two kinds of cell for the global management processor on the shared SM bus:

- OAM cells that end here;
- errored headers, with a zero payload.

It also counts monitored cells.

### FIFOs

**`user_fifo`** queues cells for the fabric. It:

- raises `csf_request`;
- sends grant, 27 words and the tag on `csf_dest`;
- then drops the request for one `pclk`, so that the arbiter can move on.

`buff_full` stops the multicast unit from overfilling it. A user cell that meets a full FIFO is
counted in `lost_cells`.

**`cac_fifo`** queues signalling cells. It sends one when the CAC arbiter grants the bus with
this port's address.

### Table loader

`table_loader` takes 64-bit entries from `signal_control[3:0]` when `signal_address` names the
port. It runs in two phases:

1. **Shift.** For each of the 64 bits, one cycle with `signal_control = {2'b00, 1'b1, bit}`, MSB
   first.
2. **Command.** One cycle with `{cmd, 2'b00}`, where `cmd` is:
   - 1: write a route/multicast entry
   - 2: write a traffic entry
   - 3: remove by incoming identifier

Route entries are `route_entry_t` `{in_id, tag, out_id}`. Traffic entries are
`traffic_entry_t` `{key, tag_mode, 3'b0, incr, limit}`.

## Fabric (`csf`, `tdm_arbiter`)

All input ports share one 16-bit bus with an 8-bit destination tag that every output port
watches.

`tdm_arbiter` polls the requests round robin. It grants only when a whole cell still fits
before `hclk` falls, and drops the grant when the request drops.

Each cell costs 30 cycles:

- 1 grant cycle
- 27 words
- 1 cycle with the request low
- 1 cycle for the next grant

So 480/30 gives exactly 16 cells per slot. That is the fabric's capacity, and the reason the
bus tops out at 16 ports.

With heavy multicast the fabric, not the ports, becomes the bottleneck. Cells then back up in
the input FIFOs and are lost there.

## Output port (`som`, one per port, gathered in `output_module`)

### Priority buffer

`priority_buffer` has dedicated queues of `QDEPTH` (8) cells for signalling, management and ILMI
cells. Their writers use request/grant:

- the CAC and SM processors through their arbiters, with a port address;
- the ILMI agent directly.

User cells from the fabric cannot be refused, so the buffer decides on its own whether to keep
each one. They share `UBUF` (64) cell locations:

- An idle-address queue holds the free locations.
- One address queue per class holds the locations of that class's cells in arrival order.

A user cell is dropped in three cases:

| case | counted in |
|---|---|
| no location is free | `overflow_discards` |
| its class already holds `CLASS_MAX` cells | `overflow_discards` |
| its CLP is 1 and the buffer already holds `clp_threshold` cells | `clp_discards` |

The last case is selective discard, which keeps room for CLP=0 cells.

### Scheduler

On each rising edge of the physical layer's `request`, `scheduler` grants one queue for one
cycle in this order:

1. signalling
2. management
3. ILMI
4. user classes 7 down to 0
5. the unassigned-cell generator, if everything is empty

The granted cell goes out serially without its routing tag, 424 bits with `dout_flag` high.

## Processor interfaces (top-level ports)

The CAC (signalling) and SM (management) processors have the same interface, handled by two
instances of `bus_arbiter`.

**From the input ports.** The arbiter polls the ports' requests and grants one, with its number
on `cac_address`/`sm_address`. The port then sends 27 words (`*_im_bus`, `*_im_data`).

**To the output ports.** The processor raises `*_cell_req` with `*_cell_address`. The arbiter
gives this priority over the input ports and forwards it to that output port. `*_cell_grant`
comes back, and the processor sends 27 words on `*_om_bus` with `*_om_data`.

**ILMI.** Each port's ILMI agent sees that port's internal bus (`ilmi_sbus`, `ilmi_stype`,
`ilmi_sdata`). It writes its answers into the same port's ILMI queue with
`ilmi_request`/`ilmi_grant`/`ilmi_data`/`ilmi_bus`.

`clp_threshold` is an input. The five statistics arrays are outputs.

## Where this model departs from the switch it follows, and what it leaves out

**One clock edge.** The original design samples on the rising edge and drives outputs, flags
and requests on the falling edge, with `hclk` and `dclk` as real clocks. Here every flop is on
the rising edge of `pclk`, and the slower clocks are enables. Handshakes therefore take whole
`pclk` cycles. This does not change the 16-cells-per-slot figure.

**No tri-state buses.** Shared buses were multiply driven with a resolution function. Here they
are multiplexed, or ORed, with a separate valid flag, and an idle bus reads zero. The
bidirectional table bus became two buses:

- `table_wbus`: headers out to the tables;
- `table_rbus`: results back.

**Payload buffers are 24 words.** The original gives both 24 and 27 for the serial-to-parallel
buffer. A payload is 24 words, and 27 is the length of a whole tagged cell, so 24 was used.

**Output buffer storage.** The original uses staggered shift registers of length 26 and 27,
which drop the tag while shifting. This model stores each 27-word cell in a memory array and
skips the tag byte when sending.

**Policer algorithm.** The original leaves it to software and names only the GCRA. The
virtual-scheduling form, the entry format and the slot time unit are this model's choices.

**End points.** OAM end points and endpoint rules follow the original's decision table. EFCI
(congestion marking) is not done.

**Not built:**

- the ILMI agent;
- the signalling processor;
- the management processor;
- the software part of the local management unit, such as connectivity checks and alarm
  surveillance;
- cells that such software would generate, so `local_sm` forwards but never originates cells.

**Local SM insertion path.** In the original, the sorter has a request/grant pair for the local
management unit, and the user FIFO has a matching data flag. Through these the local SM can push
cells into the fabric. This model has only the multicast unit's pair, because its `local_sm`
creates no cells.

**Processor ports at the top.** The original's top level holds the CAC and SM blocks, so it has
only clock, `init` and the five pins per port. Here their software halves are outside, and
their buses are top-level ports.

**Sizes the original does not give:**

| parameter | default | meaning |
|---|---|---|
| `ENTRIES` | 16 | table entries |
| `USER_DEPTH` | 4 | user FIFO cells |
| `CAC_DEPTH` | 4 | signalling FIFO cells |
| `CLASS_MAX` | 64 | no per-class cap |

The following are also choices made here:

- the `signal_control` bit assignment;
- the order signalling > management > ILMI at the scheduler;
- dropping a second multicast cell while the unit is still busy. It is counted in `lost_cells`.

**Not checked:** the cell loss figure quoted for the 64-cell shared buffer (below 10^-12 at
load under 0.8) is a statistical property. It was not measured.

## Files

- `rtl/atm_pkg.sv`: types and helper functions shared by all modules.
- `rtl/<module>.sv`: one module each. The top is `rtl/atm_switch.sv`. `cell_fifo` and
  `table_loader` are helpers used inside the port modules.
- `tb/tb_<module>.sv`: a self-checking testbench per block.
- `tb/tb_workload_16port.sv`: the switch at 16 ports under full load.
- `tb/tb_pkg.sv`: cell and table-entry builders.
- `tb/tb_bus_handler.sv`: a behavioural stand-in for the CAC and SM processors. It takes a cell
  from the input side and writes it back to the port it came from.
- `tb/tb_ilmi_agent.sv`: the same kind of stand-in for an ILMI agent.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends a stuck run
as a failure. Build one with plain Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_atm_switch \
    rtl/atm_pkg.sv tb/tb_pkg.sv $(ls rtl/*.sv | grep -v atm_pkg) \
    $(ls tb/*.sv | grep -v tb_pkg) -o sim
./obj_dir/sim
```

Replace `tb_atm_switch` with any other testbench. The unit testbenches use random stimulus from
`$urandom` and compare the block's outputs with models written in the testbench.

`tb_atm_switch` runs the whole switch at its default size: 8 ports, 64-cell buffers, 512-cycle
slots. It has two parts.

**Part A: individual cases.** It loads tables through `signal_control`, then checks:

- a VC switch and a VP switch, with the exact output cell and a latency of more than 2 and at
  most 3 slots;
- VC multicast copies;
- policing by tag and by discard;
- a signalling cell through the CAC processor and back out;
- an ILMI cell through the agent;
- a VP segment OAM cell to management;
- a monitored end-to-end OAM cell;
- table errors;
- class priority at an output;
- CLP selective discard.

**Part B: saturation.** For 90 slots every port multicasts to several outputs. The test checks:

- the fabric carries exactly 16 cells in a full slot;
- every output keeps sending;
- input FIFO losses, output overflow, unassigned cells and multicast copies all occur.

`tb_workload_16port` runs the switch at 16 ports, the most the 16-bit bus can serve. Every
input receives a cell in every slot. The traffic is a permutation, so every output is also fully
loaded. The test checks that:

- all cells arrive, in order and with their new headers;
- no cell is lost at an input or an output;
- the fabric carries 16 cells per slot;
- every cell leaves by the third slot after the one it was sent in.

A full run of either takes a few minutes.
