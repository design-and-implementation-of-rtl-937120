# Clocked OCP network interfaces between IP cores and an on-chip network

This RTL connects a master IP core (a pipelined CPU bus) to a slave IP core (a
synchronous ROM/RAM) through an on-chip network of small source-routed routers.
Each core talks to the network through a standard **Open Core Protocol (OCP 2.2)**
point-to-point link, so the cores and the network can each be reused without
knowing about each other.

Every crossing is split into the same three layers:

* a **back-end**, which speaks the core's or the network's own signals;
* a **domain interface (DI)**, which moves words between the back-end and the OCP
  entity, and can cross clock domains;
* an **OCP master or slave entity** (the front-end), which speaks OCP.

The design is built in two configurations from the same modules:

* **multifrequency** (default): the master side, the network and the slave side
  run on three unrelated clocks, and two of the DIs contain dual-clock FIFOs;
* **single clock**: every DI is plain wiring and one clock drives everything.

The RTL follows the structure, packet format, address format, OCP signal subset
and latency budget of a published design (a thesis on clocked OCP interfaces for
IP cores and network fabrics). The section "Where this RTL departs from the
reference design" lists what is this implementation's own choice.

## The path of one transaction

```
 clk_m (Top1)                                   clk_n (network)                     clk_s (Top2)
 CPU bus -> master_be -> DI1 -> OCP master => OCP slave -> DI2 ~> nw_be1 -> routers -> nw_be2 -> DI3 ~> OCP master => OCP slave -> DI4 -> slave_be -> slave_mem
```

Responses travel back along the same chain. `->` is a valid/stall handshake,
`=>` is an OCP link and `~>` is a clock crossing when `MFCD = 1`.

| Module | Role |
|---|---|
| `ocp_noc_top` | The whole chain, with the memory as the system target. The CPU bus, the route-table port and the routers' spare ports are brought out. |
| `master_be` | Takes CPU requests and translates the route field. Assigns tags, blocks the CPU in nonsplit mode and returns responses to the CPU. |
| `di` | Domain interface: wiring (`ASYNC = 0`) or two 8-word dual-clock FIFOs (`ASYNC = 1`). |
| `async_fifo` | Gray-pointer dual-clock FIFO, built from `fifomem`, `sync_r2w`, `sync_w2r`, `wptr_full` and `rptr_empty`. |
| `ocp_master`, `ocp_slave` | The two ends of one OCP link: request, datahandshake and response phases. |
| `nw_be1` | Master-end network back-end: packs requests into flits and unpacks response flits. |
| `nw_be2` | Slave-end network back-end: unpacks request flits, remembers the return route per tag, and packs responses. |
| `router3`, `router_switch`, `router_merge` | Three-port router: each input has a switch, each output has a merge. |
| `noc_chain` | `N_ROUTERS` routers chained back to back. |
| `slave_be` | Drives chip enable, write enable and byte enables of the memory, and pairs each answer with its tag. |
| `slave_mem` | 8 KB ROM + 8 KB RAM, two-clock latency. |
| `ocp_pkg` | Widths, OCP codes, structs and the flit pack functions. |

### Handshakes

Inside Top1, the network and Top2, every block-to-block channel uses **valid
forward, stall backward**: a word moves on a clock edge where valid is high and
stall is low. A stall anywhere propagates back to the CPU, which sees `cpu_stall`.

The OCP links use the OCP signals:

* `MCmd` / `SCmdAccept` for the request;
* `MDataValid` / `SDataAccept` for the write data, one cycle after the command;
* `SResp` / `MRespAccept` for the response.

Assertions in the OCP entities check that a request and its write data stay
stable until accepted.

## The CPU logical address

The CPU puts everything the network needs into its 32-bit address:

| Bits | Field |
|---|---|
| 31:26 | destination (index into the master back-end's route table) |
| 25 | transaction type, passed on unchanged (the command itself comes from `cpu_we`) |
| 24 | mode: **1 = split, 0 = nonsplit** |
| 23 | unused |
| 22:20 | burst length (0 means 8 beats) |
| 19 | burst precise |
| 18:16 | burst sequence (000 INCR, 010 WRAP, 001 user-defined) |
| 15:0 | physical address in the target |

The master back-end replaces bits 31:26 with the 6-bit **source route** read from
a 64-entry table. The table is written through `cfg_we`, `cfg_idx` and
`cfg_route`, and resets to the identity. The source route is the sequence of
turns the packet will take.

## Nonsplit and split operation

* **Nonsplit (bit 24 = 0):** the request goes out as a single transfer, and
  `cpu_stall` stays high until its response is back. Only one transaction is in
  flight.
* **Split (bit 24 = 1):** requests are pipelined, up to one per clock.
  * A burst is issued by the CPU as one request per beat, each with its own
    address. All beats share one tag.
  * Tags 0–7 are handed out in turn. A tag stays busy until every response of
    its burst has returned.
  * When the next tag is still busy, the CPU is stalled.

Responses come back to the CPU as a one-cycle `cpu_ack` with `cpu_dat_r`,
`cpu_resp` (OCP `DVA`/`ERR`) and `cpu_tag`.

## Packets and routing

A packet is a single 72-bit flit:

```
request : [71:66] route | [65:64] R/W | [63] mode | [62:59] byte enables | [58] data valid
          [57:55] tag   | [54:48] burst length, precise, sequence | [47:32] address | [31:0] write data
response: [71:66] route | [65:53] 0 | [52:51] response | [50:48] tag | [47:16] read data | [15:0] 0
```

**Router rule.** A router switches each packet on the most significant route bit,
then rotates the route left by one, so the next router finds its own bit on top.
The turn table used here is:

| Packet enters at | Bit 1 goes to | Bit 0 goes to |
|---|---|---|
| A | C | B |
| B | A | C |
| C | B | A |

With this table, every hop and its reverse carry opposite bits. In `noc_chain`:

* the master end sits on port A of router 0;
* the slave end sits on port C of the last router;
* routers are linked C to A.

So the route towards the memory starts with one `1` per router: `110000` for two
routers, `100000` for one.

**Return route.** The slave-end back-end (`nw_be2`) keeps an 8-entry table of
{tag, received route, command, burst length, count}:

* The first beat of a tag allocates an entry, and later beats of that tag share it.
* A response is matched by comparing its tag against the table.
* The return route is the received (already rotated) route, bit-reversed and
  inverted.
* The entry is freed after the last response of its burst.
* If no entry is free, the network is stalled.

The routers have three spare B ports, brought out at the top. Nothing in this
design sends traffic to them.

## Clock crossing

With `MFCD = 1`, DI2 (between clk_m and clk_n) and DI3 (between clk_n and clk_s)
each hold two 8-word gray-pointer FIFOs, one per direction. A word crosses in:

* one writer clock to store it;
* two reader clocks to synchronize the pointer;
* one reader clock for the empty flag.

A full FIFO stalls the writer.

Reset (`rst`) is **asynchronous and active high**. It goes to all three domains,
so release it away from every clock edge.

## Timing

### Single clock, one router

Measured by `tb_ocp_noc_top_sfcd`:

| Stage | Clocks |
|---|---|
| master back-end | 1 |
| OCP master + slave, request | 3 |
| network back-end + router + back-end | 3 |
| OCP, request | 3 |
| slave back-end | 1 |
| memory | 2 |
| slave back-end, response | 1 |
| OCP, response | 2 |
| network, response | 3 |
| OCP, response | 2 |
| master back-end, response | 1 |
| CPU takes the response | 1 |

This adds up to **23 clock edges**, from the edge where the back-end takes a
request to the edge where the CPU takes its response. The reference latency model
counts **24**: it counts the CPU latching into the back-end and the back-end's
mapping onto the DI as two cycles, and here they are one register.

The full runs take:

* **nonsplit:** 36 tokens in 35 × 22 + 23 = **793** cycles;
* **split:** 9 bursts of 4 with one idle cycle between bursts in **66** cycles.

Every router adds one clock each way.

### Multifrequency, two routers

Measured by `tb_ocp_noc_top` at 1 GHz / 1.11 GHz / 0.925 GHz:

* a nonsplit transaction takes about **39** master clocks (the reference model
  estimates 42);
* the 36-token nonsplit run takes 1364 master clocks;
* the split run takes 85.

The exact figures depend on clock phases.

### Throughput

In split mode, every stage accepts a new word each clock. The peak is one flit per
clock, limited by the slowest clock on the path.

## Memory target

`slave_mem` decodes the physical address as follows:

* bit 13 selects RAM (1) or ROM (0);
* bits 12:2 select the word;
* bits 15:14 and 1:0 are ignored.

Behaviour:

* ROM word *i* holds `{~i, 5'b10101, 5'b00000, i}` (11-bit *i*), a formula used
  instead of a program image.
* RAM writes honour the byte enables.
* A write to the ROM does nothing and is answered with `ERR`.
* An access is taken with `ce`, latched on the next edge and answered with `ack`
  one edge later.

## Where this RTL departs from the reference design

* **Mode bit encoding.** The reference names an operation-mode bit but gives no
  encoding, and its benchmark tables show bit 24 set in both modes. Here, 1
  means split. The nonsplit benchmark is run with bit 24 cleared.
* **Tag and burst-length widths.** These are 3 bits, as in the packet format. The
  OCP signal table of the reference lists 8-bit MTagID and MBurstLength.
* **Router turn table.** The reference gives the mechanism (MSB switching,
  rotation) but the bit-to-port assignment above is this implementation's.
* **Router buffering.** The reference router latches both at inputs and outputs.
  Here only the merge output is registered. That still gives one clock per
  router.
* **Responses stay in order.** `slave_be` answers in request order because the
  memory has a fixed latency, so out-of-order delivery between tags never occurs
  end to end. The tag-matching logic of `nw_be2` is exercised with out-of-order
  responses in `tb_noc_path`.
* **No address generation for bursts.** The CPU presents the address of every
  beat.
* **Not built:**
  * the emulated CPU (its traffic is produced by the testbenches);
  * the third-party OCP compliance checker (handshake assertions stand in for it);
  * anything physical: layout, power, area and clock frequencies.
* **Reset polarity.** OCP's own reset is active low. This design uses the active-high
  asynchronous reset of the reference implementation.
* **Benchmark tables.** The published tables print only the first 16 of their 36
  tokens. `tb/ocp_noc_traffic.svh` continues them in the same style: reading
  back the written words, a second WRAP group, and one more write/read pair.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `ocp_noc_top` | `MFCD` | 1 | 1: dual-clock DI2/DI3; 0: single clock (tie the three clocks together) |
| `ocp_noc_top`, `noc_chain` | `N_ROUTERS` | 2 | routers between the two network back-ends (at most 6: the route has 6 bits) |
| `di` | `ASYNC`, `FIFO_AW` | 1, 3 | FIFO or wiring; FIFO depth 2^3 |
| `nw_be2` | `ENTRIES` | 8 | return-route table size |
| `slave_be` | `DEPTH` | 4 | memory accesses in flight plus responses waiting |

## Testbenches

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line.

| Testbench | What it checks |
|---|---|
| `tb_ocp_noc_top` | Default parameters. Runs the nonsplit and split benchmarks, then a stress phase: 8-beat bursts that use all tags and fill the FIFOs, writes to ROM, and a random mix of modes and lengths. Every response is checked against a reference memory, and the test counts each mechanism (nonsplit blocking, pipelining, INCR/WRAP bursts, tag stall, full FIFOs, OCP back-pressure, network back-pressure, table allocation, errors). |
| `tb_ocp_noc_top_sfcd` | Single clock, one router. Checks the exact cycle counts above. |
| `tb_master_be` | Route translation, request fields, nonsplit blocking, burst tag sharing, tag exhaustion, DI stall. |
| `tb_ocp_link` | OCP master + slave: 3-clock request path, 2-clock response path, streaming, random stalls. |
| `tb_noc_path` | `nw_be1` + routers + `nw_be2` for one and two routers: out-of-order responses, route rotation, latency, table clearing. |
| `tb_router3` | Turn table, one-clock latency, round-robin fairness, random traffic with stalls. |
| `tb_slave_side` | `slave_be` + `slave_mem`: ROM formula, RAM byte enables, ERR on ROM write, 4-clock latency, back-pressure. |
| `tb_di`, `tb_async_fifo` | Wiring and FIFO modes, full/empty flags, crossing latency, ordering. |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_ocp_noc_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ocp_pkg.sv tb/tb_ocp_noc_top.sv
./obj_dir/Vtb_ocp_noc_top
```

Verilator lint leaves only notes, which are explained in each module's opening
comment: unused package constants and bits, and `SYNCASYNCNET` from assertions
that are disabled during reset.
