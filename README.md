# Manager recovery hardware for a NoC-based many-core

In a large many-core, a few processors are set aside as *managers*: they map
applications, migrate tasks and monitor their cluster of processing elements
(PEs). If a manager's processor suffers a permanent fault, every application
in its cluster loses its management. This RTL is the hardware half of a way
to recover from that without any spare hardware: the failed manager's
processor is cut off, and its entire memory — kernel code, data and all
management state — is copied over the network to an ordinary PE, which then
restarts as the new manager. The copy is done by the network interfaces of
the two PEs, so the faulty processor takes no part in it.

The design is a 6 x 6 mesh of identical PEs (`mcsoc`). Each PE (`pe_tile`)
contains:

| part | module | role |
|---|---|---|
| data-NoC routers | `data_router` (x2) | wormhole, XY or source routing, 8-flit input buffers, credit flow control; one per 16-bit physical channel |
| control-NoC router | `ctrl_router` | single-word management messages, broadcast and unicast |
| DMNI | `dmni` | network interface + DMA; also executes the two kernel-migration services in hardware |
| private memory | `dp_ram` | 64 KB, dual-port: processor on port A, DMNI on port B |
| wrappers | `cpu_wrapper` | AND gates on every control signal the processor drives into the PE |
| wrapper control | `wrapper_ctrl` | on a fault: isolate the processor, broadcast `fail_CPU` |

The processors are **not** in this RTL. Each PE's processor interface is
brought out of `mcsoc` as an element of the `cpu_*` port arrays, so a
processor model (or a testbench playing the kernel software) drives it. All
roles — global manager, cluster manager, slave — are software conventions;
the hardware of every PE is the same.

## How a recovery unfolds

Managers are paired at start-up (two horizontally adjacent clusters' managers
watch each other). Every manager keeps a *candidate* PE in its cluster — the
closest free PE, or the one with fewest tasks — and reports it to its pair
whenever it maps an application. With `h` the healthy manager of the pair,
`f` the failed one and `c` the candidate:

1. **Fault.** The fault detector of `f` (not part of this RTL) raises
   `fault_detected`. Next cycle `wrapper_ctrl` raises `isolate` — the
   processor can no longer write memory, program the DMNI or send messages —
   and broadcasts `SVC_FAIL_CPU` with `f`'s address.
2. **Freeze** (software on `h`). `h` broadcasts `SVC_FREEZE` naming `f`; every
   slave running tasks managed by `f` suspends them once they are in a safe
   state, so no management message is lost while there is no manager.
3. **Task migration, if `c` is busy** (software). `h` sends
   `SVC_TASK_MIGRATE` to `c`; `c`'s kernel sends its tasks' code, state and
   data over the data NoC to a free PE elsewhere, which reports
   `SVC_MIGRATION_END` to `h`. This uses only ordinary DMNI sends/receives.
4. **Prepare the candidate** (hardware). `h` sends `SVC_WAIT_KERNEL` to `c`.
   `c`'s DMNI — not its processor — takes the message: it raises `cpu_hold`,
   arms its receiver to write the next packet from address 0, and answers
   `SVC_WAIT_KERNEL_ACK` to `h`.
5. **Copy the kernel** (hardware). `h` sends `SVC_SEND_KERNEL` to `f` with `c`'s
   address in the payload. `f`'s DMNI reads its whole memory through port B
   and sends it as one packet to `c`, where the DMNI writes it from address 0.
   When the last word lands, `c`'s DMNI drops `cpu_hold` and pulses
   `cpu_restart`.
6. **Unfreeze** (software on `c`). The restarted kernel finds its data
   structures intact (it knows it was restarted by a migration and skips its
   initialisation) and broadcasts `SVC_UNFREEZE` with its own address, which
   both resumes the frozen tasks and tells the slaves who their manager is
   now.

Only steps 1, 4 and 5 need hardware beyond a plain NoC many-core, and they are
what makes the scheme work when the manager's processor is dead: the memory
stays reachable through the DMNI even though the processor is isolated.

## The DMNI

`dmni` has a send machine and a receive machine that share memory port B
(a receive write wins a conflict; the send read waits a cycle).

Processor commands (`dmni_cmd_t`, valid/ready):

* `DMNI_SEND {tgt, mem_addr, size, ch}` — send `size` words from `mem_addr`
  to PE `tgt` on physical channel `ch`. `send_done` pulses at the end.
* `DMNI_RECV {mem_addr}` — arm the receiver: the payload of the next packet
  arriving on either channel is written from `mem_addr` upwards; `recv_done`
  pulses with the word count on `recv_words`. While idle and armed, the
  receiver offers credit to the two channels alternately and locks onto the
  first one that delivers a header, for the whole packet.

Control-NoC services executed by the DMNI itself: `SVC_WAIT_KERNEL`
(step 4) and `SVC_SEND_KERNEL` (step 5). `pe_tile` steers these two services
to the DMNI and every other message to the processor.

Timing: a send costs one cycle to accept, one cycle per header flit and three
cycles per word (read, high flit, low flit) while credit is available. The
64 KB kernel copy (16,384 words) takes 49,164 to 49,168 cycles, depending on the distance, from the
`send_kernel` command leaving `h` to `cpu_restart` at `c`, 0.49 ms at
100 MHz. This is the hardware part only; the published measurements of the
whole recovery (freeze to unfreeze, including kernel software) are about
1.5 ms, and 1.65 ms with a task migration.

## Data NoC

Two independent planes of `data_router`, one per 16-bit physical channel.
A packet is

| flit | content |
|---|---|
| 0 | header: XY target `{0, x[6:0], y[7:0]}`, or source route `{1, hops[2:0], path[11:0]}` |
| 1 | number of payload flits `n` |
| 2 .. n+1 | payload; a 32-bit word is two flits, high half first |

A source route lists up to six outputs, two bits each (0 east, 1 west,
2 north, 3 south), the next one in `path[1:0]`; every router that passes the
header on to a neighbour decrements `hops` and shifts `path` right by two,
and `hops = 0` means "deliver here". `mcsoc_pkg::sr_header(hops, path)`
builds such a header; the DMNI sends whatever 16 bits the `tgt` field of a
send command holds, so software chooses the routing per packet.

Each input has an 8-flit FIFO; its `in_credit` output is "not full", and an
upstream port may only offer a flit while it sees credit (an assertion
checks this). A header at the head of an input requests the output chosen by
its routing; each output grants one requester at a time, round-robin, and
stays with it until the size flit's count of payload flits has passed. A
header offered in cycle t leaves the router in cycle t+2; the body then
streams at one flit per cycle.

## Control NoC

Messages are one `ctrl_msg_t` word: service code, broadcast flag, source and
target addresses, 32-bit payload, moved by valid/ready. `ctrl_router` keeps
one message per input together with the set of outputs still owed a copy;
output registers take copies round-robin, and the input is freed when the
set is empty. Broadcasts follow a fixed spanning tree (along the source row
east and west, then north and south along every column; each PE except the
source gets a local copy), unicasts follow XY routing. Both turn only from X
to Y, so the two kinds cannot wait on each other in a cycle. Links leaving
the mesh accept and drop what is sent to them. One hop costs two cycles
without contention.

Service codes are in `mcsoc_pkg::svc_e`. Broadcast is how manager pairs
talk, because after a recovery the two managers of a pair are no longer
guaranteed to be neighbours.

## Wrappers

`cpu_wrapper` ANDs each processor strobe with `!isolate`: memory enable,
memory write, DMNI command, control-message send. Messages addressed to an
isolated processor are accepted and dropped so they cannot block the control
NoC. Memory writes and DMNI commands are also blocked while the DMNI holds
the processor during kernel reception. `wrapper_ctrl` makes `isolate` sticky
until reset and sends `fail_CPU` once per fault.

## Parameters

| parameter | default | where |
|---|---|---|
| `MESH_X`, `MESH_Y` | 6, 6 | `mcsoc` |
| `MEM_WORDS` | 16384 (64 KB of 32-bit words) | `mcsoc`, `pe_tile`, `dmni`, `dp_ram` (`WORDS`) |
| `KERNEL_WORDS` | `MEM_WORDS` — the whole memory moves | `dmni` |
| `BUF_DEPTH` | 8 flits | `mcsoc`, `pe_tile`, `data_router` |
| `FLIT_W`, `WORD_W`, `COORD_W` | 16, 32, 8 | `mcsoc_pkg` |

PE (x, y) is element `y*MESH_X + x` of every `mcsoc` port array and has
address `{x, y}`.

## Simulating

All files are plain SystemVerilog; every testbench is self-checking and ends
with a `TB_RESULT checks=N failures=M` line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mcsoc_pkg.sv tb/tb_mcsoc.sv \
          --top-module tb_mcsoc -o tb_mcsoc
./obj_dir/tb_mcsoc
```

Replace `tb_mcsoc` by any other testbench name. The `-Irtl` search path
lets Verilator find each module in `rtl/<module>.sv`.

| testbench | what it shows |
|---|---|
| `tb_mcsoc` | four complete recoveries in a row in the default 6 x 6, 64 KB system, covering a cluster manager and the global manager failing, each with a free candidate and with a candidate that must first migrate a 10 KB task (once with competing traffic on the same links); plus one source-routed packet. Checks isolation, the fail_CPU latency (two cycles per hop), freeze/unfreeze counts, the acknowledge, each 64 KB kernel copy word by word and its cycle count, and that the faulty and the held processors cannot write. Four kernel copies alone are about 197,000 cycles; building takes about a minute and a half, running under a minute. |
| `tb_pe_tile` | one tile: self-addressed packets on both channels, broadcast fan-out, wait_kernel/ack/kernel reception/restart, fault isolation and send_kernel |
| `tb_dmni` | loopback copies with and without stalls and the send timing, both kernel services |
| `tb_data_router` | latency and rate, then random XY and source-routed traffic from all inputs with random back-pressure; whole, ordered, correctly routed packets and correctly rewritten source-route headers |
| `tb_ctrl_router` | broadcast tree and XY unicast from all inputs against a reference model, with back-pressure |
| `tb_dp_ram`, `tb_cpu_wrapper`, `tb_wrapper_ctrl` | the small blocks |

## What is not here, and where this RTL departs from the published design

* **Processors and kernel software.** Selecting the candidate, freezing and
  unfreezing tasks, and task migration are kernel software; the testbench
  plays them. The processor itself is an existing core of the platform the
  method was built on and is not reproduced.
* **Fault detection** is an input; any detector can drive `fault_detected`.
* **Memory ECC**, which the method assumes protects the memory, is not built.
* **Data NoC:** the original router uses its two physical channels for
  fully adaptive routing, which is not specified in enough detail to
  reproduce; here the two channels are independent planes, chosen per packet
  by the sender, each with XY or source routing. The source-route header
  format, with its six-hop limit, is this implementation's own. The kernel
  copy uses channel 0.
* **Control NoC:** the original is a separate published broadcast NoC with an
  average of about 14 cycles per hop. `ctrl_router` is a simpler router that
  provides the same service (broadcast and unicast of short messages) in two
  cycles per hop.
* **DMNI buffer:** the original DMNI has its own buffer; here incoming flits
  wait in the router's local input buffer until the receiver is armed.
* Packet layout, message encoding, service codes, the command interface of
  the DMNI, synchronous active-low reset and all latencies are choices of
  this implementation.
