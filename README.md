# A fixed-function vector accelerator behind the AlmaIF v2 interface

Each FPGA vendor's OpenCL stack drives only that vendor's devices. AlmaIF v2
takes another route: every accelerator exposes the same small memory-mapped
contract. One generic OpenCL driver can then discover the device, queue work on
it and synchronise with it through plain memory reads and writes. Other
devices can do the same, so one device can queue work on another without
involving the host CPU. The contract has four regions:

* **control registers**: identity, sizes, queue indices, reset/freeze;
* **configuration memory**: a program image or configuration bits, for
  programmable parts;
* **command queue (CQ) memory**: a ring buffer of HSA AQL packets;
* **data memory**: kernel arguments and buffers, close to the accelerator.

This repository is a synthesizable SystemVerilog implementation of such a
wrapped device. It has an AXI4-Lite slave, the four regions, a packet-processing
controller, an optional AXI4-Lite bus master for buffers outside the device,
and a kernel block with two built-in kernels: 32-bit element-wise
vector addition (`add_i32`) and multiplication (`mul_i32`). A host, or any peer
on the bus, runs a kernel as follows:

1. It writes an argument block into data memory, and the input buffers into
   data memory or into any memory the bus master can reach.
2. It writes a 64-byte kernel-dispatch packet into the ring.
3. It advances the write index.
4. It polls a completion word until the word becomes zero.

## Block structure

```
            AXI4-Lite slave (almaif_axil_slave)
                 |   address bits [17:16] select the region
   +-------------+--------------+-----------------+----------------+
   | 0x0_0000    | 0x1_0000     | 0x2_0000        | 0x3_0000       |
 control regs   configuration  CQ memory          data memory
 (almaif_       memory         (almaif_dp_ram)    (almaif_dp_ram)
  ctrl_regs)    (almaif_dp_ram)      | port B          | port B
   |  indices, reset, freeze         |                 |
   |                                 |        almaif_mem_router --> AXI4-Lite
   |                                 |                 |            master
   +------------------------> almaif_controller <------+
                                     | start / done, kernel's memory port
                              almaif_vec_kernel
```

| File | Role |
|---|---|
| `rtl/almaif_pkg.sv` | Register offsets, command codes, AQL packet layout, kernel IDs, the `mem_req_t` memory-port struct |
| `rtl/almaif_top.sv` | Wires the whole device together (top level) |
| `rtl/almaif_axil_slave.sv` | AXI4-Lite slave and region decoder |
| `rtl/almaif_ctrl_regs.sv` | Control register region |
| `rtl/almaif_dp_ram.sv` | Dual-port RAM used for each of the three memory regions |
| `rtl/almaif_controller.sv` | Command-queue packet processor |
| `rtl/almaif_vec_kernel.sv` | The `add_i32` / `mul_i32` kernels |
| `rtl/almaif_mem_router.sv` | Sends the core's data accesses to data memory or out on the AXI4-Lite master |

All internal memory ports share the same convention (`mem_req_t`): one
request per cycle, a word index as the address, per-byte write enables, and
read data one cycle after the read. The RAM holds its read word while its port
is idle. Freeze depends on this (see below).

## Host view: the address map and registers

The region offsets are local to the AXI port. The start-address registers
report them with `DEV_BASE` added. Everything the controller finds in a packet
or an argument block is such a device address. For the data memory, the word
index is `(addr - DMEM start) / 4`.

| Offset | Width | Register | Implemented behaviour |
|---|---|---|---|
| 0x000 | 3 | Status | bit 0 stalled, bit 1 frozen, bit 2 in reset |
| 0x100 / 0x108 | 64 | CQ read / write index | each is two 32-bit words, low word first; both are host-writable; the controller increments the read index |
| 0x200 | 3 | Command | 1 = hold in reset, 2 = release reset and freeze, 4 = freeze |
| 0x300 | 32 | Device class (OpenCL vendor ID) | parameter `DEV_CLASS` |
| 0x304 | 32 | Device ID | parameter `DEV_ID` |
| 0x308 | 32 | Interface version | 2 |
| 0x30C | 32 | Core count | 1 |
| 0x314 | 32 | Configuration memory size | bytes |
| 0x318 | 64 | Configuration memory start | |
| 0x320 | 64 | CQ memory size | `CQ_PACKETS * 64` |
| 0x328 | 64 | CQ memory start | |
| 0x330 / 0x338 | 64 | Data memory size / start | |
| 0x340 | 64 | Feature flags | bit 0 = `HAS_MASTER` (bus master present) |
| 0x348 | 16 | Number of built-in kernels | 2 |
| 0x34A... | 16 each | Built-in kernel IDs | 1 (`add_i32`), 2 (`mul_i32`) |

The 16-bit fields are packed two per 32-bit word, little endian. For example,
the word at 0x348 reads `{id0, count}`. The list can hold up to 64 IDs. By the
interface's convention, ID 0xFFFF in the list means "accepts compiled
OpenCL kernels". This fixed-function device does not advertise it. Unmapped
offsets, including 0x310, read 0, and writes to them are ignored.

Reading status 0 means the device is running and is not blocked.

## Submitting work: the command queue protocol

This is the heart of the design, and the part a user most needs to get right.

**Ring indexing.** The CQ memory holds `CQ_PACKETS` slots of 64 bytes.
`CQ_PACKETS` must be a power of two. Neither index ever wraps back to zero.
Index `i` lives in slot `i mod CQ_PACKETS`. The queue holds work whenever the
write index differs from the read index. The host may only fill slots between
the two indices, and must keep the number of unread packets at or below
`CQ_PACKETS`.

**Packet format.** Packets use the HSA AQL layout. The controller reads these
fields (byte offsets). Where a field is 64 bits, only its low 32 bits are used.

| Byte | Field | Use |
|---|---|---|
| 0 | header[7:0] = packet type | 1 INVALID, 2 KERNEL_DISPATCH, 3 BARRIER_AND |
| 12 | grid_size_x | global size = vector length |
| 32 | kernel_object | built-in kernel ID |
| 40 | kernarg_address | argument block in data memory |
| 8, 16, 24, 32, 40 | dep_signal[0..4] (barrier) | 0 = unused slot |
| 56 | completion_signal | 0 = no completion write |

**Argument block** (this design's layout): three 8-byte slots holding the
device addresses of A, B and C. Only the low 32 bits of each slot are used.

**What the controller does** (`almaif_controller`):

1. When the indices differ, it copies the 16 words of the slot into a packet
   register, one word per cycle.
2. If the packet type is INVALID, the producer has not finished the packet.
   The controller raises *stall* and fetches the slot again until the header
   changes. So a host may advance the write index before it writes the
   header, as long as it writes the header word last.
3. Otherwise it *picks* the packet. It overwrites the header type with
   INVALID, keeping the upper 16 setup bits, and increments the read index.
   The read index therefore counts packets taken, not packets finished, and
   the host may refill that slot at once. Completion is reported separately.
4. A kernel dispatch reads the three argument pointers from the argument
   block. If `kernel_object` is 1 or 2, the controller starts the kernel and
   waits for it. Any other ID runs nothing.
5. A Barrier-AND visits dependency slots 0 to 4. It skips null slots. For each
   other slot it reads the 32-bit word the slot points to, again and again,
   until that word is 0. Meanwhile it raises *stall*. Any other packet type is
   retired without action.
6. If `completion_signal` is non-zero, the controller writes 0 to that word.

Signal words follow one rule: **zero means complete**. A host marks an event
pending by writing a non-zero value into its signal word before it queues the
packet. Completion writes zero, and a barrier waits for zero. So a Barrier-AND
can name the completion signal of a kernel on this device, or on any other
device that can write into this data memory, and the following packets wait
for it. With the bus master, a signal word may also live in another device's
memory. Packets run strictly in order.

## External memory: the bus master

Every pointer the controller uses (argument pointers, dependency and
completion signals) is turned into a data-memory word index,
`(addr - DMEM start) / 4`. An index inside the data memory is served locally.
With `HAS_MASTER = 1`, any other index is rebuilt into the byte address and
sent out as one 32-bit AXI4-Lite read or write on the `m_*` port. So a kernel
can read A and B from host memory and write C there, and a barrier can poll a
signal word anywhere in the 32-bit address space. The argument block itself
may also be external.

During an external access the controller and kernel are stalled, through the
same clock enable that freeze uses. Writes wait for their write response
before the core continues, so completion is written only after C has landed.
Error responses are ignored. An external element costs the bus latency three
times, so external buffers are much slower than local ones. With
`HAS_MASTER = 0` the master port stays idle, out-of-range indices wrap inside
the data memory, and feature bit 0 reads 0.

## Reset, freeze and stall

* System reset (`rst_n` low) clears everything. The device comes up held in its
  own reset, with status = 0b101. A driver typically writes command 1, clears
  both indices, then writes command 2.
* Command 1 holds the controller and kernel in synchronous reset. A kernel
  in flight is abandoned, and its completion signal is never written. The
  indices keep their values. The host sets them again before it writes
  command 2.
* Command 4 (freeze) acts as a clock enable for the controller and the kernel.
  While frozen they change no state and issue no memory requests. A read
  already in flight stays on the RAM's held output, so command 2 resumes
  exactly where execution stopped. The host can still access all four regions
  while the device is frozen.
* Status bit 0 (stalled) is set when the controller waits on a barrier
  dependency or an INVALID header, or when reset or freeze is active.

## The kernels and their timing

`almaif_vec_kernel` computes `C[i] = A[i] + B[i]` or `C[i] = A[i] * B[i]` (low
32 bits of the product) for `i < grid_size_x`. It works through the single
data-memory port: read A, read B, write C. That is 3 cycles per element, and
3n + 1 cycles from start to done. A launch with n = 0 finishes at once. The
controller adds its own overhead to each packet: about 17 cycles to fetch it,
2 to decode and pick it, 4 to read the arguments, 1 to launch and 1 to signal.
The kernel is deliberately serial and simple. The interface puts no
constraint on kernel speed.

## Parameters (`almaif_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `CQ_PACKETS` | 32 | ring slots (power of two), 2 KiB |
| `DMEM_WORDS` | 4096 | data memory, 16 KiB |
| `CONF_WORDS` | 256 | configuration memory, 1 KiB |
| `DEV_BASE` | 0 | base added to the reported region start addresses |
| `DEV_CLASS`, `DEV_ID` | 0 | identity registers |
| `HAS_MASTER` | 1 | include the AXI4-Lite bus master |

At the defaults the data memory holds three vectors of up to about 1360
elements each, next to the argument and signal words. Buffers outside the
device, through the bus master, have no such limit. After coarse
synthesis, the defaults come to about 500 flip-flop bits and 156 kbit of RAM.

## Simulating

Each testbench under `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops. A watchdog counts a failure if the
run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/almaif_pkg.sv rtl/*.sv \
    tb/axil_mem_model.sv tb/tb_almaif_top.sv --top-module tb_almaif_top -o sim
./obj_dir/sim
```

The two helper files `tb/axil_mem_model.sv` (a memory with random latency on
the bus master) and `tb/axil_host_bfm.sv` (a host issuing AXI4-Lite
transactions) can always be added to the file list. Some testbenches need
them.

| Testbench | What it covers |
|---|---|
| `tb_almaif_top` | The whole device at its default parameters, driven over AXI4-Lite like a host driver. See the list below. |
| `tb_almaif_controller` | The controller with the real kernel. Covers dispatch, picking, a barrier over several slots, an INVALID header, unsupported packets, ring wrap, freeze and reset. |
| `tb_almaif_vec_kernel` | Both kernels, lengths 0 to 200, no stray writes, exact 3n + 1 latency, and freeze mid-launch. |
| `tb_almaif_ctrl_regs` | Every register, byte enables, a 64-bit index carry, and all command and status combinations. |
| `tb_almaif_axil_slave` | Random traffic with back-pressure, a read and a write arriving together, aliasing, and write strobes. |
| `tb_almaif_dp_ram` | Both ports, byte enables, read-first behaviour, the held read word, and address wrap. |
| `tb_almaif_p2p` | Two devices, no host in the loop: A's kernel writes its output and its completion signal into B through A's bus master, and B's Barrier-AND, waiting on that signal, then releases a kernel that consumes A's output. |
| `tb_almaif_mem_router` | Random local and external reads and writes with random bus latency, byte strobes, address rebuilding, the held read word, and the hold timing. |

`tb_almaif_top` runs with the default parameters and covers:

* discovery reads;
* add and mul launches, one of them over 1024 elements;
* three packets queued at once;
* a barrier that blocks until the host clears a dependency;
* a header published late;
* an unsupported kernel ID;
* freeze and reset in the middle of a kernel;
* wrap-around of the ring;
* a kernel whose buffers and barrier signal are in external memory, reached
  through the bus master.

It counts each of these mechanisms and fails if one never happened. Each
testbench has been shown to fail against a deliberately broken copy of its
module.

## What follows the AlmaIF v2 interface, and what is this design's own

Taken from the interface:

* the four regions and their roles;
* the register offsets, widths and meanings;
* the command codes and status bits;
* version 2, and at most 64 built-in IDs, with 0xFFFF reserved;
* the ring indexed modulo a power-of-two size;
* AQL packets, kernel dispatch by built-in ID, and arguments in data memory;
* the read index advanced when a packet is picked;
* Barrier-AND on signal words that complete by changing to zero;
* the two 32-bit vector kernels, whose length is the one-dimensional global
  size.

The field layout of AQL packets comes from the HSA specification. The kernel
IDs 1 and 2 follow the numbering of the open-source OpenCL runtime's
built-in kernel registry.

Choices made here, where the interface leaves things open:

* an AXI4-Lite slave and an AXI4-Lite master, both with 32-bit data;
* stalling the core for each external access;
* the region address map and all memory sizes;
* the argument-block layout;
* completion signalled by writing 0;
* waiting on INVALID headers, and retiring unsupported IDs and packet types
  silently;
* the stall definition;
* coming out of reset held in reset;
* the serial kernel schedule;
* only the low 32 bits of 64-bit addresses are used, so all addresses must
  lie in the first 4 GiB.

## Not included

* **Burst transfers on the bus master.** Each external word is its own
  AXI4-Lite transaction.
* **A software-programmable variant.** In that variant a soft processor
  fetches its program from configuration memory and shares one memory between
  the CQ and the data. Its processor is not specified here, so it is not
  built. This design keeps the configuration memory as host-accessible
  storage, and the kernel side never reads it.
* **The host-side driver** (discovery, queueing, kernel compilation). The
  top-level testbench plays a minimal host.

Resource and timing figures published for AlmaIF-wrapped components came
from different kernels and memory sizes. They do not describe this RTL. At
its defaults the memories alone need about five 36-kbit block RAMs.
