# TEXTAROSSA accelerator IPs in SystemVerilog

Heterogeneous HPC nodes spend much of their time on work that is not
computation: deciding which accelerator runs the next task, moving messages
between FPGAs, converting numbers between storage and compute formats, and
hashing. This RTL puts four small hardware blocks on those paths, following
the TEXTAROSSA accelerator specifications:

* a **Fast Task Scheduler (FTS)** that takes task commands from a host
  through memory queues and dispatches them to up to 16 accelerators. It
  notices when a task reuses the data of the previous task on the same
  accelerator, and it repeats periodic tasks;
* the routing part of a **Communication IP**, a packet router for a torus of
  FPGAs. It has per-task adaptors that turn a task's message stream into
  packets and back;
* a **Light Posit Processing Unit (Light PPU)** that converts between IEEE
  binary32 and the 8- and 16-bit posit formats;
* a **Full PPU** that adds, subtracts, multiplies and divides two posits and
  converts between posit and binary32;
* a **SHAKE-128/256** extendable-output hash accelerator on an AXI4 slave
  port.

The five blocks are independent. `textarossa_top` places them side by side
and brings out all their ports. They share only the clock and the
active-low asynchronous reset `rst_n`.

## Fast Task Scheduler

### Queues and commands

Each direction has its own queue (`fts_cmd_queue`). A queue holds 1024
64-bit entries and is split into 16 subqueues of 64 entries, one per
accelerator: accelerator *a* owns entries `64a .. 64a+63`. The host writes
commands into the *cmd-in* queue and reads completions from the *cmd-out*
queue. Each queue is a two-port RAM with a one-cycle read latency. One port
belongs to the host and the other to the scheduler.

Every command starts with a header word:

| bits    | field |
|---------|-------|
| [63:56] | valid byte: `0x80` valid, `0x00` empty slot |
| [55:8]  | arguments; [15:8] is the number of task arguments, [47:40] the destination of the completion (0x1F = host) |
| [7:0]   | command code: `0x01` execute task, `0x03` finished task, `0x05` execute periodic task |

* **Execute task** commands (and periodic ones) continue with:
  * the task id;
  * the parent task id;
  * for code 0x05 only, one word with the repetition count in [31:0] and the period in microseconds in [63:32];
  * two words per argument. The first holds the flags in [7:0] and the argument id in [63:32]; the second holds the argument value, such as a buffer address.
* Flags:
  * `0x10` means "copy this input into the accelerator";
  * `0x20` means "copy the output back".
* A command with an **odd code** makes its accelerator busy. The accelerator gets nothing more until it answers with a Finished command.

### Cmd in (`fts_cmd_in`)

The Cmd in controller runs a state machine that visits the accelerators
round robin:

1. For each accelerator that is not busy, it reads the header at that
   subqueue's read pointer.
2. If the header is valid, it streams the whole command to the accelerator
   over one AXI4-Stream. The target is named in `TDEST`.
3. It then marks the entry's slots empty, so the host can reuse them, and
   advances the pointer. Pointers wrap inside the subqueue.

**Data reuse.** For each accelerator and argument position, the controller
remembers the id and value of the last task it launched there. The
accelerator's local memory may still hold that task's data, even after the
task has finished. If the next task has the same id and value in the same
position, its input-copy flag is cleared and bit 7 of the flags is set. The
accelerator then skips the copy. `reuse_count` counts these events, and
`reuse_en` switches the feature off.

**Periodic tasks.**
* A 0x05 command stays in its slots until its last run.
* Runs start `period` microseconds apart. The microsecond is
  `CYCLES_PER_US` clock cycles, 100 by default, which assumes a 100 MHz clock.
* The accelerator answers every run. Only the answer to the last run reaches
  the host, so one command gives one completion.

### Cmd out (`fts_cmd_out`)

The accelerators' answers are merged by a round-robin, packet-atomic
multiplexer (`fts_acc_mux`). Cmd out writes each Finished command into that
accelerator's cmd-out subqueue:

1. It waits while the target slot still holds an entry the host has not
   cleared.
2. It writes the payload first.
3. It writes the valid header last, so the host never sees half an entry.

It also tells Cmd in that the accelerator is free.

### Host protocol

* **To submit a command**, write the payload words first and the header last.
* **To collect a completion**, poll the header at your read pointer. When it
  is valid, read the task id that follows. Then write zero to both words to
  give the slot back.

## Communication IP: Routing IP

### Packets

A packet is a sequence of 128-bit words:
1. a header;
2. `LENGTH` payload words;
3. a footer.

The header layout (`comm_pkg::comm_hdr_t`):

| bits      | field |
|-----------|-------|
| [3:0]     | virtual channel |
| [20:4]    | process / channel id |
| [35:21]   | destination coordinate {Z,Y,X}, 5 bits each |
| [40:36]   | destination IntraNode (intra-tile) port |
| [42]      | out-of-lattice flag |
| [47:43]   | packet type |
| [61:48]   | LENGTH (payload words) |
| [109:64]  | destination virtual address |
| [117:110] | hop count |
| [127:118] | ECC / CR |

### Ports

`comm_routing_ip` combines three kinds of block:
* `N_INTRA` IntraNode ports (`comm_intranode_if`);
* `2*DIMS` InterNode ports (`comm_internode_if`), one for each direction of each torus dimension;
* one switch (`comm_switch`).

**IntraNode port.** Each direction has two FIFOs: one for headers and footers, and one for data.
* On the TX side, the local task writes the payload and then the header and footer. The port sends the packet to the switch starting from the header.
* On the RX side, the port splits the packet back into the same two FIFOs.

**InterNode port.** Each link has two receive FIFOs, one per virtual channel (VC0 and VC1).
* Flow control on the link uses credits. The sender keeps a credit counter per channel, and the receiver returns one credit for each word it pops.
* The serial link itself (transceivers, link protocol) is outside this RTL. Its signals are `lnk_*` ports.

### Routing, virtual channels and cut-through

This part of the design is the hardest to follow.

* **Dimension order.** When a header reaches the head of an input, the router corrects the highest dimension that differs first: Z, then Y, then X.
  * It goes the shorter way round that dimension's ring. A tie goes towards +.
  * When all coordinates match, the packet leaves on the IntraNode port named in the header.
* **Dateline virtual channels.** A ring of buffers can deadlock: every buffer on the ring can wait for the next one. To prevent this:
  * a packet enters a dimension on VC0;
  * it moves to VC1 when it crosses that ring's wrap-around link (from the last node to node 0, or back);
  * it keeps its channel while it stays in the dimension.
  
  The switch rewrites the header's channel field and increments its hop count as the header passes. It counts channel switches in `vc_switch_count`, which is register 2.
* **Virtual cut-through.** An output is granted to a waiting packet only when the receiver can hold the whole packet (`room >= LENGTH + 2`). For an InterNode output, room is the credit count. For an IntraNode output, it is the free space of the RX FIFOs.
  * Each output arbitrates round robin among its candidates.
  * Once granted, the packet streams one word per cycle.
  * The packet then cannot stall inside the network for lack of buffer space.

### Registers

`cfg_*` registers are written in the cycle `cfg_we` is high and read combinationally:

| address      | register |
|--------------|----------|
| 0            | this node's coordinate {Z,Y,X} |
| 1            | torus size per dimension (reset value 1) |
| 2            | dateline VC switches |
| 16+2j, 17+2j | IntraNode port j: TX and RX packet counts |
| 32+2p, 33+2p | InterNode port p: TX and RX packet counts |

Set registers 0 and 1 before sending traffic.

### Aggregator and Dispatcher

**Aggregator** (`comm_aggregator`).
* A task sends a message as an AXI4-Stream of 128-bit words.
  * `TDEST` = {destination coordinate (15 bits), destination port (5 bits)}.
  * `TID` = the destination channel id.
* Payload words go straight into the data FIFO.
* At `TLAST`, the Aggregator builds the header and writes it to the header FIFO. Then it writes a footer holding a 32-bit sequence number.
* A message holds 1 to 62 words, so that it fits a 64-entry data FIFO.

**Dispatcher** (`comm_dispatcher`).
* It reads the header from the port's RX FIFOs.
* It forwards `LENGTH` words, with `TLAST` on the last one, to input channel `channel id mod N_CH`.
* It drops the footer.

## Light PPU

A posit<N,ES> is made of four fields:
* a sign;
* a *regime*, a run of equal bits whose length sets a coarse power of 2^(2^ES);
* ES exponent bits;
* a fraction.

`posit_to_fp32` decodes this. Every posit8 and posit16 value is exact in binary32, and NaR (`1000…`) becomes the quiet NaN `0x7FC00000`.

`fp32_to_posit` builds the unrounded regime/exponent/fraction bit string and rounds it to N bits, to nearest with ties to even.
* Results saturate to maxpos or minpos. A non-zero value never rounds to zero.
* Infinity and NaN become NaR.

`light_ppu` holds six converters behind a multiplexer. A RISC-V custom opcode would drive this multiplexer:

| opcode | conversion |
|--------|------------|
| 0 / 1  | posit<8,0> → binary32 / binary32 → posit<8,0> |
| 2 / 3  | posit<16,0> ↔ binary32 |
| 4 / 5  | posit<16,1> ↔ binary32 |

Inputs are `in8`, `in16` and `in32`; the result is `out32`. The output is
registered, so it is valid one cycle after `in_valid`. The CPU-side coupling
is not included.

## Full PPU

`full_ppu` is one lane of posit arithmetic on two operands `a` and `b`, posit<16,1> by default (parameters `N`, `ES`):

| opcode | operation |
|--------|-----------|
| 0 / 1 | a + b / a − b |
| 2 / 3 | a × b / a ÷ b |
| 4     | posit `a` → binary32 |
| 5     | binary32 `f32` → posit |

The result is registered and valid one cycle after `in_valid`. Posit results are zero-extended to 32 bits.

* Both operands are decoded exactly to a sign, a scale and a 24-bit significand.
* The product is exact. The quotient keeps 27 bits plus a sticky bit from the remainder.
* Sum and difference align the smaller operand with three guard bits and a sticky bit.
* `posit_encode` rounds each result once, to nearest with ties to even, with the same bit-string method and saturation as `fp32_to_posit`.
* NaR operands and division by zero give NaR.
* The conversions reuse the Light PPU converters.

## SHAKE-128/256 accelerator

`keccak_f1600` computes one Keccak-f[1600] round per cycle: theta, rho, pi,
chi and iota on a 1600-bit state. The round constants and rotation offsets
are computed when the design is elaborated. `done` rises 24 cycles after
`start`.

`shake_axi` wraps the permutation in a sponge with a single-beat AXI4 slave:

| address | register |
|---------|----------|
| 0x00 CTRL   | bit0 INIT (clear state, select mode), bit1 SHAKE256, bit2 FINAL (pad and start squeezing) |
| 0x04 STATUS | {mode256, squeezing, busy} |
| 0x08 DIN    | message bytes, little-endian, `WSTRB` contiguous from byte 0 |
| 0x0C DOUT   | next 4 output bytes |

* **Absorbing.** Each message byte is XORed into the rate, which is 168 bytes for SHAKE128 and 136 for SHAKE256. A full rate starts a permutation.
* **FINAL** adds the SHAKE padding: `0x1F` after the message and `0x80` in the last rate byte. It then permutes.
* **Squeezing.** Reading all of a rate starts the next permutation by itself. Output of any length can therefore be read.
* While a permutation runs, the slave holds `AWREADY` and `ARREADY` low. The first `DOUT` read after FINAL waits about 24 cycles.

## Simulating

Everything is plain SystemVerilog. Packages come first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_textarossa_top \
  -y rtl -y tb +libext+.sv rtl/fts_pkg.sv rtl/comm_pkg.sv tb/posit_ref_pkg.sv \
  tb/tb_textarossa_top.sv -o sim && ./obj_dir/sim
```

Each block has a self-checking testbench `tb/tb_<module>.sv`. A testbench
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if
the design hangs.

`tb_textarossa_top` runs the whole design at its default parameters:
* four full-size nodes are connected in a ring;
* all IntraNode ports send random messages to one another;
* node 0's scheduler runs 49 tasks on 16 accelerator models, including a periodic task;
* node 0's Light PPU and SHAKE units and node 1's Full PPU are exercised.

It counts each mechanism and fails if any never happens:
* scheduler: held commands, reuse, periodic runs, simultaneous completions;
* routing: dateline switches, cut-through waits, both ring directions, back-pressure;
* PPUs: rounding, NaR and Full PPU arithmetic;
* SHAKE: multi-block absorb.

`tb/posit_ref_pkg.sv` provides a real-number posit reference for the converter tests.

## Departures and limits

* **Host and CPU side.**
  * The PPUs have plain request/result ports. They are not coupled to a RISC-V pipeline through custom opcodes.
  * The host reaches each FTS queue through a plain synchronous RAM port, not an AXI bus.
  * The SHAKE slave supports single 32-bit beats only, not bursts.
* **Choices of this design.** The following are not fixed by the specification:
  * the argument word layout (id in [63:32] of the flags word) and the flag values `0x10`, `0x20` and bit 7;
  * the order in which Cmd in visits the accelerators;
  * hiding the intermediate completions of a periodic task;
  * the use of the two virtual channels (dateline), the credit protocol, the footer contents, the side-channel encoding, the register maps and FIFO depths.
* **Widths and sizes.**
  * The routing datapath is fixed at 128 bits. The 256-bit final release is not covered.
  * The number of IntraNode ports (`N_INTRA`) and of torus dimensions (`DIMS`, up to 3) are parameters.
* **Not included:**
  * the serial-link layer between FPGAs;
  * the fixed-point ↔ posit converters;
  * the homomorphic-encryption accelerator;
  * the RISC-V host systems.
* **Synthesis.** All RTL is written to be synthesizable. The queue RAMs start zeroed from an `initial` block, as an FPGA block RAM can.
