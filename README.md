# Synchronous Ethernet packet delay device

This RTL delays Ethernet traffic in a lab. It sits between two Ethernet
MACs and holds every frame for a programmable number of clock cycles
before passing it on, so the link behaves like a long line, for example
25 ms each way or a 50 ms round trip. Frames keep their order and their
contents. The delay can be changed from a CPU while traffic is flowing,
which makes scheduled delay profiles possible (for example a delay that
ramps up). Each direction has its own delay, so the link can also be
asymmetric.

All of the work happens in the **packet handler**. It takes 32-bit
Avalon streaming packets from one MAC, stores them in on-chip memory
and emits each one on the other MAC's stream once its time has come.
The device uses two packet handlers, one per direction, and a small
memory-mapped register decode for the CPU.

```
            MAC 0 rx ──► packet_handler u_ph0 ──► MAC 1 tx
            MAC 0 tx ◄── packet_handler u_ph1 ◄── MAC 1 rx
   CPU data master ──► mm_decoder ──► register slaves of u_ph0 (0x10000000)
                                                  and u_ph1 (0x10000040)
```

This RTL does not include the MACs, the CPU (a soft processor running
the console), the SFP transceivers, the DDR2 controller, the timers, the
UART or the PLL of the complete system. The top level, `delay_device`,
brings out their connections as ports.

## How a packet is delayed

Each handler has two memories:

| memory | size | holds |
|---|---|---|
| packet data FIFO | 32768 x 32 bit (128 KiB) | the words of every stored packet |
| descriptor FIFO | 512 x 48 bit | per packet: 16-bit byte count, 32-bit due time |

A free-running 32-bit counter advances once per clock. This is the local
time.

**Receive (`ph_rx`).** When a start-of-packet word is accepted, the
handler latches `due = now + TimeBase`. It writes each word into the data
FIFO and counts four bytes per word. On the last word it counts
`4 - empty` bytes. With the end-of-packet word it pushes the descriptor
`{bytes, due}`. In the same cycle it *commits* the packet's words, which
makes them visible to the transmit side.

**Transmit (`ph_tx`).** A five-state Moore machine:

```
 idle ──due──► latch_desc ──► sop ──ready──► reg ──≤4 bytes left──► eop ──ready──► idle
  ▲ └─not due─┘                └─!ready─┘     └─ready, >4 left─┘    └─!ready─┘      │
  └──────────────────────────────────────────────────────────────────────────────┘
```

In `idle` the machine watches the oldest descriptor until it is due. In
`latch_desc` it pops the descriptor and loads the byte count. Then it
offers the words of the packet. The first word carries startofpacket.
The last carries endofpacket, with `empty = 4 - bytes left`. Every word
the MAC takes pops the data FIFO. Two cases extend the five-state flow.
A packet of 5 to 8 bytes goes straight from `sop` to `eop`. A packet of
4 bytes or less is a single word that is both start and end of packet.

**When a descriptor is due.** The counter wraps every 2^32 cycles, which
is about 51.5 s at 83.3 MHz. A plain `now >= due` test would therefore
fail near the wrap. Instead, a descriptor is held only while the counter
lies in the window `[due - TimeBase, due)`. That window is the span from
the packet's arrival to its due time, taken modulo 2^32. At any other
counter value the packet may leave. As a result, any delay up to
2^32 - 1 cycles works across the wrap.

The window uses the *current* TimeBase, because the descriptor has no
room to store each packet's own delay. This has a consequence when the
delay changes:

* **Raising TimeBase** keeps every queued packet until its own due time.
* **Lowering TimeBase** releases queued packets whose due time now lies
  beyond the new window. They can then leave earlier than the delay they
  arrived with. They still leave in arrival order.

Even when every packet is due, the FIFO order holds: a packet with a
short delay never overtakes one with a longer delay that arrived before
it. This is store-and-forward behaviour without priority queues.

**Latency.** Say a start-of-packet is accepted when the counter reads
`t`. Its start-of-packet is offered at counter value `t + TimeBase + 2`,
as long as the whole packet has arrived by then and the MAC is ready. If
the packet is still arriving, it leaves two cycles after its last word.
The minimum delay is therefore one store-and-forward time. The
testbenches check this cycle count exactly.

## Back pressure and dropped frames

The sink's `ready` depends on whether a packet is in progress:

* **Between packets**, `ready` is low while the data FIFO has fewer than
  380 words (one 1518-byte frame) free, or while the descriptor FIFO is
  full. The MAC then keeps the next frame in its own receive FIFO.
* **During a packet**, `ready` stays high until the end-of-packet word.
  A frame of normal size that has started therefore always fits.

A longer frame, such as a jumbo frame, can still run out of space. The
same applies to a packet over 65,535 bytes, which the byte count cannot
hold. In either case the handler *rolls back* the words already written
and accepts and discards the rest of the frame. It pushes no descriptor,
so the frame is dropped cleanly and leaves no partial packet in the
FIFO.

The handler also drops traffic that breaks the stream protocol:

* Words that arrive outside a packet are discarded.
* A start-of-packet inside a packet drops the packet in progress. It also
  discards the new one up to its end.

On the source side, the MAC can stall any word by holding `ready` low.
The handler keeps the word and its flags stable until it is taken.

## Registers

Each handler has sixteen 32-bit words. The CPU addresses them at
`base + 4 * index`: handler 0 at base 0x10000000, handler 1 at base
0x10000040.

| index | name | access | function |
|---|---|---|---|
| 0x0 | Command | R/W | writing 1 to bit 0 soft-resets the handler for one cycle; the bit then clears itself |
| 0x1 | NumInPFIFO | R | words currently stored in the packet data FIFO |
| 0x2 | TimeBase | R/W | delay in clock cycles; 50000 after any reset |
| 0x3-0xF | — | — | read 0, writes ignored |

Reads return data in the same cycle and writes take effect at the
following clock edge. A read of a register in the cycle it is written
returns the old value. A soft reset empties both FIFOs and restarts the
counter and both state machines. It also reloads TimeBase, so program
the delay *after* a soft reset. To turn a delay in seconds into
TimeBase, multiply by the clock frequency: 25 ms at 83.3 MHz is
2,082,500 cycles.

## Interfaces and timing

* One clock. `reset` is active high and synchronous.
* The Avalon streaming sink and source use 32-bit data, a 2-bit `empty`,
  `startofpacket` and `endofpacket`, with a ready latency of zero. A word
  moves in a cycle where `valid` and `ready` are both high.
* `asi_sink_error` (6 bits) is not used, and `aso_source_error` is
  always 0.
* The register slave needs no wait states, so `cpu_waitrequest` is
  always 0.

The port names of `packet_handler` are the Avalon names of the original
component (`asi_sink_*`, `aso_source_*`, `avs_slave_*`).

## Capacity

Each handler holds at most 128 KiB of packet data and 512 packets. At a
given delay, the largest sustained rate a direction can carry without
back pressure is `131072 * 8 / delay` bit/s:

| one-way delay | rate that fits | example |
|---|---|---|
| 1 ms | ~1 Gb/s | full gigabit line rate only at delays ≲ 1 ms |
| 10 ms | ~105 Mb/s | 50 Mb/s UDP stream: ~62.5 KB in flight, fits |
| 25 ms | ~42 Mb/s | a 64 KiB TCP window per round trip fits |

Above that rate, the sink back-pressures the MAC. The MAC then drops
frames once its own receive FIFO is full. The handler itself can move
one 32-bit word per clock in and out, which is 2.67 Gb/s at 83.3 MHz.

## Files

| file | contents |
|---|---|
| `rtl/ph_pkg.sv` | widths, `descriptor_t`, transmit state and register enums |
| `rtl/delay_device.sv` | top: two handlers and the register decode |
| `rtl/packet_handler.sv` | one direction: counter, registers, receive, FIFOs, transmit |
| `rtl/ph_csr.sv` | register slave (Command, NumInPFIFO, TimeBase) |
| `rtl/ph_rx.sv` | streaming sink, descriptor creation, back pressure, drop |
| `rtl/ph_tx.sv` | transmit state machine, due-time window |
| `rtl/packet_fifo.sv` | 32768 x 32 data FIFO with commit/rollback and almost-full |
| `rtl/descriptor_fifo.sv` | 512 x 48 show-ahead descriptor FIFO |
| `rtl/mm_decoder.sv` | CPU byte address to handler register slaves |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the ones below |

Every testbench ends by printing `TB_RESULT checks=N failures=M`:

* `tb_delay_device` runs both directions at reduced FIFO sizes. It makes
  each mechanism happen and counts it: exact delay, asymmetric delays,
  source stalls, back pressure from each FIFO, a dropped oversize frame,
  a TimeBase change while packets wait, soft reset, and reading the fill
  level.
* `tb_delay_device_full` uses the default sizes. It sends an echo
  request and reply with a 25 ms delay each way, so each leg takes
  2,082,502 cycles. It then fills the 32768-word FIFO with 1514-byte
  frames until back pressure sets in (after 86 frames), and releases
  them.
* `tb_workloads` uses the default sizes. It runs a 50 Mb/s UDP-like
  stream at a 10 ms delay, which needs no back pressure. It also runs a
  delay profile that raises TimeBase by 300 cycles every 255 cycles.
  Every frame is checked against the TimeBase it arrived under.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_delay_device \
    -y rtl -y tb +libext+.sv rtl/ph_pkg.sv tb/tb_delay_device.sv
./obj_dir/Vtb_delay_device
```

The FIFO depths are parameters of `delay_device` and `packet_handler`.
The almost-full headroom is a parameter of `packet_fifo`, set by default
from `ph_pkg::MAX_FRAME_BYTES`.

## Departures and choices

These points follow the source design closely:

* The memories, their sizes and the descriptor layout.
* The register map and its timing.
* The back-pressure threshold.
* The five-state transmit machine.
* The wrap-around release rule.

These points are choices made for this RTL:

* **Resets.** All resets are synchronous.
* **Dropping a frame.** A frame that does not fit is rolled back. The
  source design only states that such a frame is dropped.
* **Descriptor FIFO full.** Reception is held off between packets while
  the descriptor FIFO is full.
* **Short packets.** Packets of 8 bytes or less use the short paths
  through the state machine described above.
* **Unused registers.** NumInPFIFO is read-only, the unused register
  words read 0, and the upper Command bits are kept without function.
* **Counter and reset value.** The local counter starts at 0, and a
  soft reset reloads TimeBase with 50000.
* **Byte count width.** The byte count is the full 16 bits. Some
  versions of the original keep 15 bits.
* **Lowered TimeBase.** The early release after TimeBase is lowered
  (see above) is the behaviour of the stated release rule. It is *not*
  the "every packet finishes its own delay" behaviour that one might
  expect.
