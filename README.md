# Test electronics for a bit-parallel optical packet switch

An optical packet switching network of the data-vortex kind does not buffer
packets. It carries each packet as a short burst on many wavelengths at
once:
- eight payload channels;
- one clock channel;
- a Frame signal;
- the routing bits.

The network takes one packet every 25.6 ns. That is 64 bit periods at
2.5 Gbps.

This RTL is the digital side of a board that connects a PC's PCI Express
lane to such a network. It does three jobs:

1. **Transmit.** It takes PCIe packets from a PHY's 8-bit PIPE bus. It
   buffers them and cuts each one across the eight payload channels. It
   frames each packet as a network slot with a source-synchronous clock,
   Frame and routing bits.
2. **Receive.** It samples a received burst with the clock that came
   with it, rebuilds the packet and sends it back to the PC on the PIPE
   transmit bus.
3. **Test.** It can replace or fill in the PC's traffic with
   pseudo-random or stored packets. It can corrupt or drop received
   packets on purpose. It checks a loopback automatically, keeps a small
   memory of received packets, and can skew every signal in 10 ps steps.

Nothing on the receive side needs clock and data recovery. The clock
travels beside the data through the network, so the clock-to-data timing
does not depend on the path a packet takes. A CDR would need about 100 bit
periods to lock, which is longer than a burst.

## The network slot

Every signal of one slot, counted in bits `b = 0..63` (bit 0 is sent
first):

| signal              | bits                | content                                  |
|---------------------|---------------------|------------------------------------------|
| Frame               | 0 .. 55             | high while the packet is valid           |
| routing bit r       | 0 .. 55             | `route[r]`, constant over the packet     |
| (dead time)         | 56 .. 63            | everything low                           |
| clock               | 5 .. 50             | 1,0,1,0,… : 46 bits, 23 rising edges     |
| payload channel c   | 13 .. 44            | 32 data bits                             |

Around the slot:
- **Guards.** There is a 5-bit guard on each side of the clock window.
  The switching nodes trim the edges of a burst, and the guards absorb
  that trimming.
- **Pre-clocks.** The 8 clock bits before the data, bits 5..12, condition
  the receiver's deserializer.
- **Post-clocks.** The 6 clock bits after the data, bits 45..50, push the
  last word out of the deserializer's pipeline.

All of these are constants in `rtl/ops_pkg.sv`.

**Window advance.** The clock and payload are not processed by the
network, so only their timing relative to each other matters. A control
field moves both of them, together, up to 5 bit periods earlier, into the
leading guard. Moving the burst earlier has been observed to work better
than centring it. Frame and routing do not move.

### Packet mapping

A PCIe packet of 128 ns on a 2.5 Gbps lane is 32 symbols, or 256 bits. The
slot's data window is 8 channels × 32 bits, so one PCIe packet fills
exactly one network packet. This compresses it in time by a factor of
five.

Symbol `s` goes to channel `s % 8` as byte `s / 8` of that channel's 32
bits, MSB first. Channel 0 therefore carries symbols 0, 8, 16, 24.

### From FPGA words to line bits

The FPGA runs at 312.5 MHz, so a slot is 8 FPGA clocks. Each clock, the FPGA
gives every payload channel and the clock channel one 8-bit word, and a
serializer sends word bit 7 first. That makes 9 × 8 = 72 parallel FPGA
outputs.

Frame and the routing bits change only at bits 0 and 56, which are both
word boundaries. They therefore leave the FPGA as plain single-bit outputs
with no serializer.

## Data path

```
PIPE RX (PHY RXCLK) ──► pipe_rx_capture ──toggle──► pkt_fifo ─┐
                                                              ├─► source_select ─► packet_formatter ─► 8 payload words,
prbs_gen ─────────────────────────────────────────────────────┤       │              clock word, Frame, 8 routing bits
pattern_mem ──────────────────────────────────────────────────┘       │
route_xlate (routing bits of the PCIe packet at the buffer head) ─────┘

deserializer word clock ─► rx_packet_decoder ──toggle──► pkt_manipulator ─► selftest_checker
                                                 │                 └──► held + toggle ─► pipe_tx_sender (PIPE TX, PCLK)
                                                 └──► rx_monitor_mem
ctrl_regs: control-link register file (modes, tables, patterns, delay codes, counters)
```

`ops_fpga_core` holds all of this. `ops_test_electronics` is the top level.
It adds behavioural models of the board's high-speed parts:
- nine serializers;
- eight deserializers;
- 28 programmable delay lines, one on every outgoing and incoming signal.

### Transmit side

- **`pipe_rx_capture`** (PHY RXCLK domain) looks for the STP K-symbol
  (0xFB with RXDATAK set). It then collects 32 symbols and accepts the
  packet only if the last one is the END K-symbol (0xFD). A packet that is
  cut short or malformed is counted and thrown away.
- **`pkt_fifo`** is the short buffer in front of the formatter, 4 packets
  deep. When it is full it refuses a new packet and counts an overflow.
- **`source_select`** picks what goes into the next slot:
  - the PCIe buffer;
  - a PRBS31 packet from `prbs_gen`;
  - a stored pattern from `pattern_mem`.

  In *in-line* mode, PCIe packets go first and synthetic packets fill the
  slots that would otherwise be empty.
- **`route_xlate`** takes the low 4 bits of one symbol of the PCIe packet
  (`route_sym`, 11 by default) as a key. It looks the key up in a 16-entry
  table of 8-bit routing codes. Synthetic packets use a fixed routing code
  from a register.
- **`packet_formatter`** counts the 8 clocks of a slot. In the last clock
  it takes the next packet, and then decodes every word of the slot from
  its registers. A slot with no packet stays dark: no Frame, no clock and
  no data.

### Receive side

The eight deserializers all sample on both edges of the one received
clock. They are held in reset while the received Frame is low, so every
burst starts on a word boundary. The deserializers present a word, and a
word clock, only while the received clock runs. This is why the post-clocks
exist: without them the last data word would still be inside the
deserializer when the clock stops.

**`rx_packet_decoder`** runs on that burst word clock:
1. It keeps the first five words of each channel.
2. It strips the eight pre-clock bits.
3. It reverses the formatter's mapping.

Received Frame low clears its word counter.

### Clock domains

There are four clock domains:
- PHY RXCLK;
- the FPGA clock;
- the received burst word clock;
- PHY PCLK.

A whole packet crosses from one domain to the next as a register that holds
still, plus a toggle bit:
- **`toggle_handoff`** synchronizes the toggle with two flops and detects
  its edge.
- The receiving side copies the packet one clock after it sees the edge.

This is safe as long as packets are at least a few destination clocks
apart. PCIe packets arrive every 128 ns or more, and network packets every
25.6 ns. `pipe_tx_sender` synchronizes its toggle the same way.

It sends 32 symbols per packet at the PCIe rate. This is five times slower
than the network slot rate. A packet that arrives while one is still being
sent is counted as lost (`pcie_tx_lost`), not queued.

### Test features

| feature          | block              | behaviour |
|------------------|--------------------|-----------|
| PRBS source      | `prbs_gen`         | PRBS31 (x^31 + x^28 + 1), 256 new bits per packet; reseed command |
| stored patterns  | `pattern_mem`      | 16 packets, written word by word over the control link |
| failure injection| `pkt_manipulator`  | every N-th received packet corrupted (first word XOR mask) or dropped |
| self-test        | `selftest_checker` | queues up to 8 sent synthetic packets and compares each received one with them; counts good, errored, lost and unexpected packets and bit errors |
| monitor          | `rx_monitor_mem`   | ring of the last 8 received packets, read over the control link |
| skew / deskew    | `delay_line` ×28   | 0 .. 1000 steps of 10 ps (0 .. 10 ns) on every signal |

The self-test rules:
- A received packet equal to the *second* oldest outstanding one means the
  oldest was lost.
- A packet equal to neither of the two oldest counts as a packet error.
  Its differing bits are added to the bit-error count.

## Register map (control link)

The control link is a 32-bit bus on the FPGA clock with byte addresses.
`bus_we` writes on the clock edge, and `bus_rdata` is combinational.

| address            | register | bits |
|--------------------|----------|------|
| 0x000              | CTRL     | [0] tx_enable, [2:1] source (0 PCIe, 1 PRBS, 2 pattern), [3] in-line fill, [4] self-test enable, [6:5] manipulation (0 pass, 1 corrupt, 2 drop), [10:8] window advance (0..5 bits) |
| 0x004              | ROUTE_CFG| [7:0] routing code of synthetic packets, [11:8] pattern number, [20:16] symbol index of the routing key (reset 11) |
| 0x008              | MANIP_EVERY | [7:0] N (0 or 1: every packet) |
| 0x00C              | MANIP_MASK  | XOR mask for corrupted packets |
| 0x010              | CMD      | write 1: [0] clear self-test, [1] reseed PRBS |
| 0x040 .. 0x070     | status   | PCIe packets in, bad PCIe packets, buffer overflows, slots sent, packets received, corrupted, dropped, self-test packets, packet errors, bit errors (32 bit), unexpected, lost, PIPE TX lost |
| 0x100 + 4n         | route table entry n (n = 0..15) |
| 0x200 + 32p + 4w   | pattern p, word w (p = 0..15, w = 0..7, word 0 = symbols 0..3) |
| 0x400 + 4n         | delay code n: 0–7 outgoing payload, 8 outgoing clock, 9 Frame, 10–17 routing, 18–25 incoming payload, 26 incoming clock, 27 incoming Frame |
| 0x800 + 32p + 4w   | received packet p, word w (read only) |

**Calibration.** The serializer models put the clock edges on the data
edges. The outgoing clock therefore needs half a bit period of extra delay,
code 20 (200 ps), so that the receiver samples in the middle of each bit.
On the real board this value comes from a delay sweep of the sampling
window.

Frame and the routing bits skip the serializers. They therefore come out
half a word (1.6 ns) before the serialized signals of the same slot, and
their delay codes (9–17) are set to 160 to line them up. This alignment
matters when the window is advanced: the deserializers come out of reset
only when Frame rises, so Frame must arrive before the first clock edge.

## Behavioural models

These three files stand for parts outside the FPGA. They use `#` delays and
dual-edge sampling, and they are not meant for synthesis.
- **`pecl_serializer`** runs from the 2.5 GHz reference clock. It divides
  it by 8 into the word clock, loads a word every 8 bits, and shifts it out
  MSB first. The clock channel's serializer also provides the FPGA clock.
- **`pecl_deserializer`** samples on both edges of the received clock. It
  delivers each word two samples after its last bit. It has a defined
  power-up state and clears on an edge of its reset.
- **`delay_line`** is a transport delay of `code × 10 ps`, clamped at 10 ns.

All files use `` `timescale 1ps/1ps ``.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=<n> failures=<n>`, and a watchdog ends it if it hangs.
For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    rtl/ops_pkg.sv tb/tb_ops_test_electronics.sv \
    --top-module tb_ops_test_electronics -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

`tb_ops_test_electronics` runs the whole board at its default sizes, in a
network loopback. It builds in seconds and runs in under one. It checks
and counts each mechanism, and a mechanism that never happens counts as a
failure:
- slot timing: Frame period and width, and the clock edges;
- the window advance: the first clock edge moves 2 ns earlier, and the
  loopback stays clean;
- PRBS self-test and monitor contents, checked against an independent
  PRBS31 model;
- a stored pattern;
- corrupted and dropped packets;
- skew breaking reception, and receive-side deskew repairing it;
- PCIe packets crossing unchanged from PIPE RX to PIPE TX with
  table-driven routing bits;
- in-line fill;
- buffer overflow;
- PIPE TX loss.

`tb_ops_fpga_core` checks the FPGA logic alone, with the network replaced
by a word-level loopback.

All registers that are read are reset or initialised, and the testbenches
pass with random initial values.

## Where this design departs from, or adds to, the original system

- **Packet position.** Clock and data can move only earlier in the
  slot, by whole bits up to the 5-bit guard. Finer or later shifts are
  done with the delay lines.
- **Undescribed details.** These were not specified and are this
  design's choices:
  - pre-clock count (8) and post-clock count (6);
  - symbol-to-channel mapping and bit order;
  - buffer depth;
  - routing-key extraction (one symbol through a table);
  - the register map;
  - the self-test comparison rules;
  - the every-N-th failure rule.
- **PCIe stack.** Only the PIPE data path is modelled. It uses 32-symbol
  packets framed by STP/END with K flags.
  - The PHY itself and its command/status signals are not modelled, nor is
    the link training behind them.
  - The MAC, data-link and transaction layers are not modelled either.
- **Not included:**
  - optional line encoding (the system sends data unencoded);
  - analog output controls (amplitude, swing, bias);
  - the USB device (the register bus stands in for it);
  - the electro-optic modules and the network itself (the end-to-end
    testbench replaces them with wires and an optional skew).
- **Rate.** The logic is written for 2.5 Gbps per channel, a 312.5 MHz
  FPGA clock. Higher line rates need a proportionally faster FPGA clock,
  which has not been checked.
- **Status counters.** The PHY-side counters `pcie_rx_bad` and
  `pcie_tx_lost` are read across clock domains without synchronization.
  They are for inspection only.
