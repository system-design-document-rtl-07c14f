# Market-order packet generator for the DM9000A Ethernet controller

In a trading system the time that matters is the time from "the application
decides to send an order" to "the order is on the wire". When a processor
builds every UDP packet in software, most of that time goes into copying
headers that never change. This design moves packet building into an FPGA
peripheral. The peripheral keeps one complete Ethernet/IPv4/UDP frame in an
internal RAM. The sender and the recipient are fixed, and so are all the
headers. The processor (a Nios II soft core on an Avalon bus) writes only the
order fields that changed. The peripheral patches them into the stored frame,
recomputes the UDP checksum, and copies the frame into a DM9000A Ethernet
chip. It also initializes that chip after reset, so no software has to touch
the chip to send.

The order message is 12 bytes long:

| payload bytes | field    | size |
|---------------|----------|------|
| 0 – 4         | Price    | 5    |
| 5 – 8         | Name     | 4    |
| 9             | Buy/Sell | 1    |
| 10 – 11       | Quantity | 2    |

## Block structure

```
             Avalon-MM slave                              DM9000A pins
 processor ──► mopg_avalon_slave ──► mopg_ctrl ──┬──► dm9k_init ──┐
              (1-entry instr.        (state      │                ├─► dm9k_bus ──► CS#, CMD, IOW#, IOR#,
               buffer, stalls)        machine)   ├──► dm9k_tx  ───┘                SD[15:0], RST#
                                                 │       ▲
                                                 └──► udp_packetizer ──► packet_ram
                                                         (template, patch,     (27 x 16 bit)
                                                          checksum)
```

| module              | role |
|---------------------|------|
| `mopg_pkg`          | Payload and frame layout, instruction type, header configuration `pkt_cfg_t`, template and checksum functions, DM9000A register numbers. |
| `dm9k_accel`        | Top level. Wires the blocks and shares one DM9000A bus between the two sequencers. |
| `mopg_avalon_slave` | Decodes an Avalon write into an instruction and holds it in a one-entry buffer. Raises `waitrequest` while the buffer is full. |
| `mopg_ctrl`         | The controller state machine (see below). |
| `udp_packetizer`    | Loads the frame template, patches payload bytes, computes the UDP checksum. Owns the RAM write port. |
| `packet_ram`        | 27 words of 16 bits, byte-writable, one cycle read latency. |
| `dm9k_init`         | Runs the DM9000A power-up sequence. |
| `dm9k_tx`           | Copies the frame into the DM9000A and starts transmission. |
| `dm9k_bus`          | Produces the INDEX/DATA read and write cycles of the DM9000A host bus. |

## The instruction: Offset, Wait, Data

Each Avalon write is one instruction with three fields.

| field  | carried in           | meaning |
|--------|----------------------|---------|
| Offset | `avs_address[3:0]`   | Payload byte where the data starts. The field start offsets are 0, 5, 9 and 10. |
| Wait   | `avs_address[4]`     | 1: more fields follow, so patch the frame but do not send it. 0: patch, then send. |
| Data   | `avs_writedata`, `avs_byteenable` | Byte lane *k* (bits 8k+7:8k) goes to payload byte Offset+k when `byteenable[k]` is set. |

Bytes that would land past payload byte 11 are dropped. Price is 5 bytes
long, so it takes two writes: four bytes at offset 0, then one byte at
offset 4. Every other field fits in one write. A complete order is therefore
between one and five writes. Every write except the last has Wait=1.

Example: change Quantity and Price, then send.

```
address 0x10 | 0, data = price[0..3],  byteenable 1111   // Wait=1, offset 0
address 0x10 | 4, data = price[4],     byteenable 0001   // Wait=1, offset 4
address 0x00 | 10, data = quantity,    byteenable 0011   // Wait=0, offset 10 -> send
```

The processor never polls. When the peripheral is busy, its write is held on
the bus by `waitrequest`. The one-entry buffer lets a write complete at once
while the controller is still busy with the previous one. The next write
waits.

## Controller state machine

```
 reset ─► INIT ─► IDLE ◄──────────────────────────────┐
                   │  instruction, Wait=1              │
                   ├──────────► WR_RAM_HOLD ───────────┤  patch done
                   │  instruction, Wait=0              │
                   └──────────► WR_RAM_SEND ─► WR_PHY ─┘  frame handed to the chip
```

* **INIT** starts two things in parallel. `dm9k_init` brings up the chip.
  `udp_packetizer` writes the frame template into the RAM and computes its
  checksum. The controller waits in INIT until both are done. One instruction
  can already sit in the slave's buffer during INIT.
* **IDLE** takes an instruction and starts the packetizer. A Wait=1
  instruction only patches bytes. A Wait=0 instruction patches bytes and then
  recomputes the checksum.
* **WR_RAM_HOLD** returns to IDLE once the patch is written. Nothing is sent.
* **WR_RAM_SEND** starts `dm9k_tx` once the checksum is written.
* **WR_PHY** returns to IDLE when the frame is inside the chip and
  transmission has been requested.

The chip sends a frame only after a Wait=0 instruction. So the number of bus
writes per order equals the number of changed fields, and exactly one frame
leaves per order.

## The frame and its checksums

The RAM holds a 54-byte frame. Word *w* holds bytes 2w (bits 7:0) and 2w+1
(bits 15:8). That is the byte order the DM9000A takes in 16-bit mode, so the
transmit sequencer copies words straight from the RAM to the chip.

| bytes   | content |
|---------|---------|
| 0 – 13  | Ethernet II: destination MAC, source MAC, EtherType 0x0800 |
| 14 – 33 | IPv4: version 4, IHL 5, total length 40, ID 0, DF set, TTL 64, protocol 17, header checksum, source IP, destination IP |
| 34 – 41 | UDP: source port, destination port, length 20, checksum |
| 42 – 53 | order payload |

The MAC and IP addresses and the ports come from the `CFG` parameter, of type
`mopg_pkg::pkt_cfg_t`. The IPv4 header never changes, so its checksum is
computed at elaboration (`ip_checksum`) and stored in the template.

The UDP checksum covers a pseudo header (the IP addresses, the protocol and
the UDP length), the UDP header and the payload. All of this except the
payload is constant. `udp_csum_base` sums it at elaboration. At run time the
packetizer reads back the six payload words and adds them to that constant,
byte-swapped into network order. It folds the carries, complements the result
and stores it big-endian in bytes 40–41. A result of 0 is sent as 0xFFFF. The
checksum is recomputed only before a send, not after every Wait=1 patch.

The frame is 54 bytes, below the Ethernet minimum of 60. The design relies on
the DM9000A's default behaviour of padding short frames and appending the CRC.

## Talking to the DM9000A

`dm9k_bus` performs one host-bus access per request:

* setup: 1 cycle with CS# low, CMD set and SD driven for a write
* strobe: `PULSE` cycles with IOW# or IOR# low (read data is sampled in the
  last cycle)
* recovery: `RECOVER` cycles with CS# high

A register access is two of these: an INDEX write (CMD=0) of the register
number, then a DATA access (CMD=1). SD is split into `enet_data_o`,
`enet_data_oe` and `enet_data_i`. Put the tristate buffer in the pad
(`assign SD = enet_data_oe ? enet_data_o : 'z`).

**Initialization** (`dm9k_init`) runs these steps in order:

1. Hold RST# low for `RST_CYCLES`, then wait `RESET_WAIT`.
2. Write NCR=0x01 (software reset), wait `RESET_WAIT`, then write NCR=0x00.
3. Write GPR=0x00 to power up the internal PHY, then wait `PHY_WAIT`.
4. Clear NSR (0x2C) and ISR (0x3F).
5. Write the source MAC into PAR0–PAR5, first byte into PAR0.
6. Write IMR=0x80.

The receive path is not set up.

**Transmission** (`dm9k_tx`) runs these steps in order:

1. Write INDEX=TCR, then read TCR until TXREQ (bit 0) is clear. This waits
   for the previous frame to leave.
2. Write INDEX=MWCMD, then 27 DATA writes taken from the RAM.
3. Write the frame length to TXPLH and TXPLL.
4. Write TCR=0x01.

The busy-wait comes *before* the copy. So the wire time of one frame (about
6.7 µs at 100 Mbit/s) overlaps the processor's updates for the next one, and
only a send that follows very closely has to wait. `tx_polls` counts the TCR
reads that found the chip busy.

## Timing

The clock is assumed to be 50 MHz. All figures below are in clock cycles and
use the default parameters.

| event | cycles |
|-------|--------|
| one DM9000A bus access | 5 on the bus, 7 between accesses inside `dm9k_tx` |
| Wait=1 instruction (patch) | 4 in the packetizer, about 6 controller cycles in all |
| Wait=0 instruction: patch and checksum | 4 + 8 |
| frame copy into an idle chip (`dm9k_tx`) | 252 |
| end of a Wait=0 Avalon write → `frame_sent` | 273 (measured in the end-to-end testbench) |
| initialization after reset | about 3,250 (dominated by the three 20 µs waits) |
| template load | 35 |

Frame copy dominates the latency. It is 36 bus accesses at 7 cycles each.
Shortening `PULSE` and `RECOVER` to what a given board's timing allows is the
main tuning knob.

## Parameters (top level `dm9k_accel`)

| parameter    | default | meaning |
|--------------|---------|---------|
| `CFG`        | `DEFAULT_CFG` | MACs 00:07:ED:10:20:30 → 00:1B:21:3A:4C:5E, IPs 192.168.1.10:5000 → 192.168.1.1:6000 |
| `PULSE`      | 2    | DM9000A strobe width, cycles |
| `RECOVER`    | 2    | gap between DM9000A accesses, cycles |
| `RST_CYCLES` | 100  | RST# low time |
| `RESET_WAIT` | 1000 | wait after hardware and software reset (20 µs at 50 MHz) |
| `PHY_WAIT`   | 1000 | wait after PHY power-up |

The payload layout is fixed in `mopg_pkg`. Changing it means changing
`PAYLOAD_BYTES` and the field offsets there. The frame length, the RAM depth
and the checksum loop follow from those constants.

## What follows the original description and what is this design's own

These parts follow the original description:

* the split into an Avalon component, a packetization component, and an
  initialization and a communication component for the DM9000A
* the 12-byte payload with its four fields
* the Offset/Wait/Data instruction, and sending only when Wait=0
* the five-state controller
* keeping a pre-built packet in internal memory
* computing the checksum in hardware
* initializing the chip in hardware

These parts are this design's own choices:

* **Instruction encoding.** The description names the three fields but gives
  no widths. Here Offset is a payload byte address, four data bytes are
  carried per write, and byte enables mark the valid bytes.
* **One-entry buffer and `waitrequest` stall.**
* **Header contents and default addresses.**
* **DM9000A register sequences and bus timing.** These follow the chip's
  data sheet.
* **Initialization time.** It runs once, right after reset, as the first
  state of the state machine. The prose of the description instead says the
  chip is initialized the first time a packet is sent. The state machine
  was followed.
* **Template load.** The template is loaded during INIT, in parallel with
  chip initialization.
* **Poll order.** The chip is polled before a copy rather than after it.

## Not included

* **Parts outside the peripheral.** The Nios II processor and its software,
  the Avalon interconnect, the SRAM controller and SRAM, the DM9000A chip and
  the RJ45 jack are off-the-shelf parts. The top level brings out the Avalon
  slave port and the DM9000A pins instead.
* **Receive path.** The original plan leaves reception to software. This
  peripheral drives the DM9000A bus alone. Sharing the chip with a software
  driver would need bus arbitration, which is not designed here.
* **Status reads.** The Avalon port is write-only.

## Simulation

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/mopg_pkg.sv tb/tb_ref_pkg.sv tb/tb_dm9k_accel.sv --top-module tb_dm9k_accel
./obj_dir/Vtb_dm9k_accel
```

Replace `tb_dm9k_accel` with any other testbench name.

| testbench | what it checks |
|-----------|----------------|
| `tb_dm9k_accel` | End to end at the default parameters, against the chip model. Covers initialization, 65 orders with random field subsets, writes cut off at the payload end and back-to-back sends. Every received frame is compared byte for byte with an independently built reference, including both checksums. Also checks the 273-cycle send latency. Counts that each of these happened at least once: stall during INIT, stall during a copy, Wait=1 hold, send, busy poll, dropped bytes and partial byte enables. |
| `tb_udp_packetizer` | Template load and 300 random patch and checksum operations against the reference frame. Checks the cycle counts 35, 4 and 12. |
| `tb_mopg_ctrl` | The state machine against random-latency responders. |
| `tb_mopg_avalon_slave` | Instruction decoding, ordering and `waitrequest` behaviour. |
| `tb_packet_ram` | Byte-enable writes and read latency. |
| `tb_dm9k_bus` | Register write and read-back through the bus model, strobe rules and the 1+PULSE+RECOVER access time. |
| `tb_dm9k_init` | The exact register write list, the reset pulse and the waits. |
| `tb_dm9k_tx` | Frame contents, send time, and polling while the chip is busy. |

Two files support the testbenches. `tb/dm9000a_model.sv` is a behavioural
model of the DM9000A host interface. It has a register file and a TX FIFO,
captures each transmitted frame, keeps TXREQ set for a programmable wire
time, and flags bus-protocol violations. `tb/tb_ref_pkg.sv` builds the
expected frames from plain byte sums.
