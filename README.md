# AirFPGA playback data path

AirFPGA separates a software defined radio into two parts. One is a data
acquisition node: a NetFPGA card that takes baseband IQ samples from a
receiver and sends them as UDP packets over Gigabit Ethernet. The other is
any number of "radio clients" that do the signal processing. A client can
be a PC reading a UDP socket, another NetFPGA, or a DSP board. The antenna
can then sit far from the computing.

This RTL is the FPGA side of that node in its playback configuration. The
receiver itself is not wired to the FPGA. Instead, the host PC first writes
a recording of IQ samples into the board SRAM. A *DSP simulator* then plays
the recording back, in a loop, as if it were live DSP output. A *packet
generator* wraps the samples in Ethernet/IPv4/UDP frames with a sequence
number. The frames go to the transmit queue of one Gigabit Ethernet port.
A radio interface and on-board DSP are planned on the same card but are
not part of this design.

## Data path

```
 host register bus ──> airfpga_regs ──cfg (MAC/IP/UDP)────────────> packet_generator ──> out_data[63:0]
                         │    └─sim (start, end, enable)─> dsp_simulator ─IQ stream─┘     out_ctrl[7:0]
                         │                                    │ reads                      out_wr / out_rdy
                         └── host SRAM access ──> sram_interface <──┘
                                                       │
                                                  sram_* port (board SRAM)
```

| Module | Role |
|---|---|
| `airfpga_pkg` | Widths, CTRL codes, register indices, `iq_t`, `pkt_cfg_t`, `sim_ctrl_t`, IPv4 checksum function |
| `airfpga_regs` | Eleven host registers, and a window through which the host reads and writes SRAM |
| `sram_interface` | Shares the SRAM port between host accesses and simulator reads |
| `dsp_simulator` | Reads the SRAM window start..end in a loop and streams the samples |
| `packet_generator` | Pairs samples into 64-bit words, buffers them, and emits complete packets |
| `sync_fifo` | Generic show-ahead FIFO, used by the two modules above |
| `airfpga_top` | Wires the four blocks together |

One clock, asynchronous active-low reset `rst_n`. All blocks are written
for the NetFPGA's 125 MHz core clock, but nothing in them depends on it.

## The packet

The NetFPGA moves packets as 64-bit words, each with an 8-bit control field
(CTRL). This design uses three CTRL codes:
- `0xFF` marks the module header word, which the NetFPGA output queues use
  to route the packet.
- `0x00` marks an ordinary data word.
- `0x01` marks the last word, with all eight bytes valid.

Bit 63 of a word is the first bit on the wire. Each packet is
`7 + SAMPLES_PER_PKT/2` words long:

| CTRL | bits 63..48 | 47..32 | 31..16 | 15..0 |
|---|---|---|---|---|
| FF | port_dst = 0x0001 | word_length | port_src = 0 | byte_length |
| 00 | mac_dst[47:0] ‥ | ‥ | ‥ | mac_src[47:32] |
| 00 | mac_src[31:0] ‥ | ‥ | 0x0800 | 0x45, ToS 0 |
| 00 | ip_total_length | ip_id | flags DF, offset 0 | TTL 64, protocol 17 |
| 00 | ip_header_checksum | ip_src ‥ | ‥ | ip_dst[31:16] |
| 00 | ip_dst[15:0] | udp_src | udp_dst | udp_length |
| 00 | udp_checksum = 0 | reserved = 0 | seq[31:16] | seq[15:0] |
| 00 | Q₀ | I₀ | Q₁ | I₁ |
| … | | | | |
| 01 | Q | I | Q | I |

- **Module header.** `byte_length` counts the bytes after the module header:
  48 + 4·N, where N is `SAMPLES_PER_PKT`. `word_length` = 6 + N/2.
- **IP and UDP lengths.** `ip_total_length` = 34 + 4N and `udp_length` =
  14 + 4N.
- **UDP payload.** It starts with a 16-bit reserved field, meant for
  metadata such as centre frequency or antenna state (here always zero).
  Next comes a 32-bit sequence number, then the samples.
- **Sequence number.** It is 0 after reset and goes up by one per packet.
  A client uses it to detect lost packets. The IP identification field
  carries its low 16 bits.
- **Samples.** Each sample is 32 bits, Q before I, two's complement.
- **Checksums.** The IPv4 header checksum is computed in hardware. The UDP
  checksum is 0, which IPv4 allows.
- **Multicast.** The destination IP may be a 224.x.y.z group. The hardware
  treats it like any other address.

The generator starts a packet only when a whole packet's worth of samples
is already in its FIFO. The lengths in the header are therefore fixed.
Once started, the packet never waits for input, only for `out_rdy`. The
packet parameters (MAC, IP, UDP) are copied at the start of each packet.
A register write during a packet therefore takes effect from the next
packet.

## Registers and SRAM window

The host bus is a plain request/acknowledge bus with 23-bit word
addresses and 32-bit data:
- `reg_req` is a one-cycle pulse, qualified by `reg_rd_wr_L` (1 = read),
  `reg_addr` and `reg_wr_data`.
- `reg_ack` is a one-cycle pulse, and `reg_rd_data` is valid in that cycle.
- Only one request may be outstanding. The next request may come in any
  cycle after the acknowledge.

Register accesses are acknowledged in the cycle after the request. SRAM
accesses are acknowledged when they complete.

| Addr | Register | Bits used |
|---|---|---|
| 0 | MAC_SRC_HI | [15:0] = source MAC[47:32] |
| 1 | MAC_SRC_LO | source MAC[31:0] |
| 2 | MAC_DST_HI | [15:0] = destination MAC[47:32] |
| 3 | MAC_DST_LO | destination MAC[31:0] |
| 4 | IP_SRC | source IPv4 address |
| 5 | IP_DST | destination IPv4 address |
| 6 | UDP_SRC | [15:0] source port |
| 7 | UDP_DST | [15:0] destination port |
| 8 | SIM_ADDR_LO | [18:0] first SRAM word of the recording |
| 9 | SIM_ADDR_HI | [18:0] last SRAM word (inclusive) |
| 10 | SIM_ENABLE | [0] play |
| bit 22 set | SRAM word `reg_addr[18:0]` | 32-bit sample, `{Q, I}` |

All registers reset to zero. Other addresses read as zero and ignore
writes.

To play a recording:
1. Write the samples through the SRAM window.
2. Program registers 0–9.
3. Write 1 to SIM_ENABLE.

## Playback and flow control

**Simulator reads.** On the first enabled cycle, `dsp_simulator` loads the
start address. From the next cycle it issues one read per cycle, wrapping
from the end address back to the start. While disabled it issues no reads.
Each new enable restarts at the start address. An end address below the
start address plays only the start word.

**Credit count.** The simulator counts the reads in flight plus the words
in its 8-entry output buffer. It issues a read only while that total is
below 8. A word returning from SRAM therefore always has room, whatever the
SRAM latency. When the packet generator's FIFO fills, the simulator stops
after at most eight more reads and resumes without losing or repeating a
sample.

**SRAM sharing.** `sram_interface` gives one SRAM access per cycle. A host
request wins whenever no host read is already in flight. The simulator
gets every other cycle. Returning read data is steered back to whoever
issued the read by a tag pipeline `RD_LATENCY` deep. The host can thus
read or write SRAM during playback, and the stream only loses those
cycles.

**Throughput.** With `out_rdy` high, the simulator delivers one sample
(32 bits) per clock. A packet of 256 samples (128 payload words plus 7
header words) is therefore ready every 256 clocks, and the output is busy
about half the time. That is about 4 Gb/s of samples at 125 MHz. The
radio in the reference setup captures up to 190 kHz of bandwidth, about
196 k complex samples/s or 6.3 Mb/s. That is far below both this rate and
one Gigabit port. The playback test prints both figures.

## Parameters

| Parameter (module) | Default | Meaning |
|---|---|---|
| `SAMPLES_PER_PKT` (top, packet_generator) | 256 | IQ samples per packet, even; 1072-byte frames |
| `FIFO_DEPTH` (top, packet_generator) | 512 | payload FIFO, in 64-bit words (two packets) |
| `SKID_DEPTH` (top, dsp_simulator) | 8 | simulator output buffer, power of two |
| `SRAM_RD_LATENCY` (top) / `RD_LATENCY` | 2 | SRAM read latency in cycles |
| `OUT_PORT`, `SRC_PORT`, `IP_TTL` (packet_generator) | 0x0001, 0, 64 | fixed header values |
| `SRAM_AW`, `SRAM_DW` (package) | 19, 32 | SRAM: 2¹⁹ words of 32 bits = 2 MiB, about 2.7 s of recording at 196 kS/s |

`SRAM_RD_LATENCY` must match the real SRAM. With a wrong value, every
sample is taken from the wrong cycle.

## What follows AirFPGA and what is this implementation's choice

These parts follow the AirFPGA design:
- The block structure and the playback path: register I/O, SRAM
  interface, DSP simulator, packet generator, one Gigabit port.
- The eleven registers and their meaning.
- The packet layout: CTRL codes, field order and widths, the 16-bit
  reserved field, the 32-bit sequence number, and Q before I.

These are this design's own choices:
- The register bus handshake, the address map and the SRAM window.
- The SRAM geometry and latency.
- Host-first arbitration.
- The simulator looping at the end address and restarting at the start
  on each enable. The end address is inclusive.
- The samples per packet, the FIFO sizes, and starting a packet only once
  it is complete.
- TTL 64, DF set, IP id taken from the sequence number, a zero UDP
  checksum and a zero reserved field.
- Output port 0.

The byte order is also an interpretation. The first field of the format is
taken to be the most significant bits of the word, which is the NetFPGA
convention.

Departures from the source and things not built:
- The AirFPGA design shows a FIFO for each of four output ports, feeding
  four MAC transmit queues. Only one Gigabit port is used in the
  configuration built here, so there is one FIFO and one output.
- The planned radio interface, on-board DSP modules and the four-copy
  unicast scheme are not built.
- The NetFPGA transmit queues, MACs, register system, PCI host and the SRAM
  chip lie outside this RTL. The top brings out their signals.
- The AirFPGA design calls its registers "registers and counters", but
  lists no counters, so none are built.
- Its FPGA resource figures refer to a complete NetFPGA build and are not
  comparable with this RTL alone.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=… failures=…`.

| Testbench | What it shows |
|---|---|
| `tb_airfpga_regs` | Reset values; random write/read of all registers; every `cfg`/`sim` field; one-cycle acknowledge; unused addresses; SRAM-window forwarding, waiting for completion |
| `tb_sram_interface` | Against `sram_model` and a shadow memory: host and simulator reads correct; simulator data exactly `RD_LATENCY` cycles after grant, in order; host priority; conflicts happen |
| `tb_dsp_simulator` | Address order start..end with wrap; restart on enable; no loss under random grants and random ready; one sample per cycle when unhindered |
| `tb_packet_generator` | Every word against a byte-wise reference model (`airfpga_ref_pkg`); 7 + N/2 cycles per packet; random stalls and input back-pressure; parameters changed mid-packet affect only the next packet |
| `tb_airfpga_top` | Whole design at default sizes: recording loaded over the bus, multicast destination, packets checked word by word. It also exercises output stalls, a long stall that fills the FIFO and stops the simulator, host SRAM reads during playback, and new parameters between sessions. Packet rate is one packet per 256 clocks. Each event is counted and must occur |
| `tb_airfpga_playback` | The two signal-generator scenarios (10 kHz AM tone, m = 0.5; 1 kHz wideband FM, β = 10) generated as baseband recordings and played through the default design. A client model checks every header field, the IP checksum, the sequence numbers and the samples. It then demodulates: the AM envelope ratio must be 3, with a 10 kHz tone; the FM deviation must be ±10 kHz |

`tb/sram_model.sv` is a behavioural model of the board SRAM, with a fixed
read latency. It is for simulation only.

### Running with Verilator

```
verilator --binary --timing --assert --top-module tb_airfpga_top \
    -y rtl -y tb +libext+.sv rtl/airfpga_pkg.sv tb/airfpga_ref_pkg.sv tb/tb_airfpga_top.sv
./obj_dir/Vtb_airfpga_top
```

For another testbench, substitute its name. Leave out
`tb/airfpga_ref_pkg.sv` where the testbench does not import it. Lint a
module with
`verilator --lint-only -Wall -y rtl rtl/airfpga_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about unused package constants, and about
`rst_n` being used both as an asynchronous reset and in the assertions'
`disable iff`. Both are harmless. Every test finishes in well under a
second.
