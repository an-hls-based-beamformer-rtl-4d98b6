# A streaming B-engine beamformer for a 100G FPGA card

A phased-array feed gives a radio telescope many antenna elements. Combining
their signals into beams (beamforming) is mostly a data-movement problem. The
F-engines channelise each element and send UDP packets over a 100 Gb/s
network. Each packet holds a run of time samples for **one frequency channel
of one element**. A beamformer card (a "B-engine") has to collect these
packets in whatever order they arrive, cope with missing ones, and regroup
the data so that every clock cycle the arithmetic sees all elements of one
time sample. It then forms the weighted sums and sends the result out again
as packets, each holding one channel of one beam.

This repository holds SystemVerilog RTL for such a card. It is the
32-element, 32-channel, 32-beam configuration of an HLS design for a Xilinx
Alveo card with HBM. The whole chain moves one 512-bit word per clock. At
250 MHz that is 128 Gb/s, enough for a 100G link in each direction.

The repository also contains four small kernels, used as introductory
examples of HLS interfaces (GCD, AXI4-Lite, AXI4-Stream, AXI4 master). They
sit in the same top level on their own ports and do not touch the
beamformer.

## The chain and its data orders

```
 network in ─► spead_recv ─► reorder ◄──► buffer memory (HBM, outside)
                               │
                               ▼
                        corner_turner ─► beamformer ─► corner_turner2 ─► spead_send ─► network out
                                             ▲
                                  beam weights (host, wt_* port)
```

Data is described by the nesting of its indices, outermost first:

- T = coarse time
- F = channel
- E = element
- B = beam
- the last T = the samples inside one packet

| link | order | one word holds |
|---|---|---|
| network → spead_recv | SPEAD packets, any order | 64 bytes of a packet |
| spead_recv → reorder | (F, E) packets, arrival order | 32 samples of one element |
| reorder → corner_turner | (T, F, E, T) | 32 samples of one element |
| corner_turner → beamformer | (T, F, T, E) | one sample of all 32 elements |
| beamformer → corner_turner2 | (T, F, T, B) | one sample of all 32 beams |
| corner_turner2 → spead_send | (T, F, B, T) | 32 samples of one beam |

Every internal link is an AXI4-Stream with these fields:

- 512-bit `tdata`
- `tlast` on the last word of a packet (or of a block)
- 128-bit `tuser` side channel `{timestamp[63:0], channel_id[31:0], element_id[31:0]}` (bits 127:64, 63:32 and 31:0)

After the beamformer, the element field carries the beam number.

A sample is complex with 8-bit two's-complement parts. Lane `i` of a word is
bits `[16i+15:16i]`, with the real part in the low byte. A packet payload is
`PKT_WORDS` = 64 words, i.e. 2048 samples or 4096 bytes. Timestamps count
samples, so consecutive packets of one element differ by 2048.

Shared types and constants are in `rtl/bf_pkg.sv`.

## SPEAD framing (`spead_recv`, `spead_send`)

Each packet carries a 96-byte header, sent in wire order with byte 0 in
bits [7:0] of a word:

| bytes | content |
|---|---|
| 0–7 | `53 04 02 06 00 00 00 0b` (magic, version, 2-byte item ids, 6-byte addresses, 11 items) |
| 8–95 | 11 item pointers: 16-bit id with the immediate bit set, 48-bit big-endian value |

| item | id | value |
|---|---|---|
| 0 | 0x8001 | heap id (`spead_send`: running packet count) |
| 1 | 0x8002 | heap size (4096) |
| 2 | 0x8003 | heap offset (0) |
| 3 | 0x8004 | payload length (4096) |
| 4 | 0x9600 | timestamp |
| 5 | 0x9601 | clipping count (0) |
| 6 | 0x9602 | order vector (0) |
| 7 | 0x9603 | channel |
| 8 | 0x9604 | element (input) or beam (output) |
| 9, 10 | 0 | padding |

The fixed bytes and the first four ids follow the standard SPEAD layout. The
ids from 0x9600 on and the item order are this design's convention. Change
them in `bf_pkg` if your F-engines use others.

96 bytes is one and a half words, so the payload does not start on a word
boundary:

- **spead_recv** builds every output word from the upper half of one input
  word and the lower half of the next. It moves the header fields into
  `tuser` and drops any packet whose fixed bytes are wrong or that ends
  inside the header. A packet whose last word has more than 32 valid bytes
  is counted as bad.
- **spead_send** does the reverse. It emits two header words, then the
  payload shifted by 32 bytes, then a last word with only its low 32 bytes
  valid (`tkeep[63:32] = 0`). A 64-word beam packet therefore leaves as 66
  words.

## Reorder: turning a packet storm into an ordered frame

This is the least obvious part of the design (`rtl/reorder.sv`).

**Buffer layout.** Packets arrive in any order, some late, some twice, some
never. The kernel writes each one into external memory at the word address

```
{ slot[log2 NSLOT], channel[log2 NCHANNEL], element[log2 NELEMENT], word[log2 PKT_WORDS] }
```

Here `slot = (timestamp >> TS_SHIFT) mod NSLOT`. By default
`TS_SHIFT = log2(2048)`, so each packet time gets its own slot. There are
four slots, so up to four time frames can be in flight at once. At full size
that is 4 × 32 × 32 × 64 words × 64 bytes = 16 MiB, held in HBM on the card.

**Arrival bitmap.** On chip, the kernel keeps one bit per (slot, channel,
element) and a count per slot. It also holds the time index of the oldest
frame not yet released. The first packet after reset sets this index.

**Release.** Frames leave strictly in time order. The oldest frame is
released when one of these holds:

1. All `NCHANNEL × NELEMENT` of its packets have arrived.
2. A packet arrives for a time `NSLOT` or more frames ahead, which would
   overwrite a live slot. The input then stalls (`s_tready` low, counted in
   `stall_cycles`) until the oldest frame has been forced out
   (`forced_frames`).
3. `flush` is high. This drains everything that is buffered, e.g. at the
   end of an observation.

**Read-out.** A released frame is read in (channel, element, word) order.
For every packet whose bit is clear, zeros are sent instead of reading
memory, and the packet is counted in `lost_pkts`. Downstream therefore
always receives complete frames of the expected size.

**Dropped packets.** The kernel drops, and counts, packets that:

- belong to a frame already released (`late_pkts`)
- duplicate a packet already held (`dup_pkts`)
- carry a channel or element out of range (`bad_pkts`)

**Memory port.** The memory side is a plain word-addressed port:

- `mem_wr_en`, `mem_wr_addr`, `mem_wr_data`, `mem_wr_ready`
- `mem_rd_en`, `mem_rd_addr`, `mem_rd_ready`, with in-order `mem_rd_valid` / `mem_rd_data`

Read data may come back with any latency. Reads go through a reservation
buffer of `OUT_DEPTH` entries with three pointers: issue, fill and read.
A word is only requested when there is room for it, so back-pressure on
the output never loses data. Throughput stays at one word per cycle as long
as the memory round trip is at most `OUT_DEPTH` cycles (32 by default). A
shallower buffer slows the output by roughly the ratio of the two.

A forced release never starts while a packet of the same slot is still being
written.

## Corner turns (`corner_turner`, `corner_turner2`)

Both are transposes in on-chip RAM. Each uses a ping-pong pair of RAMs: one
block is written while the other is read, so both keep one word per cycle.

**corner_turner.** It stores the 32 element packets of one channel, one
bank per element, whole. It then reads word `t` of the output as lane
`t mod 32` of word `t / 32` from every bank, so word `t` holds sample `t` of
all elements. A block is 2048 output words. Word `t` carries timestamp
`T0 + t`, and `tlast` marks the end of the block. Reading starts once the
last element packet of the channel is in.

**corner_turner2.** It does the opposite for beams. Beamformed word `t` is
spread over the banks, sample of beam `b` to lane `t mod 32` of word
`t / 32` in bank `b`. Each bank is then read whole, as one 64-word packet
per beam, with the beam number in the element field.

Both require the element or beam count to equal the 32 lanes of a word.

## Beamformer (`beamformer`, `complex_mult`)

Each input word is one time sample `x[e]` of all 32 elements of channel `f`.
For every beam the kernel computes

```
y[b] = ( Σ_e  w[f][b][e] · x[e] ) >>> SHIFT,   saturated to 8-bit real and imaginary parts
```

This uses 32 × 32 = 1024 `complex_mult` units, each
`(a+ib)(c+id) = (ac−bd) + i(ad+bc)` with 17-bit results. There is one adder
tree per beam, 22 bits wide. `SHIFT` = 8 and the saturation bring the beams
back to the 8-bit sample format, so one output word holds beam `b` in
lane `b`.

The pipeline has interval 1 and a latency of 4 cycles: weight read,
products, sums, scale and saturate. The whole pipeline stalls while the
output is back-pressured.

Weights sit in an on-chip RAM of `NCHANNEL × NBEAM` words. Each word holds
the 32 complex weights of one (channel, beam) in the same lane layout as the
data. The RAM is written through `wt_we` / `wt_addr = {channel, beam}` /
`wt_data`. In the card this port is driven by whatever brings the weights
from the host. The RAM is read at the channel of the incoming word, so
weights may be changed between channels.

## Tutorial kernels

| module | behaviour | interface |
|---|---|---|
| `gcd` | Euclid by subtraction, one step per cycle; `Ain = 0` returns `Bin` | `ap_start/ap_done/ap_idle/ap_ready`, `ap_return`, active-high `ap_rst` |
| `axilite_example` | `b ← a + 2b` | AXI4-Lite slave, registers below |
| `axis_example` | adds 5 to each 32-bit word; keep, strobe and last pass through | AXI4-Stream in and out, one register stage |
| `maxi_example` | `a[i] += 1` for 50 words: one read burst, local buffer, one write burst | AXI4 master; `ap_*` and the address `a` as ports |

`axilite_example` register map:

| address | register |
|---|---|
| 0x00 | control: bit 0 start, bit 1 done (clear on read), bit 2 idle, bit 3 ready |
| 0x04 | global interrupt enable |
| 0x08 | IP interrupt enable |
| 0x0c | IP interrupt status (write 1 toggles) |
| 0x10 | a |
| 0x14 | b |

## Top level (`bf_top`)

`bf_top` wires the chain together and brings out everything that lives
outside the FPGA logic:

- `net_rx_*` / `net_tx_*`: the streams to and from the 100G network stack,
  with `tkeep`
- `hbm_*`: the reorder kernel's memory port
- `wt_*`: weight loading
- `flush`
- status counters: `rx_*`, `ro_*`, `tx_pkts`

The tutorial kernels appear under the prefixes `gcd_`, `lite_`, `axs_a_` /
`axs_b_` and `mx_`.

The top parameters are `NCHANNEL`, `NELEMENT` and `NBEAM` (32 each),
`PKT_WORDS` (64), `NSLOT` (4) and `SHIFT` (8).

`NELEMENT` and `NBEAM` must stay at 32, the number of lanes in a word.
`NCHANNEL`, `PKT_WORDS` and `NSLOT` must be powers of two.

Everything runs on one clock with a synchronous active-low reset (`rst_n`),
except the GCD kernel, which has its own `ap_rst`.

## How far this follows the original HLS design

**Taken from it:**

- the kernel chain and the data orders at each stage
- the 512-bit stream with a 128-bit side channel
- 8-bit complex samples
- 32 channels, elements and beams
- the SPEAD header's fixed bytes and first four items
- one channel and one element (or beam) per packet
- buffering by time × (channel, element) in HBM, to solve packet
  synchronisation and loss
- the tutorial kernels' behaviour and the AXI4-Lite register map

**Chosen here, where the original says nothing:**

- the bit layout of samples and side channel
- the item ids after the fourth
- the 64-word payload, chosen to match the reorder kernel's 64-cycle
  interval
- the number of slots
- the release, loss, late and duplicate rules
- the ping-pong corner turns
- the beamformer's output scaling and saturation
- the memory and weight ports

**Different from it:**

- **Latencies.** The HLS kernels report these latencies, against this RTL:

  | kernel | HLS latency | this RTL |
  |---|---|---|
  | SPEAD | 2 cycles | 1 |
  | corner turner | 3 cycles | 2-cycle read pipeline |
  | beamformer | 82 cycles | 4 |
  | reorder | 276 cycles | depends on frame completion |

  The intervals match: one word per cycle, and 64 cycles per packet in the
  reorder kernel.
- **Weight storage.** In the original design the weights live in HBM,
  loaded by the host over PCIe. Here the beamformer holds them on chip and
  takes them through a write port. A small loader would connect the two.
- **Kernel control.** The reorder kernel has a simple request/ready memory
  port instead of an AXI4 master. The kernels have no AXI4-Lite control
  registers; they run freely on their streams.
- **Clocks.** One clock for everything. The original targets 4 ns for most
  kernels and 5 ns for the reorder kernel.
- **Scale.** 128 elements, the size planned for the full instrument, is not
  supported. It would need more than one word per time sample in the corner
  turner and the beamformer.
- **Other parts.** The network stack, HBM controller, PCIe and host software
  are not part of this RTL.

Nothing here has been placed and routed. The 4 ns and 5 ns figures are the
original design's targets, not timing results for this RTL. The beamformer's
1024 multipliers are written as plain `*`. How they map onto DSP slices is
left to synthesis.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares outputs
with values computed independently in the testbench, and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_complex_mult` | random and extreme operands; hold while `en` is low |
| `tb_gcd` | 105,77 → 7 and random pairs against Euclid's remainder form; handshake pulses; one cycle per subtraction step plus two |
| `tb_axilite_example` | a driver-style run (write a, b, start, poll done, read a + 2b); idle, done clear-on-read, interrupt enables, status toggle, byte strobes, address and data in either order |
| `tb_axis_example` | random stream with gaps and back-pressure; data, keep, strobe, last and order; one word per cycle |
| `tb_maxi_example` | exactly the 50 words at the given address incremented and nothing around them changed, for several addresses, against a memory with random gaps (`tb/axi4_mem_model.sv`) |
| `tb_spead_recv` | payload words and side channel of random packets with gaps and back-pressure; bad and truncated headers dropped; interval 1 and latency 1 |
| `tb_spead_send` | byte-exact packets against a reference builder (`tb/spead_tb_pkg.sv`) |
| `tb_corner_turner`, `tb_corner_turner2` | transposes of random blocks, side channel and tlast, with gaps and back-pressure; back-to-back blocks at one word per cycle |
| `tb_beamformer` | every beam against an integer model, plain and saturating cases; latency 4 and interval 1; gaps and back-pressure |
| `tb_reorder` | shuffled, lost, late, duplicate and out-of-range packets; forced release; flush; memory stalls (uses `tb/hbm_model.sv`) |
| `tb_bf_top` | end to end, see below |
| `tb_bf_top_full` | full size, see below |

**`tb_bf_top`** runs end to end at reduced size (2 channels, 2-word packets,
32 elements and beams) over seven time frames. It compares every output
SPEAD packet byte for byte with a reference beamformer. It also counts how
often each mechanism happens, and fails if any never does:

- out-of-order arrival
- lost packet
- overflow stall
- forced release
- late packet
- broken header
- flush
- memory stall
- network back-pressure

**`tb_bf_top_full`** runs with `bf_top` at its defaults. It sends one
complete frame of 1024 element packets in random order and checks all 1024
beam packets byte for byte. It also checks that they leave back to back:
1024 × 66 words in 67 584 cycles. It takes well under a minute to simulate.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bf_pkg.sv tb/spead_tb_pkg.sv tb/tb_bf_top.sv --top-module tb_bf_top -o sim
./obj_dir/sim
```

Replace `tb_bf_top` with any other testbench name. Packages must come first
on the command line. The remaining files are found through `-y`.

## Files

- `rtl/bf_pkg.sv`: shared types, SPEAD constants and helper functions
- `rtl/spead_recv.sv`, `rtl/reorder.sv`, `rtl/corner_turner.sv`,
  `rtl/beamformer.sv` (with `rtl/complex_mult.sv`), `rtl/corner_turner2.sv`,
  `rtl/spead_send.sv`: the beamformer chain
- `rtl/bf_top.sv`: the top level
- `rtl/gcd.sv`, `rtl/axilite_example.sv`, `rtl/axis_example.sv`,
  `rtl/maxi_example.sv`: the tutorial kernels
- `tb/hbm_model.sv`, `tb/axi4_mem_model.sv`: behavioural memory models,
  for simulation only
- `tb/spead_tb_pkg.sv`: SPEAD packet builder for the testbenches
