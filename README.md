# Direct Receiving Card for a SPOT image ground station

A low-cost SPOT satellite receiving station can be built from a PC, a SCSI RAID
and one small plug-in card, provided that the card does *nothing* but move
bits. Frame synchronisation, de-scrambling, image extraction and display all
run in host software, so supporting another satellite means changing software,
not hardware. This RTL is that card, the Direct Receiving Card (DRC): it takes
the demodulator's serial data and bit clock, packs the bits into 32-bit words,
queues them in a FIFO, interrupts the host when the FIFO is half full, and lets
the PCI chipset's DMA engine read the words out in blocks. The bit stream
reaches host memory exactly as it came off the cable, with no alignment and no
format conversion.

```
 demodulator                        DRC (this RTL: drc_top)                       host side
 ───────────        ┌────────────────────┐ 4 bit  ┌──────────────┐ 32 bit ┌───────────┐ 32 bit
 sdata_i ──────────▶│ serial_to_parallel │──nib──▶│  fpga_logic  │──wen──▶│ drc_fifo  │──────────▶ lb_data_o
 sclk_i  ──────────▶│  (bit clk → /4)    │──nclk─▶│              │◀─full──│ 16K x 32  │
                    └────────────────────┘        │  lint, read  │◀─half──│           │
                                                  │  control     │──ren──▶│           │
 PCI chipset local bus:  lb_rd_i ────────────────▶│              │        └───────────┘
                         lb_ready_o, lint_o ◀─────│              │
                                                  └──────────────┘
```

In the real card the serial-to-parallel stage is ECL gate logic behind a BNC
connector and a line receiver, followed by ECL-to-TTL level shifters; those
analog parts, the commercial PCI chipset and the host are not part of the RTL.

## Clock domains

There are two clocks and one crossing:

| domain | clock | source | logic |
|---|---|---|---|
| bit | `sclk_i` | demodulator | shift register in `serial_to_parallel` |
| nibble | `nclk` = `sclk_i`/4 | register in `serial_to_parallel` | word assembly in `fpga_logic`, FIFO write side |
| local bus | `lclk_i` | PCI chipset | interrupt and read control in `fpga_logic`, FIFO read side |

The bit and nibble domains are related (the nibble clock is a divided-down
register output), so only the FIFO crosses clock domains. It does so with
Gray-coded pointers and two-flop synchronisers in each direction; nothing else
in the design passes a signal between `nclk` and `lclk_i`.

One asynchronous active-low reset, `rst_n_i`, resets all three domains. The
nibble clock is held low during reset, so its flops are reset by the reset
level, not by a clock edge.

## Receiver: bits to nibbles

`serial_to_parallel` samples `sdata_i` on each rising edge of `sclk_i`. After
every fourth bit, it loads the nibble into `nib_o`, with the first bit of the four in bit 3.
The nibble clock is a flop that falls on the edge that loads a new nibble and
rises two bit periods later. The nibble is therefore stable for two bit periods
on each side of the edge the FPGA logic samples. After reset, the nibble clock
stays low until the first complete nibble exists. Every rising edge therefore
carries real data: the k-th rising edge (k from 0) comes on bit-clock edge
4k+6 after reset.

Dividing the clock by four is the reason this stage exists. The line rate only
has to be handled by four flops, and the FPGA logic behind it runs at a quarter
of the frequency.

## Word assembly and FIFO writes

`fpga_logic` shifts eight nibbles into a 32-bit word, first nibble into bits
31:28, and on the next nibble clock raises `fifo_wen_o` for one cycle with the
word on `fifo_wdata_o`. Combined with the receiver, this means the first bit
sampled after reset lands in bit 31 of the first word and the stream fills
words MSB-first, in order. There is no frame alignment. SPOT telemetry frames
are 74256 bits long, which is 2320.5 words, so successive frames start
alternately on word and half-word boundaries. Finding them is the host's job.

If the FIFO is full when a word is written, the word is lost and the sticky
`overflow_o` flag is set. Only reset clears it. The card has no other way of
stopping the stream: the demodulator cannot be held off.

## FIFO, half-full flag and the interrupt

This part sets how the host interacts with the card. The FIFO (`drc_fifo`, 16K × 32
by default) has three flags:

* `full_o`, in the write domain. It is pessimistic: it clears two write clocks
  after a read makes room.
* `empty_o` and `half_full_o`, in the read (local-bus) domain, computed from the
  synchronised write pointer. They lag writes by two read clocks. They never
  report more words than are really stored.

Computing the half-full flag on the read side is the design's key choice.
When the host sees the interrupt, it is guaranteed that DEPTH/2 words can be
read without the FIFO running empty. A flag computed on the write side could
over-report by the words in flight across the synchroniser.

`lint_o` is the half-full flag, registered once in `lclk_i`. It is a level: it
stays high while the FIFO holds at least DEPTH/2 words, and falls when reads
bring it below. The host protocol that matches it is:

1. wait for `lint_o`;
2. DMA-read DEPTH/2 words (8192 at the default size);
3. go back to 1.

If the host was slow and the FIFO refilled past half during the burst, the
interrupt is still high afterwards and the next block follows immediately.
While the host services one interrupt, the other half of the FIFO is its margin.
At 25 Mbit/s that is 8192 words × 1.28 µs = 10.5 ms before `overflow_o` is set.

## Local-bus read handshake

The PCI chipset's DMA engine reads the FIFO through a request/ready pair.
The FIFO's data output goes straight to the chipset (`lb_data_o`); the FPGA
logic only controls the read strobe.

```
lclk_i      _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
lb_rd_i     __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____      held until served
fifo_ren    ____/‾‾‾\_______/‾‾‾\_______      rd & !empty & !ready
lb_ready_o  ________/‾‾‾\_______/‾‾‾\___      word k on lb_data_o
transfer            ^ k         ^ k+1         edge with rd & ready
```

* The chipset raises `lb_rd_i` and keeps it high until a rising edge at which
  `lb_ready_o` is also high. That edge transfers one word. An assertion in
  `fpga_logic` checks that a request is not dropped before it is served.
* The FIFO is read in a cycle where `lb_rd_i` is high, the FIFO is not empty
  and no ready is being given. `lb_ready_o` follows one cycle later.
* If `lb_rd_i` is held high, a burst moves one word every two local-bus
  clocks: 16.7 Mwords/s (66 MB/s) at 33 MHz, against the 0.78 Mwords/s of a
  25 Mbit/s stream.
* A request made while the FIFO is empty simply waits, with no ready and no
  error, until a word arrives.

## Parameters and sizes

| parameter | default | where | origin |
|---|---|---|---|
| `NIB_W` | 4 | `drc_pkg` | receiver output width of the card |
| `WORD_W` | 32 | `drc_pkg` | FIFO and PCI data width of the card |
| `FIFO_DEPTH` / `DEPTH` | 16384 | `drc_top` / `drc_fifo` | this design's choice. The card's FIFO is only described as high-density. Must be a power of two, at least 4. |

At the default size, synthesis gives about 200 flip-flops and one
524288-bit memory. Nearly all of it is the FIFO.

## Where this RTL goes beyond or departs from the original card

The card is described at block level: the four blocks, the 4-bit and 32-bit
widths, the half-full interrupt and the four duties of the FPGA logic. The
following details are this design's own:

* **Bit and nibble order.** MSB-first throughout.
* **Nibble clock phase.** The nibble clock is delayed until the first nibble exists.
* **FIFO.** Depth 16K words. The FIFO is modelled as a dual-clock RAM with Gray pointers and a registered read port, not as a particular commercial part.
* **Half-full flag.** It is computed on the read side.
* **Interrupt.** It is a level, not a pulse.
* **Read handshake.** The request/ready protocol and its one-word-per-two-clocks rate stand in for the actual chipset's local-bus protocol.
* **Overflow.** The flag and the "drop the new word" policy are additions. The original only requires the host to keep up.
* **Reset.** There is a single asynchronous reset.
* **Receiver logic.** The ECL receiver logic is written as ordinary synchronous logic.

Not in the RTL: the BNC connector, the line receiver and the ECL-to-TTL
shifters (analog), the PCI chipset (a commercial part), and the host software.
The host software finds the 64-bit frame sync word, removes the 2047-bit
pseudo-noise scrambling, extracts the image data, sub-samples it for the
moving-window display, and archives the raw stream to RAID. In this system
all of that is deliberately software.

## Files

| file | contents |
|---|---|
| `rtl/drc_pkg.sv` | widths, default depth, `nibble_t`, `word_t` |
| `rtl/serial_to_parallel.sv` | receiver serial-to-parallel stage and nibble clock |
| `rtl/fpga_logic.sv` | word assembly, FIFO write, interrupt, read control |
| `rtl/drc_fifo.sv` | dual-clock FIFO with half-full flag |
| `rtl/drc_top.sv` | the card: the three blocks wired together |
| `tb/tb_serial_to_parallel.sv` | nibble contents and nibble-clock timing against recorded bits |
| `tb/tb_fpga_logic.sv` | word merge, write-strobe timing, overflow, read strobe, ready and interrupt timing |
| `tb/tb_drc_fifo.sv` | random dual-clock traffic at depth 16 against a queue model, with safe-side and settled flag checks |
| `tb/tb_drc_top.sv` | end to end at the default 16K depth, with a DMA host model |

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl rtl/drc_pkg.sv rtl/drc_top.sv tb/tb_drc_top.sv \
  --top-module tb_drc_top -Mdir obj_top
obj_top/Vtb_drc_top
```

Replace `drc_top` with the other module and testbench names to run the
block tests. The end-to-end test streams about 1.9 million bits, 26 telemetry
frames of 74256 bits each. It covers these cases:

* Four interrupt-driven DMA blocks. The fill level at each interrupt must be
  DEPTH/2 plus at most two words in flight, and no read may wait.
* One block started on a nearly empty FIFO, which must wait for data.
* A host that stops reading, which must set `overflow_o` and still leave the
  FIFO holding the right 16384 words.

Every word the host receives is compared with the bits the testbench drove. The
run takes a few seconds.

To change the FIFO size, set `FIFO_DEPTH` on `drc_top`. The testbenches derive
their burst sizes and fill-level checks from the package default, so change
`FIFO_DEPTH_DEFAULT` in `drc_pkg` to move both together.
