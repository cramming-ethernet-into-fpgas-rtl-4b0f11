# A lightweight serial link for directly wired FPGA arrays

Large radio-astronomy correlators and beamformers spread their work over
hundreds of FPGAs, and every FPGA has to exchange data with many others at
hundreds of Gb/s. Doing that over standard 25G Ethernet needs a large switch
fabric and a full Ethernet MAC/PCS per lane, most of which exists only for
backwards compatibility (preambles, inter-packet gaps, MAC addresses,
byte-granular lengths, checksums in headers).

This design keeps only what a point-to-point, continuously running optical
lane inside one instrument needs:

* the 25G Ethernet physical coding (64b/66b blocks and the self-synchronising
  scrambler 1 + x^39 + x^58), so the FPGA transceivers and optics work as
  they are;
* a framing in which everything is a 64-bit word. A packet is a header
  control word, any number of 64-bit data words, and a trailer control word
  carrying a CRC-32. The trailer of one packet and the header of the next
  can share one word, so back-to-back packets cost one 8-byte word each;
* idle words that can appear anywhere, also inside a packet, so a source
  never has to buffer a whole packet; the idle words carry a programmable
  pattern that identifies the sending lane and doubles as a bit-error test
  pattern.

FPGAs are wired to each other directly (for example as a 6 x 8 x 6 array in
which each FPGA talks to the FPGAs that share two of its three coordinates),
and the top level here, `serial_interconnect`, is the set of link end points
of one FPGA: 29 by default.

## The 64-bit word and the control words

Every clock one 64-bit word crosses each lane, as one 66-bit block. Bits
[1:0] of the block are the sync header: `01` for a data word, `10` for a
control word (`00` and `11` never occur on a clean line). Bits [65:2] are
the scrambled word. Byte *i* of a word is bits [8i+7:8i].

A control word is laid out so that a trailer and a header fit side by side:

| bits  | 63 | 62 | 61 .. 40         | 39 .. 32 | 31 .. 0          |
|-------|----|----|------------------|----------|------------------|
| field | H  | T  | header (22 bits) | zero     | CRC-32 of packet |

Bytes 5..7 are the header half, bytes 0..4 the trailer half.

| {H,T} | meaning                                                          |
|-------|------------------------------------------------------------------|
| 00    | idle: bits [61:0] are the lane's idle pattern                      |
| 10    | header: a packet starts, bits [61:40] are its header               |
| 01    | trailer: the open packet ends, bits [31:0] its CRC                 |
| 11    | trailer of the open packet *and* header of the next one            |

The CRC is the usual CRC-32 (reflected polynomial 0xEDB88320, start value
and final inversion all ones) over the packet's data bytes, byte 0 of each
word first; the CRC of a packet without data is 0x00000000.

Example: two packets back to back, the first with two data words, the second
with one, then a packet with no data, with collapsing on:

    HDR(A)  a0  a1  HT(A|B)  b0  HT(B|C)  TRL(C)  IDLE  IDLE ...

With collapsing off (`cfg_collapse = 0`) every packet gets its own header
and trailer:

    HDR(A)  a0  a1  TRL(A)  HDR(B)  b0  TRL(B)  HDR(C)  TRL(C)  IDLE ...

With idle separation on (`cfg_idle_sep = 1`) an idle word follows every
trailer, even when the next packet is waiting, and nothing is collapsed. This
costs one more word per packet, but a damaged sync header next to an idle
word can then be repaired:

    HDR(A)  a0  a1  TRL(A)  IDLE  HDR(B)  b0  TRL(B)  IDLE  HDR(C)  TRL(C)  IDLE ...

Idle words may also sit between two data words of a packet. Packets have no
length limit. The smallest packet is a header and a trailer only.

## Transmit path

`mac_tx` takes packets as a valid/ready stream of 64-bit beats (`s_sop`,
`s_eop`, a 22-bit header with the first beat; a packet without data is one
beat with `s_sop`, `s_eop` and `s_empty`). It emits one word per clock:

* on the first beat of a packet it sends the header word and keeps the beat
  waiting (`s_ready` low) for one clock;
* each beat is then sent as a data word while the CRC is updated;
* after the last beat a trailer is owed. In the next clock, if the next
  packet's first beat is already offered and collapsing is on, a `11` word
  carries both; otherwise a plain trailer goes out;
* whenever nothing is offered, an idle word is sent (`ev_gap` marks idle
  words inside a packet).

So a stream of back-to-back packets of L words uses L + 1 clocks per packet.
`s_ready` is combinational from the framer state and the beat markers.

`pcs_tx` scrambles the word and prefixes the sync header. The scrambler keeps
the last 58 *output* bits; output bit = input bit XOR the outputs 39 and 58
bits earlier, 64 bits per clock, bit 0 first. Its history resets to all ones
(see "Design choices").

## Receive path

`pcs_rx` = `block_aligner` + `descrambler`.

**Block alignment.** The transceiver delivers 66 bits per clock with unknown
rotation. The aligner keeps the previous word and picks 66 bits at an offset
from the concatenation. While unlocked, every invalid sync header moves the
offset by one bit (`slip_pulse`); `LOCK_COUNT` (64) valid headers in a row
give lock. While locked, headers are counted in windows of `WINDOW` (64);
`BAD_LIMIT` (16) invalid ones in one window drop lock. Words are passed on
only while locked.

**Descrambling.** The descrambler keeps the last 58 *received* bits, so it is
in step with the transmitter after 58 bits whatever either side started
with. The price is error multiplication: one wrong bit on the line gives
three wrong bits out, at its own position and 39 and 58 bits later.

**Deframing.** `mac_rx` turns words back into packets. It cannot know that a
data word is the last one until the trailer arrives, so it holds the newest
data word back until the next data word or the trailer. The output stream
has no back-pressure (a lane never stops); `rx_crc_err` is set on the last
beat of a packet whose CRC does not match.

**Sync header repair.** A single line error in a sync header makes it `00`
or `11`. Such a word is classified from context: if its payload is exactly
the expected idle word it is idle; otherwise inside a packet it is data, and
outside a packet it is a control word (only idle and header words are legal
there). A damaged trailer inside a packet would be misread as data, which is
why idle words are better placed between packets than inside them.
`ev_rx_sh_fix` counts repairs.

**Protocol errors.** A header while a packet is open, or loss of lock,
ends the open packet with `rx_crc_err` set; data outside a packet and a
trailer with no open packet are dropped. `ev_rx_proto_err` pulses for each.

## Link monitoring with idle words

Each lane sends its own idle pattern (`cfg_tx_idle`, 62 bits, e.g. FPGA and
port number), and each receiver is told what its far end should send
(`cfg_rx_idle_expect`). `link_monitor` then provides:

* `rx_idle`, the last pattern received, and `id_match`;
* `miswired`, set after `MISWIRE_COUNT` (8) identical unexpected idle words
  in a row, cleared by an expected one: a swapped fibre or a wrongly
  configured far end;
* `bit_err_count` (bits that differ from the expected idle word, plus one per
  damaged sync header) and `idle_count`, giving an error-rate estimate of
  roughly `bit_err_count / (64 * idle_count)`. Because of error
  multiplication this counts about three errors per line error;
* `lock_loss_count`. All counters saturate; `mon_clear` zeroes them.

## Sizes, rates and the top level

`serial_interconnect` holds `NUM_LINKS` independent `serial_link` instances
(each: `mac_tx`, `pcs_tx`, `pcs_rx`, `mac_rx`, `link_monitor`) and brings
every link's ports out as arrays indexed by link. Packet routing between
links and the transceivers are outside it: `pma_tx_word`/`pma_rx_word` are
the 66-bit parallel transceiver interfaces.

* `NUM_LINKS = 29`: one FPGA with 10 duplex links to a first processing stage
  and 19 links to its peers. In the 6 x 8 x 6 array each FPGA has
  5 + 7 + 5 = 17 links plus 3 loop-backs, i.e. `NUM_LINKS = 20`.
* One word per clock per lane: at 25.78125 Gbaud with 64b/66b coding the word
  clock is 390.625 MHz and a lane carries 25 Gb/s of words. With L-word
  packets back to back, L/(L + 1) of that is packet data, so 17 lanes carry
  425 x L/(L + 1) Gb/s: 400 Gb/s from L = 16 (128-byte packets) upward.
* Latency: transmit, two register stages (framer, scrambler) from the
  clock edge that accepts a beat to its block on `pma_tx_word`; receive,
  three register stages (aligner, descrambler, deframer) from a block on
  `pma_rx_word` to the beat it releases on `rx_*`. A data beat is released
  by the next data or trailer word, so it also waits for that word.
* Yosys's generic synthesis gives about 1480 word-level cells and 966
  flip-flop bits per link (the CRC and counters dominate); these are not
  vendor LUT/ALM figures.

All links and both directions run on one clock, `clk`.

## Design choices not fixed by the framing itself

The word-level framing (64-bit unit, the four control-word kinds, collapsing,
idle words anywhere, custom idle patterns used for link identification and
error-rate monitoring, the 25G Ethernet 64b/66b coding and scrambler) is the
published scheme. The following are this implementation's own choices:

* positions of the H and T flags (bits 63 and 62) and hence a 22-bit header;
  the trailer half is bytes 0..4 and the header half bytes 5..7;
* the trailer content (CRC-32 in bits [31:0], bits [39:32] zero) and the
  CRC variant;
* sync header values `01`/`10` and bit order, taken from 10G/25G Ethernet;
* the block-lock rule and its numbers (as in 10G/25G Ethernet);
* the sync-header repair rule, the error handling, the monitor's counting and
  miswire rule, the beat interface with `s_empty`, and the `cfg_collapse`
  and `cfg_idle_sep` switches (the source only says idle words between
  packets are preferred);
* the scrambler history resets to all ones. With a zero history an all-zero
  idle pattern would be sent as an all-zero line signal apart from the sync
  headers, on which the aligner can lock one bit off (the pattern `01 0...0`
  has a second valid-looking header position);
* a single clock for transmit and receive, with no rate matching between a
  recovered receive clock and the local clock;
* every link is full duplex. A link used in one direction only (the simplex
  peer links) simply leaves one half idle; a transmit-only or receive-only
  variant is not provided;
* packet forwarding between links (so that any FPGA of the array reaches any
  other in two or three hops) is not part of this RTL: the per-link packet
  streams are ports of the top level.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Reference models
(`tb/tb_ref_pkg.sv`) are written bit by bit or byte by byte, separately from
the parallel RTL.

| testbench | what it shows |
|-----------|---------------|
| `tb_scrambler`, `tb_descrambler` | known impulse response; bit-exact match with a serial model; self-synchronisation from an unknown state; one line error gives exactly three output errors at +0, +39, +58 |
| `tb_block_aligner` | lock from a random rotation, in-order blocks, 15 bad headers tolerated, a burst drops lock, relock |
| `tb_pcs_tx`, `tb_pcs_rx` | sync values, scrambled payload, no output before lock, words and damaged headers after alignment |
| `tb_mac_tx` | CRC known answer ("12345678" gives 0x9AE0DAAF), exact word sequences with collapsing, without it and with idle separation, the L + 1 clocks per packet rate, random traffic parsed by an independent decoder |
| `tb_mac_rx` | random traffic with idles inside packets, collapsed words, bad CRCs and damaged sync headers; stray data, header inside a packet, loss of lock |
| `tb_link_monitor` | error and idle counts, identity, miswire timing, clear, saturation |
| `tb_serial_link` | loop-back through a bit-level channel model with rotation and injected errors; every packet, CRC errors exactly where data was damaged, idle words between separated packets, line rate 4 beats in 5 clocks |
| `tb_serial_interconnect` | all 29 links at default parameters: two cross-wired lanes reported as miswired, one lane driven out of lock and back, one with injected errors; counts that every mechanism (slip, lock loss, collapse, idle separation, gaps, empty packets, sync repair, CRC error, idle bit errors, miswire) happened |
| `tb_workload_low_cbf` | 20 links (17 + 3 loop-back) streaming 128-byte packets: 16 beats per 17 clocks per link, 400 Gb/s of packet data over the 17 neighbour links |

Simulate one with Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/link_pkg.sv tb/tb_ref_pkg.sv tb/tb_serial_interconnect.sv \
        --top-module tb_serial_interconnect
    ./obj_dir/Vtb_serial_interconnect

Every testbench finishes in well under a second of simulation time on a
desktop machine. The simulator must start with all registers in reset (the
designs reset every register they read).

## Files

* `rtl/link_pkg.sv`: word and block types, flag encoding, scrambler taps,
  CRC function, control-word builders.
* `rtl/scrambler.sv`, `rtl/descrambler.sv`, `rtl/block_aligner.sv`,
  `rtl/pcs_tx.sv`, `rtl/pcs_rx.sv`: the 64b/66b layer.
* `rtl/mac_tx.sv`, `rtl/mac_rx.sv`: framing and deframing.
* `rtl/link_monitor.sv`: identity and error-rate monitor.
* `rtl/serial_link.sv`: one link end point.
* `rtl/serial_interconnect.sv`: top level, `NUM_LINKS` end points.
* `tb/`: testbenches and the reference package.
