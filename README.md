# DVCpro interface for a two-link digital radio camera

A radio camera must get compressed video over a radio link with very little
delay. This design uses a DVCpro25 intra-frame codec, which has about 2.5 frames
of coding delay, and sends its compressed data over two DVB-T channels. Each
channel carries about 18 Mbit/s. That is too little for the DVCpro stream on
its own but enough when the stream is split over the two.

The RTL is the FPGA logic of an interface card that sits between the codec and
the DVB-T equipment:

- **Coder side:** takes the codec's 4-bit compressed bus, drops what the link
  does not need, and cuts the rest into 188-byte transport packets. The packets
  go alternately to two modulators.
- **Decoder side:** takes the packets from two receivers, which arrive with
  different delays. It puts them back in order, rebuilds the nibble stream the
  codec expects, checks it, and recovers the 27 MHz clock.

Both sides are in the top module `dvcpro_interface` and share only clock and
reset. Its ports are prefixed `c_` for the coder and `d_` for the decoder.
On a real card only one side is loaded. A third group of ports, `t_`, carries
the proposed time-interleaving error protection, which stands apart from both.

## The codec's data bus and the DVCpro counters

The codec delivers its data as nibbles on `BUS[3:0]`, together with three
markers:

- SSP marks the start of a sector;
- SMP marks the start of a block;
- FRP18 marks the start of a frame.

The data is laid out like this:

- A frame is 12 sectors.
- A sector is 28 groups of 6 blocks, plus idle clocks.
- A block is 80 data bytes followed by 8 padding bytes, that is 160 data
  nibbles and then 16 padding nibbles.

Every decision in the design depends on knowing where a nibble sits.
`dvcpro_counters` keeps that position as a `dv_pos_t` struct: sector, group,
block and nibble.

- SSP moves the sector on. FRP18 sets it back to 0.
- The first SMP after an SSP is group 0, block 0. Each later SMP moves the
  block on, and the group after every sixth block.
- The nibble counter runs 0..175 inside a block and stops at 176 (idle)
  outside one.

The codec's bus runs on its own 18 MHz clock. This design runs on one 27 MHz
clock and takes the bus as a strobe `bus_en` (one nibble slot per strobe),
with SMP/SSP/FRP18 qualified by it. Putting a real 18 MHz bus onto that strobe
needs a synchroniser outside these modules.

## Data rate options (multiplexing mode)

The 3-bit mode field picks how much of each sector is sent. The rule is the
function `keep_nibble()` in `dvcpro_pkg`, which both the coder and the decoder
use.

| mode | rate | nibbles kept | bytes per sector |
|---|---|---|---|
| 0 | 32.256 Mbit/s | all 160 data nibbles of all 168 blocks | 13440 |
| 1 | 28.8 Mbit/s | as 0, without the 18 dummy blocks | 12000 |
| 2 | 27.072 Mbit/s | as 1, without the 9 audio blocks | 11280 |
| 3 | 24.948 Mbit/s | video blocks only, without their first 3 bytes | 10395 |

The block map is this design's own reading of the 6+135+9+18 block count:

- Group 0 is the header group.
- In groups 1..27, blocks 0..4 are video.
- Block 5 is audio in groups 1, 4, 7, ..., 25, and a dummy block otherwise.

If the real codec places its audio or dummy blocks differently, change
`block_class()`.

## Packets

A packet is 188 bytes:

| byte | contents |
|---|---|
| 0 | 0x47 |
| 1–3 | 0x00 |
| 4 | {dummy flag, 7-bit packet address} |
| 5 | {5-bit sector address, 3-bit mode} |
| 6..187 | 182 payload bytes |

The packet address starts at 0 in every sector. A sector's data fills whole
packets. Its last packet also carries the CRC-CCITT of the sector's data:
generator 0x1021, start value 0, MSB first, high byte first. The rest of that
packet is zeros. In mode 0 a sector takes 74 packets.

The FIFOs store only the 182 payload bytes and a 15-bit tag (`pkt_tag_t`: mode,
sector, address). The packet reader rebuilds the 6 header bytes as it sends.

## Coder chain (`dvcpro_coder`)

Each stage hands the data to the next:

1. `dvcpro_counters` finds each nibble's position.
2. `rate_reducer` keeps the nibbles of the current mode and packs them in
   pairs, upper nibble first, into bytes. At each SSP it reports the end of the
   previous sector, with that sector's number and mode.
3. `crc16_ccitt` runs over those bytes. It is cleared at each sector end.
4. `packet_writer` fills a FIFO slot 182 bytes at a time.
   - At a sector end it latches the CRC, appends its two bytes and commits the
     slot short.
   - If the FIFO is full, the packet is dropped and `overflow` pulses.
5. `packet_fifo` holds 3 slots. This is the depth the original hardware turned
   out to need, because the last packet of a sector is short and the data comes
   in bursts. It also reports `pkts_waiting` and its maximum since reset.
6. `packet_clock` ticks every 1122 cycles (27 MHz / 24.064 kHz).
7. `packet_reader` sends one packet per tick, at one byte per cycle. If no
   packet is waiting it sends a dummy packet: flag set, zero payload.
8. `packet_demux` sends alternate packets to the two outputs, so each link
   carries 12.032 kHz.

On the video side:

- `input_switch` picks the LVDS bytes or the descrambled SDI words for the
  codec's MAIN bus. `sdi_descrambler` undoes x^9+x^4+1 scrambling and NRZI on
  10-bit words.
- `frp27_generator` makes the codec's frame pulse. After FF 00 00 it copies
  bit 6 (F) of the TRS word.
- `aes_rx_config` shifts one configuration word into the audio receiver after
  reset.

## Decoder: putting two links back together (`dvcpro_decoder`)

This is the least obvious part of the design.

**Storing packets.** Each link has a `packet_header_decoder`:

- It locks on a 0x47 byte and drops lock if a packet start is not 0x47.
- It skips dummy packets.
- It writes each valid payload, with its tag, into that link's `packet_fifo`.

**Reading packets in order.** The `read_controller` knows which packet it
wants next: (sector S, address 0), then (S, 1), and so on. It takes that
packet from whichever FIFO has it at its head.

- **Missing packet:** if the wanted packet is in neither FIFO, it reports "no
  data". `skew_wait` pulses when the wanted packet is late but a later one is
  already waiting.
- **Unusable packet:** a head packet it can never use is thrown away, and
  `stale` pulses. This covers an earlier address of the current sector, or a
  sector that is neither the current one nor the next.

**Rebuilding the nibble stream.** `dvcpro_framer` runs along the decoder's own
`dvcpro_counters`, which follow the codec's strobes.

- For each slot that the mode keeps, it sends the next nibble from the read
  controller. For each slot the mode drops, it sends 0.
- If a byte is needed but has not arrived, it sends 0 and pulses `underflow`.
- At the next SSP it:
  1. pulls the two CRC bytes into the checker and reports `crc_ok` or
     `crc_err` (the card's indicator);
  2. skips the padding;
  3. tells the read controller which sector comes next.

  The codec's lead-in before the first block leaves room for these three
  cycles.
- `bus_out` is valid two cycles after the codec's strobe.

The mode comes from the packet headers. After a change of mode, the first
packet of the new sector must arrive before the codec reaches the first nibble
that the old mode would have kept. Otherwise that sector is lost: it gets fill
data and fails its CRC. Latency is set by how far the decoder's codec timing
lags the received data.

- **Lag too small:** the framer underflows.
- **Lag too large:** the 3-slot FIFOs overflow.

The end-to-end test runs with a lag of 6500 cycles and a link skew of 1250
cycles. In this model both fitted: smaller lags underflowed and larger ones
overflowed.

## Clock recovery

`packet_clock_detector` gives one pulse for each accepted sync byte of link 0.
It drops `present` after 4 packet periods with no sync byte.

`phase_detector` is a three-state phase/frequency detector. It compares that
pulse with the VCXO clock divided by 2244 (12.032 kHz), which is
`packet_clock` reused as the divider.

- `up` is high from a reference pulse to the next divider pulse.
- `down` is high the other way round.

The loop filter and VCXO are outside the FPGA.

## Decoder video: TRS generator and SDI scrambler

The codec's decoded video has no timing words, so `trs_generator` adds them.

- **Counters:** a rising FRP27 loads the sample counter with 552 and the line
  counter with 0. After that the counters run 0..1727 and 0..624.
- **TRS words:** EAV goes at samples 1440..1443 and SAV at 1724..1727. The XY
  word is built from F, V and H with its four protection bits, using the
  625-line F/V ranges of ITU-R BT.656.
- **Pipeline:** three register stages (decode, XY multiplexer, FF/00
  multiplexer). The output is the 8-bit video widened to 10 bits.

`sdi_scrambler` then applies x^9+x^4+1 scrambling and NRZI, least significant
bit first.

The decoder's FRP27 is a one-cycle pulse at a chosen counter position in
sector 0. The parameters are `FRP_GROUP`, `FRP_BLOCK` and `FRP_NIBBLE`, all 0
by default. The right phase depends on the codec and must be found on the
bench.

## Proposed error protection: RS coding and time interleaving

Flat fading while the camera moves wipes out runs of consecutive bytes. The
proposed fix, not used by the present coder and decoder, has two parts:

- **`rs_encoder`** adds 46 parity bytes to each 141-byte packet. The result is
  a 187-byte RS(187,141) codeword that can lose up to 23 bytes and still be
  repaired.
  - It works as a 46-stage byte LFSR over GF(256).
  - The generator polynomial is worked out at elaboration by a constant
    function.
  - No field polynomial is specified, so the DVB-T one is used:
    x^8+x^4+x^3+x^2+1, with roots a^0..a^45.
- **`time_interleaver`** writes N = 748 coded packets into the rows of a
  memory and reads them out by columns. With `DEINT = 1` it writes by columns
  and reads by rows, which undoes the interleaving.
  - The memory has two banks, so one block is written while the other is
    read.
  - Since 748 = 4 x 187, each column fills four transmitted packets exactly.
    The sync byte is added when the transport packet is formed.

A burst of B bad bytes on the link becomes at most ceil(B/748) bad bytes per
packet after de-interleaving. The end-to-end test sends a 2000-byte burst.
After de-interleaving, no packet has more than 3 bad bytes, and every clean
packet passes all 46 syndrome checks.

The cost is delay: about two blocks of 61.4 ms each.

## Where this RTL departs from the original card or fills gaps

- **Clocking:** one clock with a nibble strobe instead of the codec's separate
  18 MHz bus clock.
- **Audio and framing data:** audio, header and framing data that a reduced
  mode drops are refilled with zeros, not regenerated.
- **Derived constants:** the block map, the bit order inside header bytes 4
  and 5, the dummy packet contents and the read-order rules are this design's
  choices.
- **SDI and TRS:** polynomials, TRS positions and the F/V line ranges come from
  the SDI and BT.656 standards.
- **AES configuration:** the AES receiver's word (0x0015, 16 bits, clk/16
  serial clock) is a placeholder for the actual device.
- **Packet bursts:** packets leave as 188-byte bursts at 27 MHz. Adapting to
  the modulator's byte clock is left to the link interface.
- **Error protection:** the RS encoder and the time interleaver stand on
  their own.
  - The depth is a build parameter, not the variable depth that was
    preferred.
  - Not built: the RS decoder (a bought-in core on the original plan) and the
    141-byte packet format that would feed the encoder.
- **Also not built:** the equal-length packet strategy for 2-deep FIFOs, and
  error concealment.

## Files and simulation

- `rtl/dvcpro_pkg.sv` holds the shared constants, types and the keep rule.
- Every other file in `rtl/` holds one module.
- Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
  prints `TB_RESULT checks=N failures=M`.
- `tb/dvcpro_codec_model.sv` is a behavioural model of the codec's bus timing:
  one nibble every 3 cycles, and 29664 nibbles per sector (8 lead-in, 168 × 176,
  88 tail). Its nibble values are a hash of the position, so checkers can
  recompute them.
- `tb/tb_dvcpro_interface.sv` is the end-to-end test at default parameters. It
  runs two frames with mode changes, a corrupted byte on link 1, a link skew,
  and a switch of the video input from LVDS to SDI. Beside these, it runs
  three full 748-packet blocks through the error-protection path. It counts
  each mechanism.

To run a testbench:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_dvcpro_interface \
  -y rtl -y tb +libext+.sv -Irtl rtl/dvcpro_pkg.sv tb/tb_dvcpro_interface.sv
./obj_dir/Vtb_dvcpro_interface
```

Change the top module and the testbench file to run any other testbench. The
end-to-end test takes about 10 s; the block tests take a few seconds each.
