# Low-power WBAN baseband transceiver (TX and RX PHY)

This is the digital baseband of a short-range radio for wireless body area
networks (WBAN). Example uses are body-worn medical sensors that talk to a
hub over 1–5 m. The radio is a plain FSK modem at 2.45 GHz. The baseband sits
between the MAC layer and that modem, and is built to use as little power as
possible:

* The modem carries **250 kchip/s** with no I/Q processing.
* The clock is **4 MHz**, exactly 16 clocks per chip. The receiver needs no
  PLL or fractional timing.
* The signal path is **bit-serial** almost everywhere. The only wider data
  are the 8-bit codewords between the Hamming coder and the interleaver.
* Error protection is a cheap **(8,4) Hamming code plus an 8×4 block
  interleaver**.
* One piece of logic, the **synchronisation and data recovery (SDR)**
  block, handles bit timing, frame start and clock-drift tracking. It works
  from one over-sampling shift register.

The data rate scales with the clock, at 16 clocks per chip: a 100 MHz clock
gives 6.25 Mchip/s.

Everything is SystemVerilog-2017 RTL. `wban_transceiver` is the top.

## The frame on the air

```
 | preamble 32 chips | SFD 16 chips | coded PHR + PSDU (+pad), 32 chips per octet |
 | 1010...10         | 0x0B73, MSB  | Manchester( scramble( interleave( Hamming ))) |
 \_________ SHR: sent as raw chips _/
```

* **PHR**: one octet. Bits 6:0 hold the PSDU length (0–127 octets) and
  bit 7 is 0.
* **Pad**: the interleaver works on blocks of 2 octets (4 codewords). If
  PHR + PSDU has an odd number of octets, one zero octet is added. The
  receiver knows the length from the PHR and drops the pad.
* **Bit order**: octets are sent LSB first, in groups of 4 bits d0..d3.
* **Hamming (8,4)**: the codeword is `cw[3:0] = d`, `cw[4] = d0^d1^d3`,
  `cw[5] = d0^d2^d3`, `cw[6] = d1^d2^d3`, and `cw[7]` is the parity of
  `cw[6:0]`. The decoder corrects any single error and detects any double
  error.
* **Interleaver**: the 4 codewords of a block are the columns of an 8×4
  matrix, read out row by row. Output bit `i` of a block is bit `i/4` of
  codeword `i%4`. A burst of up to 4 consecutive bit errors therefore hits 4
  different codewords, and each of them can be corrected.
* **Scrambler**: the data is XORed with the PRBS of the LFSR x^7 + x^4 + 1,
  reseeded to all ones at the start of each packet. This removes long runs
  and periodic patterns from the data.
* **Manchester**: 0 is sent as chips `01` and 1 as chips `10`. Every bit has
  a transition in its middle, and the line has no DC content.

One PSDU octet costs 8 bits → 16 coded bits → 32 chips, which is 512 clocks.
A frame lasts `(48 + 32·octets)·16` clocks, where `octets` is PHR + PSDU
rounded up to an even number. The largest frame (127-octet PSDU) is 66 304
clocks, or 16.6 ms at 4 MHz.

## Transmitter (`tx_baseband`)

```
MAC -> TXFIFO -> Prefix MUX -> Hamming enc -> interleaver -> scrambler -> Manchester -+-> tx_chip
                     ^ PHR                                                           |
                 tx_ctrl (state control, chip timing) ------ SHR chips -------------+
```

* `byte_fifo` (TXFIFO): 128 octets, show-ahead.
* `tx_prefix_mux`: loads the PHR, the next TXFIFO octet or a pad octet, as
  `tx_ctrl` selects. It then shifts the octet out one bit at a time.
* `hamming_enc`: collects 4 bits and emits one 8-bit codeword.
* `interleaver`: 8×4 matrix. It fills with 4 codewords and then sends out
  32 bits.
* `scrambler`: a purely combinational XOR. Its LFSR steps on each handshake.
* `manchester_enc`: has a one-bit buffer and emits one chip per chip strobe.
* `tx_ctrl`: a divide-by-16 chip timer. It puts the SHR on the line and
  feeds octets to the Prefix MUX. After the last SHR chip it switches the
  output to the Manchester encoder, and at the end of the payload it pulses
  `done`.

The stages are joined by valid/ready pairs. The coding pipeline fills while
the SHR is being sent, then runs at the pace set by back-pressure from the
Manchester encoder. An interleaver block is refilled in about 20 clocks, and
each bit lasts 32 clocks, so the encoder never runs dry. An assertion in
`tx_ctrl` checks this.

MAC-side use:

1. Write the PSDU into TXFIFO (`tx_wr_en`, `tx_wdata`).
2. Pulse `tx_start` with `tx_psdu_len`.
3. `tx_chip` shows the first SHR chip one clock after `tx_start` and changes
   every 16 clocks after that.
4. `tx_busy` covers the whole frame. `tx_done` pulses one clock after the
   last chip, and the line then rests at 0.

## Receiver (`rx_baseband`)

```
rx_in -> SDR -> Manchester dec -> descrambler -> deinterleaver -> Hamming dec -> P2S -> rx_ctrl -> RXFIFO -> MAC
```

### Synchronisation and data recovery (`sdr`)

The input comes from the FSK demodulator. It is a binary level with no
timing information, and it arrives at 16 samples per chip. Two flip-flops
bring it into the clock domain. `sdr` then goes through three states.

1. **Preamble search (bit synchronisation).**
   * `preamble_corr` shifts every sample into a 16-chip × 16-sample shift
     register (256 bits).
   * Each clock it counts how many samples agree with the 1010 preamble
     template, with each template chip stretched over its 16 samples.
   * For a clean preamble the count is exactly 256 when the newest sample is
     the last sample of a chip. It drops by 16 for each sample of
     misalignment, so the peak is triangular and sharp.
   * `peak_detect` reports the first value at or above `PRE_THR` (232) that
     is followed by a lower one. It stays disarmed until the count falls
     below the threshold again.
   * That peak marks a chip boundary, so the chip-phase counter `ph` is set
     (to 2, for the two clocks of pipeline delay). `locked` rises.
2. **SFD search (packet synchronisation).**
   * Once locked, the sample at `ph == 8` (mid-chip) is the chip strobe. This
     is the 250 kHz receive clock, realised as a clock enable.
   * `sfd_corr` keeps the last 16 chips and counts how many agree with the
     SFD. A second `peak_detect` (threshold 14, so two chip errors are
     tolerated) finds the SFD peak one chip after its last chip.
   * The chip in hand at that moment is the first PHR chip. `pkt_sync`
     pulses together with it.
   * The SFD was chosen so that its correlation with any part of the
     preamble stays at 9 or below.
   * If no SFD follows within 96 chips, the block goes back to preamble
     search.
3. **Data.** Each chip strobe delivers one chip (`data_stb`, `data_chip`).
   This continues until `rx_ctrl` asserts `restart`.

**Sampling-point realignment** keeps the mid-chip sample in the middle when
the transmitter's clock drifts. It uses the same shift register. Every input
transition should fall on phase 0; Manchester coding gives at least one per
bit.

* A transition only counts once the two samples after the change agree, so
  a one-sample glitch is not taken for an edge. The counter is checked at the
  first sample of the new level.
* If that sample sits at phase 1–6, the counter runs early. It holds for one
  clock (`adj_ret`).
* If it sits at phase 9–15, the counter runs late. It skips a phase
  (`adj_adv`).
* Phase 8, the sampling point, is never skipped or repeated.
* Each correction is one sample. Drift of up to about one sample per
  transition is tracked. The testbenches run at drifts of ±0.33 % and 0.2 %,
  and at one sample every 12 chips (±0.52 %).

### Decoding and packet control

* `manchester_dec` keeps the first chip of each pair. The pairing starts at
  `pkt_sync`.
* The descrambler is a second `scrambler` instance, reseeded at `pkt_sync`.
* `deinterleaver` collects 32 bits and gives out 4 codewords. They go to
  `hamming_dec`, a registered valid/ready stage that corrects one error and
  flags two.
* `p2s_buffer` turns each 4-bit result back into serial bits.
* `rx_ctrl` packs the bits into octets:
  * Octet 0 is the PHR. It gives the length and the number of frame octets.
  * PSDU octets go into RXFIFO, and pad octets are dropped.
  * After the last octet, `rx_done` pulses, `rx_len` holds the length and
    the SDR restarts. `rx_done` comes within about 3 chips of the end of the
    frame. The second chip of the last bit is not needed.
* If any codeword is uncorrectable, reception stops at once. `rx_err` pulses,
  RXFIFO is flushed and the SDR restarts, so the MAC can ask for a
  retransmission.

The front of this chain works at chip rate. The decoder, buffer and packing
logic work in short bursts at the full clock. A block's 4 codewords drain
within about 20 clocks, well before the next bit arrives 32 clocks later;
`deinterleaver` asserts this.

MAC-side use:

* Wait for `rx_done`, then read `rx_len` octets. `rx_rdata` is valid while
  `rx_empty` is low, and `rx_rd_en` pops the octet.
* The status pulses `rx_locked`, `rx_sync`, `rx_fix`, `rx_adv` and `rx_ret`
  are there for monitoring.

## What follows the source design and what is this design's choice

These follow the source design:

* The block chain of both directions.
* 250 kchip/s at a 4 MHz clock (16 clocks per chip) and the 6.25 Mchip/s
  figure at 100 MHz.
* A PSDU of at most 127 octets, with the length carried in the PHR.
* (8,4) Hamming coding and 8×4 interleaving.
* A 1-bit serial scrambler with the same structure on both sides.
* The Manchester mapping, and decoding from the first chip of each pair.
* A correlation-based preamble and SFD search with peak detectors, and
  realignment that shares the SDR hardware.
* Stopping the packet on an uncorrectable codeword.

These are choices of this design:

* The scrambler polynomial (x^7+x^4+1) and its seed.
* The preamble (32 chips of 1010) and the SFD (0x0B73).
* The PHR layout and the pad octet.
* The extended (single-error-correcting, double-error-detecting) form of
  the (8,4) Hamming code, and its bit layout.
* Which way the interleaver matrix is written and read.
* All thresholds and the SFD timeout.
* The peak rule and the realignment rule.
* FIFO depth (128).
* valid/ready handshakes.
* LSB-first bit order.
* Flushing the whole RXFIFO on an error. This assumes the MAC has read the
  previous packet.

These depart from the source design:

* **One clock with enables.** The source switches the receiver between a
  4 MHz and a 250 kHz clock. Here everything runs on the 4 MHz clock, and
  the 250 kHz clock is a chip-rate enable. A power-optimised implementation
  would add clock gating on those enables.
* **Octet-wide RXFIFO.** In the source, the receive buffer feeds RXFIFO
  one bit at a time. Here `rx_ctrl` packs the bits into octets first, so
  both FIFOs are octet-wide and the MAC reads whole octets.
* **No SPI.** The source puts an SPI control module between MAC and PHY, but
  no protocol or register map for it is available. The MAC-side ports are
  brought out directly instead.
* **No analog parts.** The FSK modulator, RF up-conversion, down-conversion
  to the 2 MHz IF, and the FSK demodulator are analog and are not part of
  this RTL. `tx_chip` and `rx_in` are the chip-level connections to them.

## Files

| file | contents |
|---|---|
| `rtl/wban_pkg.sv` | constants (16 clocks per chip, SHR, scrambler seed, matrix size), Prefix MUX select enum, `frame_octets()`, `ham84_encode()` |
| `rtl/wban_transceiver.sv` | top: `tx_baseband` and `rx_baseband` side by side |
| `rtl/tx_baseband.sv`, `tx_ctrl`, `tx_prefix_mux`, `hamming_enc`, `interleaver`, `scrambler`, `manchester_enc` | transmitter |
| `rtl/rx_baseband.sv`, `sdr`, `preamble_corr`, `peak_detect`, `sfd_corr`, `manchester_dec`, `deinterleaver`, `hamming_dec`, `p2s_buffer`, `rx_ctrl` | receiver |
| `rtl/byte_fifo.sv` | TXFIFO / RXFIFO |
| `tb/wban_ref_pkg.sv` | independent reference model that builds the chip sequence of a frame |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_tx_baseband` also covers `tx_ctrl`, `tb_rx_baseband` also covers `rx_ctrl` |

Parameters: `OSR` (clocks per chip, default 16, must be a power of two) and
`DEPTH` (FIFO octets, default 128) on the top. `sdr` also has `WIN`,
`PRE_THR`, `SFD_THR` and `SFD_TIMEOUT`. Frame constants (preamble, SFD,
seed) live in `wban_pkg`. The reference model in `tb/wban_ref_pkg.sv` has
its own copy of them and must be changed with them.

Size after generic synthesis of the whole top: about 580 flip-flops and
2 × 1024 bits of FIFO memory. The preamble correlator's 256-bit shift
register and its population count are the largest part of the logic.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
after a fixed number of clocks if something hangs. It also has an
`$urandom`-based stimulus and needs no files. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/wban_pkg.sv tb/wban_ref_pkg.sv tb/tb_wban_transceiver.sv \
  --top-module tb_wban_transceiver -o sim && obj_dir/sim
```

Use the same command for any other `tb_*`; those that do not use the
reference model do not need `tb/wban_ref_pkg.sv`.

`tb_wban_transceiver` runs the top at its default parameters. It loops
`tx_chip` back to `rx_in` through a behavioural channel that adds a delay,
clock drift (±0.33 % and 0.2 %) and chip errors. The test sends 7 packets and
a bare preamble:

* PSDU lengths 0, 4, 5, 10, 23, 24 and 127.
* A burst of 8 chips (4 coded bits), corrected by FEC.
* Two errors in one codeword, which drop the packet with `rx_err`.
* A preamble with no SFD, which times out.

For each packet it checks:

* every transmitted chip against the reference model;
* the frame duration, to the clock;
* the received length and data.

It also checks that each mechanism happened at least once: lock, packet
sync, pad octet, advance, retard, correction, drop, timeout and the
maximum-length packet. It runs in well under a second.

Each unit testbench compares its block with a model written separately in
the testbench, including the corner cases:

* `tb_hamming_dec`: every data value with every single and double error.
* `tb_sdr`: frames at random sample offsets and with ±1 sample of drift
  every 12 chips, plus the SFD timeout.
* `tb_rx_baseband`: frames built by the reference model rather than by the
  transmitter RTL.

Each testbench has been shown to fail when its block is deliberately broken
in one relevant way.

`tb_wban_per` measures the packet error rate of the looped-back design.
Its channel inverts each 4 MHz sample independently with probability P,
a crude stand-in for demodulator noise. The results for 32 packets of 16
octets were:

| P | 0 | 0.5 % | 1 % | 2 % | 4 % |
|---|---|---|---|---|---|
| PER | 0 | 0 | 0.16 | 0.44 | 0.81 |

The PSDU has no CRC, so when a codeword holds 3 or more errors, a packet can
occasionally be delivered wrong. This happened 1 or 2 times at 2–4 %.

Not verified here: operation with real FSK demodulator output (noise, jitter,
glitches shorter than a chip), packet-error rate against SNR, timing closure
at 100 MHz, and power.
