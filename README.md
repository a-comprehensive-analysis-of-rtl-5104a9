# ZigBee (IEEE 802.15.4, 2.4 GHz) baseband transmitter with a CRC-16 frame check

This RTL turns one MAC frame into the baseband signal of a 2.4 GHz ZigBee
radio. The main case is the acknowledgement frame. The steps are:

1. Build the PHY frame (PPDU).
2. Protect the MAC part with a 16-bit cyclic redundancy check.
3. Cut every octet into two 4-bit symbols.
4. Spread every symbol into 32 chips.
5. Split the chips onto the two rails of offset QPSK.
6. Give every rail value a half-sine shape.

The output is a pair of signed I/Q sample streams, ready for a DAC and an RF
up-converter. The line rate is 250 kbit/s and the chip rate 2 Mchip/s. The
whole chain is plain synchronous logic on one clock.

The design centres on the CRC block: a bit-serial shift-register divider for
the generator x^16 + x^15 + x^2 + 1. The other stages take what the
specification fixes (octet layout, symbol mapping, chip rate, O-QPSK with
half-sine pulses) and build the simplest hardware that does it.

## Signal chain and rates

```
 hdr, payload ─► ppdu_framer ─► fcs_inserter ─► bit_to_symbol ─► symbol_to_chip ─► oqpsk_mod ─┬─► half_sine_shaper ─► i_sample
                 (octets)       (CRC-16, FCS)   (2 symbols/octet) (32 chips/symbol)           └─► half_sine_shaper ─► q_sample
```

| point in the chain | unit | rate | clocks per unit (default, 8 MHz clock) |
|---|---|---|---|
| PPDU octets | octet | 31.25 koctet/s | 256 |
| data symbols | 4 bits | 62.5 ksymbol/s | 128 |
| chips | 1 chip | 2 Mchip/s | 4 |
| I rail, Q rail | 1 chip each | 1 Mchip/s each | 8 |
| I/Q samples | sample | 8 Msample/s | 1 |

The clock runs at `SAMPLES_PER_CHIP` samples per chip: 4 by default, so
8 MHz. A free-running divider in `zigbee_tx` makes a one-clock chip strobe.
The chip stage sets the pace. Every stage before it holds one octet or one
symbol and waits on a valid/ready handshake. So a frame leaves as one
unbroken chip stream at exactly 250 kbit/s, however fast the upstream
blocks run. The framer and the CRC block need about 10 clocks per octet,
far below the 256 available.

## The frame

`ppdu_framer` sends the octets in air order:

| field | octets | covered by the FCS |
|---|---|---|
| preamble (0x00) | 4 | no |
| start-of-frame delimiter (0xA7) | 1 | no |
| frame length (PSDU octets, bit 7 reserved) | 1 | no |
| frame control | 2 | yes |
| sequence number | 1 | yes |
| destination short address (optional) | 2 | yes |
| source short address (optional) | 2 | yes |
| security control, key identifier (optional) | 1 + 1 | yes |
| payload (`payload_len` octets, 0..116) | n | yes |
| FCS (added by `fcs_inserter`) | 2 | - |

The *_en flags of the `mac_hdr_t` header struct choose the optional fields
per frame. They are not decoded from frame control. An acknowledgement
frame has none of them, so it is 4+1+1 + 2+1+2 = 11 octets. That is 88 bits,
22 symbols and 704 chips, and it lasts 352 µs on air. Multi-octet fields go
low octet first. A start whose PSDU would be longer than 127 octets is
refused with `len_err`.

## The CRC-16 frame check sequence

`crc16_lfsr` is the classic divider: one flip-flop per remainder bit. The
feedback is the top stage XOR the incoming bit. It drives stage x^0 and is
XORed in front of stages x^2 and x^15:

```
fb  = crc[15] ^ din
crc = (crc << 1) ^ (fb ? 16'h8005 : 0)      // x^16 + x^15 + x^2 + 1
```

`fcs_inserter` takes one octet and, if the octet is part of the MAC frame,
clocks its bits in least significant bit first. That is the order in which
they reach the air. The octet then goes downstream. After the octet flagged
`last`, the 16-bit remainder r goes out as two octets, highest remainder
bit first on air:

- The first FCS octet carries r15 in bit 0, up to r8 in bit 7.
- The second carries r7 in bit 0, up to r0 in bit 7.

This is the "shift the frame left by 16 and divide" construction. A
receiver that divides the whole MAC frame, FCS included, ends with a zero
remainder. The initial value is zero. The register is cleared after every
FCS, so frames can follow each other directly.

What the code catches: every single-bit error, every double-bit error
within the polynomial's period (32767 bits, far beyond the longest frame),
every odd number of bit errors (the generator has the factor x+1), and
every burst of 16 bits or less. `tb_crc16_detect` checks these four
properties on real frames.

**Interoperability.** IEEE 802.15.4 itself specifies the ITU-T generator
x^16 + x^12 + x^5 + 1 for the FCS. This design uses x^16 + x^15 + x^2 + 1,
so its frames do not pass the FCS check of a standard 802.15.4 receiver.
`crc16_lfsr` takes the generator as the parameter `POLY`. Set it to
`16'h1021` for the standard's generator; note that the standard also
defines its own bit and octet order for the FCS. The top does not pass
`POLY` through. Change the default in `zigbee_pkg::CRC16_POLY`.

## Spreading, O-QPSK and half-sine pulses

**Spreading.** `symbol_to_chip` replaces each 4-bit symbol with a 32-chip
pseudo-noise sequence, chip c0 first. These are the sixteen sequences of
the 802.15.4 2.4 GHz PHY, generated rather than stored:

- Symbol s (0..7) is the sequence of symbol 0, delayed cyclically by 4·s
  chips.
- Symbols 8..15 are symbols 0..7 with every odd chip inverted.

Symbol 0 is `1101 1001 1100 0011 0101 0010 0010 1110` (c0 on the left);
see `zigbee_pkg::chip_of`. A new symbol is accepted in the same clock as
the strobe that sends chip 31 of the previous one, so consecutive symbols
leave no gap.

**O-QPSK.** `oqpsk_mod` sends even chips to I and odd chips to Q. Each rail
holds its value for two chip periods, and Q changes one chip period after I.

**Half-sine pulses.** Each `half_sine_shaper` plays one rail value as
`±round(127·sin(π·k/8))`, k = 0..7, with the default 4 samples per chip and
8-bit samples. The table is computed at elaboration from that formula. Its
output is 0 when no pulse runs.

**Timing in the top.** A chip appears on `chip` with `chip_stb` in the clock
after its strobe. The pulse that carries the chip starts two clocks after
`chip_stb`, so sample k of that pulse is on `i_sample` or `q_sample` at
clock `chip_stb + 2 + k`. `tx_done` is high during the last sample of each
frame, the last sample of the Q pulse of its final chip. It pulses even
when the next frame follows with no gap. `tx_busy` covers everything from
`start` to that sample.

## Top-level interface (`zigbee_tx`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock (SAMPLES_PER_CHIP × 2 MHz), synchronous active-low reset |
| start | in | 1 | begin a frame. It is taken when the framer is idle, which is as soon as the previous frame's octets have left it |
| hdr | in | `mac_hdr_t` | frame control, sequence number, optional fields with enables, payload_len |
| len_err | out | 1 | start refused: PSDU over 127 octets |
| pl_data, pl_valid, pl_ready | in/in/out | 8/1/1 | payload octets, valid/ready |
| chip, chip_stb | out | 1 | chip stream and its strobe |
| i_bit, q_bit | out | 1 | O-QPSK rail values (1 = +1) |
| i_sample, q_sample | out | SAMPLE_W signed | shaped baseband samples, one per clock |
| tx_busy, tx_done | out | 1 | frame in flight; last sample of a frame |

Parameters: `SAMPLES_PER_CHIP` (default 4), `SAMPLE_W` (default 8). The
rates follow from the clock: only an 8 MHz clock with the default gives
2 Mchip/s.

## What is specified and what is chosen here

These come from the specification: the block chain (CRC, bit-to-symbol,
symbol-to-chip, O-QPSK modulator, pulse shaping), the CRC-16 generator and
its serial circuit, the 4-octet preamble and the acknowledgement frame
layout, the field order of the MAC frame, the nibble order of the symbol
mapping, 250 kbit/s, 2 Mchip/s, O-QPSK and half-sine shaping.

These are taken from IEEE 802.15.4, which the specification follows but
does not spell out:

- the preamble and SFD values and the 127-octet frame limit
- the 32-chip sequences
- I on even chips and Q on odd chips
- the zero initial value of the CRC and the bit order of the FCS
- low octet first in multi-octet fields
- 16-bit short addresses only

These are this implementation's own choices:

- one clock at 4 samples per chip
- 8-bit samples with amplitude 127
- valid/ready handshakes between stages
- explicit enables for the optional fields
- one octet each for security control and key identifier
- a synchronous reset
- the frame-level control interface of the top

Not included:

- The RF side: DAC, mixer, power amplifier and antenna, and with it the
  choice among the 16 channels (5 MHz apart) of the 2.4 GHz band.
- The 802.15.4 MAC protocol: beacons, superframe timing, CSMA/CA,
  association, guaranteed time slots.
- Any receiver.

The reference design's FPGA wrapper had a byte-wide register interface
(data, select, load and enable strobes, a serial TxD output). Its behaviour
is not documented, so it is not reproduced. The frame-level interface
above replaces it.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog. The
reference models in `tb/zigbee_ref_pkg.sv` are written independently of the
RTL:

- The CRC is polynomial long division over a bit queue.
- The chip sequences are written out in full.
- The pulse samples come from `$sin`.

| testbench | what it checks |
|---|---|
| `tb_crc16_lfsr` | long division on 200 random messages; the CRC-16 check value 0xFEE8 of "123456789"; message + remainder → 0 |
| `tb_crc16_detect` | single, double, odd-count and ≤16-bit burst errors on acknowledgement and random frames are all detected |
| `tb_fcs_inserter` | 40 back-to-back frames with stalls: output octets and FCS, receiver remainder zero |
| `tb_ppdu_framer` | acknowledgement and random frames, every optional-field mix, payload gaps, oversize refusal |
| `tb_bit_to_symbol` | nibble order, last flag, one symbol per clock |
| `tb_symbol_to_chip` | all 16 sequences, chip spacing, no gap between symbols, idle when starved |
| `tb_oqpsk_mod` | rail assignment, two-chip hold, one-chip Q offset |
| `tb_half_sine_shaper` | every sample value, back-to-back pulses, idle zero |
| `tb_zigbee_tx` | whole chain at default parameters: chips, every I/Q sample, 704 chips in 2816 clocks for the acknowledgement frame, tx_done timing, stalls, payload gaps, back-to-back frames, refusal |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/zigbee_pkg.sv tb/zigbee_ref_pkg.sv tb/tb_zigbee_tx.sv --top-module tb_zigbee_tx
./obj_dir/Vtb_zigbee_tx
```

Swap the testbench name for any other. `bit_to_symbol` checks its input
handshake with an immediate assertion, which `--assert` enables. The whole
end-to-end test runs in well under a second.

## Files

- `rtl/zigbee_pkg.sv`: constants, the `mac_hdr_t` struct, the chip-sequence
  function.
- `rtl/crc16_lfsr.sv`, `rtl/fcs_inserter.sv`, `rtl/ppdu_framer.sv`,
  `rtl/bit_to_symbol.sv`, `rtl/symbol_to_chip.sv`, `rtl/oqpsk_mod.sv`,
  `rtl/half_sine_shaper.sv`: the blocks.
- `rtl/zigbee_tx.sv`: the top.
- `tb/`: the testbenches and `zigbee_ref_pkg.sv`.
