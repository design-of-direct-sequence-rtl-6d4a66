# DS-CDMA transmitter (digital part) in SystemVerilog

A direct-sequence spread-spectrum transmitter. Serial data is sent at
2 Mbit/s. Each bit is multiplied by ten chips of a pseudo-noise (PN) code,
and the resulting 20 Mchip/s stream switches the phase of a 40 MHz carrier
by 180 degrees (BPSK). A receiver that knows the code and its phase can
correlate it back out. Any other signal, including another transmitter using
a different code or code phase, looks like wideband noise to that receiver.
Before spreading, the data is cut into frames of 16 bits. Each frame is
followed by one parity bit so the receiver can detect single-bit errors.

The design follows a 2002 FPGA transmitter design (Xilinx XSV300 board).
That design consists of an oscillator, a PN-code generator, a parity check, a
BPSK modulator and a control block for timing and framing. Its published
description gives these blocks, the 40 MHz carrier, the 2 Mbit/s rate, the
x2 and x10 frequency dividers and the 16+1-bit frame. It does not give their
insides. Everything below the block level is this implementation's own
choice, and the sections below say where.

## Signal path

```
             data_in ──► tx_control ──tx_bit──┐
  data_req ◄──────────┘   │   ▲               ▼
                          │   │ parity     bpsk_mod ──► tx_out / tx_sym
                          ▼   │               ▲  ▲
                       parity_gen          chip  carrier
                                              │    │
 carrier_osc ─period_tick─► freq_divider(/2) ─chip_tick─► pn_generator
      │                           │
      └────── carrier ────────────┼──────────────────────────► bpsk_mod
                                  └─► freq_divider(/10) ─bit_tick─► tx_control
```

| module          | role |
|-----------------|------|
| `dscdma_pkg`    | rates, frame length, PN polynomial and seed |
| `carrier_osc`   | square-wave carrier and a tick on the last clock of each carrier period |
| `freq_divider`  | divides a tick rate by an integer (used twice: /2 and /10) |
| `pn_generator`  | 7-stage LFSR, x^7 + x^6 + 1, period 127 chips |
| `parity_gen`    | running parity of the data bits of the current frame |
| `tx_control`    | frame sequencer: 16 data bits, then the parity bit; data request to the source |
| `bpsk_mod`      | spreading (bit XOR chip) and BPSK of the carrier, registered output |
| `dscdma_tx`     | top level, wires the above together |

## One clock, three tick rates

The hardest part to follow is the timing. Everything runs on one 80 MHz
system clock. The slower rates are not clocks. They are one-cycle enables
("ticks"), all produced in a chain so that they line up:

| rate              | produced by                         | clocks per event | condition, t = clocks since reset |
|-------------------|-------------------------------------|------------------|-----------------------------------|
| carrier 40 MHz    | `carrier_osc` (HALF_CYCLES = 1)     | 2                | carrier high when t is even        |
| carrier period    | `period_tick`                        | 2                | t mod 2 = 1                        |
| chip 20 Mchip/s   | `freq_divider` /2 of period ticks    | 4                | t mod 4 = 3                        |
| bit 2 Mbit/s      | `freq_divider` /10 of chip ticks     | 40               | t mod 40 = 39                      |

Each divider's output is its input tick ANDed with "count is at its last
value". A bit tick is therefore always also a chip tick and a carrier-period
tick. Each tick falls on the *last* clock of a carrier period. Registers
updated on it (the PN state and the bit on the air) therefore change at the
first clock of the next carrier period. That puts every BPSK phase reversal
on a carrier period boundary.

The original design describes a 2 MHz clock multiplied by 2 and 10 to reach
the 40 MHz carrier. Here this is read as bit rate x10 = chip rate and chip
rate x2 = carrier. The same ratios are built by dividing down from one faster
clock. A registered square wave needs two clock samples per carrier period,
which gives 80 MHz. That is below the 100 MHz limit of the original board.

## Frames and the data handshake

A frame is 17 bit periods long (680 clocks, 8.5 us):

```
 slot:   0   1   2  ...  15   16
 bit:   d0  d1  d2  ...  d15  parity (even over d0..d15)
```

At every bit tick `tx_control` decides what goes on the air for the next
40 clocks:

* **Idle, or the parity bit has just been sent.** If `tx_en` is high, a new
  frame starts with d0 (`frame_start`). Otherwise the transmitter goes idle.
* **d15 has just been sent.** The parity bit from `parity_gen` follows.
* **Otherwise** the next data bit follows.

The data source must hold `data_in` valid. It is sampled in the single cycle
where `data_req` is high, and the source may move to the next bit
afterwards. While `tx_en` stays high, frames follow each other with no gap.
If `tx_en` falls in the middle of a frame, that frame is still completed,
parity included. While idle, `active` is 0, `tx_out` is 0 and `tx_sym` is 0.
The handshake and the end-of-frame rule are this implementation's choices.
The source description only says that the control block does timing and
framing.

Payload throughput is 16/17 x 2 Mbit/s = 1.88 Mbit/s.

## PN code

`pn_generator` is a Fibonacci LFSR. On each step it shifts towards its top
bit, and the XOR of the tapped stages enters at the bottom. The chip is the
top stage. With taps x^7 + x^6 + 1 the chip sequence obeys
c[n+7] = c[n] XOR c[n+1] and repeats every 127 chips, with 64 ones and 63
zeros per period. The all-ones seed gives seven leading ones.

The code steps once per chip tick (ten chips per bit). The spreading code is
therefore not aligned to bit or frame boundaries: a 170-chip frame spans more
than one code period. While the transmitter is idle the register is held at
its seed. Every transmission therefore starts at the same code phase, which
a receiver can acquire. Back-to-back frames simply continue the code. To give
a station its own code, change the seed (a different phase of the same
m-sequence) or the taps (a different polynomial). The source description
says only that a PN code is used. Its length, polynomial and seed are this
implementation's choices.

## BPSK on a digital carrier

The carrier is a square wave, so a 180 degree phase shift is an inversion:

    tx_out(t+1) = carrier(t) XOR tx_bit(t) XOR chip(t)     (0 while idle)

`spread` = `tx_bit XOR chip` is brought out for observation. `tx_sym` gives
the same output as a signed level: +1 or -1 while sending, 0 while idle.
This is a convenient input for a DAC or a baseband simulation. The output is
registered, so it lags `carrier` by one clock. The analog stage (filter,
up-conversion, amplifier) is outside this design.

## Top-level interface (`dscdma_tx`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | 80 MHz clock, active-low synchronous reset |
| `tx_en` | in | 1 | send frames; a started frame always finishes |
| `data_in` | in | 1 | serial data, sampled when `data_req` = 1 |
| `data_req` | out | 1 | `data_in` is taken this cycle |
| `tx_out` | out | 1 | BPSK-modulated carrier |
| `tx_sym` | out | 2 signed | +1 / -1 / 0 level of `tx_out` |
| `carrier`, `chip`, `spread`, `pn_state` | out | | carrier, PN chip, bit XOR chip, PN register |
| `tx_bit`, `active`, `frame_start`, `in_parity`, `bit_index` | out | | framing state |
| `chip_tick`, `bit_tick` | out | 1 | rate enables |

Parameters, with their defaults taken from `dscdma_pkg`: `HALF_CYCLES` (1),
`CARRIER_DIV` (2), `CHIP_DIV` (10), `DATA_BITS` (16), `PN_DEG` (7), `PN_POLY`,
`PN_INIT` and `ODD_PARITY` (0). For example, with a 100 MHz clock and the
same ratios, set `HALF_CYCLES` to keep the carrier an integer fraction of
the clock. For lower data rates, raise `CHIP_DIV`. Raising `CHIP_DIV` also
raises the spreading factor.

Size after generic synthesis: 67 word-level cells and 26 flip-flops.

## Departures from the source design

* **Error correction.** The source description mentions "error detection and
  correction" in one place. Elsewhere it mentions only error detection and a
  single parity bit per frame. Only the parity bit is built, which detects
  but cannot correct errors.
* **Clock plan.** The original uses a 2 MHz clock with x2 and x10 multipliers
  to reach 40 MHz. Here there is one 80 MHz clock with dividers and clock
  enables, which keeps the design in a single clock domain.
* **Block internals.** The oscillator, dividers, PN generator, parity
  generator, controller and modulator are the simplest circuits that perform
  the described functions. Widths, encodings, the handshake and reset
  behaviour are this implementation's choices.
* **Board and RF.** The FPGA board interfaces and the analog RF stage are not
  part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog:

| testbench | what it checks |
|-----------|----------------|
| `tb_freq_divider` | /10 and /2 outputs against a count of random input ticks, and reset mid-count |
| `tb_carrier_osc` | carrier level and period tick every clock, for HALF_CYCLES 1 and 3; frequency |
| `tb_pn_generator` | every chip against the recurrence; period 127; balance; hold and reload |
| `tb_parity_gen` | running and final parity of 200 random words with gaps; odd variant |
| `tb_tx_control` | frame format, data_req timing, outputs stable between ticks, finish after tx_en drop, idle and restart |
| `tb_bpsk_mod` | spread and modulated output for all input combinations, and the disabled state |
| `tb_dscdma_tx` | whole transmitter at default parameters, described below |

`tb_dscdma_tx` runs the full-size design. Its reference is written from the
rate table above, not from the RTL. For six frames it checks every clock:
carrier, ticks, `data_req`, the bit and chip on the air, and the modulated
output. A model receiver then despreads `tx_out` with the reference carrier
and code, votes over the 40 samples of each bit, and checks that every frame
carries the supplied 16 bits with even parity. It checks that data is taken
exactly every 40 clocks (2 Mbit/s) and that frames are 680 clocks long. It
also counts each mechanism and fails if one never happens: back-to-back
frames, parity 0 and 1, phase reversals, a PN period wrap, a frame finished
after `tx_en` dropped, idle, and restart from idle with the code reloaded.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl rtl/dscdma_pkg.sv \
    tb/tb_dscdma_tx.sv --top-module tb_dscdma_tx -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in the file of the same name. Only
the package has to be listed explicitly. The full-size run takes well under
a second.
