# LOCx2 transmitter in SystemVerilog

LOCx2 is a two-channel serial transmitter for a detector front end: every
25 ns (one 40 MHz LHC clock) each channel takes 112 bits of ADC data and sends
them, wrapped in a 128-bit frame, over one 5.12 Gbps line. The point of the
design is low latency at low overhead. Instead of a block code such as 8b/10b
(25 % overhead, word alignment logic), each LHC clock gets exactly one frame
with a 16-bit frame overhead (14.3 %). An 8-bit header carries a fixed
alignment pattern and a compressed bunch-crossing number. An 8-bit trailer
carries a CRC. The payload in between is scrambled so the line has enough
transitions. Nothing in the encoder waits for more than one frame's worth of
data.

This RTL covers the digital part of the chip: the two LOCic encoders, the two
16:1 serializer trees, the PLL's divide-by-64 chain and the I2C configuration
slave. The analog core of the PLL (phase detector, charge pump, loop filter,
LC-VCO) is a behavioural model. The CML line drivers, the SLVS input receivers
and the clock buffers are not modelled. The block structure, the rates, the
frame format and the serializer structure follow the published LOCx2 chip. The
CRC polynomial, the scrambler, the BCID code, the register map and the ADC
interface are not specified in that description. They are this design's own
choices, and are listed under "Departures and assumptions" below.

## The LOCic frame

One frame is sent per channel per LHC clock, as eight 16-bit words, most
significant bit first:

| Frame bits | Width | Content | Scrambled |
|-----------|-------|---------|-----------|
| 127:124 | 4 | fixed pattern `1010` | no |
| 123:120 | 4 | BCID code `{prbs7[1:0], prbs5[1:0]}` | no |
| 119:8 | 112 | payload: ADC chip 0 word (bits 111:56), ADC chip 1 word (55:0) | yes |
| 7:0 | 8 | CRC-8 of the unscrambled payload | no |

Each 56-bit ADC chip word holds four 12-bit samples and 8 calibration bits.
The encoder treats the payload as opaque bits, so another split of the
112 bits needs no change to the encoder.

**BCID code.** Sending a 12-bit bunch-crossing number in every frame would
cost 12 bits. Instead, two LFSRs step once per frame. One is a PRBS7,
x^7+x^6+1, with period 127. The other is a PRBS5, x^5+x^3+1, with period 31.
A frame that carries the bunch-crossing reset (BCR) restarts both LFSRs at
all-ones. The header carries the two low bits of each state. Because each
LFSR shifts by one bit per frame, a receiver that has seen a few consecutive
headers knows both full states. The pair of states repeats only after
lcm(127, 31) = 3937 frames. That is more than the 3564 crossings of an LHC
orbit, so the pair identifies the crossing number since BCR. The receiver
gets this from a lookup table, or by running the same LFSRs.

**Scrambler.** The payload goes through a self-synchronizing scrambler,
x^58 + x^39 + 1:

    s[k] = d[k] ^ s[k-39] ^ s[k-58]

Here `s` is the stream of scrambled payload bits only: header and trailer
bits are skipped, and the history runs on across frames. The receiver inverts
it with `d[k] = s[k] ^ s[k-39] ^ s[k-58]` on the received payload bits. The
receiver needs no seed and no synchronization: after 58 payload bits it
decodes correctly. A bit error on the line corrupts three payload bits, and
the CRC detects them.

**CRC.** The trailer is CRC-8 with polynomial x^8+x^2+x+1 (0x07) and initial
value 0. It is computed over the 112 payload bits before scrambling, bit 111
first. The receiver descrambles first, then checks the CRC.

**Frame alignment at the receiver.** Frame boundaries are not marked beyond
the header. A receiver finds them as the 128-bit phase at which the `1010`
pattern and the CRC check out frame after frame. The end-to-end testbench
does exactly this.

## Encoder (`locic_encoder`, 320 MHz)

```
in_payload, in_bcr --> sync_fifo --head--> bcid_prbs --+
   (in_valid)                      |------> crc8 ------+--> frame_builder --> word[15:0]
                                   '------> scrambler -+        (8 words / frame)
```

* `in_valid` pulses once per LHC clock and writes `{bcr, payload}` into
  `sync_fifo` (depth 4, show-ahead).
* The first write starts `frame_builder`'s cadence of 8-cycle slots. In the
  last cycle of each slot the builder asserts `take`. At that edge the FIFO
  head is popped, the PRBS pair steps (or restarts on BCR), the scrambler
  history advances, and the complete frame is registered.
* CRC and scrambling of all 112 bits are done combinationally in the take
  cycle. The chip's encoder was custom-laid-out for 320 MHz. This RTL keeps
  the same clock but makes no timing-closure claim for a standard-cell flow.
* Latency: the first word of a frame is on `word` right after the second
  320 MHz edge, counting the edge that wrote its payload (write, take). In
  steady state the FIFO holds an entry for one cycle only. It absorbs the
  phase between the data strobe and the frame slot.
* If the FIFO is empty at a take, an all-zero idle frame goes out.
  `fifo_underflow` records this. The receiver rejects the idle frame because
  its header lacks `1010`.

## Serializer (`serializer16`, `ser_mux2`)

A binary tree of flip-flop based 2:1 multiplexers. It has 8 cells at 320 MHz,
4 at 640 MHz, 2 at 1.28 GHz and 1 at 2.56 GHz. Every cell is a half-rate
multiplexer:

* both inputs are captured on the rising edge;
* the second input is captured again on the falling edge;
* the output shows the first input while the clock is high and the second
  while it is low.

Each stage therefore doubles the bit rate, and the last stage produces
5.12 Gbps from a 2.56 GHz clock. Cell `j` of a stage with `M` cells takes
lanes `j` and `j+M` of the previous stage. Input lane `k` carries `d[15-k]`,
so the line carries `d[15]` first.

All four clocks must come from the divider chain, whose rising edges
coincide. A word presented at a 320 MHz edge `t0` is captured at
`t0 + 3.125 ns`. Its first bit starts at `t0 + 5.859375 ns`: that is
3.125 ns plus half a period of each faster stage (1.5625 + 0.78125 +
0.390625 ns). Each bit lasts 195.3125 ps.

## Clocking and the PLL

`pll_analog` (behavioural) and `pll_div64` (logic) form the PLL. The divider
is six ripple toggle flip-flops: 2.56 GHz down to 1.28 GHz, 640 MHz, 320 MHz,
160 MHz, 80 MHz and the 40 MHz feedback. All its outputs rise together.

The model does not solve the loop equations. It measures the reference
period. If the selected band can reach 64 × f_ref, it moves the VCO to
exactly that frequency after an acquisition time. It then removes the phase
error between feedback and reference with one phase step. `locked` rises
after 8 consecutive aligned reference edges and drops at the first miss. If
the band cannot reach the target, the VCO sits at the nearer band edge and
never locks.

* Bands: four overlapping bands, each 340 MHz wide, starting at 1.86, 2.12,
  2.38 and 2.64 GHz. They cover 1.86–2.98 GHz. Band 2 (2.38–2.72 GHz) holds
  2.56 GHz.
* Acquisition time: 4 / bandwidth. The bandwidth is 0.5 + code × 2/7 MHz,
  scaled by (cp_cur + 1)/9. The time is × 1.25 with the 3rd-order filter,
  which has less phase margin than the 2nd-order one.

The time unit inside the model is 1 fs, so the 390.625 ps period is exact.
The 640 MHz divider output is brought out as `test_clk640`.

## Configuration (`i2c_slave`)

The slave has four 16-bit registers at 7-bit address `0x20` (parameter
`I2C_ADDR`). It oversamples SCL and SDA with the 40 MHz reference clock,
because the PLL clocks do not exist until the PLL is configured. SCL up to a
few MHz works.

Transfers:

* Write: `S, addr+W, ptr, hi, lo, [hi, lo ...], P`. A register is written
  when its low byte is acknowledged. The pointer then auto-increments, also
  on reads.
* Read: `S, addr+W, ptr, Sr, addr+R, hi, lo, ...`.

SDA is open drain: `sda_oe = 1` pulls the line low.

Register 0 (`pll_cfg_t`, reset value `0x02E2`):

| Bits | Field | Reset | Meaning |
|------|-------|-------|---------|
| 1:0 | `vco_band` | 2 | VCO tuning band |
| 5:2 | `cp_cur` | 8 | charge-pump current code |
| 8:6 | `lpf_bw` | 3 | loop bandwidth code (0.5–2.5 MHz) |
| 9 | `lpf_3rd` | 1 | 1 = 3rd-order loop filter, 0 = 2nd-order |
| 15:10 | – | 0 | unused |

Registers 1–3 are spare read/write registers.

## Top level (`locx2_top`) and its timing

Ports:

* `ref_clk40`: the 40 MHz reference clock.
* `rst_n`: asynchronous reset, active low.
* `bcr`: bunch-crossing reset.
* `adc_word[NCH][2]`: 56 bits per ADC chip.
* `scl`, `sda_in`, `sda_oe`: the I2C bus.
* `ser_out[NCH]`: one line per channel, to the line drivers.
* `test_clk640`: the 640 MHz test clock.
* `pll_lock`: PLL lock indicator.
* `fifo_overflow`, `fifo_underflow`: sticky status flags.

`NCH` defaults to 2.

ADC words and BCR are sampled in the 320 MHz domain, one 320 MHz period after
each rising edge of the divided 40 MHz clock. Once the PLL is locked, that
clock is aligned to `ref_clk40`. Drive the inputs at the falling edge of the
reference. With this timing, the first bit of a frame leaves 12.109 ns after
the reference edge that sampled its data, and the last bit ends 25 ns later,
at 37.109 ns. The chip is specified for under 27.2 ns. The published number
does not say between which two points it is measured, and it starts from
the serial ADC interface, which is not modelled here.

## Departures and assumptions

* **ADC interface.** The real chip receives the ADC chips' serial SLVS data
  with their frame clocks. Here each ADC chip delivers one parallel 56-bit
  word per LHC clock, already synchronous to the reference.
* **Line code details.** The following are choices made here:
  * the CRC polynomial and the bit order;
  * the scrambler polynomial and its self-synchronizing form;
  * the two PRBS polynomials, their seeds and the 4 header bits taken from
    them.

  A receiver built for the original chip would not decode this design's
  frames.
* **Whole-frame encoding** in one cycle, instead of word-serial processing in
  a hand-laid-out datapath.
* **PLL.** The analog core is a behavioural model without loop dynamics. The
  band split and the bandwidth mapping are assumptions. The chip's simulated
  tuning range (1.86–2.98 GHz) is used, not its measured one (2.0–3.1 GHz).
* **Latency variation.** The chip's latency changes by up to 6.25 ns from one
  power cycle to the next, because the phase of its internal clocks is not
  fixed. Here the divider starts from reset and the PLL model aligns the
  40 MHz feedback with the reference edge. The latency is therefore the same
  on every run.
* **Registers.** The register map, the I2C address and the reset values are
  assumptions.
* **Not modelled:** the CML line drivers (5-stage CML, 50 Ω), the SLVS
  receivers, the clock buffers and the pads.

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. Each has a watchdog. `tb/locic_ref_pkg.sv`
holds the reference models: CRC by long division, the descrambler and the
BCID PRBS sequences. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/locx2_pkg.sv tb/locic_ref_pkg.sv rtl/*.sv tb/tb_locx2_top.sv \
    --top tb_locx2_top -Mdir obj_top && obj_top/Vtb_locx2_top
```

Replace `tb_locx2_top` with any other `tb_*` to test one block.

| Testbench | What it shows |
|-----------|---------------|
| `tb_locx2_top` | Full chip at default parameters. The PLL locks, loses lock in band 0 and relocks in band 2 after I2C writes, and register 0 is read back. Then 300 LHC clocks of random data with BCRs. A receiver that is not told the frame phase finds frame alignment, descrambles, and checks the payload, CRC, BCID code and latency of every frame on both channels. Runs in under a second. |
| `tb_locx2_orbit` | Full chip for two LHC orbits with BCR every 3564 clocks. The receiver recovers the bunch-crossing number of every frame from the headers alone (PRBS states rebuilt from the last 7 headers, then a table lookup) and sees all 3564 numbers in an orbit. About one second. |
| `tb_locic_encoder` | Frame contents and the write-to-first-word latency, with BCRs. |
| `tb_serializer16` | Bit order and the 5.859375 ns latency, sampled mid-bit. |
| `tb_pll_analog` | Lock time, VCO period, feedback alignment, out-of-band behaviour, relock. |
| `tb_pll_div64` | Division ratios and edge alignment. |
| `tb_i2c_slave` | Reset values, multi-register write, repeated-start read, wrong address. |
| `tb_crc8`, `tb_scrambler`, `tb_bcid_prbs`, `tb_sync_fifo`, `tb_frame_builder` | Each unit against its reference model. `tb_bcid_prbs` also checks that the BCID state pair is unique over an orbit. |

All flip-flops use an asynchronous active-low reset. A two-state simulator
applies it only on a falling edge of `rst_n`, so start `rst_n` high and pull it
low after time zero, as the testbenches do.

`pll_analog` uses delays and `$time`, so it simulates but does not
synthesize. For a netlist, replace it with the real PLL macro.
`rtl/locx2_pkg.sv` must be compiled before the other files.
