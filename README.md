# Programmable DS-SS transmitter and correlator receiver

This is a small direct-sequence spread-spectrum (DS-SS) link of the kind used
to get data out of a tiny sensor system, such as an ingestible capsule that
measures temperature, pH, conductivity or oxygen. The transmitter spreads each
data bit into a burst of pseudo-noise (PN) chips. The receiver takes the
digitized chip stream and correlates it with the same PN code to recover the
bit. Spreading lets several sensor systems share one channel, each with its
own code, and it rejects interference.

The design is programmable in two ways:

* **Code.** 4 select bits `S3S2S1S0` choose a code length of 32, 64, 128 or
  256 chips per bit. For each length there are three PN codes. There is also a
  no-coding mode.
* **Receiver sizing.** The input sample width `IN_W` and the accumulator
  width `ACC_W` are parameters. They set the receiver's area and power.

The RTL is synthesizable SystemVerilog with one clock. Clock enables replace
the divided clocks of the original block diagrams.

## Code selection and the PN generator

The PN generator (`pn_generator`) is an eight-stage Fibonacci LFSR. On each
chip the register shifts one stage up. Stage 1 takes the XOR of the tapped
stages. The output is taken from stage *n*, where n = 5, 6, 7 or 8 sets the
code length:

| S3S2S1S0 | taps      | chips | S3S2S1S0 | taps      | chips |
|----------|-----------|-------|----------|-----------|-------|
| 0000     | no coding | 1     | 1000     | reserved  | 1     |
| 0001     | 5,2       | 32    | 1001     | 7,1       | 128   |
| 0010     | 5,4,3,2   | 32    | 1010     | 7,3       | 128   |
| 0011     | 5,4,2,1   | 32    | 1011     | 7,3,2,1   | 128   |
| 0100     | reserved  | 1     | 1100     | reserved  | 1     |
| 0101     | 6,1       | 64    | 1101     | 8,4,3,2   | 256   |
| 0110     | 6,5,2,1   | 64    | 1110     | 8,6,5,3   | 256   |
| 0111     | 6,5,3,2   | 64    | 1111     | 8,6,5,2   | 256   |

`S3S2` is the length select and `S1S0` the tap-set select. All twelve tap
sets give maximal-length sequences. The tap masks are in `dsss_pkg`.

**Why 32 and not 31.** An n-stage maximal LFSR repeats every 2^n - 1 chips,
but a bit here lasts 2^n chips. This design reloads the register with the
all-ones seed at the end of every bit. So each bit carries the full 2^n - 1
chip m-sequence, followed by one repeat of its first chip. Every bit uses the
same 2^n-chip code. As a result, the periodic autocorrelation side lobes are
not the ideal -1/(2^n - 1). They reach 0.25 of the peak for the worst 32-chip
code and about 0.1 at 256 chips (see `tb_autocorrelation`).

The three reserved words behave like no coding: the PN output is 0 and a bit
is one chip long.

## Transmitter (`dsss_transmitter`)

The transmitter has four parts, as in the original block diagram:

* `clock_divider`: a chip counter that divides the chip rate by the code
  length.
* `data_latch`: holds the bit being sent.
* `pn_generator`: produces the code chips.
* `mod2_adder`: XORs the data bit with the PN chip. In bipolar form
  (0 = +1, 1 = -1) this XOR is the product of data and code.

The handshake and its timing are this design's own:

```
clk         _|‾|_|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_
en          __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾‾‾‾‾‾‾
data_req    __/‾‾‾\__________ ... ___/‾‾‾\_____     data taken at these edges
chip_valid  ______/‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾‾‾‾‾‾‾
coded             c0  c1  c2  ...  cL-1 c0 ...      one chip per clock
```

* In the first cycle with `en` high, `data_req` is high and the first bit is
  taken.
* Chips start in the next cycle, one per clock, with `chip_valid` high.
* In the last chip of every bit, `data_req` is high again and the next bit is
  taken at that edge. The source therefore moves to its next bit on every edge
  where `data_req` is high.
* If `en` is low at a bit boundary, transmission stops after that bit.
* `sel` must not change while the transmitter runs. An assertion checks this.

A bit takes exactly L clock cycles (L = 1 without coding). At the 10 MHz
clock the original design was evaluated at, that is 312.5 kbit/s with
32-chip codes and 39 kbit/s with 256-chip codes.

## Receiver (`dsss_receiver`)

The receiver computes the zero-shift correlation of one bit period:

    r = sum_{i=0}^{L-1} x(i) * c(i),   c(i) = +1 for chip 0, -1 for chip 1

where x(i) is the signed `IN_W`-bit sample of chip i.

Matched chips (data 0) give a large positive r. Inverted chips (data 1) give
a large negative r.

**MAC (`correlator_mac`).** Because c is ±1, the multiply is only a change of
sign. One adder handles both cases. When the chip is 1, the sign-extended
sample is inverted bit by bit and the chip is fed in as the carry, giving
`acc + ~x + 1 = acc - x`. The first chip of a bit starts the sum from zero.

**Saturation.** The accumulator is `ACC_W` bits wide. It clips at its largest
positive and negative values instead of wrapping. A clipped sum keeps its
sign, so the decision still holds. `saturated` reports clipping in the bit.

**Threshold and comparator.** `threshold_select` picks one of four signed
thresholds with `S5S4`:

| S5S4 | default |
|------|---------|
| 00   | 0 |
| 01   | +2^(ACC_W-4) |
| 10   | -2^(ACC_W-4) |
| 11   | +2^(ACC_W-3) |

These values are parameters (`THR0`..`THR3`) and are this design's own
choice. The original design leaves them unspecified. `comparator` outputs 1
when r is below the threshold.

**Alignment.** The receiver does not acquire code phase. It assumes that the
first sample with `valid` after `en` rises is chip 0 of a bit. Low `en`
clears it. Samples may arrive at any rate up to one per clock. One cycle after
the last sample of a bit, `data_valid` pulses together with `data_out`,
`corr` (the clipped sum) and `saturated`.

## Sizing the accumulator

The largest possible |r| is L · 2^(IN_W-1), so a register of
`ACC_W = IN_W + n` bits never saturates. Real received signals stay well
below full scale, so smaller registers usually work. The original evaluation
found these minimum widths:

| input width | minimum register width |
|-------------|------------------------|
| 4 bits      | 6 to 9 bits, depending on code length |
| 8 bits      | 9 bits |
| 12 bits     | 12 bits |

It recommended at least 12 bits for a receiver that must accept any input
width and code. The defaults follow that: `IN_W = 8` (the 8-bit A/D
conversion of the original test setup) and `ACC_W = 12`. `ACC_W >= IN_W` is
required and checked at elaboration.

In the original evaluation, receiver area depended far more on the input
width than on the register width. It was attributed to a sample memory inside
the correlator. That memory is not described, and it is not part of this RTL.

## Top level (`dsss_transceiver`)

The top level places the transmitter and receiver side by side. They share
clock and reset, and each has its own code select, so a duplex link can use
different codes in each direction.

The analog path between `tx_coded` and `rx_sample` is outside the RTL: radio,
demodulator and A/D converter. The testbenches model it as bipolar mapping,
amplitude, uniform noise, quantisation and one cycle of delay.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `tx_sel` | in | 4 | transmit code select S3S2S1S0 |
| `tx_en`, `tx_data` | in | 1 | enable, serial data |
| `tx_data_req` | out | 1 | `tx_data` is taken at this edge |
| `tx_coded`, `tx_chip_valid` | out | 1 | chip stream |
| `rx_sel`, `rx_thr_sel` | in | 4, 2 | receive code select, threshold select S5S4 |
| `rx_en`, `rx_valid`, `rx_sample` | in | 1, 1, IN_W | alignment/enable, sample strobe, signed sample |
| `rx_data`, `rx_data_valid` | out | 1 | recovered bit |
| `rx_corr`, `rx_saturated` | out | ACC_W, 1 | correlation sum, clip flag |

## Departures from the original design

* Each bit is a 2^n-chip code made by reloading the LFSR (see above). The
  original gives lengths of 32..256 without saying how the extra chip is
  produced.
* Clock enables replace the clock divider's derived clocks. The divider also
  reads `S1S0`, to run one chip per bit without coding.
* The data latch is a one-bit register with load enable. The original calls
  this block both a data latch and a memory block for data.
* Reserved select words act as no coding.
* The threshold values, the comparison direction, saturating (clipping)
  arithmetic, the handshakes and the reset values are this design's own.
* Not included: code acquisition and tracking, the correlator's sample
  memory, and the analog parts (sensors, amplifiers, A/D converter, radio).

## Files

* `rtl/dsss_pkg.sv`: select-word decoding (tap masks, code lengths).
* `rtl/pn_generator.sv`, `rtl/clock_divider.sv`, `rtl/data_latch.sv`,
  `rtl/mod2_adder.sv`, `rtl/dsss_transmitter.sv`: the transmitter.
* `rtl/correlator_mac.sv`, `rtl/threshold_select.sv`, `rtl/comparator.sv`,
  `rtl/dsss_receiver.sv`: the receiver.
* `rtl/dsss_transceiver.sv`: the top level.
* `tb/tb_<module>.sv`: a self-checking testbench per module.
  `tb/tb_dsss_ref_pkg.sv` builds the reference codes straight from the tap
  lists by the LFSR recurrence.
* Application testbenches:
  * `tb_register_sweep`: the pattern 10101010 at all code lengths, received
    by nine receivers with input widths 4/8/12 and register widths 6..16.
  * `tb_pressure_waveform`: 2048 8-bit samples of a blood-pressure-like
    waveform sent and rebuilt bit-exactly.
  * `tb_autocorrelation`: periodic autocorrelation of all twelve codes taken
    from the transmitter output.

`tb_dsss_transceiver` runs the top level at its default parameters. It counts
each mechanism and fails if any never happened:

* every code length;
* no coding and a reserved word;
* 4-bit and 8-bit sample ranges;
* accumulator saturation;
* all four thresholds.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dsss_pkg.sv tb/tb_dsss_ref_pkg.sv tb/tb_dsss_transceiver.sv \
    --top-module tb_dsss_transceiver -o sim
./obj_dir/sim
```

For another testbench, swap in its file and top name; `tb_dsss_ref_pkg.sv` is
only needed by testbenches that import it. Each run takes under a second.
Nothing relies on X values, and all state is reset through `rst_n`, which is
asynchronous and active low.
