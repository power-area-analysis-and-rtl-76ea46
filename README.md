# DS-SS transmitter and correlator receiver for a sensor capsule link

A miniature sensor system (an ingestible capsule measuring pH, temperature
and similar quantities) has to send a slow stream of readings over a radio
link that several capsules may share and that must survive interference.
This RTL does it with direct-sequence spread spectrum (DS-SS): every data
bit is replaced by a whole pseudo-random (PN) chip sequence, and the
receiver recovers the bit by correlating what it receives with the same
sequence. Each capsule can be given its own code, which is what lets several
of them share one channel (CDMA).

The design has two halves:

* a **transmitter** that XORs the serial data with a programmable PN code, and
* a **correlator receiver** that needs no multiplier: a chip of a PN code is
  +1 or -1, so "multiply and accumulate" is just "add the sample, or add its
  sign-changed copy".

It follows the structure of a published DS-SS transmitter/receiver for an
ingestible sensor microsystem (block diagrams, code table, LFSR structure,
register-width study). Details the published description leaves open, such
as number formats, reset, handshakes, threshold value and synchronization,
are this implementation's own choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Code selection

A 4-bit select word `s3s2s1s0` (type `dsss_pkg::code_sel_t`, fields `len` =
s3s2 and `fb` = s1s0) chooses one of twelve maximal-length LFSR codes:

| s3s2s1s0 | feedback taps | register stages n | LFSR period | chips per data bit |
|---|---|---|---|---|
| 0000 | no coding (PN chip = 0) | - | - | 32 |
| 0001 / 0010 / 0011 | [5,2] / [5,4,3,2] / [5,4,2,1] | 5 | 31 | 32 |
| 0101 / 0110 / 0111 | [6,1] / [6,5,2,1] / [6,5,3,2] | 6 | 63 | 64 |
| 1001 / 1010 / 1011 | [7,1] / [7,3] / [7,3,2,1] | 7 | 127 | 128 |
| 1101 / 1110 / 1111 | [8,4,3,2] / [8,6,5,3] / [8,6,5,2] | 8 | 255 | 256 |
| 0100, 1000, 1100 | reserved, treated as no coding | - | - | 64 / 128 / 256 |

A tap list `[a,b,...]` means that the XOR of stages a, b, ... is shifted into
stage 1 (Fibonacci LFSR, stages numbered 1 to 8). All twelve sets give the
maximal period 2^n - 1, and `tb_pn_code_gen` confirms this.

**Code length versus period.** The code length names 32, 64, 128 and 256 chips,
but an n-stage maximal LFSR repeats after 2^n - 1 chips. This design keeps
both numbers. A data bit lasts 2^n chips, and the LFSR runs freely at its
own period, so the code phase moves by one chip from bit to bit. That does
not matter for decoding: the transmitter and receiver start from the same seed
at the same chip and then stay in step. What the receiver correlates against
is exactly the chips that were sent.

## Transmitter (`dsss_transmitter`)

```
 data_in --> data_latch --+
                          XOR --> [reg] --> coded
 pn_code_gen -------------+
 clock_divider: first/last strobes per bit (load latch)
```

* `pn_code_gen` holds the 8-stage LFSR. Its feedback-select logic XORs the
  stages in `dsss_pkg::tap_mask(sel)`, and a multiplexer picks the output
  from stage 5, 6, 7 or 8 according to s3s2. After reset, the first chip
  comes from the seed (`SEED`, default `8'hFF`).
* `clock_divider` counts chips 0..L-1 (L = 32 << s3s2). It gives `first` and
  `last` strobes that act as clock enables. No slower clock is generated.
* `data_latch` takes `data_in` in the `first` cycle of each bit. The new bit
  already drives the XOR in that same cycle, and the latch holds it for the
  rest of the bit.
* `spreader` is the modulo-2 adder, with a register on its output.

Timing: `data_req` is high in the cycle where `data_in` is sampled. That is
chip 0 of each bit, and the first time is the first cycle after reset.
`coded` carries the chip of the previous cycle. `frame` is high with the
first coded chip after reset. `sel` may only change while reset is held.

## Receiver (`dsss_receiver`): a correlator without a multiplier

```
 sample --> mac (+x or +~x, chosen by pn) --> acc --> comparator --> data_out
            pn_code_gen, clock_divider           threshold(s3s2) -^
```

This is the part that needs the most explanation.

**Samples are offset binary.** The receiver takes the converter's plain
unsigned code. Mid-scale (127.5 for 8 bits) stands for zero, so chip 0
(bipolar +1) arrives near `128 + A` and chip 1 (bipolar -1) near `127 - A`.
In offset binary, inverting every bit is a sign change about mid-scale:
`~x = (2^DATA_W - 1) - x`. The multiply by a ±1 chip therefore becomes "add
x when the local PN chip is 0, add ~x when it is 1". That is one row of
inverters and an adder.

**The sum is unsigned and centred.** Over one bit of L chips, each term is
mid-scale plus or minus the chip amplitude, and the sign is the data bit's
sign, because the PN chip cancels itself. The sum is therefore

```
sum = L*(2^DATA_W - 1)/2  +  (bipolar data) * L * A  (+ noise)
```

The `threshold` block supplies the centre value for the selected length,
`(2^DATA_W - 1) << (4 + s3s2)`. The `comparator` outputs 1 (bipolar -1) when
the sum is below it, and 0 otherwise, including a tie.

**Accumulator width (`ACC_W`).** The register width is the main
area/power trade-off of the design. A full-scale input needs
`ACC_W >= DATA_W + log2(L)` bits:

| DATA_W | L = 32 | 64 | 128 | 256 |
|---|---|---|---|---|
| 4 | 9 | 10 | 11 | 12 |
| 8 | 13 | 14 | 15 | 16 |
| 12 | 17 | 18 | 19 | 20 |

Real received signals rarely reach full scale, so smaller registers often work.
When the sum would exceed `2^ACC_W - 1`, `mac` clamps it there and raises
`sat`. A clamped sum still decides correctly as long as the threshold fits in
the register, because the sum can only have overflowed upwards. The defaults,
`DATA_W = 8` and `ACC_W = 16`, never clamp. The published register study
reports smaller minimum widths for its own test signals, whose amplitudes
are not known here. The recommendation that comes with that study, at least
12 bits when several input widths must be supported, is met.

With the chip amplitude at a quarter of full scale, `tb_dsss_width_sweep`
shows where this lands. The sum of a 0 bit starts to clamp one bit below
`DATA_W + log2(L)`, and bits are lost only once the threshold itself no
longer fits, two bits below. For example, an 8-bit input with 256-chip
codes decodes without error at 15 bits (clamping) and at 16 bits (not
clamping).

**Synchronization.** Acquisition and tracking are outside this design: it
assumes perfect synchronization. A one-cycle `sync` pulse marks chip 0 of
the first bit. It restarts the divider and the PN generator in that same cycle
and unlocks the output. Before the first `sync` no bit is reported. In the
system top, the transmitter's `frame` marker is meant to travel with the
signal and arrive as `sync`.

Timing: one sample per clock. `valid` pulses with `data_out` 2 cycles after
the last chip of each bit: one cycle for the accumulator register and one for
the comparator register.

## System top (`dsss_system`)

The top puts the transmitter and the receiver side by side. The carrier
modulator, the channel, the demodulator and the A/D converter between them
are analog, so their ends are ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | chip clock; synchronous active-low reset |
| `tx_sel` | in | 4 | transmitter code select |
| `tx_data_in` / `tx_data_req` | in / out | 1 | serial data and its sample strobe |
| `tx_coded`, `tx_frame` | out | 1 | coded chip; first-chip marker |
| `rx_sel` | in | 4 | receiver code select |
| `rx_sync` | in | 1 | first chip of the first bit |
| `rx_sample` | in | `DATA_W` | digitized received chip, offset binary |
| `rx_data_out`, `rx_data_valid` | out | 1 | recovered bit and its strobe |
| `rx_sat` | out | 1 | accumulator clamped this cycle |

Parameters: `DATA_W` (receiver input width, default 8; the register study
covers 4, 8 and 12) and `ACC_W` (accumulator width, default 16; the study
covers 6 to 16).

To loop the link back ideally, map `tx_coded` 0 to `128 + A` and 1 to
`127 - A`, and delay `tx_coded` and `tx_frame` by the same number of cycles
into `rx_sample` and `rx_sync`.

## Departures and own choices

* The code table, the 8-stage LFSR with feedback select and stage-5..8
  output multiplexer, the XOR spreader, the division of the clock per data
  bit, the MAC-free correlator idea and the threshold/comparator stage follow
  the published design.
* Own choices:
  * Offset-binary receiver input, with the sign change done as a bitwise
    inversion.
  * The threshold formula.
  * Clamping on overflow, and the `sat` output.
  * Tie handling in the comparator.
  * Clock-enable strobes instead of a divided clock.
  * A one-bit data latch with same-cycle bypass. The original mentions a data
    memory but gives no depth.
  * Registered transmitter output.
  * Seed `8'hFF`, synchronous reset and the `sync`/`frame` synchronization
    scheme.
  * Reserved selections behave like "no coding".
* Not built:
  * The analog link and the sensors with their converter.
  * Code acquisition and tracking. The original assumes perfect
    synchronization.

## Verification

Every module has a self-checking testbench in `tb/`, and each one prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_pn_code_gen` | all 16 selections against a stage-by-stage LFSR model; period and balance of all 12 codes; restart |
| `tb_clock_divider` | strobes once per 32/64/128/256 chips, chip index, restart |
| `tb_data_latch`, `tb_spreader`, `tb_comparator` | random stimulus against a reference |
| `tb_threshold` | threshold for 4 lengths at 3 width settings, including clamping |
| `tb_mac` | running sum and clamp flag against a reference, for a wide and a narrow register |
| `tb_dsss_transmitter` | every coded chip of all 16 selections against an independent model; one data request per L chips |
| `tb_dsss_receiver` | random bits with noise larger than the chip amplitude, all 16 selections; 2-cycle latency; no output before sync; clamping in a 13-bit instance |
| `tb_dsss_system` | transmitter to receiver through a delayed, noisy link model; all selections, mode switches under reset, the bit period, clamping in a 15-bit instance; counts how often each mechanism occurred |
| `tb_dsss_width_sweep` | the width study: `10101010` on each code length into 24 receivers at once (4-bit input with 6..16-bit registers, 8-bit with 9..16, 12-bit with 12..16); `sat` must appear exactly when the despread sum exceeds the register, and every bit must be recovered whenever the threshold fits; prints a clamp/error table |
| `tb_dsss_two_users` | two transmitters with different codes of the same length share the link; one receiver per user recovers its own bits, for two code pairs at every length |
| `tb_dsss_full` | default-size top: the test word `10101010` on all twelve codes, then a 1000-reading, 8-bit synthetic pH record (8000 bits, 256 000 chips) rebuilt without error |

To run one with Verilator, use:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/dsss_pkg.sv tb/tb_dsss_system.sv --top-module tb_dsss_system
./obj_dir/Vtb_dsss_system
```

The testbenches randomize with `$urandom` and need no external files. They
finish in well under a second.

## Files

| file | contents |
|---|---|
| `rtl/dsss_pkg.sv` | code-select type, tap table, length helpers |
| `rtl/pn_code_gen.sv` | programmable 8-stage LFSR with feedback select and length multiplexer |
| `rtl/clock_divider.sv` | chip counter giving per-bit strobes |
| `rtl/data_latch.sv`, `rtl/spreader.sv` | transmitter data store and XOR spreader |
| `rtl/dsss_transmitter.sv` | transmitter |
| `rtl/mac.sv`, `rtl/threshold.sv`, `rtl/comparator.sv` | correlator datapath |
| `rtl/dsss_receiver.sv` | receiver |
| `rtl/dsss_system.sv` | top: transmitter and receiver, with the analog link as ports |
