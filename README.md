# A 27-tap FIR audio equalizer with downloadable coefficients

This is a digital audio equalizer that fits in a small FPGA. A 27-tap FIR filter
runs on 8-bit samples at 44.1 kHz. Its 14 coefficients are sent from a PC over a
serial line and can change while audio is flowing, so one board can act as a
low-pass filter, a high-pass filter or a shaped equalizer without being
reprogrammed. Samples come from an external A/D converter as 8-bit two's
complement words, and results go to a 16-bit D/A converter.

The design keeps the logic small with two ideas:

* **Folding.** The filter's impulse response is symmetric (linear phase), so the
  two samples that share a coefficient are added first. The 27 products then
  become 14.
* **One serial multiplier, used 15 times per sample.** A single 9-bit
  shift-and-add multiplier takes 21 clocks per product. It computes the 14
  products one after another, then waits one extra slot so the ripple adders
  can settle. That makes 15 × 21 = 315 clocks per sample. At a 13.89 MHz clock
  this is exactly 44.1 kHz.

All adders are plain ripple-carry adders built from one-bit full adders. Each
one has a sign-extension bit, so every sum is exact.

## Block structure

```
                 uart_clk domain          |            clk domain (13.89 MHz)
                                          |
 serial_in --> uart_rx --data_out[7:0]----+--> coef_shift_reg (14 x 8 bit)
                       --stop_receiving---+-->   (edge detector)     |
                                          |                          v
 adc_data[7:0] ---------------------------+--> tap_delay_line --> fold_adders --> operand_mux
 CS/WR/RD/CK <-- ad_controller <-- count  |     (27 x 8 bit)      (14 x 9 bit)       |
                         ^                |                                          v
                         |                |   mac_sequencer --slot--> ... serial_mult (9x9)
                         +----------------+---------------------count----+           |
                                          |                               mag, neg   v
 outdata[15:0] <-- output_reg <-- adder_tree (14 -> 1) <-- product_regs (14 x 12 bit)
```

| Module | Role |
|---|---|
| `fir_equalizer` | Top: the filter plus the serial receiver, each on its own clock |
| `fir_filter` | Everything on the 13.89 MHz clock |
| `serial_mult` | 9 × 9 signed shift-and-add multiplier. Its counter is also the master timebase |
| `mac_sequencer` | Counts slots 0..14 and marks the end of slot 13, when the new sample is taken |
| `tap_delay_line` | 27 × 8-bit sample shift register |
| `fold_adders` | 13 adders `x[k] + x[26-k]`, plus the centre tap |
| `coef_shift_reg` | 14 × 8-bit coefficient shift register with an edge detector on the receiver's strobe |
| `operand_mux` | Selects the folded sum and coefficient of the current slot |
| `product_regs` | 14 registers holding truncated, signed 12-bit products |
| `adder_tree` | 14 → 1 sum in four levels of sign-extending ripple adders, 16-bit result |
| `output_reg` | D/A output register in the converter's inverted code |
| `ad_controller` | CS/WR/RD sequence and a ≈2 MHz clock for the A/D converter |
| `uart_rx` | 28,800-baud receiver on a 3.6864 MHz clock, inverted line |
| `sign_ext_adder`, `full_adder` | The adder cell and the N-bit ripple adder with sign extension |
| `fir_pkg` | Shared widths and counts |

## The sampling period: 15 slots of 21 clocks

Everything in the filter clock domain is timed by the multiplier's operation
counter `count`, which runs 0..20. `mac_sequencer` counts slots 0..14 on top of
it. One sampling period looks like this:

| Slot | Clocks | What happens |
|---|---|---|
| 0 | 0–20 | At clock 0, `output_reg` stores the sum of the previous period's products. Product 0 (outermost tap pair) is computed |
| 1..12 | 21–272 | Products 1..12 |
| 13 | 273–293 | Product 13 (centre tap × centre coefficient). On the edge that ends the slot, the delay line shifts and takes `datain` |
| 14 | 294–314 | Idle. The multiplier runs on zero operands and nothing is stored. The adder tree settles |

Consequences a user should know:

* **Input sampling.** `datain` is read on one clock per period, the edge that
  ends slot 13. The A/D controller holds RD low over that point.
* **Latency.** A sample first affects `outdata` 337 clocks after it is taken:
  the idle slot, one full period of products, and one clock for the output
  register.
* **Coefficient changes.** A coefficient change takes effect at the next product
  that uses it. The output period in which the change happens therefore mixes
  old and new coefficients. During a download (14 bytes, about 5 ms) the filter
  keeps running with a partly shifted coefficient set. This is how the design is
  meant to work; mute the output during a download if that matters.

## The serial multiplier

This block is the least obvious part of the design, and everything else is
timed by it.

**Operands.** They are 9-bit two's complement numbers:

* the multiplier is a folded sum of two 8-bit samples, −256..254;
* the multiplicand is the 8-bit coefficient, sign-extended.

The multiplier works on magnitudes and restores the sign at the end.

**Per count:**

| count | Action |
|---|---|
| 0 (`mult_start`) | Store the operand sign bits `np`, `nc` |
| 1 | Load the magnitudes: the multiplier into `mplierbus`, the multiplicand into the low 9 bits of the 18-bit product register `mag`. The high half is cleared |
| 2, 4, …, 18 | If `mag[0]` is 1, add `mplierbus` into the high half `mag[17:9]` |
| 3, 5, …, 19 | Shift `mag` right by one |
| 20 (`mult_done`) | `mag` holds \|mplier\| × \|mcand\|. `neg = np ^ nc` is valid. Consumers take the product now |

After nine add/shift pairs, every multiplicand bit has passed through `mag[0]`,
and the high half holds the partial products. The adder keeps only 9 bits of
each sum. No carry is lost: before each add the high half is below
`mplierbus`, so the sum is below `2·mplierbus` ≤ 512. It fits in 9 bits, and
the shift that follows brings it back below `mplierbus`.

For example, for 12 × 13 the product register reads 13 at count 2 and 3078
at count 4, and ends at 156. The unit testbench checks these intermediate
values.

**Product register.** `product_regs` takes bits 15..4 of the 18-bit magnitude.
Four low bits are dropped and the top bits are zero for every legal operand
pair. The register then negates the 12-bit value if `neg` is set. Truncating
the magnitude *before* negating rounds toward zero. This is not the same as
truncating a two's complement number, which rounds toward −∞. The reference
model in `tb/fir_model_pkg.sv` does the same.

**One corner case wraps.** If both samples of a pair are −128 and the
coefficient is −128, the magnitude is 256 × 128 = 32768. Its bits 15..4 are
0x800, which reads as −2048 in 12 bits. Every other combination fits. The
published widths have the same limit. The PC download program accepts only
−127..127, which keeps clear of it.

**Signed result port.** `serial_mult` also keeps the full signed product in
`result` (17 bits), registered at `mult_done`. The filter does not use it; it
is there for reuse and observation.

## Folding, scaling and the adder tree

The 14 products are defined as follows:

```
folded[k] = x[n-k] + x[n-26+k]   (k = 0..12, 9 bits)
folded[13] = x[n-13]             (centre tap, sign-extended)
p[k]      = trunc_toward_zero( folded[k] * c[k] / 16 )   (12 bits)
y         = sum p[k]             (16 bits)
```

**Coefficient scale.** A coefficient of 127 is roughly unity. A full-scale
sample through a filter whose coefficient sum is *G* gives about `x·G/16` at the
output. The low-pass set below has a folded sum of 507, so a constant input of
100 settles at 3166 (3168 before the per-product truncation).

**Adder tree.** The tree is fixed at 14 inputs and grows by one bit per level:

| Level | Adders | Width | Notes |
|---|---|---|---|
| 1 | 7 | 12 → 13 bits | Adds pairs of products |
| 2 | 3 | 13 → 14 bits | The seventh 13-bit sum has no partner. It is sign-extended to 14 bits and added in at level 3 |
| 3 | 2 | 14 → 15 bits | |
| 4 | 1 | 15 → 16 bits | |

The sum is exact and cannot overflow: 14 × 2048 < 2¹⁵.

**Sign-extending ripple adder.** `sign_ext_adder` adds two N-bit numbers
through a chain of full adders. The extra bit N is not the final carry. It is
the sign of the true sum:

* 1 if both inputs are negative;
* 0 if both are non-negative;
* otherwise the MSB of the N-bit sum.

In logic: `r[N] = a·b + (a⊕b)·r[N-1]`, where `a` and `b` are the input MSBs.
Every adder in the design is this one, at widths 8 (folding), 9 (inside the
multiplier), and 12–15 (the tree).

**Timing.** The tree and the folding adders are combinational ripple chains.
The tree's longest path, through four levels of up to 15-bit ripple adders, is
allowed a whole slot (21 clocks, 1.5 µs). The folding adders and the operand
path have the idle slot too: about 22 clocks pass between the delay-line shift
and the next operand load. A
synthesis tool should be told these are multicycle paths. Otherwise it will try
to close the full ripple chains in one 72 ns clock, which is easy in any
current FPGA but not needed.

## Loading coefficients

**Sending a set.** The PC sends 14 bytes, centre coefficient first and
outermost coefficient last. Each byte goes into the same 14-entry shift
register, so after 14 bytes the first one sent has reached the centre position
`coefs[13]`.

**Serial format (`uart_rx`).** The receiver runs at 28,800 baud on a 3.6864 MHz
clock, which is 128 clocks per bit. The format is one start bit, 8 data bits LSB
first, and one stop bit. The line is inverted, as it comes from an RS-232 level
shifter:

* idle and the stop bit are low;
* the start bit is high;
* a data 1 is low.

**Inside the receiver.**

1. A rising edge on the idle line starts a word.
2. A half-bit counter gives an event every 64 clocks. Every second event falls
   at a bit centre, where the inverted line is shifted in.
3. The first sample is the start bit, which falls out of the register by the
   end of the word.
4. After the ninth sample the word is complete. `stop_receiving` goes high for
   three receiver clocks.

For byte 0x05, the register reads 00, 80, 40, A0, 50, 28, 14, 0A, 05 after the
successive samples.

**Crossing into the filter clock.** `stop_receiving` and `data_out` go straight
into the filter clock domain. `coef_shift_reg` finds the rising edge of
`stop_receiving` with two flip-flops:

* `delay0` samples the line;
* `delay1` samples `!delay0`;
* the shift pulse is `delay0 & delay1`.

This gives one filter clock per word, whatever the clock ratio. `data_out` is
stable at that point: it holds the word until the centre of the next start
bit, at least 256 receiver clocks (about 70 µs) even for back-to-back bytes.
The strobe itself lasts about 0.8 µs, which is eleven filter clocks.

There is no extra synchronising flip-flop in front of `delay0`. A metastable
`delay0` can at worst give a shift one clock early or late. It cannot give a
double shift, because `delay1` takes `!delay0` from the previous clock. An
assertion in `coef_shift_reg` checks the one-clock pulse in simulation. If you
port the design to a faster clock, add a synchroniser stage. It does not change
the behaviour.

## A/D converter control

**Converter clock.** The converter wants about 2 MHz. `ad_controller` derives a
one-clock pulse `ck` after counts 0, 7 and 14 of each multiplication, which is
every 7 system clocks (1.98 MHz). It counts 45 of these pulses per period
(`adcount` 0..44) and decodes the active-low lines from the count, through
registers:

| adcount | CS | WR | RD | Phase |
|---|---|---|---|---|
| 0 | 0 | 1 | 1 | Select |
| 1 | 0 | 0 | 1 | Start of acquisition and conversion |
| 2..36 | 1 | 1 | 1 | Converting: 35 A/D clocks, against the 7 + 27 = 34 the converter needs |
| 37 | 0 | 1 | 1 | Select |
| 38..44 | 0 | 1 | 0 | Converter drives its data. The filter takes the sample at adcount 42 |

**Timing.**

* CS is low from adcount 37 through adcount 1 of the next period.
* WR falls 7 system clocks after RD rises.
* With `res` low, all three lines are held high.
* Two assertions check in simulation that WR and RD are never low together and
  never low without CS.

## D/A output code

The D/A converter expects "complementary two's complement": every bit of the
two's complement word except the sign bit is inverted. `output_reg` stores
`{sum[15], ~sum[14:0]}`. The largest positive value becomes the smallest code
and the most negative the largest:

| Sum | Code |
|---|---|
| +32767 (0x7FFF) | 0x0000 |
| +1 | 0x7FFE |
| 0 | 0x7FFF |
| −1 (0xFFFF) | 0x8000 |
| −32768 (0x8000) | 0xFFFF |

Reset leaves the register at 0x7FFF, the code of zero.

## Coefficient sets used for testing

All values are listed centre coefficient first:

| Set | Coefficients `c13, c12, …, c0` | Folded sum |
|---|---|---|
| Low-pass, Kaiser, cutoff π/4 (≈5.5 kHz) | 127 113 76 33 0 −16 −16 −8 0 4 3 1 0 0 | 507 |
| High-pass, Kaiser | 127 −38 −25 −11 0 5 5 3 0 −1 −1 0 0 0 | 1 |
| Equalizer | 127 −2 1 4 6 7 6 4 2 1 0 0 0 0 | 193 |

The PC download program also offers four presets, all of which are simulated
too:

| Preset | Coefficients `c13, …, c0` |
|---|---|
| Low-pass, 2.8 kHz | 127 122 108 87 64 41 22 8 0 −3 −4 −4 −2 −1 |
| High-pass, 2.8 kHz | 127 −17 −15 −12 −9 −6 −3 −1 0 1 1 1 0 0 |
| Band-pass, 2.8–5.5 kHz | 127 69 30 −14 −43 −49 −36 −16 0 7 7 4 1 0 |
| Band-stop, 2.8–5.5 kHz | 127 −16 −7 3 10 11 8 4 0 −2 −2 −1 0 0 |

## How this RTL departs from the published design

**Clocking of the serial receiver.** The original receiver clocks its shift
register and bit counter from a bit clock derived in logic. Here every register
runs on the receiver clock, with enables at the same instants. Events move by
about one clock, which is well inside a 128-clock bit.

**Reset.** `res` is active low and synchronous, and clears everything the
filter reads:

* delay line and coefficients to 0;
* output to the code of zero;
* the sequencer to slot 0.

The receiver gets its own synchronous `uart_rst_n`. The original clears less
and leaves the receiver without a reset.

**Product width.** Products are 12 bits wide (magnitude bits 15..4), the
truncated variant. A full 16-bit variant is also described but was not the one
chosen.

**Additions of this RTL.** These are not in the original:

* the signed `result` port of the multiplier;
* the assertions;
* `fir_pkg`.

## Verification and how far to trust it

Every block has its own self-checking testbench in `tb/`. Each compares the
block against arithmetic written independently in the testbench, and each
ends with a line `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_full_adder` | All 8 input combinations |
| `tb_sign_ext_adder` | Exhaustive at widths 8 and 4, random at width 15, against signed integer addition |
| `tb_serial_mult` | Random operand pairs plus the extremes −256 × −128 and 255 × −255, against `a*b`: magnitude, sign and signed result. Register values at counts 2 and 4. The 21-clock spacing of `mult_done` |
| `tb_tap_delay_line`, `tb_fold_adders`, `tb_operand_mux`, `tb_product_regs`, `tb_adder_tree`, `tb_output_reg` | Against integer models. `tb_output_reg` also checks an 8-bit instance against the published code table |
| `tb_coef_shift_reg` | Strobes of random length and phase, word order, a strobe already high at reset |
| `tb_mac_sequencer` | Slot order, the 315-clock period, the position of the sample strobe |
| `tb_ad_controller` | 45 converter clocks per period. 7 WR, 49 RD and 70 CS clocks per period. The WR-after-RD spacing. Reset behaviour |
| `tb_uart_rx` | Random bytes with the inverted line format, the register trace for byte 0x05, the strobe |
| `tb_fir_filter` | The whole filter with coefficients loaded directly: every output against a bit-exact model, nine coefficient sets (the low-pass set, the four presets, four random sets including −128), extreme samples |
| `tb_fir_equalizer` | The whole design, both clocks at nominal rates. See below |

**`tb_fir_equalizer`** runs the whole design with no parameter overrides:

* Three coefficient sets are downloaded byte by byte over the serial line.
* The low-pass and high-pass sets are each driven with a 0→100 step and then
  a 3 kHz square wave.
* The equalizer set is driven with a sine sweep from 0 Hz to 22.05 kHz.
* A behavioural model of the A/D converter, `tb/adc1241_model.sv`, supplies the
  samples. It drives its data bus only inside the read window and flags a
  conversion that is read too early.
* Every output outside a coefficient change is compared with the bit-exact
  model.

The test also counts each mechanism and fails if one never happens:

* coefficient shifts and received bytes (42 each);
* set switches;
* negative products;
* products that lose low bits;
* idle slots;
* samples taken inside the read window (all of them);
* 315-clock periods;
* converter timing.

The run takes about 26 ms of simulated time, a few seconds of wall time.

For each block a deliberately broken copy was also simulated, to confirm that
the testbench catches the fault. Examples:

* a multiplier that ignores the multiplicand sign;
* a sequencer with 14 slots;
* a receiver that does not invert the line;
* a sign-extension bit without the carry term.

**What is not verified:**

* **Gate-level timing of the multicycle paths.** Simulation is cycle based.
* **Metastability at the clock crossing.** It is only argued above.
* **The analog parts and the converter chips.** These are modelled only as far
  as their digital interfaces.
* **Frequency response.** No filter response is checked against a frequency
  specification. The testbenches check that the hardware computes the FIR sum
  exactly; the shape of the response comes from the coefficients. The only
  response-level checks are the step tests: low-pass DC gain 507/16, high-pass
  DC nearly blocked.

## Simulating

The testbenches need Verilator 5 with `--timing`. From the repository root,
for example:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fir_pkg.sv tb/fir_model_pkg.sv tb/tb_fir_equalizer.sv \
  --top-module tb_fir_equalizer -o sim
./obj_dir/sim +verilator+rand+reset+2
```

**Other testbenches.** Replace the testbench name to run another one. The
unit testbenches of blocks that do not use the packages still build with the
same command line.

**Random initial values.** `+verilator+rand+reset+2` starts every register at a
random value, which shows up anything that depends on power-up state. Use
`+verilator+seed+N` to vary the values.

**Clocks.** `tb_fir_equalizer` uses `#36` (13.89 MHz) and `#135.63`
(3.6864 MHz) half periods, so it needs the 1 ns time unit given above.

## Changing the design

**Parameters.** Widths and counts live in `rtl/fir_pkg.sv`, and every block has
parameters with the original sizes as defaults. Some are tied to each other:

* **Filter length.** `NUM_TAPS` must be odd. `NUM_COEF = (NUM_TAPS+1)/2`.
  `adder_tree` is written for exactly 14 products, so a different length
  needs a new tree.
* **Period.** The number of slots, times `2·MULT_W + 3` clocks, sets the
  sampling period. The A/D controller's `AD_LAST` must equal
  `period / 7 − 1`, and its read window must cover the end of the last product
  slot.
* **Baud rate.** `uart_rx`'s `HALF_BIT` is half the number of receiver clocks
  per bit.

**Other sample rates.** For a different sample rate, change the clock: the
design is fully synchronous to `clk`, and the converter clock scales with it.
