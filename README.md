# On-chip self-test of an ADC for total-ionizing-dose damage

Ionizing radiation slowly shifts comparator offsets and adds leakage in an
analog-to-digital converter. After some tens of krad a converter can miss codes,
drift in offset and gain, and lose linearity. This design lets a chip measure
its own ADC while it runs. A counter-driven delta-sigma DAC makes a very slow,
very linear voltage ramp. An analog multiplexer puts the ramp on the ADC input
for the length of one self-test cycle. For every ramp step the ADC output is
averaged and stored, one byte per step, in a 4 KB result memory. The stored
transfer curve is read out over JTAG. The analysis (ramp-histogram method for
missing codes, offset, gain error, DNL and INL) runs off chip; no evaluation
logic sits on the die.

```
 analog_in ─────────────────────┐
                                ▼
 ramp_counter ─► ds_modulator ─► ds_dac_filter ─► analog_mux ─► subranging_adc ─► adc_data
   (12 bit)       (1-bit stream)  (ramp voltage)   (test_sel)     (8 bit, 2-step)
      ▲                                                 ▲               │
      │                                                 │               ▼
      └───────────── bist_control ──────────────────────┘          averager (÷64)
                       │   ▲                                            │
                       ▼   │                                            ▼
                  bist_sram 4096 x 8 ◄──────────────────────────────────┘
                       │
                       ▼
                 p2s_converter ─► jtag_tap ─► TDO      (TCK, TMS, TDI, TRST_N in)
```

## The self-test cycle

A cycle is started over JTAG, at any time during normal operation. The
sequencer (`bist_control`) then does the following for each of the 4096 ramp
codes:

1. **Settle.** The counter holds the code and the ADC input stays on the ramp.
   The sequencer waits `SETTLE_CYCLES` clocks, 4104 by default, until the DAC
   output reflects only the new code.
2. **Average.** The next 64 ADC conversions, one per clock, go to the
   averager.
3. **Write.** One clock later the mean is written to the SRAM at the address
   equal to the ramp code, and the counter steps.

After code 4095 the multiplexer returns the ADC to its normal input, `busy`
falls and `done` is set. A cycle lasts exactly
`2**CODE_BITS * (SETTLE_CYCLES + 2**AVG_LOG2 + 1)` clocks. That is 17,084,416
clocks, about 1.07 s at a 16 MHz sample clock. While the ramp runs, the
normal input is not converted.

Averaging is what makes the on-chip memory small. Without it, 64 samples per
step would be stored. For a 10-bit converter that is 4096 × 64 × 10 bits,
320 KB of radiation-hardened memory, instead of 4 KB.

## Making a linear ramp: the delta-sigma DAC

The ramp has 12-bit resolution, four bits finer than the ADC. Each ADC code
is therefore crossed by 16 ramp steps. This resolution comes from
oversampling, not from matched analog parts:

* `ds_modulator` is a first-order modulator. Each clock it adds the code to a
  12-bit accumulator and sends the carry out as the output bit. For a constant
  code `x`, the bit pattern repeats with a period that divides 4096. Any 4096
  consecutive bits therefore hold exactly `x` ones.
* `ds_dac_filter` models the one-bit DAC and its analog reconstruction
  filter. It is an ideal moving average over the last `2**DAC_OSR_LOG2 = 4096`
  bits. With that window equal to the modulator period, the filter output
  equals the code exactly 4096 clocks after a step. The ramp is therefore
  perfectly linear in the model. Real filters settle with a tail and add
  noise, and neither is modelled. The default settle time is this window plus
  8 clocks of margin.

Higher resolution (up to 18 bits, for ADCs up to 16 bits) is reached by
widening the counter and the modulator and by raising the oversampling ratio.
The parameters allow this, but the fixed-point analog width (below) would have
to grow too.

## The converter under test and how damage shows

`subranging_adc` is a behavioural model of an 8-bit, two-step sub-ranging
converter:

* A resistor ladder has 16 large segments, each made of 16 small resistors.
* The coarse flash sub-ADC has 15 comparators on the segment taps. It resolves
  the four upper bits and selects a segment.
* The fine flash sub-ADC has 15 comparators on the small taps of the selected
  segment. It resolves the four lower bits.
* Each comparator array feeds a thermometer-to-binary decoder
  (`therm_decoder`). The decoder counts ones, so a bubble costs one code.
* The output is registered, with a latency of one clock.

Every comparator has an input-referred offset port (`msb_offset[k]`,
`lsb_offset[j]`). These ports emulate radiation damage. When a coarse
threshold is shifted up by `o`, inputs just above the segment boundary stay in
the segment below. The fine array then clips at `1111`, and up to `o / 256`
codes just above the boundary never appear. A threshold shifted down makes the
codes just below the boundary read as the first code of the next segment.
This is the missing-code failure the self-test is meant to expose. The
end-to-end testbenches compare the stored curve with this rule, code by code.

## Reading results over JTAG

`jtag_tap` is a standard 16-state 1149.1 TAP with a 4-bit instruction
register. It has three instructions:

| IR     | name        | data register                                                                                     |
|--------|-------------|---------------------------------------------------------------------------------------------------|
| `0010` | BIST_CTRL   | 2 bits. Capture reads `{done, busy}`. Update with bit 0 set starts a cycle; bit 1 set rewinds the read pointer to address 0. |
| `0100` | SRAM_READ   | 8 bits, the `p2s_converter`. Capture loads the byte at the read pointer. Shift-DR sends it LSB first. Update-DR advances the pointer. |
| `1111` | BYPASS      | 1 bit (selected after reset or TRST_N; unknown codes also act as BYPASS).                        |

Capture-IR loads `0001`. A read-out therefore looks like this: load IR
`0100`, then do 4096 DR scans of 8 bits. Scan `n` returns the mean ADC output
for ramp code `n`. Starting a cycle also rewinds the pointer.

The JTAG pins are synchronised into the system clock and TCK edges are
detected there, so the design has a single clock. As a result TCK must be at
most clk/6, with each TCK phase lasting at least three clocks. TMS and TDI are
taken at the TCK rise, and TDO changes at the TCK fall.

## Surviving upsets during a one-second cycle

A self-test cycle lasts over a second, which is long enough for a
single-event upset to hit the sequencer. The ramp counter and all sequencer
state are held in `tmr_reg` registers: the sequencer state, its timer, the
`done` flag and the read pointer. Each `tmr_reg` keeps three copies and
outputs their bit-wise majority. Every clock, all three copies are rewritten
with the new value or with the voted value. A flipped copy is therefore
masked at once and repaired on the next edge, and upsets in different copies
do not accumulate.

A synthesis tool that merges equivalent flip-flops folds the copies into one.
Generic synthesis does this, and it reports the counter as 12 flip-flops, not
36. The implementation flow must therefore mark `tmr_reg` instances
dont_touch and place the copies apart. The other hardening measures are cell
and layout work and are not in the RTL: enclosed-gate transistors against
leakage, guard rings, and DICE storage cells (for example for the result
SRAM and the JTAG registers).

## Analog signals in a two-state simulation

The ramp voltage, the normal analog input and the comparator offsets are
16-bit fixed-point numbers. A value `v` stands for
`REF- + v / 65536 · (REF+ - REF-)`; offsets are signed in the same unit. One
ADC LSB is 256 units and one 12-bit ramp step is 16 units. Thus everything,
the analog models included, simulates in plain two-state Verilator and lints
as ordinary RTL. The width is `bist_pkg::VA_W`.

## Modules

| file | role | kind |
|------|------|------|
| `bist_pkg.sv` | fixed-point analog type, JTAG instruction and TAP state enums, sequencer states | package |
| `bist_top.sv` | the whole system | RTL |
| `ramp_counter.sv` | 12-bit ramp code counter with clear, enable and last-code flag | RTL |
| `ds_modulator.sv` | first-order delta-sigma modulator | RTL |
| `ds_dac_filter.sv` | one-bit DAC and reconstruction filter (moving average) | behavioural model |
| `analog_mux.sv` | ADC input switch, normal input or test ramp | behavioural model |
| `subranging_adc.sv` | two-step 8-bit ADC with comparator offset ports | behavioural model |
| `therm_decoder.sv` | flash thermometer-to-binary decoder (ones count) | RTL |
| `averager.sv` | 64-sample accumulator with a 6-bit right shift (truncating) | RTL |
| `bist_sram.sv` | 4096 × 8 synchronous single-port result memory | RTL (memory array) |
| `p2s_converter.sv` | 8-bit parallel-to-serial shift register, LSB first | RTL |
| `bist_control.sv` | self-test sequencer and read pointer | RTL |
| `jtag_tap.sv` | JTAG TAP and instruction decode | RTL |
| `tmr_reg.sv` | triple-modular-redundant register with vote and scrubbing | RTL |

The parameters of `bist_top` have these defaults:

* `CODE_BITS = 12`: ramp, DAC and SRAM address width.
* `SUB_BITS = 4`: each half of the ADC. The ADC, averager, SRAM word and
  serialiser are `2*SUB_BITS` bits wide.
* `AVG_LOG2 = 6`: 64 samples are averaged.
* `DAC_OSR_LOG2 = 12`: the filter window. It must be at least `CODE_BITS`.
* `SETTLE_CYCLES = 2**DAC_OSR_LOG2 + 8`.

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. The JTAG bit-banging tasks are in
`tb/jtag_driver.svh`. The end-to-end flow is in `tb/bist_top_flow.svh`. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv tb/tb_bist_top_full.sv \
          --top-module tb_bist_top_full -Mdir obj_full
obj_full/Vtb_bist_top_full
```

The other testbenches are built the same way: name the testbench and its top.
Verilator finds the modules through `-Irtl`.

* `tb_bist_top` runs the whole system at a reduced size: an 8-bit ramp and a
  256-bit DAC window. It finishes in under a second and covers:
  * normal conversions;
  * a JTAG-started cycle with an undamaged ADC, which must store code `n` at
    address `n`;
  * a cycle with three damaged coarse comparators (offsets +700, −900 and
    +1500 units), whose stored curve must match the damage rule and shows
    missing codes;
  * status polls, a read-pointer rewind and the exact cycle length;
  * in both cycles, a comparison of the stored curve with the ADC output
    observed directly on `adc_data` in the middle of each ramp step. The two
    must be identical.

  Each of these mechanisms is counted, and a mechanism that never occurs
  fails the test.
* `tb_bist_top_10bit` runs the same flow with `SUB_BITS = 5` and the full
  12-bit ramp. This is a 10-bit converter, the widest one a 12-bit ramp is
  meant to serve. It runs only the damaged cycle and reads back 10-bit
  words.
* `tb_bist_top_full` runs the same flow with every parameter at its default.
  That is two full 4096-step cycles of about 17 M clocks each, plus two
  4096-byte JTAG read-outs. It takes about half a minute in Verilator. The
  damaged run shows 10 missing codes.
* Each module has its own testbench (`tb_<module>.sv`). Its expected values
  come from rules written in the testbench, not from the module. Each
  testbench was also shown to fail against a deliberately broken copy of its
  module.

## How far to trust it, and what is this design's own

The following follow the source architecture:

* the set of blocks and how they connect;
* the 12-bit counter and delta-sigma DAC;
* the test multiplexer;
* the 8-bit two-step ADC made of two 4-bit flash halves on a 16 × 16 ladder;
* averaging of 64 conversions with an adder and a shift;
* the 4 KB result memory with one byte per ramp code;
* the 8-bit parallel-to-serial converter;
* JTAG as the only control path.

The following are this design's own choices:

* the modulator order and structure, and the ideal moving-average filter;
* the settle time and the settle / average / write sequence;
* truncation in the averager, with no rounding;
* a single clock, with JTAG synchronised into it;
* the JTAG instruction set and register layout;
* the read pointer and its rewind;
* the ones-counting decoder;
* the one-clock ADC latency;
* the fixed-point representation of analog values;
* modelling radiation damage as comparator offsets only. Leakage-current
  effects and supply or reference degradation are not modelled;
* which registers are triplicated (the counter and the sequencer).

The source architecture quotes the converter both at 20 MS/s and as sampled
at 16 MS/s during the test. The clock rate does not enter the RTL; timing
figures here use 16 MHz.

Not represented:

* radiation hardening beyond `tmr_reg`: enclosed-gate transistors, guard
  rings and DICE cells are layout and cell choices outside this RTL, and the
  JTAG TAP registers are not triplicated;
* the analog non-idealities of the DAC, the multiplexer and the ladder;
* the off-chip ramp-histogram analysis.

The SRAM is a plain array of the hardened macro's size. `sram_wdata` of
`bist_control` is wired straight from `avg_data` on purpose: the averager's
output register already holds the byte for the write.
