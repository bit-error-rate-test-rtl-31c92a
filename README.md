# PRBS bit error rate tester for an optical link

To measure how many bits an optical link corrupts, one FPGA is used as both
ends of the link. The transmitter sends a pseudo-random bit sequence (PRBS)
from a small linear feedback shift register (LFSR) into a 14-bit DAC. The DAC
drives an amplifier and a Mach-Zehnder modulator. The light crosses the fibre,
and a photodiode, an amplifier and a 14-bit ADC bring it back into the same
FPGA. The receiver builds a second copy of the same LFSR. Once that copy is
lined up with the incoming bits, every received bit that differs from the
local one is a bit error. The bit error rate is errors divided by compared bits.

The hard part is the lining up. The receiver does not know which of the 15
states the transmitter is in, or how many clocks the link takes. Two
schemes are implemented. A run-time input selects one:

* **Method 1 (seed recovery):** the receiver reconstructs the transmitter's
  state from the last four received bits. It needs nothing from the
  transmitter beyond the PRBS itself.
* **Method 2 (initialization pattern):** the transmitter first sends a fixed
  4-bit pattern. The receiver checks it, and retries up to four times. Then
  one button press loads the same hard-coded seed into both LFSRs.

Method 1 can be misled if the bits it recovers the seed from are themselves
corrupted. Method 2 avoids that, but its seed is fixed at build time.

Everything runs from one 50 MHz clock and sends one bit per clock.

## The PRBS generator (`lfsr_prbs`)

The generator is a 4-bit Fibonacci LFSR. On every clock the state shifts one
place towards the MSB, and the new LSB is `q[3] ^ q[2]`. The transmitted bit is
the MSB. The polynomial is x^4 + x^3 + 1, so any non-zero seed runs through all
15 non-zero states before it repeats. From seed `F` the states are:

| step  | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 |
|-------|---|---|---|---|---|---|---|---|---|---|----|----|----|----|----|
| state | F | E | C | 8 | 1 | 2 | 4 | 9 | 3 | 6 | D  | A  | 5  | B  | 7  |
| bit   | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 1 | 0 | 0 | 1  | 1  | 0  | 1  | 0  |

`load` (with priority) copies `seed` into the register, and `enable` steps it.
Reset loads `RESET_SEED`, so the transmitter is running as soon as reset is
released. The width and the taps are parameters. The functions `lfsr_next` and
`lfsr_advance` in `bert_pkg` describe the same step in software form.

## Transmit path (`dac_mapper`)

The DAC has two 14-bit channels. A `1` is sent as `CODE_HIGH` and a `0` as
`CODE_LOW`, on both channels. In effect all 14 data lines follow the PRBS bit.
The two codes should be set to the largest and smallest levels the driver
amplifier accepts. The defaults are full scale (`3FFF`/`0000`). The words are
registered, so they appear one clock after the bit.

## Receive path (`adc_slicer`)

The ADC word (taken as offset binary) becomes one bit, registered, one clock
after the sample:

* Method 1 takes the sign bit, i.e. the MSB: 1 above mid-scale.
* Method 2 outputs `sample > reference`. The reference resets to mid-scale
  (`2000`). It can be loaded directly (`ref_load`, `ref_in`). It can also be
  trained: while `ref_train` is high, the slicer records the smallest and
  largest sample it sees, and when training ends the reference becomes
  their mean. In Method 2 this happens automatically while each
  initialization pattern arrives, since the pattern contains both levels.
  The `ref_train` input can also trigger it at any time while the PRBS is
  arriving. Training matters on an attenuated or offset link, where both
  levels may sit on the same side of mid-scale. There, the first pattern
  check fails on the mid-scale reference, and the retry passes on the
  trained one.

## Lining up the receiver

Notation: `S(t)` is the transmitter state in clock `t`, and `D` is the number
of clocks from a transmitted bit to the matching received bit. In the top
level, `D = ext_delay + 2`: the DAC register, the external path and the slicer
register.

### Method 1: rebuilding the seed from the received bits (`m1_seed_recovery`)

In a Fibonacci LFSR that shifts towards the MSB, the MSB of the next three
states are bits 2, 1 and 0 of the current state. Four consecutive received bits
are therefore a complete earlier state. They are shifted into `rx_reg`, newest
bit in bit 0, and `rx_reg` ends up holding `S(t - D - 4)`. Stepping that value
four times gives the state the transmitter had when the newest bit left it.
For example, bits 1,1,0,0 give `rx_reg = 1100` and a seed of `0100`. In
general, four steps of `abcd` give `(a^b)(b^c)(c^d)(a^b^d)`.

`rx_seed` is recomputed every clock from the shift register's next value. As a
result, `rx_seed(t) = S(t - D)`: the state whose MSB is the bit arriving in
that same clock. It is valid from the fifth bit on.

A press of the load button copies `rx_seed` into the receive LFSR. From then
on, the receive LFSR runs exactly one clock behind the received bit stream. It
is therefore compared with the received bit delayed by one register
(`rx_bit_dly`). The scheme works for any link delay and needs no setting.

Comparison in Method 1 is on from reset. The error count climbs (LED 4) until
the press, which clears it. On a clean link it then stays at zero (LED 3).

### Method 2: initialization pattern and fixed seed (`m2_init_sync`)

1. After reset, or when `method` changes, the controller puts
   `INIT_PATTERN` (default `1010`) on the line, MSB first. This takes four
   clocks.
2. Starting `D` clocks after the first pattern bit, the receiver shifts in four
   bits and compares them with its own copy of the pattern:
   * While the pattern's samples arrive, the slicer reference is trained on
     them.
   * On a match, `led_no_pattern_error` is lit. The line then carries PRBS
     bits, which the receiver ignores.
   * On a mismatch, `led_pattern_error` is lit and the pattern is sent again.
     After `MAX_TRIES` (4) failed checks, `channel_fail` is raised and the
     controller waits for a restart (reset or a change of `method`).
3. A load press loads `SEED` into the transmit LFSR in the same clock. It also
   clears the counters. `D` clocks later, the same seed goes into the receive
   LFSR. From the next clock on, each received bit is compared directly with
   the receive LFSR's MSB. A press while counting restarts this alignment.

The receiver needs to know `D`. It is computed in the top level from the
`ext_delay` input, the measured delay of everything between the DAC pins and
the ADC pins. The original description loads both LFSRs in the same clock,
which is the `D = 0` case of this scheme. The 16-bit delay covers 25 km of
fibre (about 96 to 122 us, i.e. 4,800 to 6,100 clocks at 50 MHz) with plenty
of room.

## Counting errors (`bert_counter`)

When the checker is enabled, it XORs the received bit with the local bit.
`err_count` (32 bits) counts mismatches, and `bit_count` (48 bits) counts
compared bits. Both counters saturate rather than wrap, and both are cleared by
the load press. `led_no_error` (LED 3) is on while the error count is zero, and
`led_error` (LED 4) while it is not. `bit_error` shows the result of the last
comparison.

## The load button (`debounce`)

The raw button goes through a synchroniser flip-flop. A counter then checks
that the synchronised level has not changed for `STABLE_CYCLES` clocks
(500,000, i.e. 10 ms at 50 MHz) before an output flip-flop takes it. A clean
edge reaches `level` after `STABLE_CYCLES + 2` clocks, and shorter bounces are
dropped. The button is active low, and the falling edge of the debounced level
is the load event.

## Top level (`prbs_bert_top`)

The receiver does not have to listen to the ADC. For bring-up without the
optical path, `rx_src` selects one of two other sources:

* `RX_PIN`: a digital input, meant to be wired to the `tx_pin` output, for
  example between two connector pins;
* `RX_INTERNAL`: `tx_pin` fed back inside the FPGA.

Each path has one register on each side, like the DAC and slicer path, so
`D = ext_delay + 2` holds for every source.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | 50 MHz clock, asynchronous active-low reset |
| `method` | in | 1 | `METHOD1` / `METHOD2` (`bert_pkg::method_e`); a change restarts Method 2 |
| `rx_src` | in | 2 | `RX_ADC`, `RX_PIN` or `RX_INTERNAL` (`bert_pkg::rx_src_e`) |
| `btn_load_n` | in | 1 | raw load button, low when pressed |
| `ext_delay` | in | 16 | clocks from DAC word (or `tx_pin`) to ADC sample (or `rx_pin`) outside the FPGA; 0 for `RX_INTERNAL` (Method 2 only) |
| `dac_a`, `dac_b` | out | 14 | DAC channel words |
| `adc_sample` | in | 14 | ADC word, offset binary |
| `tx_pin`, `rx_pin` | out/in | 1 | transmitted bit (registered) and digital loopback input |
| `ref_train`, `ref_load`, `ref_in`, `ref_q` | in/out | 1/1/14/14 | slicer reference control and value |
| `tx_bit`, `rx_bit`, `bit_error` | out | 1 | transmitted bit, received bit, last comparison |
| `err_count`, `bit_count` | out | 32 / 48 | errors and compared bits |
| `led_no_error`, `led_error` | out | 1 | LED 3 / LED 4 |
| `led_pattern_error`, `led_no_pattern_error`, `channel_fail`, `init_tries` | out | 1/1/1/3 | Method 2 pattern check status |
| `btn_level`, `tx_state`, `rx_state`, `rx_reg`, `rx_seed_q` | out | 1/4/4/4/4 | probes |

Parameters: `SEED` (`1100`), `INIT_PATTERN` (`1010`), `MAX_TRIES` (4),
`DEBOUNCE_CYCLES` (500,000), `DAC_HIGH`/`DAC_LOW` (`3FFF`/`0000`). Widths and
defaults shared by the modules are in `bert_pkg`.

## What follows the original design and what does not

The following follow the original description:

* the 4-bit LFSR, with taps, shift direction and output bit as in its state
  tables and register drawing;
* the one-bit-to-14-bit DAC mapping;
* sign-bit and reference slicing;
* the Method 1 shift register and four-step seed function;
* the Method 2 pattern check with its retries and LEDs;
* the XOR comparison, the error counter and LED 3/LED 4;
* the 10 ms two-flip-flop-and-counter debouncer;
* the test loopbacks, inside the FPGA and from pin to pin.

Where the source disagrees with itself, the RTL takes these readings:

* Shift direction: one code fragment shifts the LFSR the other way. The
  register drawing, both state tables and a worked example all agree with the
  direction used here.
* Method 2 LEDs: the text swaps the two pattern LEDs relative to their names.
  Here, `led_pattern_error` means a mismatch.

The following are choices made in this RTL:

* a single clock for both ends;
* the `ext_delay` input and the delayed receive-LFSR load in Method 2;
* Method 1 comparing against the delayed received bit rather than the
  delayed transmit bit, so that it works through a real link;
* the min/max reference training;
* the compared-bit counter;
* counter widths and saturation;
* the default seed, pattern and DAC codes;
* button polarity.

The following are not included:

* **Receiver clock phase adjustment.** On the board, the receive side was
  clocked from a vendor PLL whose phase was changed at run time over JTAG, so
  that samples land in the middle of each bit. This RTL has one clock. On
  hardware, the slicer and everything after it would move to the
  phase-shifted clock.
* **Converter control pins and the board's pin-level configuration.** This
  covers the DAC write strobes, the converter clocks and the ADC output
  enables.
* **The analog and optical parts** (converters, amplifiers, modulator, fibre
  and photodiode). `tb/link_model.sv` is a simulation-only stand-in. It
  turns the DAC word into one of two ADC levels after a delay, with optional
  bit flips.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The RTL also carries
assertions, which are checked when simulating with `--assert`:

* the LFSR never falls into the all-zero state;
* there are never more errors than compared bits;
* the LFSRs are never loaded, and bits never compared, while the pattern is
  on the line;
* the receive load never comes before the transmit load.

| testbench | what it checks |
|-----------|----------------|
| `tb_lfsr_prbs` | the table above, the 1100 to 0100 example, hold, load priority, period 15 from every seed |
| `tb_debounce` | bounces ignored, press latency `STABLE_CYCLES + 2`, single press/release pulses |
| `tb_dac_mapper` | codes on both channels, one clock latency |
| `tb_adc_slicer` | sign bit, default threshold, trained reference equals the mean of min and max, loaded reference |
| `tb_m1_seed_recovery` | `rx_reg` and `rx_seed` against an independent LFSR model, for all 15 seeds |
| `tb_m2_init_sync` | pattern on the line, delays 0/1/5/9, training window, `rx_load` exactly `D` clocks after `tx_load`, retries, failure after 4 attempts |
| `tb_bert_counter` | counts against a model with random enable/clear, saturation |
| `tb_prbs_bert_top` | whole design at default parameters (see below) |

`tb_prbs_bert_top` runs the top with every parameter at its default,
including the full 10 ms debounce (about 4.5 million clocks, a few seconds in
Verilator). It goes through these steps:

1. Method 1 over a 3-clock link:
   * errors are counted before the load;
   * bounces are ignored;
   * after the press, the seed register and receive LFSR match the
     transmitter history and the error count stays zero;
   * 25 injected errors are counted exactly.
2. Reference training on an attenuated link.
3. A switch to Method 2 over a 5-clock link:
   * with the reference back at mid-scale, the first pattern fails, trains
     the reference, and the retry passes;
   * after a restart, the first pattern is corrupted on the link and
     retried;
   * the load gives zero errors;
   * 40 injected errors are counted exactly.
4. A dead link with a single level leads to `channel_fail` after four
   attempts.
5. Method 1 with the internal loopback: zero errors.
6. Method 2 over a 4-clock pin-to-pin wire: the pattern passes on the first
   attempt, the error count stays at zero, and 10 injected errors are
   counted.

The testbench also counts how often each of these mechanisms happened, and
fails if one never did.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/bert_pkg.sv tb/tb_prbs_bert_top.sv --top-module tb_prbs_bert_top
./obj_dir/Vtb_prbs_bert_top
```

Replace the testbench name to run another one. To lint the RTL:
`verilator --lint-only -Wall -y rtl rtl/bert_pkg.sv rtl/prbs_bert_top.sv`.

## Changing it

* **Longer PRBS:** set `LFSR_W` and `LFSR_TAPS` in `bert_pkg`, e.g. 7 bits
  with taps `1100000` for x^7 + x^6 + 1. Method 1 then needs `LFSR_W` received
  bits and advances `LFSR_W` steps, which the code already derives from the
  width. The seed and pattern defaults must be resized with it.
* **Other amplifier limits:** `DAC_HIGH` and `DAC_LOW`.
* **Shorter button filter** for simulation: `DEBOUNCE_CYCLES`.
* **More or fewer pattern retries:** `MAX_TRIES`.
