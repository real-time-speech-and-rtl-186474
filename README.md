# A computer-controlled transversal filter and LPC speech synthesizer

This is the RTL of a 10-tap digital transversal (FIR) filter. A small
minicomputer can replace the filter's coefficients at any time, and the new
set takes effect within a single sampling period. That makes the filter
time-varying. The filter can be used in two ways:

* **Open loop.** The input is sampled, and the output is
  `y(n) = sum_{k=1..10} h(k) x(n-k)`. Coefficients come from the computer or
  are typed on a hex keypad at the loader panel.
* **Closed loop.** An external analog summer feeds the filter output back to
  its input together with an excitation signal. This gives an all-pole filter,
  `y(n) = x(n) + sum h(k) y(n-k)`, which works as a linear-prediction speech
  synthesizer. An exciter supplies a pitch pulse train (voiced speech) or
  pseudo-random noise (unvoiced speech). Every 15 ms the computer sends a
  96-bit frame with the pitch period, the amplitude, the voiced/unvoiced flag
  and ten predictor coefficients. The filter and the exciter switch to the
  new frame together.

All arithmetic is bit-serial, with 8-bit two's complement data and
coefficients. Each sampling period is 100 master-clock cycles: 10 intervals of
10 clocks, with one multiply and one accumulate per interval. The design is
fully synchronous, with one clock (the master oscillator) and a synchronous
active-high reset. Every other timing signal is a one-cycle enable pulse
decoded from two counters.

## Block structure

```
ccdf_top
├── computer_output     16-bit output buffer of the computer, BUSY/DONE flags
├── loader_unit
│   ├── keyboard_encoder   16-key scan (one key per edit-clock tick), digit strobes
│   ├── edit_control       step switch: rotate the store by 9 words per press
│   ├── interface_control  START / IOPULSE / CLEAR / load switch handling, COMP
│   ├── load_control       align -> wait READY -> 80-bit transfer -> loaded
│   └── loader_storage     80-bit coefficient loop, display register, counters A/B/C
├── filter_unit
│   ├── filter_control     100-clock period decoder (the control pulses)
│   ├── filter_storage     9-word data loop, ADC latch, multiplicand, 80-bit coefficient loop
│   ├── serial_multiplier  8x8 shift-add multiplier, sign bit subtracts
│   ├── filter_accumulator 16-bit adder/latch
│   └── overflow_limiter   clips the sum to 8 bits
├── prbs_noise          15-bit maximal-length LFSR (noise source)
└── exciter             16-bit parameter extension, pitch counter, excitation value
```

`ccdf_pkg` holds the word sizes and `filter_ctrl_t`, the packed struct of
control pulses that `filter_control` sends to the datapath.

The top leaves out the analog parts and brings their digital signals out as
ports:

| Part | Ports on the top |
|---|---|
| Sample-and-hold | `sh_track` |
| 8-bit ADC | `adc_start`, `adc_data` (two's complement: the converter's offset-binary MSB inverted) |
| 8-bit DAC | `dac_data` |
| Summing amplifier of the closed loop | outside the design |
| Multiplying DAC of the exciter | `exc_pulse`, `exc_voiced`, `exc_amp` |

`exc_value` is the same excitation already multiplied out, as an 8-bit two's
complement number in units of 1/128.

## Number formats and the arithmetic chain

| Quantity | Format | Range |
|---|---|---|
| data x, coefficient h | Q1.7 (8 bits) | -1 ... 127/128 |
| product | Q1.11 (12 bits) | bits 14..3 of the exact Q2.14 product, truncated |
| accumulator | Q5.11 (16 bits) | -16 ... +16 |
| limiter input | Q5.7 (top 12 accumulator bits) | |
| output y | Q1.7 (8 bits) | |

The **multiplier** (`serial_multiplier`) takes the coefficient one bit at a
time, LSB first, from the coefficient loop. Each step adds zero or the
multiplicand to the upper half of a partial product and shifts it right one
place. Which of the two it adds is set by a zero/one/true/complement selector.
On the eighth step (the coefficient's sign bit) the selector gives the one's
complement, and an adder carry-in of 1 turns it into a subtraction. The
product is exact before truncation. The single overflow case, -1 x -1 = +1,
wraps to -1, as two's complement Q1.11 must.

The **limiter** looks at the top five bits of the 12-bit total. If they are
all equal the value fits in 8 bits and is passed through. Otherwise it
outputs -1 (0x80) if the total is negative, else 127/128 (0x7F), and raises
`overflow` for that sample.

## Timing of one sampling period

Each clock is named by the pulse number `p = 10*B + A` (B = interval, A = clock
within the interval):

| When | What |
|---|---|
| A = 0 | clear the multiplier |
| A = 1..8 | multiply step, and one shift of the coefficient loop (`sr_clk`) |
| A = 8 | the step uses the coefficient sign bit (subtract) |
| A = 9 | accumulate the product, load the next multiplicand from the data loop |
| p = 0 | READY to the loader, output latch (new `dac_data`), accumulator clear, sample-and-hold tracks, exciter sample clock |
| p = 1 | ADC start convert |
| p = 79 | ADC result into the storage input latch |
| p = 89 | that sample enters the data loop and the multiplicand latch, so it is used in the last (10th) product as x(n-1) |

The products come in the order x(n-10)h(10), ..., x(n-1)h(1). The newest
sample is needed only at the end, which leaves most of the period for the ADC
conversion. The filter's latency is one sample:
`dac_data` at the start of period m is computed from inputs m-1 ... m-10.
This is what makes closed-loop use possible.

The choice of pulses 79 and 89 and of the per-interval schedule is this
design's own. So is the choice of p = 0 for READY, the output latch and the
accumulator clear.

## The loader

The loader's store is an 80-bit serial loop, holding coefficients in the order
h(10)..h(1). Its last 8 bits are the display register. That register shows as
two hex digits, plus a coefficient number 0..9 (h(k) shows as k-1). A hex key
overwrites the left digit and then the right digit, alternately. Three
counters track the loop's position:

* A counts bits in a word (÷8).
* B counts words during an edit step (÷9).
* C counts words in the sequence (÷10).

Their terminal counts give `end_of_word`, `end_of_9_words` and `end_of_seq`.

**Computer transfers.** The computer puts a 16-bit word in its output buffer
(DOA), then issues START. The interface control shifts 8 bits from the buffer
(LSB first) into the loop on 8 filter shift clocks. It then answers with COMP,
which clears BUSY and sets DONE. A second START sends the high byte. A byte
moves in 8 shift clocks, about a tenth of a sampling period, so a
12-byte frame plus its LOAD takes about 3 sampling periods.

**Frame order.** Ten bytes from a cleared loader are h(10) first, ..., h(1)
last. Every bit pushed out of the loop during a transfer also shifts into the
exciter's 16-bit extension register. So a 12-byte speech frame ends with its
first two bytes (pitch, then amplitude with the voiced flag as bit 7) in the
exciter. The remaining ten bytes are in the loop. This is why a speech frame
is sent as pitch, amp/VUV, a8, a7, ..., a1, a10, a9: the loop's word
positions are counted from the cleared state, so after alignment a(k) lands
on h(k).

**LOAD.** A LOAD comes either from the computer (IOPULSE, then START) or from
the panel load switch. The load control then:

1. Rotates the loop until the LSB of h(10) is at its output.
2. Waits for READY.
3. Sends all 80 bits to the filter's coefficient loop within that one
   sampling period. The filter's coefficient loop takes these bits instead of
   recirculating its own. Each old bit is still used for the current period's
   product before it is replaced, so the period of the transfer computes with
   the old set and the next period with the new set.
4. Pulses `loaded`. This latches the exciter's parameters and, for a computer
   LOAD, also sends COMP.

The whole sequence takes between about 1 and 3 sampling periods.

**Step switch.** Each press rotates the loop by 72 bits (nine words), so
successive presses display h(1), h(2), ..., h(10). The loop shifts one bit per
edit-clock tick, and the edit clock is the keyboard scan clock: 400 Hz with
`SCAN_DIV = 2500` at a 1 MHz master clock. One press therefore takes 72 ticks,
about 0.18 s, and the switch must be held that long.

**Keyboard.** The keyboard scanner looks at one key per tick. A 16-bit shift
register, rotated with the scan, remembers each key's state from the last
scan, so a key that stays down is entered only once. There is no separate
debounce: each key is sampled only once per full scan (16 ticks, 40 ms), so
contact bounce shorter than that is not seen.

**CLEAR.** CLEAR clears BUSY and DONE and resets the loader's control and
counters.

## Exciter

The latched parameters are a pitch period P (8 bits, 2..255 samples), an
amplitude (7 bits) and the voiced flag. A down counter steps once per sample.
When it reaches 1 it reloads P and produces a one-sample pulse, so pulses are
exactly P samples apart.

* **Voiced:** the excitation is +amplitude on a pulse and 0 otherwise.
* **Unvoiced:** it is +amplitude or -amplitude, chosen by the noise bit. The
  noise comes from a 15-bit LFSR (x^15 + x^14 + 1, period 32767) stepped once
  per sample.

In the synthesizer, the external summer has a loop gain of 4. With that gain,
predictor coefficients in the range -4..+4 fit the filter's ±1 coefficient
format.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| ccdf_top, loader_unit, keyboard_encoder | `SCAN_DIV` | 2500 | master clocks per keyboard-scan / edit-clock tick |
| filter_control, filter_storage, filter_unit | `N_COEF` | 10 | taps |
| filter_control | `TICKS` | 10 | clocks per interval (needs ≥ coefficient width + 2) |
| serial_multiplier | `W`, `PROD_W` | 8, 12 | word length, kept product bits |
| filter_accumulator | `ACC_W`, `OUT_W` | 16, 12 | register width, bits given to the limiter |
| computer_output | `W` | 16 | computer word |
| exciter | `PITCH_W`, `AMP_W` | 8, 7 | parameter fields |
| prbs_noise | `LFSR_W` | 15 | noise register length (only 15 has its taps defined) |

The loader is built for 10 coefficients of 8 bits. Its counters and the
speech frame layout assume those sizes. A longer filter (for example 29 or 51
taps) would need a larger loader as well as larger `N_COEF` and period
counters. It would also run at a proportionally lower sampling rate.

## Where this design makes its own choices

* **Clocking.** There is one clock and synchronous reset. All shift clocks,
  latch strobes, the edit clock and the sample clock are enables.
* **Accumulator.** It is 16 bits (Q5.11). Each 12-bit product is added at
  full precision, and the limiter sees the top 12 bits. The ±16 range and
  the five-bit overflow test follow the specification; the register width
  is a choice.
* **Control pulse positions.** The pulses within the 100-clock period are
  chosen as listed above.
* **State machine encodings** are this design's. So is the precise
  behaviour of a START or IOPULSE that arrives while the loader is busy:
  it is ignored until the current operation ends.
* **Noise source.** The LFSR polynomial and seed are this design's, as is
  the mapping of noise bit 1 to +amplitude.
* **Exciter output.** The digital product `exc_value` is provided in
  addition to the multiplying-DAC inputs.
* **Keyboard digit order.** The left (high) digit is entered first after
  reset.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
reference arithmetic (exact product truncation, limiter, 10-tap sum) is in
`tb/ccdf_tb_pkg.sv`. To run one with Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/ccdf_pkg.sv tb/ccdf_tb_pkg.sv \
    tb/tb_ccdf_top.sv --top-module tb_ccdf_top -o sim
./obj_dir/sim
```

Notable tests:

* **`tb_serial_multiplier`** checks all 65,536 operand pairs.
* **`tb_filter_unit`** runs 300 sampling periods against the reference
  filter. It reloads the coefficients during operation and checks the
  100-clock output spacing and both limiter directions.
* **`tb_ccdf_top`** runs the whole design at its default parameters,
  including the 400 Hz keyboard scan, in three phases:
  1. The computer loads coefficients and the filter runs open loop on random
     and full-scale inputs, driving the limiter both ways. A second set
     replaces the first while the filter is running.
  2. An operator steps through the ten coefficients, types a new value and
     loads it with the panel switch.
  3. After CLEAR, the computer sends a voiced and then an unvoiced speech
     frame. The filter runs closed loop, with the testbench acting as the
     gain-4 summer.

  Every output sample is checked. Each mechanism is counted, and the test
  fails if any of them never happened. It simulates about 2.3 million master
  clocks in a few seconds.

* **`tb_speech_synth`** is the synthesizer workload. It sends ten 96-bit
  frames, one every 150 samples (the 15 ms / 67 Hz update rate at 10 kHz),
  and runs the loop with gain 4. It checks every sample, the 96 bits moved
  per frame, the pitch-pulse spacing and the noise. A frame and its LOAD
  take 3 of the 150 sample periods.
* **`tb_fir_design`** is the FIR workload. It builds 9-tap band-pass designs
  (pass band 0.0986-0.1826 of the sampling rate) with a rectangular and a
  Hanning window, rounds them to 8 bits and loads them. It then measures
  the response to sine waves at six frequencies. The measured amplitudes
  match the rounded design's response to within 0.002. With the
  rectangular window, the response at band centre is 0.78.

No analog behaviour is modelled. The ADC, DAC, sample-and-hold and summer
are represented only by the testbench driving `adc_data` and reading
`dac_data`.
