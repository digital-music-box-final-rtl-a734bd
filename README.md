# Music-box FPGA: a 32-point FFT note display and a keypad song selector

A small music box plays a song on three speakers while sixteen LEDs show
which frequency band the melody is in. A Raspberry Pi plays the music. This
FPGA does the two jobs next to it:

* **Spectrum display.** The Pi sends the melody on one pin as a square
  wave. The FPGA samples that pin at 2.4 kHz. It runs a 32-point fast Fourier
  transform (FFT) on each block of 32 samples and lights the LED of the
  frequency bin with the most energy. Each bin is about 76 Hz wide.
* **Song selection.** The FPGA scans a 4x4 keypad. When key 1 to 5 is
  pressed, it raises one of five lines to the Pi, which then plays that song.

The FFT is the hard part and gets most of the space below. It is not
pipelined. One small engine does every butterfly in turn, two clock cycles
each, and moves the data between two memory banks from one level to the
next.

The RTL is a re-implementation of the FPGA part of a published course
project report. Where this code follows that design and where it departs
from it is listed in [Departures from the original design](#departures-from-the-original-design).

## Block structure

```
music_box_fpga
├── tick_gen (x2)        2441 Hz sample enable, 153 Hz keypad-scan enable
├── fft_controller       sampling, frame control, LED output
│   ├── fft_core         32-point FFT engine
│   │   ├── fft_agu          sequencer / address generating unit
│   │   ├── fft_data_memory  two-bank ("ping-pong") memory
│   │   │   └── fft_bank_ram (x2)
│   │   ├── twiddle_rom      16 twiddle factors
│   │   ├── butterfly        radix-2 butterfly
│   │   └── peak_finder      largest-energy bin
│   └── led_decoder      bin -> one-hot LEDs
└── keypad_scanner       column scan, key decode, song lines
```

`music_box_pkg` holds the shared types: `cplx_t` is a packed `{re, im}` pair
of signed 16-bit numbers. It also holds the sample levels, the keypad layout
function and `bit_reverse`.

## Top-level pins

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 40 MHz board clock |
| `reset` | in | 1 | active-high, asynchronous |
| `data` | in | 1 | melody square wave from the Pi (asynchronous; synchronised inside) |
| `rows` | in | 4 | keypad rows; a row is high when a pressed key connects it to the driven column |
| `cols` | out | 4 | keypad columns, exactly one high at a time |
| `song` | out | 5 | one-hot: `song[k-1]` is high after key *k* (1..5); keys other than 1..5, `*` included, clear the selection |
| `leds` | out | 16 | one-hot: LED *k* means bin *k*, about 76·*k* Hz, had the most energy |
| `done` | out | 1 | rises when an FFT result is ready and stays high for one sample period |

Parameters: `SAMPLE_DIV` (default 16384, so 40 MHz / 16384 = 2441 Hz) and
`SCAN_DIV` (default 262144, one column step at 152.6 Hz). Every block runs
on `clk`. The two slow rates are one-cycle clock enables from `tick_gen`,
not divided clocks.

## The spectrum path

### Sampling and framing (`fft_controller`)

The controller turns each sample tick into one FFT input. A high pin becomes
+1023 and a low pin -1023, both real, with 0 as the imaginary part. Sample
*n* (0..31) is written to the FFT memory. After the 32nd sample the
controller pulses `start` and waits for the engine's `done`. It then latches
the peak bin, which drives the LEDs through `led_decoder`, and starts
collecting the next 32 samples.

The FFT runs at the full clock rate. It takes about 165 cycles, far less
than the 16384-cycle sample period, so in practice no sample is lost. A tick
that does arrive while the FFT runs is dropped. The LEDs therefore update
every 32 sample periods (13.1 ms). The new value appears 164 clock edges
after the edge that writes the 32nd sample.

Because the input is a ±1023 square wave, the spectrum holds the note's
fundamental plus its odd harmonics. The fundamental is normally the
strongest. Two cases behave differently:

* A note above half the sample rate (about 1.2 kHz) is aliased, so some LED
  still lights, but not the one for its real pitch.
* A note below about 40 Hz shows up as bin 0.

### The FFT engine (`fft_core`)

This is a radix-2, decimation-in-time FFT. The input is stored in
bit-reversed order, and 5 levels of 16 butterflies produce the spectrum in
natural order. Four units do the work:

**Address generation (`fft_agu`).** A small FSM walks the level `i` (0..4)
and the butterfly index `j` (0..15):

```
WAIT --start--> CLEAR --> READ --> WRITE --> READ --> ... --> WRITE (i=4, j=15) --> DONE --> WAIT
```

The two addresses of butterfly `j` in level `i` are 2j and 2j+1, each
rotated left by `i` bits within 5 bits:

```
adr_a = rotl5(2j,   i)
adr_b = rotl5(2j+1, i)      // differs from adr_a only in bit i
tw    = j & ~(4'b1111 >> i) // the upper i bits of j, left-aligned in 4 bits
```

This reproduces exactly the pairs and twiddle exponents of the textbook
in-place radix-2 stage *i*:

* partners are 2^i apart;
* the twiddle exponent is (adr_a mod 2^i)·16/2^i.

The difference is that no nested group/offset counters are needed. In level
0 every butterfly uses twiddle 0. In level 4 `adr_a = j` and
`adr_b = j + 16`.

**Two cycles per butterfly.** The memory read is registered. In READ the AGU
presents `adr_a`/`adr_b`. In WRITE the read data is at the butterfly's
inputs, and the results are written back to the same two addresses. A whole
transform is 1 (CLEAR) + 80 × 2 + 1 (DONE) cycles. `done` is high 162 cycles
after the `start` cycle.

**Ping-pong memory (`fft_data_memory`).** There are two banks of 32 complex
words, and each bank has two ports. Level `i` reads bank `i[0]` and writes
the other bank:

| Level | Reads | Writes |
|-------|-------|--------|
| 0, 2, 4 | bank 0 | bank 1 |
| 1, 3 | bank 1 | bank 0 |

A level therefore never overwrites a value that a later butterfly of the
same level still has to read. Loading writes bank 0 through port A at the
bit-reversed sample index.

**Butterfly (`butterfly`) and twiddles (`twiddle_rom`).**

```
A = a + W·b
B = a − W·b
```

The twiddles are Q1.15, so 0x7fff stands for 1. The complex product W·b is
computed at full precision. Bits [30:15] of each 33-bit real or imaginary
sum are kept, which truncates the result. The additions wrap at 16 bits, and
there is no scaling between levels. With ±1023 inputs the largest possible
value is 32·1023 = 32736, so nothing overflows.

The ROM holds W_k = exp(+2πik/32) for k = 0..15, rounded from
32767·cos and 32767·sin. The positive exponent gives the complex conjugate
of the usual forward transform. For a real input this only swaps bins *k*
and 32−*k*, and the energy per bin is the same. The table stores only the 9
cosine values of the first quadrant and derives the rest from symmetry.

**Peak finding and clearing.** The WRITE cycles of level 4 produce final
values. The `out_a` side of those cycles covers bins 0..15 in order. During
those 16 cycles:

* `peak_finder` computes re² + im² as a 32-bit unsigned number and keeps the
  first bin with the strictly largest value.
* Instead of the results, zeros are written. Level 4 writes bank 1, so bank 1
  ends up cleared; bank 0 is overwritten by the next 32 samples anyway.

Bins 16..31 mirror bins 1..15 for a real input, so they are not searched.
`fft_core` also brings the level-4 results out as a stream (`res_valid`,
`res_adr_a/b`, `res_a/b`), because they are never stored.

## Keypad and song selection (`keypad_scanner`)

One column is driven high at a time (0001 → 0010 → 0100 → 1000) and moves on
at every scan tick. The rows go through a two-flop synchroniser. They are
sampled on the tick, at the end of the column's period. A sample with
exactly one row high decodes through the layout below, where row 0 is the
top row and column 0 is the left column:

```
1 2 3 A
4 5 6 B
7 8 9 C
* 0 # D
```

The key is held until another key is seen. A sample with several rows high
is ignored. Debouncing comes from the slow scan alone. Each key is looked at
once every four column periods, about 26 ms, which is longer than typical
contact bounce. Reading the same key again changes nothing. A held key is
found within 4 scan ticks.

## Outside the FPGA

These parts of the music box are not logic and have no RTL:

* **Raspberry Pi.** It reads the score files, plays three parts as 25 ms
  three-note chords, and sets the dancers' motor PWM from a moving average of
  note lengths.
* **Analog and passive parts.** The LM386 amplifiers, the speakers, the
  L293 H-bridges and DC motors, the LEDs with their resistors, and the
  keypad itself.

The testbenches contain behavioural models of the keypad matrix
(`keypad_matrix_model`) and of the Pi's melody pin (`pi_melody_model`).

## Departures from the original design

* **Clocking.** The original clocks the FFT logic from a counter bit, at
  2.4 kHz, and the keypad from another counter bit. Here everything uses the
  40 MHz clock with enables. The FFT runs at full speed, and `done` is
  stretched to one sample period to keep its original length.
* **Low sample level.** The original text gives the low level as −1024, but
  the original waveform and data show 0xfc01 (−1023). This design uses
  −1023, which keeps a 50 % square wave free of DC.
* **Twiddle sign.** The twiddle table uses the positive exponent because the
  original simulation waveform shows W_8 = 0 + i·0x7fff. For the LED output
  this makes no difference.
* **Song lines.** There are five one-hot song lines (keys 1..5), as in the
  pin list and the text; one listing of the original has only three.
* **Keypad scan.** The scan has four states; the original also has an
  all-columns-low state. The scan step is 2^18 cycles, 153 Hz, as the text
  says; one original divider gives half that rate.
* **Peak finder width.** It uses an unsigned energy, so two full-scale
  components cannot overflow it.
* **Start signal.** The original block diagram draws a start signal from the
  Pi, but the pin list has none. The FFT start is generated internally.
* **Bin width.** The text describes 60 Hz per LED. At the 2.4 kHz sample rate
  a 32-point bin is 76.3 Hz, so the LEDs span 0 to 1.14 kHz.

## Verification

Every block has a self-checking testbench in `tb/` (the bank RAM is tested
through `fft_data_memory`). Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_butterfly` | 5000 random and corner operands against an integer model |
| `tb_twiddle_rom` | all 16 entries against floating-point cos/sin |
| `tb_fft_agu` | per level: every address used once, partners differ in bit *i*, textbook twiddle exponent, bank select, READ/WRITE alternation, 162-cycle latency |
| `tb_fft_data_memory` | bit-reversed loading and bank isolation in both directions |
| `tb_peak_finder` | running maximum, ties, full-scale values, clear |
| `tb_fft_core` | every bin bit-exact against a reference FFT (`fft_ref_pkg`, written as the textbook loop), peak bin, floating-point peak for square waves, memory cleared, latency |
| `tb_fft_controller` | LEDs against the reference FFT of the sampled data for tones in all 15 bins, result timing, `done` width, dropped ticks |
| `tb_keypad_scanner` | all 16 keys, song lines, hold after release, scan rotation, two keys in one column |
| `tb_led_decoder`, `tb_tick_gen` | exhaustive / period |
| `tb_music_box_fpga` | end to end at the real 2441 Hz sample rate (slow clock, `SAMPLE_DIV=256`, `SCAN_DIV=64`): songs 1..5 and `*`, the C-major test scale with every LED checked, notes below and above the range; counts each mechanism |
| `tb_bach_excerpt` | the opening melody of song 1 (13 notes and rests, 200 ms per eighth note) at the real sample rate: every frame against the reference, every frame inside a note lights the note's bin, every frame inside a rest lights bin 0 |
| `tb_music_box_fpga_full` | default parameters at 40 MHz: key 1 selects song 1, A4 (440 Hz) lights LED 5 or 6 in three frames of 32·16384 cycles |

To run one with Verilator 5, list the package first, then the reference
package and models, then the design files:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    rtl/music_box_pkg.sv tb/fft_ref_pkg.sv tb/keypad_matrix_model.sv tb/pi_melody_model.sv \
    tb/tb_music_box_fpga.sv --top-module tb_music_box_fpga -o sim
./obj_dir/sim
```

`-Irtl` lets Verilator find each module in the file of the same name.
`--timescale` gives the design files the time unit the testbenches use, and
`-Wno-fatal` keeps lint warnings, such as deliberately open output pins,
from stopping the build. The
end-to-end test takes about 15 s and the full-size one about 20 s.

## Changing it

* **Sample rate and scan rate.** Set `SAMPLE_DIV` and `SCAN_DIV` on the top.
  The bin width is clock / `SAMPLE_DIV` / 32.
* **Sample levels.** Change `SAMPLE_HIGH` and `SAMPLE_LOW` in `music_box_pkg`.
* **FFT size.** The size is fixed at 32 points by the package constants and
  by the 4-bit twiddle index. A larger FFT needs a wider `j`/`i` in
  `fft_agu`, a larger twiddle table and, above about 32 points of ±1023
  input, scaling between levels to avoid overflow.
