# Realtime sound localization: a delay-and-sum direction finder

This design finds the direction a sound comes from with a small microphone
array and shows the angle on 7-segment displays. It repeats the measurement
continuously. Each axis has four I2S MEMS microphones in a line. The design
takes one block of 1024 samples from every microphone and transforms each
block with an FFT. It picks the strongest frequency bin k in the first
microphone's spectrum. It then steers the array towards 37 candidate
directions (-90° to +90° in 5° steps) at that one frequency, and reports the
direction with the most output power. This is the classic Bartlett
(delay-and-sum) beamformer, evaluated in the frequency domain:

    P(θj) = | Σ_{i=0..3} X_i(k) · D_ij |² ,   D_ij = exp(+j·2π·k·τ_ij / N)

Here X_i(k) is bin k of microphone i's FFT, and τ_ij is the delay, in
samples, with which a plane wave from direction θj reaches microphone i
after microphone 0. The design has two axes. They are two identical
single-axis chains, fed by eight microphones on one I2S bus.

## Signal chain

```
 SD1..SD4 ──► i2s_capture ──► raw_ram ×8 ──┬─► axis_localizer (axis 0: SD1, SD2)
 SCK, WS ◄──┘   (1024 frames)              └─► axis_localizer (axis 1: SD3, SD4)

 axis_localizer:
   raw_ram q ──► fft_wrapper ×4 ──► FFT RAM ×4 ──► freqdetect (mic 0) ──► maxbin
                 (fft_core inside)         │                                │
                                           └────────► weightblock ◄─────────┘
                                                   (delay_rom, trig_rom,
                                                    compmult, realmult)
                                                          │ doa
                                                      angdisplay ──► 3 digits
```

| Module | Role |
|---|---|
| `sound_localizer` | Top. Holds the shared I2S capture, the eight raw RAMs and two axes, and restarts the system when both axes finish. |
| `axis_localizer` | One axis. Holds four FFT wrappers, frequency detection, the direction scan and the display driver. |
| `i2s_capture` | I2S master (SCK, WS). Shifts in the 24-bit words and writes 16-bit samples to the raw RAMs. |
| `raw_ram` | 1024 × 16 buffer per microphone. It is written by address and read in order by request, like a FIFO. |
| `fft_wrapper` | Control for one channel: streams the raw block into the FFT and stores the result in a 1024 × 28 FFT RAM. |
| `fft_core` | 1024-point radix-2 FFT with a sop/eop/valid packet interface. |
| `freqdetect` | Finds the bin with the largest re²+im². It skips DC and the lowest bins. |
| `weightblock` | Direction scan: computes P(θj) for the 37 directions and keeps the direction with the largest value. |
| `delay_rom` | Steering delays τ_ij, computed at elaboration. |
| `trig_rom` | 1024-entry cos/sin table, computed at elaboration. It supplies the FFT twiddles and the steering phasors. |
| `compmult`, `realmult` | Signed complex and real multipliers. |
| `angdisplay` | Shows the signed angle on three active-low 7-segment digits. |
| `sl_pkg` | Shared constants, the FFT word type and the array geometry. |

## One measurement, step by step

1. **Capture** (`i2s_capture`). SCK runs all the time at clk/16 (3.125 MHz
   from 50 MHz). One frame is 64 SCK periods, numbered by `clk_cnt`. The
   frame rate is fs = 48.828 kHz. WS is low for periods 0–31 (left slot) and
   high for 32–63 (right slot). The left word's 24 bits are shifted in, MSB
   first, on the rising edges of periods 1–24. The right word's bits come in
   periods 33–56. In period 57, the upper 16 bits of all eight words are
   written to the raw RAMs with a one-cycle `wrreq`. After 1024 frames the
   block goes to READ and raises `ready`. A block always starts on a whole
   frame after the start pulse. Capture takes 1024 × 64 × 16 ≈ 1.05 M cycles
   (21 ms).
2. **FFT** (`fft_wrapper`, four per axis, running in lock step). The states
   are IDLE → READ → WRITE → READY. In READ, the wrapper issues 1024
   consecutive `rdreq`s. The samples arrive one cycle later and go into the
   FFT as one packet: `sink_sop` on sample 0, `sink_eop` on sample 1023. The
   FFT input is the upper 14 bits of each 16-bit sample, with the imaginary
   part 0. The output packet is written to the FFT RAM. An address generator
   with two states (VACANT, START) restarts at address 0 on the packet's
   sop. READY (`fftdone`) holds the spectrum until the next `go`. This step
   takes 1024 + 5120 + 1024 cycles plus a few.
3. **Dominant frequency** (`freqdetect`). This reads bins 4…511 of
   microphone 0's spectrum, one per cycle, and keeps the first bin whose
   |X|² is strictly larger than the running maximum. It takes 509 cycles.
4. **Direction scan** (`weightblock`). This reads X_0…X_3 at bin `maxbin`.
   For each direction it accumulates four complex products X_i·D_ij, taking
   two cycles per microphone. It then squares the magnitude and compares it
   with the best value so far. A scan takes 336 cycles. `done` rises, and
   `angdisplay` latches the angle.
5. **Restart** (`sound_localizer`). When both axes are done, a one-cycle `go`
   starts the next capture. The same pulse resets the raw RAM read pointers
   and returns the FFT wrappers to IDLE. Processing (about 8k cycles) is
   short next to capture, so a new estimate appears about every 21.2 ms
   (47 per second).

## The FFT and the bit-reversed spectrum

`fft_core` is a compact in-place FFT. It does not use a pipelined streaming
architecture. It loads the 1024 samples into a register-file memory. It then
runs 10 decimation-in-frequency stages of 512 butterflies, one butterfly per
cycle:

    A' = (A + B) / 2          B' = ((A − B) · W^m) / 2,   W^m = e^{−j2πm/N}

The division by 2 in every stage makes the result X[k]/N, so no stage can
overflow. The data path carries 4 guard bits below the 14-bit input LSB. The
twiddle table's full scale is 2047, not 2048. The butterfly corrects this
gain with a small extra term, so repeated stages do not shrink large peaks.

Decimation in frequency with natural-order input gives the output in
**bit-reversed order**. Output word a of the packet, and so FFT RAM address
a, holds bin bitrev(a). Everything that reads the FFT RAM therefore uses
bit-reversed addresses: `freqdetect` scans bin k at address bitrev(k), and
`weightblock` reads address bitrev(maxbin). If you replace the core with one
that outputs in natural order, drop the bit reversal in those two places.

A real tone of amplitude A (in 14-bit input LSBs) at an exact bin appears as
A/2 in that bin and in its mirror bin.

## How the steering phasors are formed

D depends on both direction and frequency. A table of D for every bin would
need 512 × 37 × 4 complex entries. Instead, `delay_rom` holds only the 148
frequency-independent delays, in samples, as signed Q7.8 values:

    τ_ij = i · d · sin(θj) · fs / c        d = 0.04 m, c = 343 m/s, fs = 48828.125 Hz

The weight block computes the phase index p = ⌊k·τ_ij⌋ mod 1024, in units of
1/1024 of a turn. It looks up cos and sin of p in `trig_rom`, which gives
D_ij = cos + j·sin. Microphone i hears the wave τ_i samples late, so
X_i = X_0·e^{−j2πkτ_i/N}. The positive phase of D undoes this delay, and the
terms add in phase only for the true direction.

The geometry constants (`MIC_SPACING_M`, `SOUND_SPEED`, `FS_HZ`) and the
direction grid (`N_DIR`, `DIR_MIN_DEG`, `DIR_STEP_DEG`) are in `sl_pkg`. Both
tables are rebuilt from them at elaboration. If you change the SCK divider,
also change `FS_HZ` to clk / SCK_DIV / 64. With 4 cm spacing, frequencies
up to c/(2d) ≈ 4.3 kHz are free of spatial aliasing.

Resolution is coarse with a four-microphone, 12 cm aperture. Near ±90° the
power curve is flat, so the 5° grid and the fixed-point rounding can move
the answer by one grid step. The testbenches allow that.

## Number formats

| Quantity | Format |
|---|---|
| I2S word | 24 bits, two's complement, MSB first |
| Raw sample | bits 23:8 of the word (16 bits) |
| FFT input | upper 14 bits of the raw sample |
| FFT RAM word (`fft_word_t`) | {re[27:14], im[13:0]}, signed, X[k]/N |
| cos/sin | signed 12 bits, full scale 2047 |
| Steering delay | signed 16 bits, Q7.8 samples |
| Array output Y | the sum of the four 27-bit products, shifted right by 11 |
| `doa` | signed 8-bit degrees |
| Display | {g,f,e,d,c,b,a}, active low. `disp[a][2]` is the sign ('-' or blank), `[1]` the tens (blank if 0), `[0]` the units. All three show '-' until the first estimate. |

## Where this design makes its own choices

The overall structure follows the source design. The following points are
this implementation's own choices:

- **FFT core.** The original uses a vendor streaming FFT core. `fft_core` is
  a simple replacement with the same kind of packet interface. It is
  block-based, so its latency differs: 5120 compute cycles between input and
  output.
- **FFT RAM write start.** The original address generator waits for
  `source_eop`, which suits a core that streams without gaps. This core
  emits one packet per block, so writing starts at `source_sop`. A
  "start of raw data" pulse from the original packet counter has no stated
  use and is not built.
- **Steering matrix.** D is formed from stored delays, not stored whole (see
  above).
- **Geometry and rates.** These were chosen for the design: microphone
  spacing 4 cm, SCK divider 16, the 37-direction grid, and the low-frequency
  cut-off `MIN_BIN = 4` (≈190 Hz). The detector searches only the lower
  half of the spectrum, because the upper half mirrors it.
- **Channel mapping.** Microphones 0–3 of axis 0 are SD1-left, SD1-right,
  SD2-left and SD2-right. Axis 1 uses SD3 and SD4 the same way. The 16→14
  bit cut between raw RAM and FFT is also a choice.
- **Right-channel shift.** Every right-channel shift register shifts its own
  data line. The original capture code shifts one of them from a
  neighbouring register, which looks like a slip.
- **Restart and reset.** The system restarts automatically, and resets are
  asynchronous and active low.
- **Multipliers.** The multipliers and ROM reads are combinational or one
  cycle. There is no vendor pipelining.

## Simulating

Every module has a self-checking testbench in `tb/`, named `<module>_tb`.
Each ends by printing `TB_RESULT checks=N failures=M`. `tb/i2s_mic_model.sv`
is a behavioural model of two I2S microphones sharing a data line. Each
microphone plays a tone with a programmable fractional delay.

Run the end-to-end test at full size. It uses default parameters, two
complete measurements, and sources at 75° and −20°:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sl_pkg.sv tb/sound_localizer_tb.sv --top-module sound_localizer_tb
./obj_dir/Vsound_localizer_tb
```

It runs about 2.1 M clock cycles in seconds. It prints the estimate of each
axis and counts the mechanisms that happened (capture, estimate, display
update, automatic restart). A missing mechanism counts as a failure.

`doa_sweep_tb` runs one axis over every grid direction from −85° to +85° at
three tone frequencies, 105 measurements in all. It prints the estimate
next to the true angle. In the reference run, 102 of the 105 estimates are
exact and the other three are one grid step off.

Replace the top-module name to run any other testbench. The block
testbenches check against values computed independently in the testbench:

- `fft_core_tb` and `fft_wrapper_tb` compare all 1024 bins with a direct
  DFT, within 4 LSB.
- `weightblock_tb` compares the scan with a floating-point Bartlett
  spectrum.
- `freqdetect_tb` plants large values at DC, below the cut-off and in the
  upper half, and checks that they are ignored.
- `i2s_capture_tb` checks every stored sample against the tone the
  microphone models sent.

The testbenches also check latencies: frame spacing, FFT compute time
((N/2)·log2 N + 1), detection time (N/2 − MIN_BIN + 1) and scan time
(3 + 37·9).

## Limits

- The FFT memory has two reads and two writes per cycle, plus asynchronous
  reads. It synthesizes to registers, not block RAM. A production version
  would split it into banks or use a streaming FFT.
- Only one frequency bin is used. A source with no clear spectral peak, or
  with its strongest component below about 190 Hz, gives an unreliable
  angle.
- The sign convention: a positive angle means microphone 3 hears the wave
  last. This follows from the delay formula. Mount the array accordingly.
