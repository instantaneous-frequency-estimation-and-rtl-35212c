# Frequency-coded temperature readout for an IEPE sensor line

An IEPE sensor shares two wires between its constant-current supply and its
signal. In this design the sensor is not an accelerometer. A thermistor
detunes an oscillator, so the quantity to measure arrives as an FM tone
between 8 and 19 kHz. The FPGA samples the line and finds the tone's frequency
with a long FFT. It then inverts the analog front end and the thermistor law
in fixed-point arithmetic to get a temperature. A VGA monitor shows the
temperature history as a trace, plus a numeric readout of the current
frequency and temperature.

The SystemVerilog here covers the whole chain from ADC samples to VGA pins.
The only parts left out are the two vendor blocks the chain relies on: the
on-chip ADC and the streaming FFT core. Both connect through ports of the top
(`iepe_temp_top`). The testbenches contain behavioural stand-ins for both.

## Signal path

```
 clk_sys (100 MHz)
   ADC 961.54 kHz, 12 bit
   -> sample_decimator   /20, 48 kHz, signed 16 bit
   -> bandpass_fir       128 taps, 8-19 kHz pass band
   -> [FFT core]         2^15 points, rectangular window, no overlap  (external)
   -> square_and_sum     re^2 + im^2                 2 clk
   -> magnitude_sqrt     floor(sqrt)                17 clk
   -> peak_search        argmax over bins 0..N/2-1   1 clk after bin N/2-1
   -> center_freq_est    F = k*Fs/N   (Q16.16 Hz)    2 clk
   -> center_freq_2_voltage  V_amp   (Q16.16 V)      3 clk
   -> sensing_resistance     R       (Q16.16 kOhm)  37 clk
   -> base_2_log -> natural_logarithm  ln R         <=34 + 3 clk
   -> convert_temperature    T       (Q48.16 K)     41 clk
   -> kelvin_to_celsius      T - 273.4 (Q48.16 degC) 1 clk
   -> temperature_buffer (dual clock, 128 x 64 bit)
 clk_pix (65 MHz, 1024x768 at 60 Hz)
   vga_timing -> vga_text_controller (text_ram + font_rom) -> waveform_display
   -> colour register -> VGA
   text_formatter rewrites the readout each frame
```

Each stage hands its result to the next with a one-cycle `valid` pulse. FFT
frames also carry a `last` flag. There is no back-pressure: at 100 MHz a
48 kHz sample leaves about 2080 clocks of slack. Only two stages can refuse
data, the serial FIR and the iterative logarithm, and they show it with
`s_ready`. The top counts anything dropped against them (`drop_count`). A
sample refused by the FFT core sets the sticky flag `fft_overrun`.

One FFT frame is 32768 samples, so one temperature comes out every 0.683 s.
The bin spacing is 48000/32768 = 1.46 Hz. That spacing, not the arithmetic,
limits the resolution of the result. This is why the readout shows hundredths
even though the last digit moves in coarse steps.

## Finding the tone

**Decimation.** The ADC runs at 961.54 kHz. `sample_decimator` averages
blocks of 20 samples, a boxcar filter, giving 48.08 kHz. It removes the
mid-scale offset and rescales to a signed 16-bit sample, multiplying by a
fixed-point reciprocal of 20 rather than dividing.

**Band-pass FIR.** `bandpass_fir` has 128 taps and uses a single
multiply-accumulate unit over a circular delay line. It takes 130 clocks per
sample. After reset it spends 128 clocks zeroing the delay line, with
`s_ready` low. The coefficients are in `rtl/fir_coeffs.hex`: 128 lines, each one
Q1.15 word in four hex digits. They come from an equiripple (Parks–McClellan)
design at Fs = 48 kHz, with three bands:

| band        | gain |
|-------------|------|
| 0–6 kHz     | 0    |
| 8–19 kHz    | 1    |
| 21–24 kHz   | 0    |

Each coefficient is rounded to `round(h * 32768)`.

**FFT and magnitude.** The external core receives a real sample stream with
`fft_s_last` on every 32768th sample. It returns bins in natural order with
`fft_m_last`. Each bin is assumed to be a 32-bit signed complex value: a
16-bit input plus unscaled growth.
- `square_and_sum` forms the 64-bit power.
- `magnitude_sqrt` takes an exact integer square root, using the restoring
  method with two result bits per stage. Sixteen stages plus an output
  register give a latency of 17 clocks.
- `peak_search` counts bins from the frame boundary. It keeps the largest
  magnitude among the first half of the bins, since the input is real. On a
  tie, the lower index wins. It reports the 16-bit index one clock after the
  last bin it examines.

## From frequency to temperature in fixed point

All values between the peak index and the logarithm are signed Q16.16: 16
integer and 16 fraction bits. Resistances are in kΩ so they fit.

1. **Frequency:** `center_freq_est` computes F = k·Fs/N. N is a power of two,
   so this is a multiply and a shift, and it is exact.
2. **Front-end voltage:** the front end sets the tone as
   F = (Vref − G·Vamp)/(4·Vpp·R1C1). `center_freq_2_voltage` solves this as
   Vamp = (Vref − 4·Vpp·R1C1·F)·(1/G). The constant 4·Vpp·R1C1 is far
   smaller than one Q16.16 LSB, so it is held with 32 fraction bits.
3. **Sensing resistance:** the front end ties V_amp to R as
   R = (Vcc·Rx + Vamp·(Ri + 2Rx)) / (Vcc − Vamp·(Ri/Rx + 2)).
   `sensing_resistance` evaluates the numerator and denominator in three
   pipeline stages. It then divides: numerator·2^16 / denominator gives a
   Q16.16 quotient. A non-positive denominator, or a quotient too large for
   Q16.16, sets `m_err`.
4. **Thermistor law:** the beta model gives T = T0·β / (T0·ln(R/R0) + β).
   `convert_temperature` takes ln R, subtracts the constant ln R0, forms
   T0·(ln R − ln R0) + β, and divides T0·β by it. The quotient has 36 bits,
   so the Kelvin result is a 64-bit Q48.16 value.
5. **Celsius:** `kelvin_to_celsius` subtracts 273.4 (this design uses 273.4,
   not 273.15).

**Dividers.** `pipelined_divider` is shared by steps 3 and 4. It is a
restoring radix-2 divider with one quotient bit per pipeline stage and a
remainder output. It accepts a new operand pair every clock. Its one
precondition is that the quotient fits in QW bits. Both callers check this
before dividing and flag the result otherwise. The stage counts are chosen so
the two module latencies are 37 and 41 clocks.

**Circuit constants.** The constants live in `rtl/iepe_pkg.sv` and can be
overridden as `real` parameters on each module. The source design does not
state their values. The values shipped here are an example, chosen so that
8–19 kHz maps to about 4–63 °C. Before using the design with real hardware,
replace them with the values of your own front end and thermistor. The
thermistor values are those of a standard 10 kΩ NTC part with B = 4300 K,
such as the EPCOS B57164K103; the front-end values are illustrative only.

| constant | value    |
|----------|----------|
| Vref     | 2.5 V    |
| G        | 2        |
| Vpp      | 1 V      |
| R1C1     | 25 µs    |
| Vcc      | 5 V      |
| Rx       | 1 kΩ     |
| Ri       | 3.5 kΩ   |
| T0       | 298.15 K |
| β        | 4300 K   |
| R0       | 10 kΩ    |

## The logarithm without a table

`base_2_log` computes log2 of an unsigned Q16.16 number with the
repeated-squaring method (Turner's "fast binary logarithm"). It runs in two
phases:

1. **Normalise.** Shift the operand one bit per clock until it lies in
   [1, 2). The net shift count is the integer part of the result.
2. **Square.** Repeat OUT_FRAC = 16 times, one clock each: square the
   mantissa. If the square is at least 2, the next fraction bit is 1 and the
   square is halved; otherwise the bit is 0.

The mantissa is kept with 30 fraction bits, so the rounding error of 16
successive squarings stays below one output LSB. The latency depends on the
operand: 2 + shifts + 16 clocks, at most 34. The block accepts a new operand
only when idle (`s_ready`). That is not a limitation here, because operands
come 68 million clocks apart. A zero operand sets `m_err`.

`natural_logarithm` then multiplies by ln 2, held as a 32-bit fraction, and
rounds. This takes 3 clocks.

## Two clock domains

Results leave the 100 MHz domain in two places.

**Temperature buffer.** `temperature_buffer` is a dual-port RAM of 128
64-bit words, the last 87 s of results, written as a circular buffer.
- The write pointer moves only after its word is written.
- The pointer crosses to the pixel clock in Gray code through two flip-flops.
- The reader asks for an entry by *age* (0 = newest) and the buffer returns
  it two pixel clocks later. It also returns how many entries are valid.
- Only error-free results are written. Invalid ones appear on `res_err`.

**Readout frequency.** The current frequency crosses through `cdc_word_sync`.
This is a held register plus a toggle that passes through three flip-flops.

## Drawing the screen

`vga_timing` produces the VESA 1024×768 at 60 Hz raster for a 65 MHz clock:

| direction  | total | front porch | sync | back porch |
|------------|-------|-------------|------|------------|
| horizontal | 1344  | 24          | 136  | 160        |
| vertical   | 806   | 3           | 6    | 29         |

Both syncs are negative. The raster also gives a pulse at the first blanked
line, and the two display blocks use that pulse as their frame tick.

**Trace.** At each frame tick, `waveform_display` reads the 64 newest
temperatures into registers. The screen width is split into 64 segments of
16 pixels, newest on the right, about 43 s in all. A pixel is lit when its row
is within two rows of the segment's temperature:
- row = 735 − 8·T, with T in °C;
- rows are clamped to 160…735;
- segments with no data yet stay dark.

**Text.** The text path is the part where timing matters most:
- `text_ram` holds 128×48 character cells, one per 8×16-pixel block.
- `font_rom` holds 128 glyphs × 16 rows × 8 pixels (16384 bits). Code 0x7F
  is replaced by a degree sign.
- Both memories need two clocks per read.

`vga_text_controller` therefore works on a pipeline four clocks deep:
- **Clock 0:** address the RAM with the cell under the current pixel.
- **Clock 2:** the character code comes out. Combine it with the pixel row
  *delayed by two clocks* to address the ROM.
- **Clock 4:** the glyph row comes out. Select the bit with the pixel column
  *delayed by four clocks*.

Syncs, coordinates and the active-video flag are delayed by the same four
clocks, so everything stays in step. If the row or column were taken
undelayed, pixels would come from the neighbouring character or glyph row.
This shows as glyphs shifted or torn between cells, and the controller's
testbench checks for exactly that error.

`text_formatter` rewrites two 16-character lines at every frame tick, at text
row 2 starting in column 4:
- `F = ddddd.dd Hz`
- `T = sddd.dd°C`

Its steps are:
1. It splits each value into an integer part and hundredths; the fraction
   is truncated.
2. It peels off the integer digits with four parallel divide-by-10 units over
   five clocks.
3. It writes one character per clock, through the RAM's write port.

Leading zeros become spaces, and temperatures are clamped to ±999.99. The
readout temperature is the newest buffered entry. The font file
`rtl/font_rom.hex` has 2048 lines of one byte each, with address = code·16 +
row and the MSB as the leftmost pixel. Only the characters the readout uses
are drawn:
- digits;
- `F T H z C K = . - : ?`;
- the degree sign.

All other codes are blank.

The output colour is registered one clock after the trace decision:
- text: white;
- trace: green;
- background: black.

## Departures from the reference design

- **ADC and FFT core.** These are vendor blocks and are not written here. The
  top exposes their streams as ports. The reference FFT core takes 65060
  clocks from last input to last output. The full-size test gives the FFT
  model that latency, and the reduced test a short one. The design does not
  depend on the figure.
- **Decimator.** The reference design does not give a decimation filter.
  This one is a 20-sample boxcar average, and the band-pass FIR after it does
  the real selection.
- **Square root.** An exact restoring square root replaces a CORDIC core in
  square-root mode. The latency (17) is the same.
- **Logarithm latency.** The reference reports 170 clocks for its iterative
  logarithm; this one needs at most 34. Nothing downstream depends on the
  figure.
- **Dividers.** The dividers are written out as RTL, not taken from a library
  generator. Their latencies match the reference (37 and 41 clocks for the
  modules that contain them).
- **Frequency rate.** The frequency conversion uses the nominal Fs = 48000,
  while the boxcar produces 48077 Hz. This scales all frequencies by 0.16 %.
  Change `FS_HZ` to 48077 if the ADC really runs at 961.54 kHz.
- **Error handling.** Invalid results are not buffered or displayed. The
  reference design does not say how it handles them.
- **Your choices.** These are all left to you, and set here as described
  above:
  - the circuit and thermistor constants;
  - screen layout, trace scale and colours;
  - glyph shapes;
  - readout format.

## Files

| file | contents |
|------|----------|
| `rtl/iepe_pkg.sv` | Q16.16/Q48.16 types, sample rate, FFT size, example circuit constants |
| `rtl/iepe_temp_top.sv` | top level, both clock domains |
| `rtl/sample_decimator.sv`, `rtl/bandpass_fir.sv`, `rtl/fir_coeffs.hex` | front-end filtering |
| `rtl/square_and_sum.sv`, `rtl/magnitude_sqrt.sv`, `rtl/peak_search.sv` | spectrum magnitude and peak |
| `rtl/center_freq_est.sv`, `rtl/center_freq_2_voltage.sv`, `rtl/sensing_resistance.sv`, `rtl/pipelined_divider.sv` | frequency → voltage → resistance |
| `rtl/base_2_log.sv`, `rtl/natural_logarithm.sv`, `rtl/convert_temperature.sv`, `rtl/kelvin_to_celsius.sv` | resistance → temperature |
| `rtl/temperature_buffer.sv`, `rtl/cdc_word_sync.sv` | clock-domain crossing |
| `rtl/vga_timing.sv`, `rtl/waveform_display.sv`, `rtl/text_formatter.sv`, `rtl/text_ram.sv`, `rtl/font_rom.sv`, `rtl/font_rom.hex`, `rtl/vga_text_controller.sv` | display |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/xadc_model.sv`, `tb/fft_model.sv` | behavioural ADC tone source and FFT |
| `tb/tb_iepe_temp_top.sv` | end-to-end test at 256-point frames |
| `tb/tb_iepe_temp_full.sv` | end-to-end test at full size |

## Simulating

Run from the repository root, because the memories load their `.hex` files by
paths relative to it. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/iepe_pkg.sv tb/tb_peak_search.sv --top-module tb_peak_search -o sim
./obj_dir/sim
```

**Results line.** Every testbench checks the block against values it computes
independently, including the documented latencies. It ends with
`TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs, and counts
that as a failure.

**`tb_iepe_temp_top`.** This is the end-to-end test with reduced sizes, about
15 s:
- 256-point frames;
- the ADC model emitting a sample every 8 clocks;
- a short FFT latency.

It steps the tone through the 8–19 kHz band, and once below it, where the
resistance equation has no positive solution. It checks:
- every peak index, against the tone that filled the frame;
- every temperature, against a floating-point model of the same equations
  evaluated from the reported index (within 0.05 °C);
- that the error flag is raised exactly when the equation fails;
- on every checked VGA frame, each text pixel against the glyph of the cell
  under it, and the number of trace pixels per segment;
- the readout lines in the text RAM after the last result. It counts each mechanism and
fails if one never happened:
- frames;
- results;
- error results;
- buffer wrap-around;
- readout refreshes;
- display frames.

No sample may be dropped during normal operation. A final overload phase
then makes the ADC convert on every clock, so the FIR must drop samples and
`drop_count` must count them. It also withdraws the FFT core's ready, so
`fft_overrun` must be set.

**`tb_iepe_temp_full`.** This runs the top with every parameter at its
default: a 32768-point frame from a 12 kHz tone at the real ADC rate. It
checks:
- the peak bin (8192);
- the exact frequency, 12000.00 Hz;
- the temperature against the model;
- the buffer;
- the on-screen text;
- the clock counts through the spectrum and conversion stages: 2 + 17 + 1
  from the middle bin to the peak, 2 to the frequency, 3 + 37 to the
  resistance, and (2 + shifts + 16) + 3 + 41 + 1 to the temperature.

The FFT model in this test takes 65060 clocks from last input to last
output. The test takes about 2.5 minutes.

## Changing the design

- **Front end or thermistor:** change the constants in `iepe_pkg` or override
  the module parameters. Check that the resistance still fits Q16.16 in kΩ.
- **FFT size:** `N_FFT_LOG2` sets the frame length, the search range and the
  frequency scale together. The index port is 16 bits, enough for up to
  2^17 points.
- **Buffer and trace:** `BUF_DEPTH` and `SEGS` set their sizes. `SEGS` ×
  segment width should equal 1024.
- **Filter:** replace `rtl/fir_coeffs.hex`, keeping 128 Q1.15 words, or
  change `FIR_TAPS` together with the file.
