// Shared types and constants of the IEPE frequency-to-temperature pipeline.
//
// All signal-processing values after the peak search are fixed point Q16.16
// (16 integer bits, 16 fraction bits, two's complement), the format the whole
// conversion chain uses. The 64-bit Celsius result keeps 16 fraction bits
// (Q48.16). The circuit constants below are this design's own example values:
// the sensor front end they describe (oscillator, amplifier, bridge and a
// 10 kOhm NTC thermistor) must be replaced by the values of a real board.
// Resistances are expressed in kOhm so that they fit the Q16.16 range.
package iepe_pkg;

  typedef logic signed [31:0] q16_t;     // Q16.16
  typedef logic signed [63:0] q48_t;     // Q48.16 (64-bit temperature)

  localparam int unsigned QF = 16;       // fraction bits of Q16.16

  // Sampling and transform (values from the design description).
  localparam int unsigned FS_HZ      = 48000;  // processing sample rate
  localparam int unsigned N_FFT_LOG2 = 15;     // 32768-point transform

  // Oscillator law F = (Vref - G*Vamp) / (4*Vpp*R1C1): example circuit values.
  localparam real VREF_V  = 2.5;
  localparam real GAIN_G  = 2.0;
  localparam real VPP_V   = 1.0;
  localparam real R1C1_S  = 25.0e-6;

  // Bridge constants of Eq. (2), resistances in kOhm: example values.
  localparam real VCC_V   = 5.0;
  localparam real RX_K    = 1.0;
  localparam real RI_K    = 3.5;

  // NTC thermistor (10 kOhm at 25 C, beta 4300 K).
  localparam real T0_K    = 298.15;
  localparam real BETA_K  = 4300.0;
  localparam real R0_K    = 10.0;

  // Kelvin to Celsius offset as used by the design description.
  localparam real KELVIN_OFFSET = 273.4;

  // Convert a real constant to Q16.16 (rounded to nearest).
  function automatic q16_t to_q16(input real x);
    return q16_t'($rtoi(x * 65536.0 + (x >= 0.0 ? 0.5 : -0.5)));
  endfunction

endpackage
