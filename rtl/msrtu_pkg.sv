// msrtu_pkg: shared constants and number formats of the multi-sampling,
// real-time-update voltage controller.
//
// Number formats used throughout the datapath:
//   * Voltage samples and voltage references are 16-bit two's-complement ADC
//     codes (the ADS8568 output format).
//   * Modulation waves are Q1.15: -32768 is -1.0 (carrier valley), +32767 is
//     just below +1.0 (carrier peak).
//   * Controller coefficients are 32-bit signed with COEF_FRAC fractional bits.
//
// The system numbers (10 kHz switching, 8 samples per switching period, 50 Hz
// fundamental) follow the converter the design was built for. The 100 MHz
// FPGA clock and all word widths are this design's own choices.
package msrtu_pkg;

  // Clock and converter timing.
  localparam int unsigned CLK_HZ     = 100_000_000; // FPGA fabric clock (assumed)
  localparam int unsigned FSW_HZ     = 10_000;      // switching frequency f_sw
  localparam int unsigned N_SAMPLE   = 8;           // samples (and updates) per T_sw
  localparam real         F0_HZ      = 50.0;        // fundamental frequency f_0

  // Word widths.
  localparam int unsigned SAMPLE_W   = 16;  // ADC code width
  localparam int unsigned MOD_W      = 16;  // modulation wave, Q1.15
  localparam int unsigned COEF_W     = 32;  // controller coefficient width
  localparam int unsigned COEF_FRAC  = 29;  // fractional bits of coefficients
  localparam int unsigned NPHASE     = 3;   // three-phase converter

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [MOD_W-1:0]    mod_t;
  typedef logic signed [COEF_W-1:0]   coef_t;

  typedef sample_t abc_sample_t [NPHASE];
  typedef mod_t    abc_mod_t    [NPHASE];

  localparam real PI = 3.14159265358979323846;

  // Coefficient in COEF_FRAC fixed point, rounded to nearest.
  function automatic coef_t to_coef(input real x);
    real s;
    s = x * (2.0 ** COEF_FRAC);
    return coef_t'(longint'(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  // Feedback coefficient 2*cos(w0*Tsa) of the discretised resonant controller.
  function automatic coef_t rc_two_cos(input real f0, input real tsa);
    return to_coef(2.0 * $cos(2.0 * PI * f0 * tsa));
  endfunction

  // Forward gain Kr*sin(w0*Tsa)/(2*w0) of the discretised resonant controller,
  // multiplied by 'scale' (ADC code to modulation conversion).
  function automatic coef_t rc_gain_coef(input real kr, input real f0, input real tsa,
                                    input real scale);
    real w0;
    w0 = 2.0 * PI * f0;
    return to_coef(scale * kr * $sin(w0 * tsa) / (2.0 * w0));
  endfunction

endpackage
