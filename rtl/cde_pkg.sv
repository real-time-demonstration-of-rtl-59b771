// cde_pkg: constants and the coefficient derivation shared by the chromatic
// dispersion equalizer (CDE) blocks.
//
// The equalizer is the time-domain all-pass filter that undoes fibre
// chromatic dispersion. Its ideal taps are
//   h[k] = sqrt(j / K) * exp(-j*pi*k^2 / K),   k = -(N-1)/2 .. (N-1)/2,
//   K    = D*z*lambda^2 / (c*T^2),
// where D*z is the accumulated dispersion, lambda the carrier wavelength and
// T the sample period. All taps have the same magnitude, so only the phase
// phi_k = pi/4 - pi*k^2/K matters once the common gain is dropped.
//
// The real and the imaginary part of each tap are quantized to one of four
// levels (Delta = 4). This design uses the levels {-3, -1, +1, +3} (times a
// common gain) with decision thresholds at 0 and +/-0.5 of the tap
// magnitude, close to the optimum 4-level quantizer for a cosine of a
// uniformly spread phase. A level is held as a 2-bit index i with value
// 2*i - 3. Because cos(phi) >= 0.5 exactly when phi lies within pi/3 of a
// multiple of 2*pi (and likewise for the other thresholds), the indices come
// from the phase alone, taken modulo 2*pi, with no trigonometric function.
//
// The tap count, level count, lane count, ADC width, wavelength, sample
// rate and dispersion are those of the demonstration; the level values,
// thresholds and the dropped common gain are this design's own choices.
package cde_pkg;

  localparam int unsigned LANES   = 16;  // samples per clock (2.5 GSa/s / 156.25 MHz)
  localparam int unsigned NTAPS   = 83;  // equalizer order
  localparam int unsigned NLEVELS = 4;   // quantization levels per tap part
  localparam int unsigned ADC_W   = 8;   // ADC resolution in bits
  localparam int unsigned LEVEL_W = 2;   // bits of one level index

  // Physical constants of the link (SI units).
  localparam real LIGHT_C   = 299792458.0;      // m/s
  localparam real LAMBDA    = 1549.32e-9;       // m
  localparam real DISP_ACC  = 1.6e-6 / 1.0e-9;  // D*z: 1.6 us/nm in s/m
  localparam real SAMPLE_T  = 1.0 / 2.5e9;      // s

  // K = D*z*lambda^2/(c*T^2), about 80.07 for the link above.
  localparam real CD_K = DISP_ACC * LAMBDA * LAMBDA / (LIGHT_C * SAMPLE_T * SAMPLE_T);

  // Level index -> signed level value (2*i - 3).
  typedef logic [LEVEL_W-1:0] level_t;

  // Quantized tap: level index of the real part and of the imaginary part.
  typedef struct packed {
    level_t re;
    level_t im;
  } tap_code_t;

  // Level index of cos(pi*u), u = phase/pi in any range.
  function automatic level_t cos_level(real u);
    real x;
    x = u - 2.0 * $floor(u / 2.0);   // x in [0, 2)
    if (x <= 1.0 / 3.0 || x >= 5.0 / 3.0)      return level_t'(3);  // cos >= 0.5
    else if (x <= 0.5 || x >= 1.5)             return level_t'(2);  // 0 <= cos < 0.5
    else if (x < 2.0 / 3.0 || x > 4.0 / 3.0)   return level_t'(1);  // -0.5 < cos < 0
    else                                       return level_t'(0);  // cos <= -0.5
  endfunction

  // Quantized code of the tap at offset k from the centre tap.
  function automatic tap_code_t cd_tap_code(int k, real kd);
    real u;
    tap_code_t c;
    u    = 0.25 - real'(k * k) / kd;   // phi_k / pi
    c.re = cos_level(u);
    c.im = cos_level(u - 0.5);         // sin(phi) = cos(phi - pi/2)
    return c;
  endfunction

endpackage
