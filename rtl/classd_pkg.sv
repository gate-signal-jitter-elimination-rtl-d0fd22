// classd_pkg -- shared constants and types of the noise-shaping class-D modulator.
//
// Word widths follow the configuration that the modulator is built around: a 26-bit
// reference (m), a 9-bit noise-shaper output (n) that drives a 9-bit counter PWM, an
// 11th-order noise-coupled shaper and a 100 MHz modulator clock, which gives a PWM
// frequency of 100 MHz / (2 * 2^9) = 97.66 kHz.
//
// The loop-filter coefficients are this design's own. They realise
//   NTF(z) = (1 - H_BWD(z)) / (1 + H_FWD(z)),  H(z) = sum_{i=1..11} c_i z^-i
// with the NTF zeros spread over the 0..10 kHz baseband (one at DC and five
// conjugate pairs at 2.66, 5.13, 7.25, 8.84 and 9.78 kHz, placed to minimise the
// integrated in-band noise gain) and the poles of an 11th-order Butterworth
// high-pass chosen so that the out-of-band NTF gain is 20 (26 dB). The coefficients
// are signed fixed-point numbers with COEF_FRAC = 24 fractional bits:
//   BWD_COEF[i-1] = round(-a_i * 2^24), where 1 - H_BWD = sum a_i z^-i (a_0 = 1)
//   FWD_COEF[i-1] = round( d_i * 2^24), where 1 + H_FWD = sum d_i z^-i (d_0 = 1)
// A bit-true model of the loop with these numbers reaches about 122 dB SNR in
// 0..10 kHz for a 170 Hz sine at modulation index 0.85 without saturating.
`timescale 1ns / 1ps
package classd_pkg;

  parameter int unsigned REF_W     = 26;  // m: reference word width
  parameter int unsigned NS_OUT_W  = 9;   // n: noise-shaper output / PWM resolution
  parameter int unsigned NS_ORDER  = 11;  // noise-shaper order (taps per FIR)
  parameter int unsigned COEF_W    = 36;  // loop-filter coefficient width
  parameter int unsigned COEF_FRAC = 24;  // fractional bits of the coefficients

  typedef logic signed [COEF_W-1:0] coef_t;

  // Zeros of the NTF (numerator), tap 1 first.
  parameter coef_t BWD_COEF [NS_ORDER] = '{
    36'sd166948035,   -36'sd771016319,   36'sd2180260072, -36'sd4192839804,
    36'sd5756348975,  -36'sd5756348975,  36'sd4192839804, -36'sd2180260072,
    36'sd771016319,   -36'sd166948035,   36'sd16777216
  };

  // Poles of the NTF (denominator), tap 1 first.
  parameter coef_t FWD_COEF [NS_ORDER] = '{
    -36'sd79868628,   36'sd189016217,   -36'sd285113725,  36'sd300756710,
    -36'sd230992843,  36'sd131044698,   -36'sd54672707,   36'sd16383345,
    -36'sd3349161,    36'sd419409,      -36'sd24328
  };

  // Gate sequencing, in modulator clock cycles (10 ns at 100 MHz).
  parameter int unsigned DEAD_CYC = 5;  // dead time and minimum on/off time (50 ns)
  parameter int unsigned BLK_DLY  = 1;  // gate change to BLK falling
  parameter int unsigned BLK_CYC  = 2;  // BLK low time

  // Gate sequencer state.
  typedef enum logic [1:0] {
    GS_DEAD = 2'd0,  // both transistors off (dead time)
    GS_LO   = 2'd1,  // low-side transistor on
    GS_HI   = 2'd2   // high-side transistor on
  } gate_state_e;

endpackage
