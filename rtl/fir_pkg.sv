// fir_pkg: types, sizes and coefficient tables shared by the FIR filter blocks.
//
// The filters are 37-tap (order N = 36) linear-phase FIR filters designed with a
// Kaiser window for a 60 dB stopband, sample rate Fs = 4096 Hz. Because the
// impulse response is symmetric, h(k) = h(N-k), only the M+1 = 19 coefficients
// h(0)..h(18) are stored; h(18) is the centre tap.
//
// Coefficients are signed Q1.15 (16 bits, value = integer / 2^15), obtained by
// rounding the Kaiser-window design:
//   Np     = (TAPS-1)/2,  alpha = 0.1102*(Att-8.7)      (Att = 60 dB >= 50 dB)
//   A(0)   = 2*(Fb-Fa)/Fs
//   A(j)   = (sin(2*pi*j*Fb/Fs) - sin(2*pi*j*Fa/Fs)) / (pi*j),     j = 1..Np
//   (band-stop: A(0) = 1 - 2*(Fb-Fa)/Fs and A(j) negated)
//   h(Np+j) = h(Np-j) = A(j) * I0(alpha*sqrt(1 - (j/Np)^2)) / I0(alpha)
// with I0 the zeroth-order modified Bessel function of the first kind.
// Band edges (Fa, Fb) in Hz: lowpass 0..512, highpass 410..2048,
// bandpass 512..1024, bandstop 450..1050. The highpass and bandstop edges, the
// length 37, Fs and Att are the published design values; the lowpass and bandpass
// edges are this design's choice, scaling the 50 MHz / 100 MHz band edges of a
// 200 MHz system to the same Fs/2 = 2048 Hz.
package fir_pkg;

  // Filter length (odd) and number of distinct coefficients (M+1).
  localparam int unsigned TAPS   = 37;
  localparam int unsigned HALF   = (TAPS + 1) / 2;

  // Sample and coefficient formats.
  localparam int unsigned DATA_W    = 8;   // signed input samples
  localparam int unsigned COEF_W    = 16;  // signed Q1.15 coefficients (15 fraction bits)

  typedef logic signed [COEF_W-1:0] coef_t;

  // The four filter responses of the design.
  typedef enum logic [1:0] {
    FT_LOWPASS  = 2'd0,
    FT_HIGHPASS = 2'd1,
    FT_BANDPASS = 2'd2,
    FT_BANDSTOP = 2'd3
  } filter_type_e;

  typedef coef_t coef_half_t [HALF];

  localparam coef_half_t COEF_LOWPASS = '{
    16'sd12, 16'sd18, 16'sd0, -16'sd54, -16'sd117, -16'sd121, 16'sd0, 16'sd234,
    16'sd444, 16'sd415, 16'sd0, -16'sd705, -16'sd1298, -16'sd1206, 16'sd0,
    16'sd2289, 16'sd5052, 16'sd7317, 16'sd8192};

  localparam coef_half_t COEF_HIGHPASS = '{
    16'sd11, 16'sd25, 16'sd28, 16'sd1, -16'sd68, -16'sd162, -16'sd230, -16'sd196,
    -16'sd3, 16'sd342, 16'sd728, 16'sd950, 16'sd767, 16'sd5, -16'sd1344,
    -16'sd3076, -16'sd4807, -16'sd6088, 16'sd26208};

  localparam coef_half_t COEF_BANDPASS = '{
    -16'sd12, 16'sd8, 16'sd0, -16'sd22, 16'sd117, 16'sd292, 16'sd0, -16'sd564,
    -16'sd444, 16'sd172, 16'sd0, -16'sd292, 16'sd1298, 16'sd2912, 16'sd0,
    -16'sd5525, -16'sd5052, 16'sd3031, 16'sd8192};

  localparam coef_half_t COEF_BANDSTOP = '{
    16'sd6, -16'sd39, -16'sd75, 16'sd2, 16'sd34, -16'sd74, 16'sd108, 16'sd619,
    16'sd430, -16'sd591, -16'sd769, -16'sd31, -16'sd785, -16'sd2192, 16'sd487,
    16'sd6053, 16'sd5364, -16'sd3751, 16'sd23168};

endpackage
