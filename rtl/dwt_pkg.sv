// Shared constants, types and helpers for the distributed-arithmetic wavelet
// analyser.
//
// The analyser is a four-scale discrete wavelet decomposition. Each scale is a
// low-pass/high-pass pair of 4-tap FIR filters followed by decimation by two.
// Every filter is built with distributed arithmetic: the samples are fed in bit
// serially and a 16-entry table of coefficient sums replaces the multipliers.
//
// Numbers used everywhere:
//  * samples are DATA_W = 16-bit two's complement. The value 16 comes from the
//    bit counter of the filter, which closes a word when it reaches 15.
//  * coefficients are COEF_W = 16-bit two's complement with COEF_FRAC = 14
//    fraction bits (range -2 .. +2). This quantization is a choice of this
//    design.
//  * the filters are the 4-tap Daubechies pair (often called D4, or db2 in
//    Matlab), as decomposition filters in Matlab's convention:
//        Lo_D = [(1-r3), (3-r3), (3+r3), (1+r3)] / (4*sqrt(2)),  r3 = sqrt(3)
//        Hi_D[k] = (-1)^(k+1) * Lo_D[3-k]
//    each rounded to the nearest multiple of 2^-14. Tap k multiplies x[n-k].
package dwt_pkg;

  localparam int unsigned DATA_W    = 16;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 14;
  localparam int unsigned TAPS      = 4;
  localparam int unsigned LEVELS    = 4;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_set_t [TAPS];

  // round(Lo_D * 2^14): -0.12941, 0.22414, 0.83652, 0.48296
  localparam coef_set_t LO_D = '{-16'sd2120, 16'sd3672, 16'sd13705, 16'sd7913};
  // round(Hi_D * 2^14): -0.48296, 0.83652, -0.22414, -0.12941
  localparam coef_set_t HI_D = '{-16'sd7913, 16'sd13705, -16'sd3672, -16'sd2120};

  // Width of a table entry: a sum of up to TAPS coefficients.
  function automatic int unsigned rom_width(int unsigned coef_w, int unsigned taps);
    return coef_w + $clog2(taps);
  endfunction

endpackage
