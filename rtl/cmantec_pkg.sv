// cmantec_pkg: constants and helper functions shared by the C-Mantec learner.
//
// Fixed-point conventions used throughout the design:
//   * input value psi : unsigned 8-bit, 7 fractional bits (1.0 = 8'h80)
//   * weight and bias : signed N1+N2 bits, N2 fractional bits
//   * exp() samples and Tfac : unsigned 16-bit, 15 fractional bits (1.0 = 16'h8000)
//   * the ratio x = |h|/T fed to the exp table: 8 fractional bits
// The 8-bit input byte and the one-byte class field follow the byte-per-input
// pattern layout; the other fractional splits are choices of this design.
package cmantec_pkg;

  localparam int PSI_W    = 8;   // bits per input value
  localparam int PSI_FRAC = 7;   // fractional bits of an input value
  localparam int EXP_W    = 16;  // bits of an exp() sample and of Tfac
  localparam int EXP_FRAC = 15;  // fractional bits of an exp() sample and of Tfac
  localparam int X_FRAC   = 8;   // fractional bits of x = |h| / T
  localparam int EXP_STEP_BITS = 3;        // table step 0.125 = 2^-3
  localparam int EXP_ENTRIES   = 64;       // samples at x = 0, 0.125, ... 7.875
  localparam int TFAC_GROUP    = 16;       // neurons compared per clock in the Tfac module
  localparam int LOG2_IMAX_MAX = 17;       // largest Imax is 2^17
  localparam int ITER_W        = LOG2_IMAX_MAX + 1;  // iteration counter, holds 0..2^17

  // exp(-k/8) in EXP_FRAC fractional bits, rounded; k = 64 gives exp(-8),
  // the end point used when interpolating the last interval.
  function automatic logic [EXP_W-1:0] exp_sample(input int k);
    real v;
    v = 1.0;
    for (int j = 0; j < k; j++) v = v * 0.8824969025845955; // exp(-1/8)
    v = v * 32768.0 + 0.5;
    if (v > 32768.0) v = 32768.0;
    return EXP_W'($rtoi(v));
  endfunction

endpackage
