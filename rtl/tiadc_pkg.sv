// tiadc_pkg: shared constants, number formats and helper functions of the
// TIADC background calibrator.
//
// Number formats (all two's complement):
//   * sub-ADC word    : ADC_W bits, full scale -1 .. +1 (ADC_W-1 fraction bits)
//   * internal sample : DW bits with DFRAC fraction bits (range -2 .. +2), so the
//                       offset-corrected and corrected signals keep headroom and
//                       extra precision below the ADC LSB
//   * coefficient     : W_W bits with W_FRAC fraction bits (range -0.25 .. +0.25),
//                       used for both gain (w_gk) and timing (w_rk, in units of Ts)
//   * FIR tap         : CW bits with CFRAC fraction bits
//
// The Hadamard matrix is the Sylvester one, F[k][i] = (-1)^popcount(k & i).
// For M = 4 its rows 1..3 are (1,-1,1,-1), (1,1,-1,-1), (1,-1,-1,1): the
// sequences T_1..T_3 that define the four-channel coefficients of the design.
//
// The derivative filter taps are the ideal differentiator h[k] = (-1)^k / k
// (k != 0, h[0] = 0, frequency response j*omega) multiplied by a Hanning window
// w[n] = 0.5 * (1 - cos(2*pi*(n+1)/(NTAPS+1))), n = 0 .. NTAPS-1, k = n - (NTAPS-1)/2,
// rounded to CFRAC fraction bits. The tap count (33) and the window follow the
// design description; the window variant (no zero end taps) and all word widths
// are this implementation's choices.
//
// Every module takes these constants as defaults of its own typed parameters,
// so lint reports, per module, the package constants that module does not
// use. CH_W in particular is used by no design module (each derives its
// channel-index width from its M parameter); it serves code that
// instantiates them at the default size.
package tiadc_pkg;

  // Number of interleaved sub-ADC channels (power of two, Hadamard order).
  parameter int M      = 4;
  parameter int CH_W   = (M > 1) ? $clog2(M) : 1;

  parameter int ADC_W  = 12;            // sub-ADC output word
  parameter int DW     = 18;            // internal sample width
  parameter int DFRAC  = 16;            // internal sample fraction bits

  parameter int W_W    = 18;            // coefficient width
  parameter int W_FRAC = 19;            // coefficient fraction bits

  parameter int NTAPS  = 33;            // derivative FIR length
  parameter int CW     = 16;            // derivative FIR tap width
  parameter int CFRAC  = 15;            // derivative FIR tap fraction bits

  parameter int LOG2_NAVG   = 10;       // offset averaging length N = 2**LOG2_NAVG per channel
  parameter int MU_G_SHIFT  = 7;        // gain step size   mu_g = 2**-MU_G_SHIFT
  parameter int MU_R_SHIFT  = 6;        // timing step size mu_r = 2**-MU_R_SHIFT

  // Sign of the Hadamard (Sylvester) matrix entry F[k][i]: 1 means -1.
  function automatic logic hadamard_neg(input int unsigned k, input int unsigned i);
    logic [31:0] a;
    a = k & i;
    return ^a;
  endfunction

  // Derivative FIR tap n (0 .. ntaps-1) scaled by 2**cfrac and rounded.
  function automatic int deriv_tap(input int n, input int ntaps, input int cfrac);
    real pi, h, w, v;
    int  k;
    pi = 3.14159265358979323846;
    k  = n - (ntaps - 1) / 2;
    if (k == 0) return 0;
    h = (((k % 2) == 0) ? 1.0 : -1.0) / real'(k);
    w = 0.5 * (1.0 - $cos(2.0 * pi * real'(n + 1) / real'(ntaps + 1)));
    v = h * w * real'(64'(1) << cfrac);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

endpackage
