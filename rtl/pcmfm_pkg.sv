// pcmfm_pkg: shared constants and helper functions of the PCM/FM demodulator.
//
// The receiver takes a 1 Mbit/s PCM/FM signal on a 70 MHz IF sampled at
// 100 Msamples/s, mixes it to I/Q baseband, low-pass filters and downsamples
// it to 20 Msamples/s, demodulates it with a discrete-time phase-locked loop,
// downsamples the frequency estimate to 4 Msamples/s (4 samples per bit) and
// recovers bit timing with an early-late timing PLL. Those rates are the ones
// the design is built around; the word widths below are this design's own
// choices except the 12-bit I/Q and discriminator words, which match the
// 12-bit ports of the generated FM demodulator.
//
// The helpers here are pure functions: saturation of a wide signed value to
// a narrower one, and the gains of a second-order PLL loop filter computed
// from the normalised loop noise bandwidth and damping factor with the
// standard discrete-time PLL design equations.
package pcmfm_pkg;

  // Sample rates (Hz) and the IF.
  localparam real FS_ADC_HZ  = 100.0e6;
  localparam real IF_HZ      = 70.0e6;
  localparam int  DECIM_FIR  = 5;     // 100 -> 20 Msamples/s
  localparam int  DECIM_PCM  = 5;     // 20 -> 4 Msamples/s

  // Word widths.
  localparam int ADC_W   = 14;  // converter sample
  localparam int MIX_W   = 16;  // mixer output
  localparam int BB_W    = 12;  // I/Q into the FM demodulator
  localparam int DISC_W  = 12;  // FM demodulator output (deriv_phi)
  localparam int PHASE_W = 32;  // DDS phase accumulators
  localparam int LUT_AW  = 10;  // DDS lookup address bits
  localparam int LUT_W   = 12;  // DDS sine/cosine width

  localparam real PI = 3.14159265358979323846;

  // Saturate a signed 64-bit value into a signed field of `w` bits, returned
  // sign-extended in 64 bits.
  function automatic longint sat(input longint v, input int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Arithmetic right shift by `s` with round-half-up.
  function automatic longint rshift_round(input longint v, input int s);
    if (s <= 0) return v <<< (-s);
    return (v + (longint'(1) <<< (s - 1))) >>> s;
  endfunction

  // Second-order loop gains (proportional K1, integral K2) for normalised
  // noise bandwidth bn_t (per symbol), damping zeta, `n` samples per symbol,
  // detector gain kp and NCO gain k0.
  function automatic real loop_k1(input real bn_t, input real zeta, input int n,
                                  input real kp, input real k0);
    real th, d;
    th = bn_t / (zeta + 0.25 / zeta) / real'(n);
    d  = 1.0 + 2.0 * zeta * th + th * th;
    return (4.0 * zeta * th / d) / (kp * k0);
  endfunction

  function automatic real loop_k2(input real bn_t, input real zeta, input int n,
                                  input real kp, input real k0);
    real th, d;
    th = bn_t / (zeta + 0.25 / zeta) / real'(n);
    d  = 1.0 + 2.0 * zeta * th + th * th;
    return (4.0 * th * th / d) / (kp * k0);
  endfunction

endpackage
