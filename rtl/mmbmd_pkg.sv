// mmbmd_pkg: types, constants and filter-coefficient functions shared by the
// multi-modulation baseband modulator (MMBM) and demodulator (MMBD).
//
// The four modulations (BPSK, 4-PAM, QPSK, 16-QAM) are selected by a 2-bit
// code. Every modulation carries the same bit rate: a bit lasts SPB sample
// clocks, so a symbol of k bits lasts L = k*SPB samples. The pulse-shaping
// interpolator and the matched filter therefore change their interpolation
// rate L with the modulation (4, 8, 8 and 16 samples per symbol by default).
//
// Coefficients are computed at elaboration from the closed-form root-raised
// cosine (RRC) and raised cosine (RC) impulse responses, truncated to SPAN
// symbols. RRC taps are scaled to unit energy (so RRC transmit filter and RRC
// matched filter together have unit gain at the symbol peak) and quantised
// with CF_RRC fractional bits; RC taps have a unit peak and CF_RC fractional
// bits. The set of modulations, their Gray-coded constellations and the use
// of RRC/RC filters follow the design; the bit rate per sample, roll-off,
// span, word widths and scaling are choices of this implementation.
package mmbmd_pkg;

  // modulation select, the value of the 2-bit mode switch
  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_4PAM  = 2'd1,
    MOD_QPSK  = 2'd2,
    MOD_16QAM = 2'd3
  } mod_t;

  localparam int DW      = 16;    // baseband sample width (signed)
  localparam int ADC_W   = 14;    // ADC sample width
  localparam int SPB     = 4;     // samples per bit, all modulations
  localparam int KMAX    = 4;     // bits per symbol of 16-QAM
  localparam int LMAX    = SPB * KMAX;  // largest samples per symbol
  localparam int SPAN    = 6;     // filter span in symbols
  localparam int NMAX    = SPAN * LMAX + 1;  // longest (odd) filter length
  localparam int CW      = 16;    // coefficient width (signed)
  localparam int CF_RRC  = 15;    // fractional bits of RRC taps
  localparam int CF_RC   = 14;    // fractional bits of RC taps
  localparam real ALPHA  = 0.5;   // roll-off factor
  localparam int MU      = 2048;  // symbol scaling factor (eq. A_sym = mu*A_i)
  localparam real PI     = 3.14159265358979323846;

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;

  // bits per symbol k = log2(Mo)
  function automatic int bits_per_sym(mod_t m);
    case (m)
      MOD_BPSK: return 1;
      MOD_4PAM: return 2;
      MOD_QPSK: return 2;
      default:  return 4;
    endcase
  endfunction

  // samples per symbol L = k * SPB
  function automatic int sps(mod_t m);
    return bits_per_sym(m) * SPB;
  endfunction

  // true for the modulations that use the Q channel
  function automatic bit two_dim(mod_t m);
    return (m == MOD_QPSK) || (m == MOD_16QAM);
  endfunction

  // RRC impulse response at t (in symbol periods), unit symbol period
  function automatic real rrc_real(real t);
    real a, den;
    a = ALPHA;
    if (t < 1.0e-9 && t > -1.0e-9)
      return 1.0 - a + 4.0 * a / PI;
    den = 1.0 - (4.0 * a * t) * (4.0 * a * t);
    if (den < 1.0e-9 && den > -1.0e-9)
      return (a / $sqrt(2.0)) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * a))
                                + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * a)));
    return ($sin(PI * t * (1.0 - a)) + 4.0 * a * t * $cos(PI * t * (1.0 + a)))
           / (PI * t * den);
  endfunction

  // RC impulse response at t (in symbol periods)
  function automatic real rc_real(real t);
    real a, den, sinc;
    a = ALPHA;
    if (t < 1.0e-9 && t > -1.0e-9)
      return 1.0;
    sinc = $sin(PI * t) / (PI * t);
    den  = 1.0 - (2.0 * a * t) * (2.0 * a * t);
    if (den < 1.0e-9 && den > -1.0e-9)
      return (PI / 4.0) * sinc;
    return sinc * $cos(PI * a * t) / den;
  endfunction

  // Tap i (0 .. SPAN*L) of the length SPAN*L+1 filter for L samples/symbol.
  // is_rc selects RC (unit peak) instead of RRC (unit energy). Out of range: 0.
  function automatic int coef_l(bit is_rc, int l, int i);
    real e, v;
    int  half;
    half = SPAN * l / 2;
    if (i < 0 || i > SPAN * l) return 0;
    if (is_rc)
      return $rtoi(rc_real(real'(i - half) / real'(l)) * real'(1 << CF_RC)
                   + ((rc_real(real'(i - half) / real'(l)) >= 0.0) ? 0.5 : -0.5));
    e = 0.0;
    for (int j = 0; j <= SPAN * l; j++)
      e += rrc_real(real'(j - half) / real'(l)) * rrc_real(real'(j - half) / real'(l));
    v = rrc_real(real'(i - half) / real'(l)) / $sqrt(e) * real'(1 << CF_RRC);
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  // Saturate a wide signed value to a DW-bit sample
  function automatic sample_t sat(logic signed [47:0] v);
    if (v > 48'((1 << (DW - 1)) - 1)) return {1'b0, {(DW-1){1'b1}}};
    if (v < -48'(1 << (DW - 1)))      return {1'b1, {(DW-1){1'b0}}};
    return sample_t'(v);
  endfunction

endpackage
