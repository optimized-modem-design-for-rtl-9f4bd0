// modem_pkg: constants, types and constant functions shared by the QPSK modem.
//
// Carrier: one period of a sine is held as 16 signed 8-bit samples of amplitude
// 127, sample k = round(127 * sin(2*pi*k/16)). The period length and amplitude are
// the ones visible in the modem's simulation traces (0, 49, 90, 117, 127, ...);
// a cosine, or any 90-degree multiple, is the same table read 4, 8 or 12 steps ahead.
//
// Low-pass filter: the two coefficient sets of the demodulator's FIR filter, one
// designed with a Hamming window (41 taps) and one with a rectangular window
// (47 taps). They are kept here as real numbers and quantised to signed Q1.15
// (round(c * 2^15)) by constant functions, so nothing but these decimal values
// has to be edited to change the filter. The rectangular set lists its end taps
// as 0.008, which is kept as given.
//
// Decision constants: for a word d held over a whole carrier period, the sum of
// (d*carrier)*carrier over that period is d * SUM_CARRIER_SQ exactly, and a linear
// filter scales that sum by the sum of its taps. decision_gain() is that product;
// decision_recip() is round(2^DEC_SHIFT / gain), used to divide by it.
package modem_pkg;

  localparam int CARRIER_STEPS = 16;   // samples per carrier period
  localparam int CARRIER_W     = 8;    // signed carrier sample width
  localparam int COEF_W        = 16;   // signed Q1.15 filter coefficients
  localparam int COEF_FRAC     = 15;
  localparam int DEC_SHIFT     = 48;   // fraction bits of the decision reciprocal

  typedef logic signed [CARRIER_W-1:0] carrier_t;

  typedef enum logic {
    WIN_HAMMING = 1'b0,
    WIN_RECT    = 1'b1
  } fir_window_e;

  // round(127 * sin(2*pi*k/16)), k = 0..15
  function automatic carrier_t sine_sample(logic [3:0] k);
    logic [6:0] mag;
    case (k[2:0])                 // magnitude over a half period
      3'd0:         mag = 7'd0;
      3'd1, 3'd7:   mag = 7'd49;
      3'd2, 3'd6:   mag = 7'd90;
      3'd3, 3'd5:   mag = 7'd117;
      default:      mag = 7'd127;
    endcase
    return k[3] ? -carrier_t'({1'b0, mag}) : carrier_t'({1'b0, mag});
  endfunction

  function automatic int fir_taps(fir_window_e w);
    return (w == WIN_HAMMING) ? 41 : 47;
  endfunction

  // Hamming-window low-pass prototype, taps 0..20 (the filter is symmetric)
  function automatic real hamming_half(int k);
    case (k)
      0: return 0.0010;   1: return 0.0011;   2: return -0.0008;  3: return -0.0024;
      4: return 0.0002;   5: return 0.0045;   6: return 0.0021;   7: return -0.0069;
      8: return -0.0072;  9: return 0.0079;  10: return 0.0156;  11: return -0.0048;
     12: return -0.0271; 13: return -0.0059; 14: return -0.0399; 15: return 0.0298;
     16: return -0.0519; 17: return -0.0831; 18: return 0.0603;  19: return 0.3097;
     default: return 0.4357;
    endcase
  endfunction

  // Rectangular-window low-pass prototype, taps 0..23 (the filter is symmetric)
  function automatic real rect_half(int k);
    case (k)
      0: return 0.008;    1: return 0.0011;   2: return -0.0002;  3: return -0.0018;
      4: return -0.0015;  5: return 0.0017;   6: return 0.0042;   7: return 0.0012;
      8: return -0.0058;  9: return -0.0073; 10: return 0.0023;  11: return 0.013;
     12: return 0.0085;  13: return -0.0122; 14: return -0.0236; 15: return -0.0032;
     16: return 0.0323;  17: return 0.0345;  18: return -0.0182; 19: return -0.0740;
     20: return -0.0428; 21: return 0.1074;  22: return 0.2939;
     default: return 0.378;
    endcase
  endfunction

  function automatic real fir_coef_real(fir_window_e w, int k);
    int n, m;
    n = fir_taps(w);
    m = (k < n - 1 - k) ? k : n - 1 - k;   // mirror into the first half
    return (w == WIN_HAMMING) ? hamming_half(m) : rect_half(m);
  endfunction

  // signed Q1.15 coefficient, rounded half away from zero
  function automatic int fir_coef(fir_window_e w, int k);
    real c;
    c = fir_coef_real(w, k) * real'(1 << COEF_FRAC);
    return (c >= 0.0) ? int'($floor(c + 0.5)) : -int'($floor(-c + 0.5));
  endfunction

  function automatic longint fir_coef_sum(fir_window_e w);
    longint s;
    s = 0;
    for (int k = 0; k < fir_taps(w); k++) s += longint'(fir_coef(w, k));
    return s;
  endfunction

  // sum over one period of the squared carrier sample (the same for sine and cosine)
  function automatic longint carrier_sq_sum();
    longint s;
    s = 0;
    for (int k = 0; k < CARRIER_STEPS; k++)
      s += longint'(sine_sample(4'(k))) * longint'(sine_sample(4'(k)));
    return s;
  endfunction

  function automatic longint decision_gain(fir_window_e w);
    return fir_coef_sum(w) * carrier_sq_sum();
  endfunction

  function automatic longint decision_recip(fir_window_e w);
    real r;
    r = (2.0 ** DEC_SHIFT) / real'(decision_gain(w));
    return longint'($floor(r + 0.5));
  endfunction

endpackage
