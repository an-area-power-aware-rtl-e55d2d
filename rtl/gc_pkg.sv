// gc_pkg: shared constants, types and constant functions of the stochastic
// gammachirp filterbank.
//
// Number formats (used by every block):
//   * A signal sample is signed two's complement, SIG_W = 11 bits. Inside the
//     stochastic domain it is carried as sign + MAG_W = 10-bit magnitude; a
//     magnitude m stands for the unipolar value m / 2^MAG_W.
//   * A filter coefficient is sign + MAG_W-bit magnitude with COEF_EXP = 1
//     extra integer bit: magnitude m stands for m / 2^(MAG_W-COEF_EXP), so
//     coefficients span (-2, 2), enough for every a1 of a stable section.
//   * The stochastic bit-stream length is N_sto = 2^n - 1, n = LFSR width,
//     N_MIN..N_MAX. One operation lasts N_cyc = 2^n clock cycles: N_sto
//     stochastic cycles and one binary cycle.
//
// The LFSR taps are maximal-length polynomials (period 2^n - 1). Operand
// streams use the LFSR state, coefficient streams its bit-reversed value.
//
// Coefficient functions (this design's own choice of coefficient design; the
// filter structure, the ERB scale, b = 1.019, N = 4 compensation sections and
// the form of r_k / phi_k follow the reference description):
//   * channel centre frequencies are spaced uniformly on the ERB-number scale
//     ERBN(f) = 21.4 log10(0.00437 f + 1) from 20 Hz to 20 kHz;
//   * ERB(f) = 24.7 + 0.108 f;
//   * gammatone: 4 second-order sections with poles r e^{+-j theta},
//     r = exp(-2 pi b ERB / fs), theta = 2 pi fr / fs, and one zero each at
//     r (cos theta +- sqrt(3 +- 2^1.5) sin theta) (the four sections take the
//     four sign combinations); each section is scaled to unit gain at fr;
//   * asymmetric compensation section k = 1..4: poles r_k e^{+-j phi_k},
//     zeros r_k e^{+-j varphi_k}, r_k = exp(-k p1 2 pi b ERB / fs),
//     phi_k = 2 pi (fr + p0^(k-1) p2 c b ERB) / fs,
//     varphi_k = 2 pi (fr - p0^(k-1) p2 c b ERB) / fs,
//     p0 = 2, p1 = 1.35 - 0.19|c|, p2 = 0.29 - 0.004|c|, c = -2; each section
//     is scaled to unit gain at fr.
// Quantisation rounds to the 2^-9 grid; -a1 is then limited to
// 1 + a2 - 2^-9 so that no rounded pole lands on the unit circle (which
// happens for the channels below about 250 Hz otherwise).
// The five coefficients of a section are stored as {b0, b1, b2, -a1, -a2}, so
// the section output is the plain sum of the five products.
package gc_pkg;

  localparam int SIG_W    = 11;           // signed sample width
  localparam int MAG_W    = SIG_W - 1;    // magnitude width in stochastic domain
  localparam int COEF_EXP = 1;            // coefficient integer bits
  localparam int N_MIN    = 3;            // smallest LFSR width (N_sto = 7)
  localparam int N_MAX    = 10;           // largest LFSR width (N_sto = 1023)
  localparam int NW       = 4;            // width of the n (LFSR width) field
  localparam int CNT_W    = N_MAX;        // S2B counter width (counts to 1023)
  localparam int N_TAPS   = 5;            // coefficients per 2nd-order section
  localparam int N_GT     = 4;            // gammatone sections per channel
  localparam int N_AC     = 4;            // compensation sections per channel
  localparam int N_SEC    = N_GT + N_AC;  // sections per channel
  localparam int N_CH     = 32;           // channels

  localparam real FS      = 48000.0;      // sampling frequency [Hz]
  localparam real F_LO    = 20.0;         // lowest channel frequency [Hz]
  localparam real F_HI    = 20000.0;      // highest channel frequency [Hz]
  localparam real B_ERB   = 1.019;        // bandwidth factor b
  localparam real C_CHIRP = -2.0;         // chirp factor c
  localparam real PI      = 3.14159265358979323846;
  localparam real C_ABS   = (C_CHIRP < 0.0) ? -C_CHIRP : C_CHIRP;

  typedef logic signed [SIG_W-1:0] sample_t;
  typedef logic        [MAG_W-1:0] mag_t;
  typedef logic        [N_MAX-1:0] rnd_t;
  typedef logic        [NW-1:0]    nsel_t;

  // Sign/magnitude coefficient as held in a section.
  typedef struct packed {
    logic sign;
    mag_t mag;
  } coef_t;

  typedef coef_t sec_coef_t [N_TAPS];

  // Fibonacci LFSR feedback masks of maximal-length polynomials: bit (t-1)
  // set for tap t.
  function automatic rnd_t lfsr_mask(input int n);
    rnd_t m;
    case (n)
      3:       m = 10'b00_0000_0110;  // 3,2
      4:       m = 10'b00_0000_1100;  // 4,3
      5:       m = 10'b00_0001_0100;  // 5,3
      6:       m = 10'b00_0011_0000;  // 6,5
      7:       m = 10'b00_0110_0000;  // 7,6
      8:       m = 10'b00_1011_1000;  // 8,6,5,4
      9:       m = 10'b01_0001_0000;  // 9,5
      default: m = 10'b10_0100_0000;  // 10,7
    endcase
    return m;
  endfunction

  // ---------------------------------------------------------------------
  // Constant functions for the coefficient set (evaluated at elaboration).
  // ---------------------------------------------------------------------
  function automatic real erb(input real f);
    return 24.7 + 0.108 * f;
  endfunction

  function automatic real erb_num(input real f);
    return 21.4 * $log10(0.00437 * f + 1.0);
  endfunction

  // Centre frequency of channel ch (0 .. nch-1).
  function automatic real chan_freq(input int ch, input int nch);
    real e0, e1, e;
    e0 = erb_num(F_LO);
    e1 = erb_num(F_HI);
    e  = (nch > 1) ? e0 + (e1 - e0) * real'(ch) / real'(nch - 1) : e0;
    return ($pow(10.0, e / 21.4) - 1.0) / 0.00437;
  endfunction

  // Real value of tap (0..4 = b0, b1, b2, -a1, -a2) of section sec of
  // channel ch, numerator already scaled to unit section gain at fr.
  function automatic real sec_tap_real(input int ch, input int nch,
                                       input int sec, input int tap);
    real f, e, th, r, q, s, rk, d, ph, vp, g;
    real b0, b1, b2, a1, a2;
    real cr, ci, nr, ni, dr, di;
    f  = chan_freq(ch, nch);
    e  = erb(f);
    th = 2.0 * PI * f / FS;
    if (sec < N_GT) begin
      r  = $exp(-2.0 * PI * B_ERB * e / FS);
      q  = (sec % 2 == 0) ? 3.0 + $pow(2.0, 1.5) : 3.0 - $pow(2.0, 1.5);
      s  = (sec < 2) ? 1.0 : -1.0;
      b0 = 1.0;
      b1 = -($cos(th) + s * $sqrt(q) * $sin(th)) * r;
      b2 = 0.0;
      a1 = -2.0 * r * $cos(th);
      a2 = r * r;
    end else begin
      rk = $exp(-real'(sec - N_GT + 1) * (1.35 - 0.19 * C_ABS) * 2.0 * PI * B_ERB * e / FS);
      d  = $pow(2.0, real'(sec - N_GT)) * (0.29 - 0.004 * C_ABS) * C_CHIRP * B_ERB * e;
      ph = 2.0 * PI * (f + d) / FS;
      vp = 2.0 * PI * (f - d) / FS;
      b0 = 1.0;
      b1 = -2.0 * rk * $cos(vp);
      b2 = rk * rk;
      a1 = -2.0 * rk * $cos(ph);
      a2 = rk * rk;
    end
    // Gain at z = e^{j th}: evaluate numerator and denominator in z^-1.
    cr = $cos(th);
    ci = -$sin(th);
    nr = b0 + b1 * cr + b2 * (cr * cr - ci * ci);
    ni = b1 * ci + b2 * (2.0 * cr * ci);
    dr = 1.0 + a1 * cr + a2 * (cr * cr - ci * ci);
    di = a1 * ci + a2 * (2.0 * cr * ci);
    g  = $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
    case (tap)
      0:       return b0 / g;
      1:       return b1 / g;
      2:       return b2 / g;
      3:       return -a1;
      default: return -a2;
    endcase
  endfunction

  // Stored coefficient tap of one section: real value quantised to
  // sign/magnitude with COEF_EXP integer bits (magnitude saturates).
  function automatic coef_t sec_coef(input int ch, input int nch,
                                     input int sec, input int tap);
    real v, a;
    int  m, a2m, lim;
    v = sec_tap_real(ch, nch, sec, tap);
    a = (v < 0.0) ? -v : v;
    m = $rtoi(a * real'(1 << (MAG_W - COEF_EXP)) + 0.5);
    if (m > (1 << MAG_W) - 1) m = (1 << MAG_W) - 1;
    // Keep the quantised poles strictly inside the unit circle:
    // |a1| <= 1 + a2 - 1 LSB.
    if (tap == 3) begin
      a2m = $rtoi(-sec_tap_real(ch, nch, sec, 4) * real'(1 << (MAG_W - COEF_EXP)) + 0.5);
      lim = (1 << (MAG_W - COEF_EXP)) + a2m - 1;
      if (m > lim) m = lim;
    end
    return '{sign: (v < 0.0) && (m != 0), mag: mag_t'(m)};
  endfunction

endpackage
