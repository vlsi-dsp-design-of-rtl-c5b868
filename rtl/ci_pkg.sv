// ci_pkg: word lengths, shared types and coefficient generators of the
// cochlear-implant signal path.
//
// All filter coefficients of the design are computed here at elaboration from
// closed formulas, so that the centre frequency, the number of channels or the
// delay can be changed by a parameter:
//   * gammatone sections (four second-order sections with a common pole pair,
//     the usual efficient realisation of the fourth-order gammatone filter),
//   * the maximally flat (Lagrange) fractional delay taps and the Farrow
//     polynomial coefficients of the same interpolator,
//   * Hamming-windowed band-pass taps of the FIR filter bank.
// Samples are 16-bit two's complement with 15 fraction bits throughout; the
// word lengths are this design's choice.
package ci_pkg;

  localparam int W       = 16;          // sample width (Q1.15)
  localparam int CW      = 18;          // IIR / FD coefficient width
  localparam int CF      = 15;          // IIR / FD coefficient fraction bits
  localparam int GTF_G   = 4;           // guard fraction bits of the gammatone feedback state
  localparam int FB_CW   = 18;          // filter-bank coefficient width
  localparam int FB_CF   = 19;          // filter-bank coefficient fraction bits
  localparam int FB_ACCW = 48;          // DA accumulator width

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [W-1:0]  sample_t;
  typedef logic signed [CW-1:0] coef_t;

  // Index of the five coefficients of one gammatone section:
  //   y = g*(b0*x + b1*x[n-1]) - a1*y[n-1] - a2*y[n-2]
  typedef enum logic [2:0] {GC_B0, GC_B1, GC_G, GC_A1, GC_A2} gtf_coef_e;

  // Round a real value to an integer with FRAC fraction bits.
  function automatic longint quant(real v, int frac);
    return longint'(v * (2.0 ** frac));
  endfunction

  // Saturate a wide value to a W-bit sample.
  function automatic sample_t sat(longint v);
    if (v > longint'(2 ** (W - 1)) - 1) return sample_t'((2 ** (W - 1)) - 1);
    if (v < -longint'(2 ** (W - 1)))    return sample_t'(-(2 ** (W - 1)));
    return sample_t'(v);
  endfunction

  // Saturate a wide value to an n-bit two's-complement range.
  function automatic longint sat_n(longint v, int n);
    if (v > (longint'(1) <<< (n - 1)) - 1) return (longint'(1) <<< (n - 1)) - 1;
    if (v < -(longint'(1) <<< (n - 1)))    return -(longint'(1) <<< (n - 1));
    return v;
  endfunction

  // ---------------------------------------------------------------- gammatone
  // Real-valued coefficient `which` of section `sec` (0..3) of an eighth-order
  // gammatone filter at centre frequency fc, sample rate fs.
  //   ERB = fc/9.26449 + 24.7,  b = 1.019*2*pi*ERB
  //   a1 = -2 cos(2 pi fc T) e^{-bT},  a2 = e^{-2bT}
  //   A1k/T = -(cos(2 pi fc T) + s_k sin(2 pi fc T)) e^{-bT},
  //   s_k = +sqrt(3+2^1.5), -sqrt(3+2^1.5), +sqrt(3-2^1.5), -sqrt(3-2^1.5)
  //   b0 = 0.5, b1 = 0.5*A1k/T, g = 1/|H_k(e^{j 2 pi fc T})|
  function automatic real gtf_coef_r(int sec, gtf_coef_e which, real fc, real fs);
    real t, erb, bw, th, r, a1, a2, sk, b0, b1;
    real nre, nim, dre, dim;
    t   = 1.0 / fs;
    erb = fc / 9.26449 + 24.7;
    bw  = 1.019 * 2.0 * PI * erb;
    th  = 2.0 * PI * fc * t;
    r   = $exp(-bw * t);
    a1  = -2.0 * $cos(th) * r;
    a2  = r * r;
    case (sec)
      0:       sk =  $sqrt(3.0 + $pow(2.0, 1.5));
      1:       sk = -$sqrt(3.0 + $pow(2.0, 1.5));
      2:       sk =  $sqrt(3.0 - $pow(2.0, 1.5));
      default: sk = -$sqrt(3.0 - $pow(2.0, 1.5));
    endcase
    b0 = 0.5;
    b1 = -0.5 * ($cos(th) + sk * $sin(th)) * r;
    nre = b0 + b1 * $cos(th);
    nim = -b1 * $sin(th);
    dre = 1.0 + a1 * $cos(th) + a2 * $cos(2.0 * th);
    dim = -a1 * $sin(th) - a2 * $sin(2.0 * th);
    case (which)
      GC_B0:   return b0;
      GC_B1:   return b1;
      GC_G:    return $sqrt((dre * dre + dim * dim) / (nre * nre + nim * nim));
      GC_A1:   return a1;
      default: return a2;
    endcase
  endfunction

  function automatic coef_t gtf_coef(int sec, gtf_coef_e which, real fc, real fs);
    return coef_t'(quant(gtf_coef_r(sec, which, fc, fs), CF));
  endfunction

  // ------------------------------------------------------- fractional delay
  // Lagrange (maximally flat) interpolator tap n of the given order, delay d:
  //   h[n] = prod_{k != n} (d - k) / (n - k)
  function automatic real lagrange_r(int n, real d, int order);
    real h;
    h = 1.0;
    for (int k = 0; k <= order; k++)
      if (k != n) h = h * (d - real'(k)) / real'(n - k);
    return h;
  endfunction

  // Coefficient of d^m in the polynomial h[n](d) above (Farrow sub-filter m,
  // tap n).
  function automatic real farrow_r(int m, int n, int order);
    real p [0:15];
    real q [0:15];
    real den;
    for (int j = 0; j < 16; j++) p[j] = 0.0;
    p[0] = 1.0;
    den  = 1.0;
    for (int k = 0; k <= order; k++) begin
      if (k != n) begin
        for (int j = 0; j < 16; j++) q[j] = -real'(k) * p[j] + ((j > 0) ? p[j-1] : 0.0);
        for (int j = 0; j < 16; j++) p[j] = q[j];
        den = den * real'(n - k);
      end
    end
    return p[m] / den;
  endfunction

  // ------------------------------------------------------------ filter bank
  // Band edges: NCH bands spaced logarithmically from flo to fhi.
  function automatic real fb_edge(int i, int nch, real flo, real fhi);
    return flo * $exp($ln(fhi / flo) * real'(i) / real'(nch));
  endfunction

  function automatic real sinc_lp(real fc_norm, real m);
    // ideal low-pass impulse response 2fc*sinc(2fc*m), fc normalised to fs
    if (m == 0.0) return 2.0 * fc_norm;
    return $sin(2.0 * PI * fc_norm * m) / (PI * m);
  endfunction

  // Tap k of band-pass channel ch: Hamming window times the difference of two
  // ideal low-pass responses, quantised with FB_CF fraction bits.
  function automatic int fb_coef(int ch, int k, int nch, int ntaps, real fs, real flo, real fhi);
    real m, f1, f2, w, h;
    m  = real'(k) - real'(ntaps - 1) / 2.0;
    f1 = fb_edge(ch, nch, flo, fhi) / fs;
    f2 = fb_edge(ch + 1, nch, flo, fhi) / fs;
    w  = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(ntaps - 1));
    h  = w * (sinc_lp(f2, m) - sinc_lp(f1, m));
    return int'(quant(h, FB_CF));
  endfunction

endpackage
