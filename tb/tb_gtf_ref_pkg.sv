// tb_gtf_ref_pkg: integer reference model of the gammatone sections, written
// from the difference equation (not from the RTL structure), plus a helper
// that measures the steady-state amplitude of a sine response.
package tb_gtf_ref_pkg;
  import ci_pkg::*;

  class gtf_ref;
    real    fc, fs;
    longint x1[4], y1[4], y2[4];

    function new(real fc_hz, real fs_hz);
      fc = fc_hz;
      fs = fs_hz;
      for (int k = 0; k < 4; k++) begin x1[k] = 0; y1[k] = 0; y2[k] = 0; end
    endfunction

    // one sample through section k
    function longint sec(int k, longint x);
      longint s, q, y;
      s = (longint'(gtf_coef(k, GC_B0, fc, fs)) * x + longint'(gtf_coef(k, GC_B1, fc, fs)) * x1[k]) >>> CF;
      // state u = y1/y2 keeps GTF_G extra fraction bits
      q = (longint'(gtf_coef(k, GC_G, fc, fs)) * s) * (1 << GTF_G)
        - longint'(gtf_coef(k, GC_A1, fc, fs)) * y1[k]
        - longint'(gtf_coef(k, GC_A2, fc, fs)) * y2[k];
      y = q >>> CF;
      if (y > (32768 << GTF_G) - 1) y = (32768 << GTF_G) - 1;
      if (y < -(32768 << GTF_G)) y = -(32768 << GTF_G);
      x1[k] = x;
      y2[k] = y1[k];
      y1[k] = y;
      return y >>> GTF_G;
    endfunction

    // one sample through sections first..last
    function longint run(int first, int last, longint x);
      longint v;
      v = x;
      for (int k = first; k <= last; k++) v = sec(k, v);
      return v;
    endfunction
  endclass

  // input sample n of a sine of frequency f (Hz) and amplitude amp (full scale 1)
  function automatic longint sine(int n, real f, real fs, real amp);
    return longint'(amp * 32767.0 * $sin(2.0 * 3.14159265358979 * f * real'(n) / fs));
  endfunction
endpackage
