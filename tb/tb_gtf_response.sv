// tb_gtf_response: frequency response of the eighth-order gammatone filter,
// direct and folded, at the default centre frequency of 1 kHz.
// Sines from 250 Hz to 4 kHz are fed to gtf8 and gtf8_folded in parallel.
// After settling, each measured peak gain must match the analytic response
// of the four sections, |H(f)| = prod_k g_k |b0 + b1 e^{-jw}| /
// |1 + a1 e^{-jw} + a2 e^{-2jw}| with unquantised coefficients, within 5 %
// (plus 12 LSB); the two filters must agree sample for sample, and the gain
// must peak at the centre frequency.
module tb_gtf_response;
  import ci_pkg::*;

  localparam int  NF = 9;
  localparam real FREQ [NF] = '{250.0, 500.0, 700.0, 850.0, 1000.0, 1150.0, 1400.0, 2000.0, 4000.0};
  localparam int  NPER = 1500, NMEAS = 400;
  localparam real AMP = 8000.0, FS = 44100.0, FC = 1000.0, PI = 3.14159265358979;

  logic    clk = 0, rst = 1, in_valid = 0, in_ready, d_valid, f_valid;
  sample_t x = '0, yd, yf;
  int      checks = 0, failures = 0;

  gtf8        u_d (.clk, .rst, .in_valid(in_valid && in_ready), .x, .out_valid(d_valid), .y(yd));
  gtf8_folded u_f (.clk, .rst, .in_valid, .in_ready, .x, .out_valid(f_valid), .y(yf));
  always #5 clk = ~clk;

  sample_t dq [$];
  int      nout = 0, pk = 0;

  always @(posedge clk) if (!rst) begin
    if (d_valid) dq.push_back(yd);
    if (f_valid) begin
      sample_t e;
      e = dq.pop_front();
      checks++;
      if (e != yf) begin failures++; if (failures < 10) $display("direct %0d folded %0d", e, yf); end
      if (nout % NPER >= NPER - NMEAS) begin
        int a;
        a = (yf < 0) ? -int'(yf) : int'(yf);
        if (a > pk) pk = a;
      end
      nout++;
    end
  end

  function automatic real gain(real f);
    real w, h, nre, nim, dre, dim, a1, a2, b0, b1, g;
    w = 2.0 * PI * f / FS;
    h = 1.0;
    for (int k = 0; k < 4; k++) begin
      b0 = gtf_coef_r(k, GC_B0, FC, FS);
      b1 = gtf_coef_r(k, GC_B1, FC, FS);
      g  = gtf_coef_r(k, GC_G,  FC, FS);
      a1 = gtf_coef_r(k, GC_A1, FC, FS);
      a2 = gtf_coef_r(k, GC_A2, FC, FS);
      nre = b0 + b1 * $cos(w);
      nim = -b1 * $sin(w);
      dre = 1.0 + a1 * $cos(w) + a2 * $cos(2.0 * w);
      dim = -a1 * $sin(w) - a2 * $sin(2.0 * w);
      h = h * g * $sqrt((nre * nre + nim * nim) / (dre * dre + dim * dim));
    end
    return h;
  endfunction

  initial begin
    real meas [NF];
    int  best;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < NF; i++) begin
      real w, expv;
      w  = 2.0 * PI * FREQ[i] / FS;
      pk = 0;
      for (int n = 0; n < NPER; n++) begin
        in_valid = 1;
        x = sample_t'(int'(AMP * $sin(w * n)));
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (40) @(negedge clk);
      meas[i] = real'(pk) / AMP;
      expv = gain(FREQ[i]);
      $display("%6.0f Hz: gain %.4f, analytic %.4f", FREQ[i], meas[i], expv);
      checks++;
      if (real'(pk) > expv * AMP * 1.05 + 12.0 || real'(pk) < expv * AMP * 0.95 - 12.0) failures++;
    end
    best = 0;
    for (int i = 1; i < NF; i++) if (meas[i] > meas[best]) best = i;
    checks++;
    if (FREQ[best] != FC) failures++;
    checks++;
    if (nout != NF * NPER) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
