// tb_fb_band_sweep: band-plan test of the full-size filter bank (16 bands,
// 878 taps). A sine at the geometric centre of each band in turn is fed
// through the bank; after the filters have settled, the band it belongs to
// must carry the largest output of all 16 bands, with a peak above 50 % of
// the input, and bands two or more away must stay below 10 %. (The lowest
// bands are only 50 to 100 Hz wide, narrower than the main lobe of an
// 878-tap Hamming window at 44.1 kHz, so their centre gain is 0.5 to 0.9.)
module tb_fb_band_sweep;
  import ci_pkg::*;

  localparam int NCH = 16;
  localparam int NPER = 1300;      // samples per tone
  localparam int NMEAS = 300;      // measured at the end of each tone
  localparam real AMP = 16000.0;

  logic    clk = 0, rst = 1, in_valid = 0, in_ready, out_valid;
  sample_t x = '0;
  sample_t y [NCH];
  int      checks = 0, failures = 0;

  da_filter_bank dut (.clk, .rst, .in_valid, .in_ready, .x, .out_valid, .y);
  always #5 clk = ~clk;

  int nout = 0;
  int pk [NCH];

  always @(posedge clk) if (!rst && out_valid) begin
    if (nout % NPER >= NPER - NMEAS)
      for (int c = 0; c < NCH; c++) begin
        int a;
        a = (y[c] < 0) ? -int'(y[c]) : int'(y[c]);
        if (a > pk[c]) pk[c] = a;
      end
    nout++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int band = 0; band < NCH; band++) begin
      real fc, w;
      int  best;
      fc = $sqrt(fb_edge(band, NCH, 200.0, 8000.0) * fb_edge(band + 1, NCH, 200.0, 8000.0));
      w  = 2.0 * 3.14159265358979 * fc / 44100.0;
      for (int c = 0; c < NCH; c++) pk[c] = 0;
      for (int n = 0; n < NPER; n++) begin
        in_valid = 1;
        x = sample_t'(int'(AMP * $sin(w * n)));
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (40) @(negedge clk);
      best = 0;
      for (int c = 1; c < NCH; c++) if (pk[c] > pk[best]) best = c;
      $display("tone %6.1f Hz: band %2d peak %5d, strongest band %2d", fc, band, pk[band], best);
      checks++;
      if (best != band) failures++;
      checks++;
      if (real'(pk[band]) < 0.5 * AMP) failures++;
      for (int c = 0; c < NCH; c++) if (c < band - 1 || c > band + 1) begin
        checks++;
        if (real'(pk[c]) > 0.1 * AMP) begin failures++; $display("  band %0d leaks: %0d", c, pk[c]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
