// tb_da_filter_bank: self-checking test of the 16-channel DA filter bank at
// its full size (878 taps per channel).
//   * 1000 random half-scale samples, offered back to back: all 16 band
//     outputs of every sample against a direct-form convolution with the same
//     taps (ci_pkg::fb_coef), bit-exact;
//   * a sine at the centre of band 10: band 10 must carry it (peak above 70 %
//     of the input), bands two or more away must reject it (below 10 %);
//   * acceptance every 17 clocks at full rate and 18 clock edges from
//     acceptance to out_valid.
module tb_da_filter_bank;
  import ci_pkg::*;

  localparam int NCH = 16;
  localparam int NT  = 878;
  localparam int LAT = 18;
  localparam int NRAND = 1000;
  localparam int NSINE = 1400;
  localparam int BAND = 10;

  logic    clk = 0, rst = 1, in_valid = 0, in_ready, out_valid;
  sample_t x = '0;
  sample_t y [NCH];
  int      checks = 0, failures = 0;

  da_filter_bank dut (.clk, .rst, .in_valid, .in_ready, .x, .out_valid, .y);
  always #5 clk = ~clk;

  int      coef [NCH][NT];
  longint  hist [NT];
  longint  expq [$];
  int      tq [$];
  int      cyc = 0, nout = 0, last_acc = -100, ngap17 = 0;
  int      pk [NCH];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin
      tq.push_back(cyc);
      if (cyc - last_acc == 17) ngap17++;
      last_acc = cyc;
    end
    if (out_valid) begin
      int t0;
      t0 = tq.pop_front();
      checks++;
      if (cyc - t0 != LAT) begin failures++; if (failures < 10) $display("latency %0d", cyc - t0); end
      for (int c = 0; c < NCH; c++) begin
        longint e;
        e = expq.pop_front();
        checks++;
        if (longint'(y[c]) != e) begin
          failures++;
          if (failures < 10) $display("sample %0d band %0d: got %0d expected %0d", nout, c, y[c], e);
        end
        if (nout >= NRAND + NSINE - 300) begin
          int a;
          a = (y[c] < 0) ? -int'(y[c]) : int'(y[c]);
          if (a > pk[c]) pk[c] = a;
        end
      end
      nout++;
    end
  end

  task automatic send(longint v);
    @(negedge clk);
    in_valid = 1;
    x = sample_t'(v);
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    for (int c = 0; c < NCH; c++) begin
      longint s;
      s = 0;
      for (int k = 0; k < NT; k++) s += longint'(coef[c][k]) * hist[k];
      s = s >>> FB_CF;
      if (s > 32767) s = 32767;
      if (s < -32768) s = -32768;
      expq.push_back(s);
    end
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    real fc, w;
    for (int c = 0; c < NCH; c++) begin
      pk[c] = 0;
      for (int k = 0; k < NT; k++) coef[c][k] = fb_coef(c, k, NCH, NT, 44100.0, 200.0, 8000.0);
    end
    for (int k = 0; k < NT; k++) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NRAND; n++) send(longint'($urandom_range(0, 32767)) - 16384);
    fc = $sqrt(fb_edge(BAND, NCH, 200.0, 8000.0) * fb_edge(BAND + 1, NCH, 200.0, 8000.0));
    w  = 2.0 * 3.14159265358979 * fc / 44100.0;
    for (int n = 0; n < NSINE; n++) send(longint'(16000.0 * $sin(w * n)));
    repeat (30) @(posedge clk);
    checks++;
    if (nout != NRAND + NSINE) begin failures++; $display("outputs %0d", nout); end
    for (int c = 0; c < NCH; c++) $display("band %2d (%5.0f-%5.0f Hz): peak %0d", c,
      fb_edge(c, NCH, 200.0, 8000.0), fb_edge(c + 1, NCH, 200.0, 8000.0), pk[c]);
    checks++;
    if (pk[BAND] < 11200) failures++;
    for (int c = 0; c < NCH; c++) if (c < BAND - 1 || c > BAND + 1) begin
      checks++;
      if (pk[c] > 1600) begin failures++; $display("band %0d leaks", c); end
    end
    $display("%0d samples accepted at the full rate of one per 17 clocks", ngap17);
    checks++;
    if (ngap17 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
