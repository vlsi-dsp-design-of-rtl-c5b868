// tb_ffd_fir: self-checking test of the fixed fractional delay filter.
//   * random samples: each output against the real-valued Lagrange filter
//     (taps from the product formula, computed here), within 3 LSB;
//   * a 500 Hz sine at 44.1 kHz: the output must match the sine delayed by
//     1.427 samples within 6 LSB, and must differ from the sine delayed by 1
//     or by 2 whole samples, so the delay really is fractional;
//   * one clock from in_valid to out_valid.
module tb_ffd_fir;
  import ci_pkg::*;

  localparam real D  = 1.427;
  localparam real FS = 44100.0;
  logic    clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t x = '0, y;
  int      checks = 0, failures = 0;

  ffd_fir dut (.clk, .rst, .in_valid, .x, .out_valid, .y);
  always #5 clk = ~clk;

  real     hist [4];
  real     expq [$];
  real     sinq [$], int1q [$], int2q [$];
  int      nout = 0, maxerr = 0, dev1 = 0, dev2 = 0, cyc = 0, tin = 0;

  function automatic real h(int k);
    real p;
    p = 1.0;
    for (int i = 0; i < 4; i++) if (i != k) p = p * (D - i) / (k - i);
    return p;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && out_valid) begin
    real e; int err;
    e   = expq.pop_front();
    err = int'($floor(e)) - int'(y);
    if (err < 0) err = -err;
    checks++;
    if (err > 3) begin failures++; if (failures < 10) $display("out %0d: got %0d exp %f", nout, y, e); end
    checks++;
    if (cyc != tin + 1) begin failures++; if (failures < 5) $display("latency %0d", cyc - tin); end
    if (nout >= 2000) begin
      real sv, i1, i2; int e1, e2, es;
      sv = sinq.pop_front(); i1 = int1q.pop_front(); i2 = int2q.pop_front();
      es = int'($floor(sv + 0.5)) - int'(y); if (es < 0) es = -es;
      e1 = int'(i1) - int'(y); if (e1 < 0) e1 = -e1;
      e2 = int'(i2) - int'(y); if (e2 < 0) e2 = -e2;
      if (nout >= 2004) checks++;
      if (nout >= 2004 && es > 6) begin failures++; if (failures < 10) $display("sine %0d: got %0d exp %f", nout, y, sv); end
      if (nout >= 2004 && es > maxerr) maxerr = es;
      if (nout >= 2010 && e1 > dev1) dev1 = e1;
      if (nout >= 2010 && e2 > dev2) dev2 = e2;
    end
    nout++;
  end

  always @(posedge clk) if (!rst && in_valid) tin <= cyc;

  task automatic send(int v);
    real e;
    @(posedge clk);
    in_valid <= 1;
    x <= sample_t'(v);
    for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = real'(v);
    e = h(0) * hist[0] + h(1) * hist[1] + h(2) * hist[2] + h(3) * hist[3];
    if (e > 32767.0) e = 32767.0;
    if (e < -32768.0) e = -32768.0;
    expq.push_back(e);
    @(posedge clk);
    in_valid <= 0;
  endtask

  initial begin
    for (int k = 0; k < 4; k++) hist[k] = 0.0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) send(int'($urandom_range(0, 65535)) - 32768);
    for (int n = 0; n < 1000; n++) begin
      real w;
      w = 2.0 * 3.14159265358979 * 500.0 / FS;
      sinq.push_back(16383.0 * $sin(w * (n - D)));
      int1q.push_back(16383.0 * $sin(w * (n - 1)));
      int2q.push_back(16383.0 * $sin(w * (n - 2)));
      send(int'(16383.0 * $sin(w * n)));
    end
    repeat (5) @(posedge clk);
    $display("sine error %0d LSB; whole-sample delays 1 and 2 differ by up to %0d and %0d LSB",
             maxerr, dev1, dev2);
    checks++;
    if (dev1 < 40 || dev2 < 40) failures++;
    checks++;
    if (nout != 3000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
