// tb_vfd_fir: self-checking test of the variable fractional delay filter.
// The delay is changed every 40 samples (random values between 0.5 and 2.5
// samples, and 1.4 samples among them); for every output the expected value
// is the real-valued Lagrange interpolator at that delay, computed here from
// the product formula; half-scale random data must match within 3 LSB.
// A 500 Hz sine checks the delay itself at d = 1.4. Also checks one clock
// from in_valid to out_valid.
module tb_vfd_fir;
  import ci_pkg::*;

  localparam real FS = 44100.0;
  logic       clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t    x = '0, y;
  logic [9:0] d = '0;
  int         checks = 0, failures = 0;

  vfd_fir dut (.clk, .rst, .in_valid, .x, .d, .out_valid, .y);
  always #5 clk = ~clk;

  real hist [4];
  real expq [$];
  int  nout = 0, maxerr = 0, cyc = 0, tin = 0, nd = 0;

  function automatic real h(int k, real dd);
    real p;
    p = 1.0;
    for (int i = 0; i < 4; i++) if (i != k) p = p * (dd - i) / (k - i);
    return p;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      real e; int err;
      e   = expq.pop_front();
      err = int'($floor(e + 0.5)) - int'(y);
      if (err < 0) err = -err;
      if (nout > 3) begin
        checks++;
        if (err > 3) begin failures++; if (failures < 10) $display("out %0d: got %0d exp %f", nout, y, e); end
        if (err > maxerr) maxerr = err;
      end
      checks++;
      if (cyc != tin + 1) failures++;
      nout++;
    end
    if (in_valid) tin <= cyc;
  end

  task automatic send(int v, logic [9:0] dq);
    real dd, e;
    dd = real'(dq) / 256.0;
    @(posedge clk);
    in_valid <= 1;
    x <= sample_t'(v);
    d <= dq;
    for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = real'(v);
    e = 0.0;
    for (int k = 0; k < 4; k++) e = e + h(k, dd) * hist[k];
    expq.push_back(e);
    @(posedge clk);
    in_valid <= 0;
  endtask

  initial begin
    logic [9:0] dq;
    for (int k = 0; k < 4; k++) hist[k] = 0.0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      if (n % 40 == 0) begin
        dq = (n % 400 == 0) ? 10'd358 : 10'($urandom_range(128, 640));
        nd++;
      end
      send(int'($urandom_range(0, 32767)) - 16384, dq);
    end
    // the delay itself: 500 Hz sine, d = 1.4 (358/256)
    for (int n = 0; n < 200; n++) begin
      real w;
      w = 2.0 * 3.14159265358979 * 500.0 / FS;
      send(int'(16383.0 * $sin(w * n)), 10'd358);
      if (n > 10) begin
        int err;
        @(negedge clk);
        err = int'($floor(16383.0 * $sin(w * (n - 358.0 / 256.0)) + 0.5)) - int'(y);
        if (err < 0) err = -err;
        checks++;
        if (err > 4) begin failures++; $display("sine %0d: got %0d err %0d", n, y, err); end
      end
    end
    repeat (5) @(posedge clk);
    $display("largest error %0d LSB over %0d delay settings", maxerr, nd);
    checks++;
    if (nout != 4200) failures++;
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
