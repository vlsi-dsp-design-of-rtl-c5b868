// tb_ds_beamformer: self-checking test of the delay-and-sum beamformer.
//   * random microphone samples: every output against (FD(front)+rear)/2
//     with the real-valued Lagrange delay computed here, within 2 LSB;
//   * directivity: a 7 kHz plane wave from the front (rear microphone lags
//     by 1.427 samples) must pass at nearly full amplitude, the same wave from
//     the back (front microphone lags) must be attenuated below 30 %;
//   * one clock from in_valid to out_valid; the inputs carry random values
//     while in_valid is low, so an input used at the wrong clock shows.
module tb_ds_beamformer;
  import ci_pkg::*;

  localparam real D  = 1.427;
  localparam real FS = 44100.0;
  localparam real PI2 = 2.0 * 3.14159265358979;
  logic    clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t mf = '0, mr = '0, y;
  int      checks = 0, failures = 0;

  ds_beamformer dut (.clk, .rst, .in_valid, .mic_front(mf), .mic_rear(mr), .out_valid, .y);
  always #5 clk = ~clk;

  real hist [4];
  real expq [$];
  int  nout = 0, maxerr = 0, cyc = 0, tin = 0, pk = 0;

  function automatic real h(int k);
    real p;
    p = 1.0;
    for (int i = 0; i < 4; i++) if (i != k) p = p * (D - i) / (k - i);
    return p;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      real e; int err;
      e   = expq.pop_front();
      err = int'($floor(e)) - int'(y);
      if (err < 0) err = -err;
      if (nout < 2000) begin
        checks++;
        if (err > 2) begin failures++; if (failures < 10) $display("out %0d: got %0d exp %f", nout, y, e); end
        if (err > maxerr) maxerr = err;
      end
      if (int'(y) > pk) pk = int'(y);
      checks++;
      if (cyc != tin + 1) failures++;
      nout++;
    end
    if (in_valid) tin <= cyc;
  end

  task automatic send(int f, int r);
    real e;
    @(posedge clk);
    in_valid <= 1;
    mf <= sample_t'(f);
    mr <= sample_t'(r);
    for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = real'(f);
    e = 0.0;
    for (int k = 0; k < 4; k++) e = e + h(k) * hist[k];
    if (e > 32767.0) e = 32767.0;
    if (e < -32768.0) e = -32768.0;
    expq.push_back((e + real'(r)) / 2.0);
    @(posedge clk);
    in_valid <= 0;
    mf <= sample_t'($urandom);      // inputs are don't-care while in_valid is low
    mr <= sample_t'($urandom);
  endtask

  initial begin
    int pk_front, pk_back;
    real w;
    for (int k = 0; k < 4; k++) hist[k] = 0.0;
    w = PI2 * 7000.0 / FS;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++)
      send(int'($urandom_range(0, 32767)) - 16384, int'($urandom_range(0, 65535)) - 32768);
    // source in front: the rear microphone hears it D samples later
    for (int n = 0; n < 300; n++) begin
      if (n == 20) pk = 0;
      send(int'(16000.0 * $sin(w * n)), int'(16000.0 * $sin(w * (n - D))));
    end
    @(posedge clk);
    pk_front = pk;
    // source behind: the front microphone hears it D samples later
    for (int n = 0; n < 300; n++) begin
      if (n == 20) pk = 0;
      send(int'(16000.0 * $sin(w * (n - D))), int'(16000.0 * $sin(w * n)));
    end
    @(posedge clk);
    pk_back = pk;
    repeat (5) @(posedge clk);
    $display("random-data error %0d LSB; 7 kHz peak from front %0d, from back %0d (input 16000)",
             maxerr, pk_front, pk_back);
    checks++;
    if (pk_front < 14000) failures++;
    checks++;
    if (pk_back > 4800) failures++;
    checks++;
    if (nout != 2600) failures++;
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
