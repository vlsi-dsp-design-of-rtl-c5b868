// tb_ci_top: end-to-end test of the cochlear-implant front end with every
// parameter at its default (16 bands of 878 taps, gammatone at 1 kHz).
//
// Stimulus: a 1 kHz tone arriving from the front (the rear microphone hears
// it 1.427 samples later) plus independent noise on each microphone, offered
// with random gaps and back to back. The variable delay is switched every
// 150 samples. Checks:
//   * beamformer output against the real-valued delay-and-sum (2 LSB);
//   * all 16 filter-bank bands, bit-exact against a direct-form convolution
//     of the beamformer output stream;
//   * direct and folded gammatone outputs, bit-exact against the integer
//     difference-equation model of the same stream;
//   * VFD output against the real-valued Lagrange interpolator (3 LSB);
//   * latency of every output from acceptance;
//   * that each mechanism happened: input back-pressure, full-rate
//     acceptance (one pair per 18 clocks), delay switches of the VFD.
module tb_ci_top;
  import ci_pkg::*;
  import tb_gtf_ref_pkg::*;

  localparam int  NCH = 16;
  localparam int  NT  = 878;
  localparam int  NS  = 1200;
  localparam real D   = 1.427;
  localparam real PI2 = 2.0 * 3.14159265358979;

  logic       clk = 0, rst = 1, in_valid = 0, in_ready;
  sample_t    mic_front = '0, mic_rear = '0;
  logic [9:0] vfd_delay = 10'd358;
  logic       bf_valid, fb_valid, gtf_valid, gtff_valid, vfd_valid;
  sample_t    bf_out, gtf_out, gtff_out, vfd_out;
  sample_t    fb_out [NCH];

  ci_top dut (.*);
  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  int     cyc = 0, last_acc = -100;
  int     n_stall = 0, n_fullrate = 0, n_dswitch = 0, n_bf = 0, n_fb = 0, n_gtf = 0, n_gtff = 0, n_vfd = 0;
  int     coef [NCH][NT];
  longint bhist [NT];
  real    fhist [4], vhist [4];
  real    bf_expq [$], vfd_expq [$];
  longint fb_expq [$], gtf_expq [$], gtff_expq [$];
  int     tq_bf [$], tq_vfd [$], tq_gtf [$], tq_gtff [$], tq_fb [$];
  gtf_ref ref_d = new(1000.0, 44100.0);
  gtf_ref ref_f = new(1000.0, 44100.0);

  function automatic real lag(int k, real dd);
    real p;
    p = 1.0;
    for (int i = 0; i < 4; i++) if (i != k) p = p * (dd - i) / (k - i);
    return p;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 12) $display("%0d: %s", cyc, what);
  endtask

  task automatic check_lat(ref int q [$], input int lat, input string name);
    int t0;
    t0 = q.pop_front();
    checks++;
    if (cyc - t0 != lat) fail($sformatf("%s latency %0d, expected %0d", name, cyc - t0, lat));
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready) begin
      if (cyc - last_acc == 18) n_fullrate++;
      last_acc = cyc;
      tq_bf.push_back(cyc); tq_vfd.push_back(cyc); tq_gtf.push_back(cyc);
      tq_gtff.push_back(cyc); tq_fb.push_back(cyc);
    end
    if (bf_valid) begin
      real e;
      e = bf_expq.pop_front();
      checks++;
      if (e - real'(bf_out) > 2.0 || real'(bf_out) - e > 2.0) fail($sformatf("bf %0d, expected %f", bf_out, e));
      check_lat(tq_bf, 1, "bf");
      // references of the three band-splitting structures follow the beamformer output
      for (int k = NT - 1; k > 0; k--) bhist[k] = bhist[k-1];
      bhist[0] = longint'(bf_out);
      for (int c = 0; c < NCH; c++) begin
        longint s;
        s = 0;
        for (int k = 0; k < NT; k++) s += longint'(coef[c][k]) * bhist[k];
        s = s >>> FB_CF;
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        fb_expq.push_back(s);
      end
      gtf_expq.push_back(ref_d.run(0, 3, longint'(bf_out)));
      gtff_expq.push_back(ref_f.run(0, 3, longint'(bf_out)));
      n_bf++;
    end
    if (vfd_valid) begin
      real e;
      e = vfd_expq.pop_front();
      checks++;
      if (e - real'(vfd_out) > 3.0 || real'(vfd_out) - e > 3.0) fail($sformatf("vfd %0d, expected %f", vfd_out, e));
      check_lat(tq_vfd, 1, "vfd");
      n_vfd++;
    end
    if (gtf_valid) begin
      checks++;
      if (longint'(gtf_out) != gtf_expq.pop_front()) fail("gtf output");
      check_lat(tq_gtf, 5, "gtf");
      n_gtf++;
    end
    if (gtff_valid) begin
      checks++;
      if (longint'(gtff_out) != gtff_expq.pop_front()) fail("folded gtf output");
      check_lat(tq_gtff, 25, "gtff");
      n_gtff++;
    end
    if (fb_valid) begin
      for (int c = 0; c < NCH; c++) begin
        longint e;
        e = fb_expq.pop_front();
        checks++;
        if (longint'(fb_out[c]) != e) fail($sformatf("band %0d: %0d, expected %0d", c, fb_out[c], e));
      end
      check_lat(tq_fb, 19, "fb");
      n_fb++;
    end
  end

  task automatic send(int f, int r, logic [9:0] dq);
    real fd, v;
    in_valid  = 1;
    mic_front = sample_t'(f);
    mic_rear  = sample_t'(r);
    if (dq != vfd_delay) n_dswitch++;
    vfd_delay = dq;
    for (int k = 3; k > 0; k--) begin fhist[k] = fhist[k-1]; vhist[k] = vhist[k-1]; end
    fhist[0] = real'(f);
    vhist[0] = real'(f);
    fd = 0.0;
    v  = 0.0;
    for (int k = 0; k < 4; k++) begin
      fd += lag(k, D) * fhist[k];
      v  += lag(k, real'(dq) / 256.0) * vhist[k];
    end
    bf_expq.push_back((fd + real'(r)) / 2.0);
    vfd_expq.push_back(v);
    while (!in_ready) @(negedge clk);
    @(negedge clk);               // accepted at the rising edge just passed
  endtask

  initial begin
    logic [9:0] dq;
    real w;
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < NT; k++) coef[c][k] = fb_coef(c, k, NCH, NT, 44100.0, 200.0, 8000.0);
    for (int k = 0; k < NT; k++) bhist[k] = 0;
    for (int k = 0; k < 4; k++) begin fhist[k] = 0.0; vhist[k] = 0.0; end
    w  = PI2 * 1000.0 / 44100.0;
    dq = 10'd358;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      int nf, nr;
      if (n % 150 == 149) dq = 10'($urandom_range(128, 640));
      nf = int'($urandom_range(0, 4000)) - 2000;
      nr = int'($urandom_range(0, 4000)) - 2000;
      send(int'(8000.0 * $sin(w * n)) + nf, int'(8000.0 * $sin(w * (n - D))) + nr, dq);
      if (n % 3 == 0) begin
        in_valid = 0;
        repeat ($urandom_range(0, 30)) @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (60) @(posedge clk);
    $display("outputs: bf %0d, vfd %0d, gtf %0d, gtff %0d, fb %0d of %0d", n_bf, n_vfd, n_gtf, n_gtff, n_fb, NS);
    $display("mechanisms: %0d stall cycles, %0d full-rate accepts, %0d VFD delay switches",
             n_stall, n_fullrate, n_dswitch);
    checks++; if (n_bf != NS || n_vfd != NS || n_gtf != NS || n_gtff != NS || n_fb != NS) fail("missing outputs");
    checks++; if (n_stall == 0) fail("back-pressure never happened");
    checks++; if (n_fullrate == 0) fail("full-rate acceptance never happened");
    checks++; if (n_dswitch == 0) fail("VFD delay never switched");
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
