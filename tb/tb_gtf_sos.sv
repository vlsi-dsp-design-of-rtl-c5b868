// tb_gtf_sos: self-checking test of the direct second-order gammatone section (second of the four).
// Drives a 1 kHz sine (the centre frequency) and then a 4 kHz sine with random
// gaps between samples, and checks
//   * every output sample against an integer model of the difference equation,
//   * the latency of one clock from in_valid to out_valid,
//   * unity gain at the centre frequency (peak within 20 % of the input) and
//     some rejection (below 50 %) two octaves away.
module tb_gtf_sos;
  import ci_pkg::*;
  import tb_gtf_ref_pkg::*;

  localparam int NS = 3000;
  localparam int LAT = 1;

  logic    clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t x = '0, y;
  int      checks = 0, failures = 0;

  gtf_sos #(.SECTION(1)) dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  gtf_ref  ref_m = new(1000.0, 44100.0);
  longint  expq [$];
  int      tq [$];
  int      cyc = 0, nout = 0;
  longint  pk_pass = 0, pk_stop = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && out_valid) begin
    longint e; int t0;
    e  = expq.pop_front();
    t0 = tq.pop_front();
    checks++;
    if (longint'(y) !== e) begin
      failures++;
      if (failures < 10) $display("sample %0d: got %0d expected %0d", nout, y, e);
    end
    checks++;
    if (cyc - t0 != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", cyc - t0, LAT);
    end
    if (nout >= 1000 && nout < 1500 && (y > pk_pass || -y > pk_pass)) pk_pass = (y > 0) ? y : -y;
    if (nout >= 2500 && (y > pk_stop || -y > pk_stop)) pk_stop = (y > 0) ? y : -y;
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NS; n++) begin
      longint s;
      s = (n < 1500) ? sine(n, 1000.0, 44100.0, 0.25) : sine(n, 4000.0, 44100.0, 0.25);
      @(posedge clk);
      in_valid <= 1;
      x <= sample_t'(s);
      expq.push_back(ref_m.run(1, 1, s));
      tq.push_back(cyc + 1);
      @(posedge clk);
      in_valid <= 0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("outputs %0d of %0d", nout, NS); end
    $display("pass-band peak %0d, stop-band peak %0d (input peak 8192)", pk_pass, pk_stop);
    checks++;
    if (pk_pass < 6550 || pk_pass > 9830) failures++;
    checks++;
    if (pk_stop > 4096) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
