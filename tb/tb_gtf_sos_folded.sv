// tb_gtf_sos_folded: self-checking test of the folded second-order gammatone section (third of the four)
// filter. Same stimulus and checks as for the direct filter (bit-exact
// outputs against the integer difference-equation model, gain at and away
// from the centre frequency), here with the valid/ready handshake: samples
// are offered back to back and with random gaps, so the full rate of one
// sample per five clocks is exercised. Also checks the latency of six clocks
// and that in_ready drops while a sample is being processed.
module tb_gtf_sos_folded;
  import ci_pkg::*;
  import tb_gtf_ref_pkg::*;

  localparam int NS = 3000;
  localparam int LAT = 6;

  logic    clk = 0, rst = 1, in_valid = 0, in_ready, out_valid;
  sample_t x = '0, y;
  int      checks = 0, failures = 0;

  gtf_sos_folded #(.SECTION(2)) dut (.clk, .rst, .in_valid, .in_ready, .x, .out_valid, .y);

  always #5 clk = ~clk;

  gtf_ref  ref_m = new(1000.0, 44100.0);
  longint  expq [$];
  int      tq [$];
  int      cyc = 0, nout = 0, nstall = 0, nb2b = 0, last_acc = -100;
  longint  pk_pass = 0, pk_stop = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin
      tq.push_back(cyc);
      if (cyc - last_acc == 5) nb2b++;
      last_acc = cyc;
    end
    if (in_valid && !in_ready) nstall++;
    if (out_valid) begin
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
        if (failures < 10) $display("latency %0d, expected %0d", cyc - t0, LAT);
      end
      if (nout >= 1000 && nout < 1500 && (y > pk_pass || -y > pk_pass)) pk_pass = (y > 0) ? y : -y;
      if (nout >= 2500 && (y > pk_stop || -y > pk_stop)) pk_stop = (y > 0) ? y : -y;
      nout++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NS; n++) begin
      longint s;
      s = (n < 1500) ? sine(n, 1000.0, 44100.0, 0.25) : sine(n, 4000.0, 44100.0, 0.25);
      @(negedge clk);
      in_valid = 1;
      x = sample_t'(s);
      expq.push_back(ref_m.run(2, 2, s));
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
      if (n % 2 == 1) repeat ($urandom_range(0, 8)) @(negedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("outputs %0d of %0d", nout, NS); end
    $display("pass-band peak %0d, stop-band peak %0d; %0d stall cycles, %0d full-rate accepts",
             pk_pass, pk_stop, nstall, nb2b);
    checks++;
    if (pk_pass < 6550 || pk_pass > 9830) failures++;
    checks++;
    if (pk_stop > 4096) failures++;
    checks++;
    if (nstall == 0 || nb2b == 0) failures++;
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
