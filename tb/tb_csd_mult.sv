// tb_csd_mult: self-checking test of the run-time CSD multiplier (18 x 18
// bits): random operands, the extreme values of both operands, and data
// words and coefficients with long runs of ones (where CSD recoding matters
// most). The product is compared with the built-in signed multiplication;
// the no-adjacent-digits rule on both operands is checked by the assertions
// inside the recoders.
module tb_csd_mult;
  localparam int AW = 18, CW = 18;
  logic signed [AW-1:0]    a;
  logic signed [CW-1:0]    c;
  logic signed [AW+CW-1:0] p;
  int checks = 0, failures = 0;

  csd_mult #(.AW(AW), .CW(CW)) dut (.a, .c, .p);

  task automatic check(logic signed [AW-1:0] ta, logic signed [CW-1:0] tc);
    longint e;
    a = ta; c = tc;
    #1;
    e = longint'(ta) * longint'(tc);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("%0d * %0d = %0d, expected %0d", ta, tc, p, e);
    end
  endtask

  initial begin
    logic signed [AW-1:0] ext_a [4];
    logic signed [CW-1:0] ext_c [8];
    ext_a = '{18'sh1ffff, -18'sh20000, 18'sd1, -18'sd1};
    ext_c = '{18'sh1ffff, -18'sh20000, 18'sd1, -18'sd1, 18'sh0ffff, 18'sh15555, 18'sh0aaaa, 18'sd0};
    foreach (ext_a[i]) foreach (ext_c[j]) check(ext_a[i], ext_c[j]);
    for (int i = 0; i < 20000; i++) check(AW'($urandom), CW'($urandom));
    for (int i = 0; i < 18; i++) for (int j = i; j < 18; j++)
      check(AW'($urandom), CW'(((1 << (j + 1)) - 1) & ~((1 << i) - 1)));
    for (int i = 0; i < 18; i++) for (int j = i; j < 18; j++)
      check(AW'(((1 << (j + 1)) - 1) & ~((1 << i) - 1)), CW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
