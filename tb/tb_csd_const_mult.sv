// tb_csd_const_mult: self-checking test of the constant CSD multiplier.
// Five instances with constants of different shape (the 1.427-sample
// Lagrange taps, a long run of ones, the most negative and a small odd value)
// multiply random and extreme data; every product is compared with the
// built-in multiplication.
module tb_csd_const_mult;
  localparam int AW = 16, CW = 18;
  localparam longint C [5] = '{-2102, 21073, 131071, -131072, 3};
  logic signed [AW-1:0]    a;
  logic signed [AW+CW-1:0] p [5];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 5; i++) begin : g_dut
    csd_const_mult #(.AW(AW), .CW(CW), .COEF(C[i])) dut (.a, .p(p[i]));
  end

  task automatic check(logic signed [AW-1:0] ta);
    a = ta;
    #1;
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (longint'(p[i]) != longint'(ta) * C[i]) begin
        failures++;
        if (failures < 10) $display("%0d * %0d = %0d", ta, C[i], p[i]);
      end
    end
  endtask

  initial begin
    check(16'sh7fff);
    check(-16'sh8000);
    check(16'sd0);
    check(-16'sd1);
    for (int i = 0; i < 5000; i++) check(AW'($urandom));
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
