// tb_ripple_carry_adder: self-checking test of the ripple-carry adder at a
// width of 34 bits: random operands and carry-in plus the corner cases that
// ripple a carry through every bit (all ones + 1, most negative + -1).
// Sum and carry-out are compared with the built-in addition.
module tb_ripple_carry_adder;
  localparam int WD = 34;
  logic [WD-1:0] a, b, sum;
  logic          cin, cout;
  int            checks = 0, failures = 0;

  ripple_carry_adder #(.WIDTH(WD)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check(logic [WD-1:0] ta, logic [WD-1:0] tb_, logic tc);
    logic [WD:0] e;
    a = ta; b = tb_; cin = tc;
    #1;
    e = {1'b0, ta} + {1'b0, tb_} + (WD+1)'(tc);
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      if (failures < 10) $display("%h + %h + %b = %h, expected %h", ta, tb_, tc, {cout, sum}, e);
    end
  endtask

  initial begin
    check('1, '0, 1'b1);
    check('1, 34'd1, 1'b0);
    check({1'b1, {(WD-1){1'b0}}}, '1, 1'b0);
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    for (int i = 0; i < 20000; i++)
      check({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
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
