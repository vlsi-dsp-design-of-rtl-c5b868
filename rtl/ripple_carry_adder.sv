// ripple_carry_adder: WIDTH-bit adder built as a chain of full adders.
//
// Each bit position is one full adder (sum = a^b^c, carry = majority(a,b,c));
// the carry ripples from bit 0 to bit WIDTH-1. It is the slowest adder but the
// one with the fewest gates and the least switching, which is why the direct
// gammatone filter uses it for all of its additions. Purely combinational:
// sum = a + b + cin modulo 2^WIDTH (two's complement), cout is the carry out of
// the top bit.
module ripple_carry_adder #(
  parameter int WIDTH = 34
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;
  assign cout = c[WIDTH];
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end
endmodule
