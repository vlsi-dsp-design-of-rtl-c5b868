// csd_recode: recodes a signed two's-complement word into canonical signed
// digits (CSD) at run time.
//
// Reitwiesner's rule is applied from the LSB up with a carry: a digit is -1
// where the incoming bit (plus carry) is one and the next bit is also one,
// +1 where it is one and the next bit is zero, and 0 otherwise. The word is
// sign-extended for the next bit of the MSB, so W digits suffice and
// x = sum(dpos[i]*2^i) - sum(dneg[i]*2^i) holds modulo 2^W. No two adjacent
// digits are non-zero, so at most ceil(W/2) digits are non-zero.
// Combinational.
module csd_recode #(
  parameter int W = 18
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] dpos,   // digit +1 at each weight
  output logic [W-1:0] dneg    // digit -1 at each weight
);
  always_comb begin
    logic carry, nxt;
    logic [1:0] y;
    carry = 1'b0;
    dpos  = '0;
    dneg  = '0;
    for (int i = 0; i < W; i++) begin
      nxt = x[(i + 1 < W) ? i + 1 : W - 1];
      y   = {1'b0, x[i]} + {1'b0, carry};
      if (y == 2'd1 && nxt) begin
        dneg[i] = 1'b1;
        carry   = 1'b1;
      end else if (y == 2'd1) begin
        dpos[i] = 1'b1;
        carry   = 1'b0;
      end else if (y == 2'd2) begin
        carry   = 1'b1;
      end else begin
        carry   = 1'b0;
      end
    end
  end

  // CSD property: no two adjacent non-zero digits.
  always_comb assert (((dpos | dneg) & ((dpos | dneg) >> 1)) == '0);
endmodule
