// csd_mult: signed multiplier in which both the data sample and the run-time
// coefficient are recoded into canonical signed digits (CSD).
//
// Each operand goes through a csd_recode instance (Reitwiesner's rule), which
// gives digits in {-1,0,+1} with no two adjacent non-zero digits, so at most
// about half of them are non-zero. The digits of the data word a select the
// partial-product rows: a zero digit gives no row, a +1 or -1 digit gives the
// coefficient shifted to the digit's weight, added or subtracted. The
// coefficient enters each row in its own CSD form, as a positive digit vector
// P and a negative digit vector N (c = P - N). Both are summed row by row into
// two accumulators, and one subtraction at the end gives
//   p = sum_i a_i*2^i * (P - N) = a*c.
// Recoding the data halves the number of rows of a plain shift-and-add
// multiplier; recoding the coefficient keeps each row sparse. That both
// operands are used in CSD form follows the text; the row/column split and
// the single final subtraction are this design's choice. It is the single
// multiplier of each folded gammatone section and the delay multiplier of
// the variable fractional delay filter. Combinational; p = a*c exactly.
module csd_mult #(
  parameter int AW = 18,
  parameter int CW = 18
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [CW-1:0]    c,
  output logic signed [AW+CW-1:0] p
);
  localparam int PW = AW + CW;

  logic [AW-1:0] apos, aneg;   // CSD digits of the data
  logic [CW-1:0] cpos, cneg;   // CSD digits of the coefficient

  csd_recode #(.W(AW)) u_rec_a (.x(a), .dpos(apos), .dneg(aneg));
  csd_recode #(.W(CW)) u_rec_c (.x(c), .dpos(cpos), .dneg(cneg));

  always_comb begin
    logic signed [PW-1:0] sp, sn;   // rows of P and of N, summed separately
    logic signed [PW-1:0] rp, rn;
    rp = PW'(cpos);
    rn = PW'(cneg);
    sp = '0;
    sn = '0;
    for (int i = 0; i < AW; i++) begin
      if (apos[i]) begin
        sp = sp + (rp <<< i);
        sn = sn + (rn <<< i);
      end
      if (aneg[i]) begin
        sp = sp - (rp <<< i);
        sn = sn - (rn <<< i);
      end
    end
    p = sp - sn;
  end
endmodule
