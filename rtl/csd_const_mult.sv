// csd_const_mult: multiplication by a constant through the constant's
// canonical signed digits (numerical strength reduction).
//
// COEF is recoded into CSD at elaboration; the product is the sum of the data
// word shifted to the weight of every +1 digit minus the shifted copies for
// every -1 digit. No multiplier is built: a coefficient with N non-zero digits
// costs N-1 adders. The fractional delay filters use it for their fixed taps.
// Combinational; p = a*COEF exactly.
module csd_const_mult #(
  parameter int      AW   = 16,
  parameter int      CW   = 18,
  parameter longint  COEF = 21073       // 0.6431 in Q.15, a tap of the 1.427-sample delay filter
) (
  input  logic signed [AW-1:0]    a,
  output logic signed [AW+CW-1:0] p
);
  typedef struct packed {
    logic [CW-1:0] pos;
    logic [CW-1:0] neg;
  } csd_t;

  function automatic csd_t to_csd(longint v);
    csd_t   dg;
    longint r;
    dg = '0;
    r = v;
    for (int i = 0; i < CW; i++) begin
      // digit i: r is odd -> +1 if r mod 4 == 1, -1 if r mod 4 == 3
      if ((r % 2) != 0) begin
        if (((r % 4) + 4) % 4 == 1) begin
          dg.pos[i] = 1'b1;
          r = r - 1;
        end else begin
          dg.neg[i] = 1'b1;
          r = r + 1;
        end
      end
      r = r / 2;
    end
    return dg;
  endfunction

  localparam csd_t DIG = to_csd(COEF);

  always_comb begin
    logic signed [AW+CW-1:0] ax;
    ax = (AW+CW)'(a);
    p  = '0;
    for (int i = 0; i < CW; i++) begin
      if (DIG.pos[i]) p = p + (ax <<< i);
      if (DIG.neg[i]) p = p - (ax <<< i);
    end
  end
endmodule
