// vfd_fir: variable fractional delay filter in Farrow form.
//
// The Lagrange interpolator taps are polynomials in the delay d,
// h[k](d) = sum_m c[m][k] d^m, so the filter splits into ORDER+1 fixed FIR
// sub-filters v_m = sum_k c[m][k] x[n-k] (constant taps as csd_const_mult
// shift-add networks) followed by Horner's rule in d:
//   y = (((v3*d + v2)*d + v1)*d + v0)
// whose ORDER multiplications by the run-time delay use csd_mult, so the delay
// can be changed every sample. d is unsigned with DF fraction bits (Q2.8 by
// default, 0 to 3.996 samples); the filter is most accurate for d near
// ORDER/2. Sub-filter taps have 17 fraction bits and the Horner chain keeps
// four guard bits below the sample LSB, rounded away at the output, because
// the polynomial evaluation amplifies coefficient errors by up to d^3. The
// Farrow structure, the order and all word lengths are this design's
// choices.
//
// Timing: one sample per clock; x and d are taken when in_valid is high and y
// appears with out_valid one clock later.
module vfd_fir
  import ci_pkg::*;
#(
  parameter int ORDER = 3,
  parameter int DF    = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  sample_t        x,
  input  logic [DF+1:0]  d,
  output logic           out_valid,
  output sample_t        y
);
  localparam int FCW = 20;                       // sub-filter coefficient width
  localparam int FCF = 17;                       // ... and its fraction bits
  localparam int XF  = 4;                        // guard fraction bits below the sample LSB
  localparam int PW  = W + FCW;                  // tap product
  localparam int VW  = W + 4 + XF;               // sub-filter output, 15+XF fraction bits
  localparam int AW  = W + 9 + XF;               // Horner accumulator, 15+XF fraction bits
  localparam int DW  = DF + 3;                   // signed delay word

  sample_t              tap  [ORDER+1];
  sample_t              hist [ORDER];
  logic signed [PW-1:0] prod [ORDER+1][ORDER+1]; // [m][k]
  logic signed [VW-1:0] v    [ORDER+1];
  logic signed [AW-1:0] h    [ORDER+1];          // Horner partial results
  logic signed [AW+DW-1:0] hp [ORDER];

  assign tap[0] = x;
  for (genvar k = 1; k <= ORDER; k++) begin : g_tap
    assign tap[k] = hist[k-1];
  end

  // fixed sub-filters
  for (genvar m = 0; m <= ORDER; m++) begin : g_sub
    for (genvar k = 0; k <= ORDER; k++) begin : g_tap
      csd_const_mult #(.AW(W), .CW(FCW), .COEF(quant(farrow_r(m, k, ORDER), FCF))) u_m (
        .a(tap[k]), .p(prod[m][k]));
    end
    always_comb begin
      logic signed [PW+2:0] s;
      s = '0;
      for (int k = 0; k <= ORDER; k++) s = s + (PW+3)'(prod[m][k]);
      v[m] = VW'(s >>> (FCF - XF));
    end
  end

  // Horner evaluation in d
  assign h[ORDER] = AW'(v[ORDER]);
  for (genvar m = ORDER - 1; m >= 0; m--) begin : g_horner
    csd_mult #(.AW(AW), .CW(DW)) u_dm (.a(h[m+1]), .c(DW'(d)), .p(hp[m]));
    assign h[m] = AW'(hp[m] >>> DF) + AW'(v[m]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < ORDER; k++) hist[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist[0] <= x;
        for (int k = 1; k < ORDER; k++) hist[k] <= hist[k-1];
        y <= sat((longint'(h[0]) + (longint'(1) <<< (XF - 1))) >>> XF);
      end
    end
  end
endmodule
