// ffd_fir: fixed fractional delay filter, maximally flat (Lagrange) FIR with
// CSD constant multipliers.
//
// y[n] = sum_{k=0..ORDER} h[k] x[n-k],  h[k] = prod_{i!=k} (DELAY-i)/(k-i),
// the FIR whose frequency response is maximally flat around DC for a delay of
// DELAY samples. The default delay, 1.427 samples, is the one needed by the
// dual-microphone beamformer (0.01 m microphone spacing at a 22.7 us sample
// period). Every tap is a csd_const_mult shift-add network, so the filter
// holds no general multiplier. The third-order (four-tap) filter, the
// coefficient word of 18 bits with 15 fraction bits and the truncating,
// saturating output are this design's choices.
//
// Timing: one sample per clock; x is taken when in_valid is high and the
// filtered sample appears on y with out_valid one clock later.
module ffd_fir
  import ci_pkg::*;
#(
  parameter real DELAY = 1.427,
  parameter int  ORDER = 3
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  localparam int PW = W + CW;
  localparam int SW = PW + $clog2(ORDER + 1);

  sample_t              tap  [ORDER+1];   // tap[k] = x[n-k]
  sample_t              hist [ORDER];
  logic signed [PW-1:0] prod [ORDER+1];
  logic signed [SW-1:0] acc;

  assign tap[0] = x;
  for (genvar k = 1; k <= ORDER; k++) begin : g_tap
    assign tap[k] = hist[k-1];
  end

  for (genvar k = 0; k <= ORDER; k++) begin : g_mul
    csd_const_mult #(.AW(W), .CW(CW), .COEF(quant(lagrange_r(k, DELAY, ORDER), CF))) u_m (
      .a(tap[k]), .p(prod[k]));
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k <= ORDER; k++) acc = acc + SW'(prod[k]);
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
        y <= sat(longint'(acc) >>> CF);
      end
    end
  end
endmodule
