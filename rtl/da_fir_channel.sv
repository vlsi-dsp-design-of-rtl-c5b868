// da_fir_channel: one band-pass FIR channel computed by bit-serial
// distributed arithmetic (DA).
//
// For y = sum_k h[k] x[n-k] with B-bit two's-complement samples,
//   y = sum_b 2^b * sum_k h[k] x_b[n-k]   (the b = B-1 term negative),
// where x_b is bit b of a sample. The inner sum depends only on the bit
// pattern of the taps, so the taps are cut into groups of K and every group
// gets a 2^K-entry table holding all sums of its K coefficients. Each clock
// one bit plane (bit bit_idx of every stored sample, on `bits`) addresses all
// tables; the table outputs are added and shift-accumulated into acc. After
// the B bit planes, acc holds the exact sum of products with FB_CF fraction
// bits. No multiplier is used.
//
// The coefficients are the Hamming-windowed band-pass taps of channel CHAN of
// an NCH-band bank (ci_pkg::fb_coef), built into the tables at elaboration.
// Order 877 (878 taps) and 16 bands follow the filter bank this design
// implements; K = 4, the band edges and the word lengths are this design's
// choices.
//
// Timing: drive en with bit_idx = 0, 1, ..., W-1 on consecutive clocks, start
// high with bit 0; acc holds the result from the clock after the last bit.
module da_fir_channel
  import ci_pkg::*;
#(
  parameter int  NTAPS  = 878,
  parameter int  K      = 4,
  parameter int  CHAN   = 0,
  parameter int  NCH    = 16,
  parameter real FS_HZ  = 44100.0,
  parameter real FLO_HZ = 200.0,
  parameter real FHI_HZ = 8000.0
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic                      en,
  input  logic [$clog2(W)-1:0]      bit_idx,
  input  logic [NTAPS-1:0]          bits,
  output logic signed [FB_ACCW-1:0] acc
);
  localparam int NG  = (NTAPS + K - 1) / K;        // number of DA tables
  localparam int LW  = FB_CW + $clog2(K);          // table entry width
  localparam int PSW = LW + $clog2(NG) + 1;        // bit-plane sum width

  typedef int lut_t [2**K];

  // all sums of the K coefficients of group g (taps past NTAPS count as zero)
  function automatic lut_t make_lut(int g);
    lut_t t;
    for (int a = 0; a < 2**K; a++) begin
      t[a] = 0;
      for (int j = 0; j < K; j++)
        if (a[j] && g * K + j < NTAPS)
          t[a] += fb_coef(CHAN, g * K + j, NCH, NTAPS, FS_HZ, FLO_HZ, FHI_HZ);
    end
    return t;
  endfunction

  logic [NG*K-1:0]       bits_pad;
  logic signed [LW-1:0]  lut_out [NG];
  logic signed [PSW-1:0] psum;
  logic signed [FB_ACCW-1:0] term;

  assign bits_pad = (NG*K)'(bits);

  for (genvar g = 0; g < NG; g++) begin : g_lut
    localparam lut_t LUT = make_lut(g);
    assign lut_out[g] = LW'(LUT[bits_pad[g*K +: K]]);
  end

  always_comb begin
    psum = '0;
    for (int g = 0; g < NG; g++) psum = psum + PSW'(lut_out[g]);
    term = FB_ACCW'(psum) <<< bit_idx;
    if (bit_idx == $clog2(W)'(W - 1)) term = -term;   // sign bit plane
  end

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= (start ? '0 : acc) + term;
  end
endmodule
