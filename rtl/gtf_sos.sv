// gtf_sos: one direct-form second-order section of the eighth-order
// gammatone filter.
//
//   s[n] = (b0*x[n] + b1*x[n-1]) >> 15          (first adder)
//   u[n] = sat((g*s[n] - a1*u[n-1] - a2*u[n-2]) >> 15)   (second, third adder)
//   y[n] = u[n] >> GTF_G
//
// The recursive state u carries GTF_G = 4 fraction bits more than the 16-bit
// samples: the feedback has a DC gain of about 50, so truncating the state to
// 16 bits would add an offset and noise of tens of LSB.
//
// Five multipliers and three ripple-carry adders, as counted for the
// unfolded filter. The four sections of the filter share the pole pair
// (a1, a2) and differ in the zero b1 (SECTION selects which); g scales the
// section to unity gain at the centre frequency. The coefficients are computed
// at elaboration by ci_pkg::gtf_coef from FC_HZ and FS_HZ; the coefficient
// formulas, the gain placement and all word lengths are this design's
// choices. Subtractions are done by adding the negated coefficients, so every
// adder is a plain adder.
//
// Timing: one sample per clock. x is taken when in_valid is high; y and
// out_valid follow one clock later. Synchronous active-high reset clears the
// delay elements.
module gtf_sos
  import ci_pkg::*;
#(
  parameter int  SECTION = 0,
  parameter real FC_HZ   = 1000.0,
  parameter real FS_HZ   = 44100.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  localparam int SW = W + 2;          // width of the scaled numerator s
  localparam int UW = W + GTF_G;      // feedback state width
  localparam int PW = W + CW + 1;     // numerator sum width
  localparam int QW = UW + CW + 2;    // feedback sum width

  localparam coef_t B0  = gtf_coef(SECTION, GC_B0, FC_HZ, FS_HZ);
  localparam coef_t B1  = gtf_coef(SECTION, GC_B1, FC_HZ, FS_HZ);
  localparam coef_t G   = gtf_coef(SECTION, GC_G,  FC_HZ, FS_HZ);
  localparam coef_t NA1 = -gtf_coef(SECTION, GC_A1, FC_HZ, FS_HZ);
  localparam coef_t NA2 = -gtf_coef(SECTION, GC_A2, FC_HZ, FS_HZ);

  sample_t x1;
  logic signed [UW-1:0] y1, y2;       // u[n-1], u[n-2]

  // five multipliers
  logic signed [W+CW-1:0]  m_b0, m_b1;
  logic signed [UW+CW-1:0] m_a1, m_a2;
  logic signed [SW+CW-1:0] m_g;
  logic signed [SW-1:0]    s;
  logic signed [PW-1:0]    p;
  logic signed [QW-1:0]    q_fb, q;

  assign m_b0 = x  * B0;
  assign m_b1 = x1 * B1;
  assign m_a1 = y1 * NA1;
  assign m_a2 = y2 * NA2;

  // three ripple-carry adders
  ripple_carry_adder #(.WIDTH(PW)) u_add_num (
    .a(PW'(m_b0)), .b(PW'(m_b1)), .cin(1'b0), .sum(p), .cout());
  assign s   = SW'(p >>> CF);
  assign m_g = s * G;
  ripple_carry_adder #(.WIDTH(QW)) u_add_fb (
    .a(QW'(m_a1)), .b(QW'(m_a2)), .cin(1'b0), .sum(q_fb), .cout());
  ripple_carry_adder #(.WIDTH(QW)) u_add_out (
    .a(QW'(m_g) <<< GTF_G), .b(q_fb), .cin(1'b0), .sum(q), .cout());

  logic signed [UW-1:0] y_next;
  always_comb y_next = UW'(sat_n(longint'(q) >>> CF, UW));

  always_ff @(posedge clk) begin
    if (rst) begin
      x1 <= '0;
      y1 <= '0;
      y2 <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= x;
        y1 <= y_next;
        y2 <= y1;
      end
    end
  end

  assign y = sample_t'(y1 >>> GTF_G);
endmodule
