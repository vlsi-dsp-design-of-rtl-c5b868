// gtf_sos_folded: second-order gammatone section folded onto one multiplier
// and one adder.
//
// The section computes exactly what gtf_sos computes,
//   s = (b0*x + b1*x[n-1]) >> 15,  u = sat((g*s - a1*u[n-1] - a2*u[n-2]) >> 15),
//   y = u >> 4 (the state u has four guard fraction bits),
// but time-multiplexes its five products on a single CSD multiplier
// (csd_mult) and its three additions on a single ripple-carry adder, with a
// folding factor of five. The schedule, one step per clock, is
//   step 0: acc = b0*x
//   step 1: acc = acc + b1*x[n-1]
//   step 2: acc = (g*(acc >> 15)) << 4
//   step 3: acc = acc + (-a1)*u[n-1]
//   step 4: u   = sat((acc + (-a2)*u[n-2]) >> 15)
// so the result is bit-identical to the unfolded section. The folding factor
// is the one the unfolded/folded operator counts imply; the schedule is this
// design's choice.
//
// Timing: a sample is accepted at a rising edge where in_valid and in_ready
// are both high; the five steps take the next five edges, and y with a
// one-clock out_valid pulse is seen at the sixth edge after acceptance.
// in_ready is high when idle and during step 4, so samples can arrive every
// five clocks.
module gtf_sos_folded
  import ci_pkg::*;
#(
  parameter int  SECTION = 0,
  parameter real FC_HZ   = 1000.0,
  parameter real FS_HZ   = 44100.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  localparam int SW = W + 2;          // width of the scaled numerator s
  localparam int UW = W + GTF_G;      // feedback state width
  localparam int AW = (SW > UW) ? SW : UW;   // multiplier data width
  localparam int MW = AW + CW;
  localparam int QW = UW + CW + 2;

  localparam coef_t B0  = gtf_coef(SECTION, GC_B0, FC_HZ, FS_HZ);
  localparam coef_t B1  = gtf_coef(SECTION, GC_B1, FC_HZ, FS_HZ);
  localparam coef_t G   = gtf_coef(SECTION, GC_G,  FC_HZ, FS_HZ);
  localparam coef_t NA1 = -gtf_coef(SECTION, GC_A1, FC_HZ, FS_HZ);
  localparam coef_t NA2 = -gtf_coef(SECTION, GC_A2, FC_HZ, FS_HZ);

  logic                 busy;
  gtf_coef_e            step;     // which coefficient is on the multiplier
  sample_t              xr, x1;
  logic signed [UW-1:0] y1, y2;       // u[n-1], u[n-2]
  logic signed [QW-1:0] acc;

  // multiplexed operands of the single multiplier and the single adder
  logic signed [AW-1:0] m_a;
  coef_t                m_c;
  logic signed [MW-1:0] m_p;
  logic signed [QW-1:0] add_a, add_b, add_s;

  always_comb begin
    unique case (step)
      GC_B0:   begin m_a = AW'(xr);                m_c = B0;  end
      GC_B1:   begin m_a = AW'(x1);                m_c = B1;  end
      GC_G:    begin m_a = AW'(SW'(acc >>> CF));   m_c = G;   end
      GC_A1:   begin m_a = AW'(y1);                m_c = NA1; end
      default: begin m_a = AW'(y2);                m_c = NA2; end
    endcase
    add_a = (step == GC_B0 || step == GC_G) ? '0 : acc;
    add_b = (step == GC_G) ? QW'(m_p) <<< GTF_G : QW'(m_p);
  end

  csd_mult #(.AW(AW), .CW(CW)) u_mult (.a(m_a), .c(m_c), .p(m_p));

  ripple_carry_adder #(.WIDTH(QW)) u_add (
    .a(add_a), .b(add_b), .cin(1'b0), .sum(add_s), .cout());

  logic signed [UW-1:0] y_next;
  always_comb y_next = UW'(sat_n(longint'(add_s) >>> CF, UW));

  assign in_ready = !busy || step == GC_A2;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      step      <= GC_B0;
      xr        <= '0;
      x1        <= '0;
      y1        <= '0;
      y2        <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        acc <= add_s;
        if (step == GC_A2) begin
          x1        <= xr;
          y1        <= y_next;
          y2        <= y1;
          out_valid <= 1'b1;
          busy      <= 1'b0;
        end else begin
          step <= gtf_coef_e'(step + 3'd1);
        end
      end
      if (in_valid && in_ready) begin
        xr   <= x;
        busy <= 1'b1;
        step <= GC_B0;
      end
    end
  end

  assign y = sample_t'(y1 >>> GTF_G);
endmodule
