// gtf8: eighth-order gammatone band-pass filter in direct (unfolded) form.
//
// Four gtf_sos sections in cascade; each is second order, together they
// realise the fourth-order gammatone response that models one place on the
// basilar membrane. Twenty multipliers and twelve ripple-carry adders in all.
// Coefficients follow from FC_HZ and FS_HZ (see ci_pkg); the filter is
// normalised to unity gain at FC_HZ.
//
// Timing: one sample per clock; each section registers its output, so y and
// out_valid appear four clocks after in_valid.
module gtf8
  import ci_pkg::*;
#(
  parameter real FC_HZ = 1000.0,
  parameter real FS_HZ = 44100.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  logic    v [5];
  sample_t d [5];

  assign v[0] = in_valid;
  assign d[0] = x;

  for (genvar k = 0; k < 4; k++) begin : g_sec
    gtf_sos #(.SECTION(k), .FC_HZ(FC_HZ), .FS_HZ(FS_HZ)) u_sos (
      .clk, .rst,
      .in_valid(v[k]), .x(d[k]),
      .out_valid(v[k+1]), .y(d[k+1]));
  end

  assign out_valid = v[4];
  assign y         = d[4];
endmodule
