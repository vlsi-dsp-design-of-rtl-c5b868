// gtf8_folded: eighth-order gammatone filter built from four folded
// second-order sections.
//
// Each gtf_sos_folded section has one CSD multiplier and one ripple-carry
// adder, so the filter has four of each instead of the twenty multipliers and
// twelve adders of gtf8, and takes five clocks per sample. The sections run
// concurrently on successive samples: section k+1 takes the output of section
// k as soon as it appears. Output samples are bit-identical to gtf8.
//
// Timing: accept x when in_valid and in_ready; y and out_valid are seen 24
// clock edges later (six per section). At the full rate of one sample per five clocks the cascade
// never stalls; the assertion checks that every section is ready when its
// predecessor delivers.
module gtf8_folded
  import ci_pkg::*;
#(
  parameter real FC_HZ = 1000.0,
  parameter real FS_HZ = 44100.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  logic    v [5];
  logic    rdy [4];
  sample_t d [5];

  assign v[0] = in_valid;
  assign d[0] = x;

  for (genvar k = 0; k < 4; k++) begin : g_sec
    gtf_sos_folded #(.SECTION(k), .FC_HZ(FC_HZ), .FS_HZ(FS_HZ)) u_sos (
      .clk, .rst,
      .in_valid(v[k]), .in_ready(rdy[k]), .x(d[k]),
      .out_valid(v[k+1]), .y(d[k+1]));
    if (k > 0) begin : g_chk
      always_ff @(posedge clk)
        if (!rst) assert (!v[k] || rdy[k]) else $error("folded section %0d overrun", k);
    end
  end

  assign in_ready  = rdy[0];
  assign out_valid = v[4];
  assign y         = d[4];
endmodule
