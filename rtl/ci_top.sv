// ci_top: digital front end of a cochlear-implant speech processor.
//
// Two microphone streams enter; the delay-and-sum beamformer (ds_beamformer)
// steers the pair towards the front by delaying the front microphone 1.427
// samples through the CSD fractional delay filter. The enhanced signal then
// feeds, side by side, the three band-splitting structures of the design:
//   * da_filter_bank: 16 band-pass FIR filters of order 877 in distributed
//     arithmetic, the band split of the continuous interleaved sampling (CIS)
//     strategy;
//   * gtf8: the eighth-order gammatone (cochlear) filter at FC_HZ in direct
//     form (20 multipliers, 12 ripple-carry adders);
//   * gtf8_folded: the same filter folded onto 4 CSD multipliers and 4 adders.
// The variable fractional delay filter (vfd_fir) runs on the front microphone
// with a delay set at run time, as the adjustable alternative to the fixed
// delay of the beamformer; its output is brought out on its own.
// How the parts are wired together is this design's choice; the envelope
// detection and pulse generation that follow the band split are not part of
// this RTL.
//
// Timing: a microphone pair is accepted when in_valid and in_ready are high.
// in_ready is low while the bit-serial filter bank or the folded filter is
// busy, and for the clock in which the beamformer result is being handed on,
// so the top takes at most one sample pair every 18 clocks; at 44.1 kHz any
// clock above about 0.8 MHz keeps up. Each output has its own valid pulse: beamformer
// 1 clock after acceptance, vfd 1 clock, gtf 5, gtff 25, filter bank 19.
module ci_top
  import ci_pkg::*;
#(
  parameter int  NCH   = 16,
  parameter int  NTAPS = 878,
  parameter real FC_HZ = 1000.0,
  parameter real FS_HZ = 44100.0,
  parameter real DELAY = 1.427
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  sample_t    mic_front,
  input  sample_t    mic_rear,
  input  logic [9:0] vfd_delay,
  output logic       bf_valid,
  output sample_t    bf_out,
  output logic       fb_valid,
  output sample_t    fb_out [NCH],
  output logic       gtf_valid,
  output sample_t    gtf_out,
  output logic       gtff_valid,
  output sample_t    gtff_out,
  output logic       vfd_valid,
  output sample_t    vfd_out
);
  logic fb_ready, gtff_ready, accept;

  assign in_ready = fb_ready && gtff_ready && !bf_valid;
  assign accept   = in_valid && in_ready;

  ds_beamformer #(.DELAY(DELAY)) u_bf (
    .clk, .rst, .in_valid(accept), .mic_front, .mic_rear,
    .out_valid(bf_valid), .y(bf_out));

  da_filter_bank #(.NCH(NCH), .NTAPS(NTAPS), .FS_HZ(FS_HZ)) u_fb (
    .clk, .rst, .in_valid(bf_valid), .in_ready(fb_ready), .x(bf_out),
    .out_valid(fb_valid), .y(fb_out));

  gtf8 #(.FC_HZ(FC_HZ), .FS_HZ(FS_HZ)) u_gtf (
    .clk, .rst, .in_valid(bf_valid), .x(bf_out),
    .out_valid(gtf_valid), .y(gtf_out));

  gtf8_folded #(.FC_HZ(FC_HZ), .FS_HZ(FS_HZ)) u_gtff (
    .clk, .rst, .in_valid(bf_valid), .in_ready(gtff_ready), .x(bf_out),
    .out_valid(gtff_valid), .y(gtff_out));

  vfd_fir u_vfd (
    .clk, .rst, .in_valid(accept), .x(mic_front), .d(vfd_delay),
    .out_valid(vfd_valid), .y(vfd_out));

  // a beamformer sample is never offered to a busy filter
  always_ff @(posedge clk)
    if (!rst) assert (!bf_valid || (fb_ready && gtff_ready)) else $error("sample lost");
endmodule
