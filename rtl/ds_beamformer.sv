// ds_beamformer: dual-microphone delay-and-sum beamformer.
//
// The front microphone signal is delayed by DELAY samples (the acoustic travel
// time across the microphone spacing, 1.427 samples by default) through the
// CSD fractional delay filter ffd_fir, and averaged with the rear microphone
// signal: y = (FD(front) + rear) / 2. Sound arriving from the front then adds
// in phase, sound from the back partly cancels. Which microphone is delayed
// and the halving of the sum are this design's choices.
//
// Timing: one sample pair per clock; mic_front and mic_rear are taken when
// in_valid is high, y and out_valid follow one clock later (the rear sample
// is registered to match the delay filter's output register).
module ds_beamformer
  import ci_pkg::*;
#(
  parameter real DELAY = 1.427
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t mic_front,
  input  sample_t mic_rear,
  output logic    out_valid,
  output sample_t y
);
  sample_t fd_y, rear_q;
  logic    fd_valid;
  logic signed [W:0] sum;

  ffd_fir #(.DELAY(DELAY)) u_fd (
    .clk, .rst, .in_valid, .x(mic_front), .out_valid(fd_valid), .y(fd_y));

  always_ff @(posedge clk) begin
    if (rst)           rear_q <= '0;
    else if (in_valid) rear_q <= mic_rear;
  end

  assign sum       = (W+1)'(fd_y) + (W+1)'(rear_q);
  assign y         = sample_t'(sum >>> 1);
  assign out_valid = fd_valid;
endmodule
