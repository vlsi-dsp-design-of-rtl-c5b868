// da_filter_bank: NCH-channel band-pass FIR filter bank in distributed
// arithmetic, splitting one input stream into NCH frequency bands.
//
// A shared delay line holds the last NTAPS input samples. When a sample is
// accepted it is shifted in, and the controller then walks the W bit planes
// of the delay line, least significant first, one per clock; every channel
// (da_fir_channel) turns the bit plane into a partial sum through its DA
// tables and accumulates it. One clock after the last bit plane each channel's
// sum is scaled back to Q1.15, saturated and presented on y[ch].
// Default: 16 channels of order-877 band-pass filters, bands spaced
// logarithmically between 200 Hz and 8 kHz at a 44.1 kHz sample rate; the
// band plan and the coefficient design are this design's choices.
//
// Timing: a sample is accepted on a clock edge where in_valid and in_ready
// are high. in_ready is low for the W bit-plane clocks that follow, so the
// bank takes one sample per W+1 = 17 clocks; y and a one-clock out_valid
// pulse are seen 18 clock edges after acceptance (a 44.1 kHz stream needs a
// clock of at least 0.75 MHz).
module da_filter_bank
  import ci_pkg::*;
#(
  parameter int  NCH    = 16,
  parameter int  NTAPS  = 878,
  parameter int  K      = 4,
  parameter real FS_HZ  = 44100.0,
  parameter real FLO_HZ = 200.0,
  parameter real FHI_HZ = 8000.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y [NCH]
);
  typedef enum logic [1:0] {S_IDLE, S_BITS, S_OUT} state_e;

  state_e                 state;
  logic [$clog2(W)-1:0]   bit_idx;
  sample_t                dline [NTAPS];
  logic [NTAPS-1:0]       plane;
  logic signed [FB_ACCW-1:0] acc [NCH];

  always_comb
    for (int k = 0; k < NTAPS; k++) plane[k] = dline[k][bit_idx];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    da_fir_channel #(.NTAPS(NTAPS), .K(K), .CHAN(c), .NCH(NCH),
                     .FS_HZ(FS_HZ), .FLO_HZ(FLO_HZ), .FHI_HZ(FHI_HZ)) u_ch (
      .clk, .rst,
      .start(bit_idx == '0), .en(state == S_BITS),
      .bit_idx, .bits(plane), .acc(acc[c]));
  end

  assign in_ready = (state != S_BITS);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      bit_idx   <= '0;
      out_valid <= 1'b0;
      for (int k = 0; k < NTAPS; k++) dline[k] <= '0;
      for (int c = 0; c < NCH; c++) y[c] <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_BITS: begin
          bit_idx <= bit_idx + 1'b1;
          if (bit_idx == $clog2(W)'(W - 1)) state <= S_OUT;
        end
        S_OUT: begin
          for (int c = 0; c < NCH; c++) y[c] <= sat(longint'(acc[c]) >>> FB_CF);
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: ;
      endcase
      if (in_valid && in_ready) begin
        dline[0] <= x;
        for (int k = 1; k < NTAPS; k++) dline[k] <= dline[k-1];
        bit_idx <= '0;
        state   <= S_BITS;
      end
    end
  end
endmodule
