// tb_da_fir_channel: self-checking test of one distributed-arithmetic channel.
// A short channel (30 taps, so the last 4-tap table is only half used) is fed
// the bit planes of random sample vectors, including all-maximum and
// all-minimum vectors; after the 16 bit-plane clocks the accumulator must
// equal the directly computed sum of coefficient * sample.
module tb_da_fir_channel;
  import ci_pkg::*;

  localparam int NT = 30;
  localparam int CH = 3;

  logic        clk = 0, rst = 1, start = 0, en = 0;
  logic [3:0]  bit_idx = '0;
  logic [NT-1:0] bits = '0;
  logic signed [FB_ACCW-1:0] acc;
  int          checks = 0, failures = 0;

  da_fir_channel #(.NTAPS(NT), .CHAN(CH)) dut (.clk, .rst, .start, .en, .bit_idx, .bits, .acc);
  always #5 clk = ~clk;

  initial begin
    sample_t xs [NT];
    longint  expv;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < NT; k++)
        xs[k] = (t == 0) ? sample_t'(16'sh7fff) : (t == 1) ? sample_t'(16'sh8000)
                         : sample_t'($urandom_range(0, 65535));
      expv = 0;
      for (int k = 0; k < NT; k++)
        expv += longint'(fb_coef(CH, k, 16, NT, 44100.0, 200.0, 8000.0)) * longint'(xs[k]);
      for (int b = 0; b < W; b++) begin
        @(posedge clk);
        en      <= 1;
        start   <= (b == 0);
        bit_idx <= 4'(b);
        for (int k = 0; k < NT; k++) bits[k] <= xs[k][b];
      end
      @(posedge clk);
      en <= 0;
      @(posedge clk);
      checks++;
      if (longint'(acc) != expv) begin
        failures++;
        if (failures < 10) $display("vector %0d: acc %0d expected %0d", t, acc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
