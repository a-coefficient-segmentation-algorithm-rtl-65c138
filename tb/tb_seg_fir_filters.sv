// tb_seg_fir_filters: runs the ten evaluation filters (five lowpass, five bandpass, 32 to 89
// taps) through the coefficient-segmented FIR filter at 8, 16 and 24 bits. The filters are
// designed by the window method inside seg_fir_stream_check and quantised to each word
// length; zero-mean uniformly distributed samples are streamed through them. Every output
// is checked against a direct convolution, and the switching at the multiplier's
// coefficient input is measured. For each width the summed switching per pass of the
// segmented m sequence must be below that of the raw coefficients.
module tb_seg_fir_filters;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [3];
  int c [3], f [3], sws [3], swr [3];
  int br [3][3];
  int checks = 0, failures = 0;

  seg_fir_stream_check #(.WIDTH(8),  .DESIGNED(1'b1)) u8  (.clk, .rst_n, .done(done[0]),
      .checks(c[0]), .failures(f[0]), .branch_seen(br[0]), .sw_segmented(sws[0]), .sw_raw(swr[0]));
  seg_fir_stream_check #(.WIDTH(16), .DESIGNED(1'b1)) u16 (.clk, .rst_n, .done(done[1]),
      .checks(c[1]), .failures(f[1]), .branch_seen(br[1]), .sw_segmented(sws[1]), .sw_raw(swr[1]));
  seg_fir_stream_check #(.WIDTH(24), .DESIGNED(1'b1)) u24 (.clk, .rst_n, .done(done[2]),
      .checks(c[2]), .failures(f[2]), .branch_seen(br[2]), .sw_segmented(sws[2]), .sw_raw(swr[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int w = 0; w < 3; w++) begin
      checks   += c[w] + 1;
      failures += f[w];
      if (sws[w] >= swr[w]) failures++;
      $display("%0d-bit: checks=%0d failures=%0d switching per pass over all filters: %0d segmented, %0d raw (%0.1f%% less)",
               8 * (w + 1), c[w], f[w], sws[w], swr[w], 100.0 * (swr[w] - sws[w]) / swr[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
