// tb_seg_fir_wide: runs the coefficient-segmented FIR filter at the two larger word lengths
// of its evaluation, 16 and 24 bits, with filters of the ten evaluation lengths (32 to 89
// taps) and random coefficients and samples. Each width is driven and checked by its own
// seg_fir_stream_check instance; the test passes when both finish without failures and
// both have seen all three kinds of segmented coefficient.
module tb_seg_fir_wide;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done16, done24;
  int checks16, failures16, checks24, failures24;
  int br16 [3], br24 [3];
  int sws16, swr16, sws24, swr24;
  int checks = 0, failures = 0;

  seg_fir_stream_check #(.WIDTH(16)) u16 (.clk, .rst_n, .done(done16), .checks(checks16),
                                          .failures(failures16), .branch_seen(br16),
                                          .sw_segmented(sws16), .sw_raw(swr16));
  seg_fir_stream_check #(.WIDTH(24)) u24 (.clk, .rst_n, .done(done24), .checks(checks24),
                                          .failures(failures24), .branch_seen(br24),
                                          .sw_segmented(sws24), .sw_raw(swr24));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done16 && done24);
    checks   = checks16 + checks24;
    failures = failures16 + failures24;
    for (int b = 0; b < 3; b++) begin
      checks += 2;
      if (br16[b] == 0) failures++;
      if (br24[b] == 0) failures++;
    end
    $display("16-bit: checks=%0d failures=%0d branches=%0d/%0d/%0d", checks16, failures16,
             br16[0], br16[1], br16[2]);
    $display("24-bit: checks=%0d failures=%0d branches=%0d/%0d/%0d", checks24, failures24,
             br24[0], br24[1], br24[2]);
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
