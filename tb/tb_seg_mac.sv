// tb_seg_mac: checks the segmented multiply-accumulate datapath.
// Frames of 1 to 24 taps with random samples, random shift parts s = +-2**e and random
// multiplier parts m below 2**(WIDTH-2) are fed, with random idle clocks between taps in
// half of the frames. After each frame y_s must equal sum(s*x), y_m sum(m*x) and y their
// sum, all worked out in the testbench with integer arithmetic; out_valid must come one
// clock after the clock edge that captured the last tap and last exactly one clock, and
// the multiplier coefficient input must hold the last m.
module tb_seg_mac;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned EXP_W = $clog2(WIDTH);
  localparam int unsigned ACC_W = 2 * WIDTH + 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tap_valid = 1'b0, tap_first = 1'b0, tap_last = 1'b0;
  logic signed [WIDTH-1:0] x = '0;
  logic s_neg = 1'b0;
  logic [EXP_W-1:0] s_exp = '0;
  logic [WIDTH-1:0] m = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] y_s, y_m, y;
  logic [WIDTH-1:0] mult_coef;
  int checks = 0, failures = 0;

  seg_mac #(.WIDTH(WIDTH), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint ref_s, ref_m;
    int len, xv, e, mv, wait_clk, pulses;
    logic neg;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 300; f++) begin
      len   = 1 + int'($urandom_range(23));
      ref_s = 0;
      ref_m = 0;
      for (int k = 0; k < len; k++) begin
        xv  = int'($urandom_range(255)) - 128;
        e   = int'($urandom_range(WIDTH - 1));
        neg = 1'($urandom);
        mv  = int'($urandom_range(2 ** (WIDTH - 2) - 1));
        if (f == 0) begin                       // extreme values in the first frame
          xv = -128; e = WIDTH - 1; neg = 1'b1; mv = 2 ** (WIDTH - 2) - 1;
        end
        ref_s += neg ? -(longint'(xv) << e) : (longint'(xv) << e);
        ref_m += longint'(xv) * mv;
        @(negedge clk);
        tap_valid = 1'b1;
        tap_first = (k == 0);
        tap_last  = (k == len - 1);
        x         = WIDTH'(xv);
        s_neg     = neg;
        s_exp     = EXP_W'(e);
        m         = WIDTH'(mv);
        if (k != len - 1 && f % 2 == 1) begin
          repeat ($urandom_range(2)) begin
            @(negedge clk);
            tap_valid = 1'b0;
            x         = WIDTH'($urandom);       // junk while idle
            m         = WIDTH'($urandom);
          end
        end
      end
      @(negedge clk);                           // last tap captured at the edge just passed
      tap_valid = 1'b0;
      x         = WIDTH'($urandom);
      m         = WIDTH'($urandom);
      @(posedge clk);
      #1;
      check("out_valid one clock after last tap", int'(out_valid), 1);
      check("y_s", y_s, ref_s);
      check("y_m", y_m, ref_m);
      check("y", y, ref_s + ref_m);
      check("mult_coef holds last m", int'(mult_coef), mv);
      pulses = 0;
      wait_clk = $urandom_range(3);
      repeat (wait_clk + 1) begin
        @(posedge clk);
        #1;
        pulses += int'(out_valid);
      end
      check("out_valid lasts one clock", pulses, 0);
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
