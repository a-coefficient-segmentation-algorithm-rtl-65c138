// tb_coef_segmenter: checks the coefficient segmentation unit.
// First the ten coefficients of the worked example H = (-97, -15, -127, -29, -119, -103, 93,
// 57, -111, 127) are segmented and compared with the printed results
// S = (-128, -16, -128, -32, -128, -128, 64, 32, -128, 64) and M = (31, 1, 1, 3, 9, 25, 29,
// 25, 17, 63). Then every WIDTH-bit value is segmented and checked against a reference built
// on $clog2: i = ceil(log2 |h|); a power of two keeps s = h, m = 0; otherwise a positive h
// takes s = 2**(i-1), a negative or zero h takes s = -2**i. The reference also fixes the
// time: out_valid must rise i+1 clocks after the coefficient is taken. Results are held
// while out_ready is low.
module tb_coef_segmenter;
  import seg_fir_pkg::*;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned EXP_W = $clog2(WIDTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic signed [WIDTH-1:0] h = '0;
  logic s_neg;
  logic [EXP_W-1:0] s_exp;
  logic [WIDTH-1:0] m;
  seg_branch_t branch;
  int checks = 0, failures = 0;
  int n_pow2 = 0, n_pos = 0, n_neg = 0;

  coef_segmenter #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .in_valid, .in_ready, .h,
                                       .out_valid, .out_ready, .s_neg, .s_exp, .m, .branch);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference segmentation
  function automatic void ref_seg(input int hv, output int s, output int mv, output int i,
                                  output seg_branch_t br);
    int mag;
    mag = (hv < 0) ? -hv : hv;
    i = (mag <= 1) ? 0 : $clog2(mag);
    if (mag != 0 && (1 << i) == mag) begin
      s = hv; br = BR_POW2;
    end else if (hv > 0) begin
      s = 1 << (i - 1); br = BR_POS;
    end else begin
      s = -(1 << i); br = BR_NEG;
    end
    mv = hv - s;
  endfunction

  // segment one value; returns s, m and the clocks from acceptance to out_valid
  task automatic segment(input int hv, input int hold, output int s, output int mv,
                         output int lat, output seg_branch_t br);
    while (!in_ready) @(posedge clk);
    h        <= WIDTH'(hv);
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
    end while (!out_valid && lat < 100);
    repeat (hold) begin              // results must stay while out_ready is low
      @(posedge clk);
      #1;
      check("out_valid held", int'(out_valid), 1);
    end
    s  = s_neg ? -(1 << s_exp) : (1 << s_exp);
    mv = int'(m);
    br = branch;
    out_ready <= 1'b1;
    @(posedge clk);
    out_ready <= 1'b0;
  endtask

  initial begin
    automatic int hx [10] = '{-97, -15, -127, -29, -119, -103, 93, 57, -111, 127};
    automatic int sx [10] = '{-128, -16, -128, -32, -128, -128, 64, 32, -128, 64};
    automatic int mx [10] = '{31, 1, 1, 3, 9, 25, 29, 25, 17, 63};
    int s, mv, lat, rs, rm, ri;
    seg_branch_t br, rbr;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 10; k++) begin
      segment(hx[k], 0, s, mv, lat, br);
      check($sformatf("example s_%0d", k), s, sx[k]);
      check($sformatf("example m_%0d", k), mv, mx[k]);
    end
    for (int v = -(2 ** (WIDTH - 1)); v < 2 ** (WIDTH - 1); v++) begin
      segment(v, v % 3, s, mv, lat, br);
      ref_seg(v, rs, rm, ri, rbr);
      check($sformatf("s of %0d", v), s, rs);
      check($sformatf("m of %0d", v), mv, rm);
      check($sformatf("latency of %0d", v), lat, ri + 1);
      check($sformatf("branch of %0d", v), int'(br), int'(rbr));
      check($sformatf("m range of %0d", v), int'(mv >= 0 && mv < 2 ** (WIDTH - 2)), 1);
      case (br)
        BR_POW2: n_pow2++;
        BR_POS:  n_pos++;
        default: n_neg++;
      endcase
    end
    check("power-of-two branch seen", int'(n_pow2 > 0), 1);
    check("positive branch seen", int'(n_pos > 0), 1);
    check("negative branch seen", int'(n_neg > 0), 1);
    $display("branches: pow2=%0d pos=%0d neg=%0d", n_pow2, n_pos, n_neg);
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
