// tb_seg_fir: end-to-end test of the coefficient-segmented FIR filter at its default size
// (8-bit data and coefficients, 89 taps).
//
// Part 1 loads the ten-tap worked example H = (-97, -15, -127, -29, -119, -103, 93, 57, -111,
// 127), feeds the first ten samples X = (21, -64, 127, 64, -59, -93, 12, 17, 54, -82) and
// compares y_s, y_m and y with the published sequences Ys, Ym and Y. It also checks that
// each pass through the segmented coefficients switches the multiplier's coefficient input
// 16 times, against 34 for the raw coefficients.
// Part 2 loads filters with the ten lengths of the evaluation set (32 to 89 taps) and
// random coefficients, biased towards powers of two, zero and the most negative value, and
// streams random samples through each. Every output is compared with a direct convolution
// of the raw coefficients with the sample history, and y_s, y_m with the testbench's own
// segmentation. Each output must appear L+1 clocks after its sample is taken, and with
// samples waiting the filter must take one every L+1 clocks. The switching count per pass
// is compared with the cyclic Hamming distance of the m sequence.
// Mechanisms counted, each of which must occur: the three segmentation branches (power of
// two, positive, negative), back-pressure on the sample input, a sample winning over a
// coefficient offered in the same clock, coefficient reload, filter length change, and
// wrap-around of the delay line.
module tb_seg_fir;
  import seg_fir_pkg::*;
  localparam int unsigned WIDTH    = DEF_WIDTH;
  localparam int unsigned MAX_TAPS = DEF_MAX_TAPS;
  localparam int unsigned ACC_W  = 2 * WIDTH + $clog2(MAX_TAPS);
  localparam int unsigned ADDR_W = $clog2(MAX_TAPS);
  localparam int unsigned TAP_W  = $clog2(MAX_TAPS + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [TAP_W-1:0] num_taps = '0;
  logic coef_valid = 1'b0, coef_ready;
  logic [ADDR_W-1:0] coef_addr = '0;
  logic signed [WIDTH-1:0] coef_h = '0;
  logic in_valid = 1'b0, in_ready;
  logic signed [WIDTH-1:0] x_in = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] y, y_s, y_m;
  logic toggle_clear = 1'b0;
  logic [31:0] coef_toggles;
  logic coef_done;
  seg_branch_t coef_branch;

  seg_fir dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;                      // number of the last rising edge
  int n_pow2 = 0, n_pos = 0, n_neg = 0, n_stall = 0, n_priority = 0;
  int n_reload = 0, n_len_change = 0, n_samples = 0, n_outputs = 0;

  // model state
  int h_model [MAX_TAPS];
  int hist [$];                     // every sample taken since reset
  int cur_len = 0;
  int last_take = 0;                // edge at which the previous sample was taken
  bit back_to_back = 1'b0;          // the previous sample was followed at once by this one
  int n_back_to_back = 0;

  typedef struct {
    int    cyc;       // edge at which the sample was taken
    int    len;
    longint y, ys, ym;
  } expect_t;
  expect_t pending [$];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference segmentation, from the definition: s is the power of two that leaves the
  // smallest non-negative m, unless h itself is +-2**i
  function automatic void split(input int hv, output int s, output int mv);
    int p;
    p = 1;
    while (p < ((hv < 0) ? -hv : hv)) p = p * 2;
    if (hv == p || hv == -p) s = hv;
    else if (hv > 0)         s = p / 2;
    else                     s = -p;
    mv = hv - s;
  endfunction

  // observe outputs and segmentation results just after each rising edge
  initial begin
    expect_t e;
    forever begin
      @(posedge clk);
      cyc++;
      #1;
      if (coef_done) begin
        case (coef_branch)
          BR_POW2: n_pow2++;
          BR_POS:  n_pos++;
          default: n_neg++;
        endcase
      end
      if (out_valid) begin
        n_outputs++;
        if (pending.size() == 0) begin
          check("unexpected output", 1, 0);
        end else begin
          e = pending.pop_front();
          check("latency", cyc - e.cyc, e.len + 1);
          check("y", y, e.y);
          check("y_s", y_s, e.ys);
          check("y_m", y_m, e.ym);
        end
      end
    end
  end

  // offer one coefficient; returns once it has been segmented and stored
  task automatic load_coef(input int k, input int hv);
    @(negedge clk);
    coef_valid = 1'b1;
    coef_addr  = ADDR_W'(k);
    coef_h     = WIDTH'(hv);
    while (!coef_ready) @(negedge clk);
    @(posedge clk);
    h_model[k] = hv;
    @(negedge clk);
    coef_valid = 1'b0;
    while (!coef_done) @(negedge clk);
  endtask

  // work out the expected output for the sample just taken
  function automatic expect_t expected(input int edge_no);
    expect_t e;
    int n, s, mv;
    n = hist.size() - 1;
    e.cyc = edge_no;
    e.len = cur_len;
    e.y = 0; e.ys = 0; e.ym = 0;
    for (int k = 0; k < cur_len && n - k >= 0; k++) begin
      split(h_model[k], s, mv);
      e.y  += longint'(h_model[k]) * hist[n - k];
      e.ys += longint'(s) * hist[n - k];
      e.ym += longint'(mv) * hist[n - k];
    end
    return e;
  endfunction

  // offer one sample and keep in_valid high until it is taken; back-to-back if hold
  task automatic send(input int xv, input bit hold);
    int edge_no;
    @(negedge clk);
    in_valid = 1'b1;
    x_in     = WIDTH'(xv);
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
    end
    edge_no = cyc + 1;              // taken at the coming edge
    if (back_to_back) begin
      check("sample period", edge_no - last_take, cur_len + 1);
      n_back_to_back++;
    end
    last_take    = edge_no;
    back_to_back = hold;
    @(posedge clk);
    hist.push_back(xv);
    n_samples++;
    pending.push_back(expected(edge_no));
    if (!hold) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  task automatic drain();
    @(negedge clk);
    in_valid     = 1'b0;
    back_to_back = 1'b0;
    while (pending.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic clear_toggles();
    @(negedge clk);
    toggle_clear = 1'b1;
    @(negedge clk);
    toggle_clear = 1'b0;
  endtask

  function automatic int cyclic_m_switching(input int len);
    int total, s, mv, s2, mv2;
    s = 0;
    s2 = 0;
    total = 0;
    for (int k = 0; k < len; k++) begin
      split(h_model[k], s, mv);
      split(h_model[(k + len - 1) % len], s2, mv2);
      total += $countones(WIDTH'(mv) ^ WIDTH'(mv2));
    end
    return total;
  endfunction

  function automatic int rand_coef();
    int r;
    r = int'($urandom_range(99));
    if (r < 15)      return (1 << $urandom_range(WIDTH - 2));
    else if (r < 30) return -(1 << $urandom_range(WIDTH - 1));
    else if (r < 35) return 0;
    else             return int'($urandom_range(2 ** WIDTH - 1)) - 2 ** (WIDTH - 1);
  endfunction

  task automatic set_length(input int len);
    drain();
    if (cur_len != 0 && len != cur_len) n_len_change++;
    @(negedge clk);
    num_taps = TAP_W'(len);
    cur_len  = len;
  endtask

  initial begin
    automatic int hx [10] = '{-97, -15, -127, -29, -119, -103, 93, 57, -111, 127};
    automatic int xs [10] = '{21, -64, 127, 64, -59, -93, 12, 17, 54, -82};
    automatic int ys [10] = '{-2688, 7856, -17920, -2704, -10368, 6096, -1264, -16448, -2992, 44224};
    automatic int ym [10] = '{651, -1963, 3894, 2110, -1641, -2548, 564, 2689, 4933, 519};
    automatic int yy [10] = '{-2037, 5893, -14026, -594, -12009, 3548, -700, -13759, 1941, 44743};
    automatic int lens [10] = '{53, 71, 42, 61, 89, 73, 34, 54, 32, 80};
    int conv_sw, len, per_pass;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- part 1: the worked example
    set_length(10);
    for (int k = 0; k < 10; k++) load_coef(k, hx[k]);
    conv_sw = 0;
    for (int k = 0; k < 10; k++) conv_sw += $countones(WIDTH'(hx[k]) ^ WIDTH'(hx[(k + 9) % 10]));
    send(xs[0], 1'b0);
    drain();
    check("example Ys(0)", y_s, ys[0]);
    check("example Ym(0)", y_m, ym[0]);
    check("example Y(0)", y, yy[0]);
    clear_toggles();
    for (int n = 1; n < 10; n++) begin
      send(xs[n], 1'b0);
      while (pending.size() != 0) @(negedge clk);
      check($sformatf("example Ys(%0d)", n), y_s, ys[n]);
      check($sformatf("example Ym(%0d)", n), y_m, ym[n]);
      check($sformatf("example Y(%0d)", n), y, yy[n]);
    end
    drain();
    check("example switching per pass", coef_toggles / 9, 16);
    check("example switching total", coef_toggles, 9 * 16);
    $display("worked example: multiplier coefficient input switches %0d times per pass, raw coefficients would switch %0d",
             coef_toggles / 9, conv_sw);

    // a sample and a coefficient offered together: the sample goes first
    @(negedge clk);
    coef_valid = 1'b1;
    coef_addr  = '0;
    coef_h     = WIDTH'(hx[0]);
    in_valid   = 1'b1;
    x_in       = WIDTH'(xs[0]);
    #1;
    if (in_ready && !coef_ready) n_priority++;
    check("sample wins over coefficient", int'(coef_ready), 0);
    coef_valid = 1'b0;
    in_valid   = 1'b0;
    send(xs[0], 1'b0);
    drain();

    // ---- part 2: filters with the evaluation lengths and random coefficients
    for (int f = 0; f < 10; f++) begin
      len = lens[f];
      set_length(len);
      for (int k = 0; k < len; k++) load_coef(k, rand_coef());
      n_reload++;
      for (int n = 0; n < 3; n++) send(int'($urandom_range(2 ** WIDTH - 1)) - 2 ** (WIDTH - 1), 1'b1);
      drain();
      clear_toggles();
      per_pass = cyclic_m_switching(len);
      for (int n = 0; n < 2 * len / 10 + 4; n++)
        send(int'($urandom_range(2 ** WIDTH - 1)) - 2 ** (WIDTH - 1), 1'b1);
      drain();
      check($sformatf("filter %0d switching", f), coef_toggles, (2 * len / 10 + 4) * per_pass);
    end

    check("outputs seen", n_outputs, n_samples);
    check("power-of-two coefficients", int'(n_pow2 > 0), 1);
    check("positive coefficients", int'(n_pos > 0), 1);
    check("negative coefficients", int'(n_neg > 0), 1);
    check("sample input stalled", int'(n_stall > 0), 1);
    check("sample priority over coefficient", int'(n_priority > 0), 1);
    check("coefficient reload", int'(n_reload > 1), 1);
    check("filter length change", int'(n_len_change > 0), 1);
    check("back-to-back samples", int'(n_back_to_back > 0), 1);
    check("delay line wrapped", int'(n_samples > int'(MAX_TAPS)), 1);
    $display("mechanisms: pow2=%0d pos=%0d neg=%0d stall_clocks=%0d priority=%0d reloads=%0d length_changes=%0d samples=%0d",
             n_pow2, n_pos, n_neg, n_stall, n_priority, n_reload, n_len_change, n_samples);
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
