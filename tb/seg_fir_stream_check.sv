// seg_fir_stream_check: drives one seg_fir instance of a given word length with filters of
// the ten evaluation lengths (32 to 89 taps) and checks every output against a direct
// convolution of the raw coefficients with the sample history. With DESIGNED = 0 the
// coefficients are random; with DESIGNED = 1 they are the ten lowpass and bandpass filters
// of the evaluation set, designed here by the window method (see design_filter) and
// quantised to WIDTH bits so that the largest coefficient is 2**(WIDTH-1)-1.
// y_s and y_m are checked against a segmentation worked out here, the latency against L+1
// clocks, and the switching count per pass against the cyclic Hamming distance of the m
// sequence. Coefficients are biased towards powers of two, zero and the most negative
// value. Inputs change on the falling clock edge. When finished it raises done and holds its
// check and failure counts for the enclosing testbench, and the switching per pass summed
// over the ten filters, for the segmented m sequence (measured) and for the raw
// coefficients (computed).
module seg_fir_stream_check #(
  parameter int unsigned WIDTH    = 16,
  parameter int unsigned MAX_TAPS = 89,
  parameter int unsigned SAMPLES  = 12,    // samples per filter after the warm-up pass
  parameter bit          DESIGNED = 1'b0    // window-designed filters instead of random ones
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   branch_seen [3],             // power of two, positive, negative
  output int   sw_segmented,                // sum over filters of m switching per pass
  output int   sw_raw                       // the same for the raw coefficients
);
  import seg_fir_pkg::*;
  localparam int unsigned ACC_W  = 2 * WIDTH + $clog2(MAX_TAPS);
  localparam int unsigned ADDR_W = $clog2(MAX_TAPS);
  localparam int unsigned TAP_W  = $clog2(MAX_TAPS + 1);

  logic [TAP_W-1:0] num_taps;
  logic coef_valid, coef_ready;
  logic [ADDR_W-1:0] coef_addr;
  logic signed [WIDTH-1:0] coef_h;
  logic in_valid, in_ready;
  logic signed [WIDTH-1:0] x_in;
  logic out_valid;
  logic signed [ACC_W-1:0] y, y_s, y_m;
  logic toggle_clear;
  logic [31:0] coef_toggles;
  logic coef_done;
  seg_branch_t coef_branch;

  seg_fir #(.WIDTH(WIDTH), .MAX_TAPS(MAX_TAPS)) dut (.*);

  int cyc = 0;
  longint h_model [MAX_TAPS];
  longint hist [$];
  int cur_len = 0;

  typedef struct {
    int     cyc;
    int     len;
    longint y, ys, ym;
  } expect_t;
  expect_t pending [$];

  initial begin
    done       = 1'b0;
    checks     = 0;
    failures   = 0;
    branch_seen = '{0, 0, 0};
    sw_segmented = 0;
    sw_raw       = 0;
    num_taps   = '0;
    coef_valid = 1'b0;
    coef_addr  = '0;
    coef_h     = '0;
    in_valid   = 1'b0;
    x_in       = '0;
    toggle_clear = 1'b0;
  end

  function automatic void check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL [%0d-bit] %s: got %0d expected %0d", WIDTH, what, got, exp);
    end
  endfunction

  function automatic void split(input longint hv, output longint s, output longint mv);
    longint p;
    p = 1;
    while (p < ((hv < 0) ? -hv : hv)) p = p * 2;
    if (hv == p || hv == -p) s = hv;
    else if (hv > 0)         s = p / 2;
    else                     s = -p;
    mv = hv - s;
  endfunction

  initial begin
    expect_t e;
    forever begin
      @(posedge clk);
      cyc++;
      #1;
      if (coef_done) branch_seen[int'(coef_branch)]++;
      if (out_valid) begin
        if (pending.size() == 0) begin
          check("unexpected output", 1, 0);
        end else begin
          e = pending.pop_front();
          check("latency", longint'(cyc - e.cyc), longint'(e.len + 1));
          check("y", y, e.y);
          check("y_s", y_s, e.ys);
          check("y_m", y_m, e.ym);
        end
      end
    end
  end

  task automatic load_coef(input int k, input longint hv);
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

  function automatic expect_t expected(input int edge_no);
    expect_t e;
    longint s, mv;
    int n;
    n = hist.size() - 1;
    e.cyc = edge_no;
    e.len = cur_len;
    e.y = 0; e.ys = 0; e.ym = 0;
    for (int k = 0; k < cur_len && n - k >= 0; k++) begin
      split(h_model[k], s, mv);
      e.y  += h_model[k] * hist[n - k];
      e.ys += s * hist[n - k];
      e.ym += mv * hist[n - k];
    end
    return e;
  endfunction

  task automatic send(input longint xv);
    int edge_no;
    @(negedge clk);
    in_valid = 1'b1;
    x_in     = WIDTH'(xv);
    while (!in_ready) @(negedge clk);
    edge_no = cyc + 1;
    @(posedge clk);
    hist.push_back(xv);
    pending.push_back(expected(edge_no));
  endtask

  task automatic drain();
    @(negedge clk);
    in_valid = 1'b0;
    while (pending.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  function automatic longint rand_word();
    return longint'($urandom_range(2 ** WIDTH - 1)) - longint'(2 ** (WIDTH - 1));
  endfunction

  function automatic longint rand_coef();
    int r;
    r = int'($urandom_range(99));
    if (r < 15)      return longint'(1) << $urandom_range(WIDTH - 2);
    else if (r < 30) return -(longint'(1) << $urandom_range(WIDTH - 1));
    else if (r < 35) return 0;
    else             return rand_word();
  endfunction

  // ---- window-method filter design for the evaluation set.
  // Band edges in kHz; the sampling rate is taken as twice the last band edge, each cutoff
  // sits in the middle of its transition band, and a filter whose window is not specified
  // uses a Hamming window. Kaiser beta follows the usual formula for the attenuation.
  localparam int NF = 10;
  localparam real FS  [NF] = '{8.0, 10.0, 20.0, 10.0, 8.0, 1.0, 15.0, 88.28, 10.0, 10.0};
  localparam real FC1 [NF] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.125, 0.675, 6.5, 1.5, 0.7375};
  localparam real FC2 [NF] = '{1.75, 1.45, 4.5, 1.25, 1.75, 0.275, 1.325, 13.5, 3.875, 3.8125};
  localparam real ATT [NF] = '{50.0, 40.0, 90.0, 56.0, 50.0, 60.0, 30.0, 60.0, 56.4, 68.4};
  localparam int  WIN [NF] = '{0, 2, 0, 0, 1, 2, 0, 2, 0, 0};   // 0 Hamming, 1 Blackman, 2 Kaiser
  localparam real PI = 3.14159265358979323846;

  function automatic real bessel_i0(input real v);
    real sum, term;
    sum = 1.0;
    term = 1.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (v / (2.0 * k)) * (v / (2.0 * k));
      sum += term;
    end
    return sum;
  endfunction

  function automatic real lowpass(input real fc, input real t);   // ideal impulse response
    if (t == 0.0) return 2.0 * fc;
    return $sin(2.0 * PI * fc * t) / (PI * t);
  endfunction

  function automatic void design_filter(input int f, input int len);
    real h [MAX_TAPS];
    real mid, w, beta, a, big, scale, r;
    mid = (len - 1) / 2.0;
    a = ATT[f];
    beta = (a > 50.0) ? 0.1102 * (a - 8.7)
         : (a >= 21.0) ? 0.5842 * $pow(a - 21.0, 0.4) + 0.07886 * (a - 21.0) : 0.0;
    big = 0.0;
    for (int n = 0; n < len; n++) begin
      case (WIN[f])
        1: w = 0.42 - 0.5 * $cos(2.0 * PI * n / (len - 1)) + 0.08 * $cos(4.0 * PI * n / (len - 1));
        2: begin
          r = 2.0 * n / (len - 1) - 1.0;
          w = bessel_i0(beta * $sqrt(1.0 - r * r)) / bessel_i0(beta);
        end
        default: w = 0.54 - 0.46 * $cos(2.0 * PI * n / (len - 1));
      endcase
      h[n] = w * (lowpass(FC2[f] / FS[f], n - mid) - lowpass(FC1[f] / FS[f], n - mid));
      if (h[n] > big) big = h[n];
      if (-h[n] > big) big = -h[n];
    end
    scale = (2.0 ** (WIDTH - 1) - 1.0) / big;
    for (int n = 0; n < len; n++) begin
      r = h[n] * scale;
      h_design[n] = (r >= 0.0) ? longint'($floor(r + 0.5)) : -longint'($floor(-r + 0.5));
    end
  endfunction

  longint h_design [MAX_TAPS];

  function automatic int cyclic_raw_switching(input int len);
    int total;
    total = 0;
    for (int k = 0; k < len; k++)
      total += $countones(WIDTH'(h_model[k]) ^ WIDTH'(h_model[(k + len - 1) % len]));
    return total;
  endfunction

  function automatic int cyclic_m_switching(input int len);
    int total;
    longint s, mv, s2, mv2;
    total = 0;
    for (int k = 0; k < len; k++) begin
      split(h_model[k], s, mv);
      split(h_model[(k + len - 1) % len], s2, mv2);
      total += $countones(WIDTH'(mv) ^ WIDTH'(mv2));
      check("m below 2**(WIDTH-2)", longint'(mv >= 0 && mv < (longint'(1) << (WIDTH - 2))), 1);
    end
    return total;
  endfunction

  initial begin
    automatic int lens [10] = '{53, 71, 42, 61, 89, 73, 34, 54, 32, 80};
    int per_pass, len;
    @(posedge rst_n);
    for (int f = 0; f < 10; f++) begin
      len = (lens[f] > int'(MAX_TAPS)) ? int'(MAX_TAPS) : lens[f];
      drain();
      @(negedge clk);
      num_taps = TAP_W'(len);
      cur_len  = len;
      if (DESIGNED) design_filter(f, len);
      for (int k = 0; k < len; k++) load_coef(k, DESIGNED ? h_design[k] : rand_coef());
      send(rand_word());                     // warm-up pass
      drain();
      @(negedge clk);
      toggle_clear = 1'b1;
      @(negedge clk);
      toggle_clear = 1'b0;
      per_pass = cyclic_m_switching(len);
      sw_segmented += per_pass;
      sw_raw       += cyclic_raw_switching(len);
      if (DESIGNED)
        $display("[%0d-bit] filter %0d (%0d taps): coefficient input switching per pass %0d segmented, %0d raw",
                 WIDTH, f, len, per_pass, cyclic_raw_switching(len));
      for (int n = 0; n < int'(SAMPLES); n++) send(rand_word());
      drain();
      check("switching per pass", longint'(coef_toggles), longint'(int'(SAMPLES) * per_pass));
    end
    done = 1'b1;
  end
endmodule
