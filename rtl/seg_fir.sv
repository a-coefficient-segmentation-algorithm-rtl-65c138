// seg_fir: FIR filter with coefficient segmentation, a low-power form of the direct FIR.
//
// The filter computes y(n) = sum_{k=0}^{L-1} h_k * x(n-k) with a single multiplier that is
// shared by all taps. Each coefficient h_k is first split, by the segmentation unit, into
// h_k = s_k + m_k: s_k is a signed power of two applied with a shift, and m_k is the small,
// never negative rest applied to the multiplier's coefficient input. Consecutive m_k values
// keep the same sign and have at most WIDTH-2 significant bits, so the multiplier's
// coefficient input switches far less than it would with the raw h_k. The output is the
// sum of the shift products y_s and the multiplier products y_m, both also brought out.
//
// Coefficient load: coef_h is written to index coef_addr on coef_valid && coef_ready. The
// segmentation unit then takes up to WIDTH+1 clocks, after which s and m are stored; one
// coefficient is taken at a time. num_taps (1..MAX_TAPS) sets the filter length L and must
// be steady while a sample is processed. Samples before the first one after reset count as
// zero. Sample flow: x_in is taken on in_valid && in_ready and written into a circular delay
// line; the sequencer then issues one tap per clock, k = 0..L-1, to the MAC. out_valid is
// high for one clock L+1 clocks after the sample was taken. in_ready returns as soon as the
// last tap has been issued, so with samples waiting the filter takes one every L+1 clocks
// and the output of one sample appears in the clock in which the next is taken; the MAC
// restarts its sums on the first tap, so its two stages can overlap frames. A sample has priority over a
// coefficient offered in the same clock. coef_toggles counts the bit transitions seen at
// the multiplier's coefficient input (clear with toggle_clear). coef_done is high for the
// clock in which a segmented coefficient is written, and coef_branch then tells which case
// of the segmentation (power of two, positive, negative) produced it.
//
// Segmentation, the two partial sums and the shared multiplier fed with m_k follow the
// method; the handshakes, storage layout, tap order and timing are this design's choices.
module seg_fir
  import seg_fir_pkg::*;
#(
  parameter int unsigned WIDTH    = DEF_WIDTH,
  parameter int unsigned MAX_TAPS = DEF_MAX_TAPS,
  localparam int unsigned ACC_W  = 2 * WIDTH + $clog2(MAX_TAPS),
  localparam int unsigned ADDR_W = $clog2(MAX_TAPS),
  localparam int unsigned TAP_W  = $clog2(MAX_TAPS + 1),
  localparam int unsigned EXP_W  = $clog2(WIDTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [TAP_W-1:0]        num_taps,
  // coefficient load
  input  logic                    coef_valid,
  output logic                    coef_ready,
  input  logic [ADDR_W-1:0]       coef_addr,
  input  logic signed [WIDTH-1:0] coef_h,
  // samples in
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [WIDTH-1:0] x_in,
  // filter output
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y,
  output logic signed [ACC_W-1:0] y_s,
  output logic signed [ACC_W-1:0] y_m,
  // switching monitor at the multiplier coefficient input
  input  logic                    toggle_clear,
  output logic [31:0]             coef_toggles,
  // segmentation status: pulses when a coefficient has been stored, with its flow chart branch
  output logic                    coef_done,
  output seg_branch_t             coef_branch
);

  // ---------------------------------------------------------------- coefficient path
  logic              seg_in_ready, seg_out_valid, seg_s_neg;
  logic [EXP_W-1:0]  seg_s_exp;
  logic [WIDTH-1:0]  seg_m;
  seg_branch_t       seg_branch;
  logic [ADDR_W-1:0] load_addr;

  // coefficient store, one entry per tap (written only by the segmentation unit)
  logic              cs_neg [MAX_TAPS];
  logic [EXP_W-1:0]  cs_exp [MAX_TAPS];
  logic [WIDTH-1:0]  cs_m   [MAX_TAPS];

  fir_state_t state;

  assign in_ready   = (state == FIR_IDLE) && seg_in_ready;
  assign coef_ready = (state == FIR_IDLE) && seg_in_ready && !in_valid;

  coef_segmenter #(.WIDTH(WIDTH)) u_seg (
    .clk, .rst_n,
    .in_valid (coef_valid && coef_ready),
    .in_ready (seg_in_ready),
    .h        (coef_h),
    .out_valid(seg_out_valid),
    .out_ready(1'b1),
    .s_neg    (seg_s_neg),
    .s_exp    (seg_s_exp),
    .m        (seg_m),
    .branch   (seg_branch)
  );

  assign coef_done   = seg_out_valid;
  assign coef_branch = seg_branch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) load_addr <= '0;
    else if (coef_valid && coef_ready) load_addr <= coef_addr;
  end

  always_ff @(posedge clk) begin
    if (seg_out_valid) begin
      cs_neg[load_addr] <= seg_s_neg;
      cs_exp[load_addr] <= seg_s_exp;
      cs_m[load_addr]   <= seg_m;
    end
  end

  // ---------------------------------------------------------------- sample path
  logic signed [WIDTH-1:0] line [MAX_TAPS];   // circular delay line
  logic [ADDR_W-1:0]       wr_ptr, rd_ptr, k;
  logic                    tap_valid, tap_first, tap_last;
  logic                    mac_out_valid;
  logic [WIDTH-1:0]        mult_coef;

  assign tap_valid = (state == FIR_ISSUE);
  assign tap_first = (k == '0);
  assign tap_last  = (TAP_W'(k) + TAP_W'(1) >= num_taps);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= FIR_IDLE;
      wr_ptr <= '0;
      rd_ptr <= '0;
      k      <= '0;
      for (int t = 0; t < MAX_TAPS; t++) line[t] <= '0;
    end else begin
      unique case (state)
        FIR_IDLE: begin
          if (in_valid && in_ready) begin
            line[wr_ptr] <= x_in;
            rd_ptr       <= wr_ptr;
            wr_ptr       <= (wr_ptr == ADDR_W'(MAX_TAPS - 1)) ? '0 : wr_ptr + ADDR_W'(1);
            k            <= '0;
            state        <= FIR_ISSUE;
          end
        end
        FIR_ISSUE: begin
          rd_ptr <= (rd_ptr == '0) ? ADDR_W'(MAX_TAPS - 1) : rd_ptr - ADDR_W'(1);
          k      <= k + ADDR_W'(1);
          if (tap_last) state <= FIR_IDLE;
        end
        default: state <= FIR_IDLE;
      endcase
    end
  end

  seg_mac #(.WIDTH(WIDTH), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n,
    .tap_valid,
    .tap_first,
    .tap_last,
    .x        (line[rd_ptr]),
    .s_neg    (cs_neg[k]),
    .s_exp    (cs_exp[k]),
    .m        (cs_m[k]),
    .out_valid(mac_out_valid),
    .y_s, .y_m, .y,
    .mult_coef
  );

  assign out_valid = mac_out_valid;

  toggle_counter #(.WIDTH(WIDTH), .CNT_W(32)) u_toggles (
    .clk, .rst_n,
    .clear(toggle_clear),
    .bus  (mult_coef),
    .count(coef_toggles)
  );

  assert property (@(posedge clk) disable iff (!rst_n)
                   state == FIR_ISSUE |-> num_taps >= TAP_W'(1) && num_taps <= TAP_W'(MAX_TAPS));

endmodule
