// coef_segmenter: splits one two's complement coefficient h into h = s + m.
//
// The unit follows the three stages of the segmentation flow chart. Stage 1 searches, one
// step per clock, for the smallest i with 2**i >= |h|. Stage 2: if 2**i equals |h| the
// coefficient is already a power of two and is realised by the shift alone (s = h, m = 0).
// Stage 3: a positive h takes s = 2**(i-1), a negative (or zero) h takes s = -2**i, and in
// both cases m = h - s. The result is a non-negative m below 2**(WIDTH-2), so the two top
// bits of the multiplier coefficient input stay at zero, and s encoded as a sign bit and an
// exponent for the shifter.
//
// Interface: valid/ready on both sides. A coefficient is taken on in_valid && in_ready
// (in_ready is high only when the unit is idle). The search then takes i+1 clocks, after
// which out_valid stays high with s_neg, s_exp, m and branch until out_ready is seen.
// The flow chart's outer loop over the coefficient index k is left to the caller, which
// presents the coefficients one after another. Taking one search step per clock (rather
// than a priority encoder) mirrors the iterative stage 1 of the flow chart; the handshake
// and the registered outputs are this design's own choices.
module coef_segmenter
  import seg_fir_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  localparam int unsigned EXP_W = $clog2(WIDTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // coefficient in
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [WIDTH-1:0] h,
  // segmented coefficient out
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic                    s_neg,    // s is negative
  output logic [EXP_W-1:0]        s_exp,    // |s| = 2**s_exp
  output logic [WIDTH-1:0]        m,        // multiplier part, non-negative
  output seg_branch_t             branch
);

  seg_state_t              state;
  logic signed [WIDTH-1:0] h_r;
  logic        [WIDTH-1:0] mag_r;    // |h|; 2**(WIDTH-1) fits as unsigned
  logic        [EXP_W-1:0] i_r;
  logic        [WIDTH-1:0] pow_i;    // 2**i
  logic        [WIDTH-1:0] m_neg;    // h + 2**i, below 2**(WIDTH-2) when used
  logic        [WIDTH-1:0] m_pos;    // h - 2**(i-1), below 2**(WIDTH-2) when used

  assign in_ready  = (state == SEG_IDLE);
  assign out_valid = (state == SEG_DONE);
  assign pow_i     = WIDTH'(1) << i_r;
  assign m_neg     = h_r + pow_i;
  assign m_pos     = h_r - (pow_i >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= SEG_IDLE;
      h_r    <= '0;
      mag_r  <= '0;
      i_r    <= '0;
      s_neg  <= 1'b0;
      s_exp  <= '0;
      m      <= '0;
      branch <= BR_POW2;
    end else begin
      unique case (state)
        SEG_IDLE: begin
          if (in_valid) begin
            h_r   <= h;
            mag_r <= h[WIDTH-1] ? WIDTH'(-h) : WIDTH'(h);
            i_r   <= '0;
            state <= SEG_SEARCH;
          end
        end
        SEG_SEARCH: begin
          if (pow_i >= mag_r) begin                // stage 1 finished
            state <= SEG_DONE;
            if (pow_i == mag_r) begin              // stage 2: power of two
              s_neg  <= h_r[WIDTH-1];
              s_exp  <= i_r;
              m      <= '0;
              branch <= BR_POW2;
            end else if (h_r[WIDTH-1] || h_r == '0) begin  // stage 3, h <= 0
              s_neg  <= 1'b1;
              s_exp  <= i_r;
              m      <= m_neg;
              branch <= BR_NEG;
            end else begin                         // stage 3, h > 0
              s_neg  <= 1'b0;
              s_exp  <= i_r - EXP_W'(1);
              m      <= m_pos;
              branch <= BR_POS;
            end
          end else begin
            i_r <= i_r + EXP_W'(1);                // stage 1: i = i + 1
          end
        end
        SEG_DONE: begin
          if (out_ready) state <= SEG_IDLE;
        end
        default: state <= SEG_IDLE;
      endcase
    end
  end

  // The multiplier part never reaches the two top bits of the coefficient word.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid |-> m[WIDTH-1 -: 2] == 2'b00);

endmodule
