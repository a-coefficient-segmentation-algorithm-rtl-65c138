// seg_mac: multiply-accumulate datapath for segmented coefficients.
//
// For every tap the sample x is multiplied by a coefficient given in segmented form,
// h = s + m with s = (s_neg ? -1 : +1) * 2**s_exp. The shift part x*|s| comes from the
// barrel shifter and the multiplier part x*m from the array multiplier. The two parts are
// kept in two accumulators, acc_s for the shift products and acc_m for the hardware
// multiplications; the shift accumulator adds or subtracts according to s_neg. When the
// last tap of an output sample is in, the filter output is the sum y = y_s + y_m.
//
// Timing, two stages: a tap presented with tap_valid is captured in operand registers at
// the next clock edge; the shifter and multiplier work from those registers and the
// accumulators take the products at the following edge. For the tap flagged tap_last,
// y_s, y_m and y are registered at that same edge and out_valid is high for one clock.
// tap_first starts a new sum. Taps may be presented on consecutive clocks. The operand
// registers only load on tap_valid, so the multiplier inputs stay still between outputs.
// Keeping the two partial sums apart and adding them at the end follows the method; the
// operand registers and the accumulator width are this design's own choices.
module seg_mac
  import seg_fir_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned ACC_W = 2 * DEF_WIDTH + $clog2(DEF_MAX_TAPS),
  localparam int unsigned EXP_W = $clog2(WIDTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // one tap
  input  logic                    tap_valid,
  input  logic                    tap_first,
  input  logic                    tap_last,
  input  logic signed [WIDTH-1:0] x,
  input  logic                    s_neg,
  input  logic [EXP_W-1:0]        s_exp,
  input  logic [WIDTH-1:0]        m,
  // filter output
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y_s,
  output logic signed [ACC_W-1:0] y_m,
  output logic signed [ACC_W-1:0] y,
  // multiplier coefficient input, for switching measurement
  output logic [WIDTH-1:0]        mult_coef
);

  // operand registers
  logic                    v_r, first_r, last_r, neg_r;
  logic signed [WIDTH-1:0] x_r;
  logic [EXP_W-1:0]        exp_r;
  logic [WIDTH-1:0]        m_r;

  logic signed [2*WIDTH-1:0] shifted, product;
  logic signed [ACC_W-1:0]   acc_s, acc_m, acc_s_nxt, acc_m_nxt, base_s, base_m;

  pow2_shifter #(.WIDTH(WIDTH)) u_shift (.x(x_r), .shamt(exp_r), .y(shifted));
  array_mult   #(.WIDTH(WIDTH)) u_mult  (.a(x_r), .b(m_r), .p(product));

  assign mult_coef = m_r;

  always_comb begin
    base_s    = first_r ? '0 : acc_s;
    base_m    = first_r ? '0 : acc_m;
    acc_s_nxt = neg_r ? base_s - ACC_W'(shifted) : base_s + ACC_W'(shifted);
    acc_m_nxt = base_m + ACC_W'(product);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r     <= 1'b0;
      first_r <= 1'b0;
      last_r  <= 1'b0;
      neg_r   <= 1'b0;
      x_r     <= '0;
      exp_r   <= '0;
      m_r     <= '0;
    end else begin
      v_r <= tap_valid;
      if (tap_valid) begin
        first_r <= tap_first;
        last_r  <= tap_last;
        neg_r   <= s_neg;
        x_r     <= x;
        exp_r   <= s_exp;
        m_r     <= m;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s     <= '0;
      acc_m     <= '0;
      y_s       <= '0;
      y_m       <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_r && last_r;
      if (v_r) begin
        acc_s <= acc_s_nxt;
        acc_m <= acc_m_nxt;
        if (last_r) begin
          y_s <= acc_s_nxt;
          y_m <= acc_m_nxt;
          y   <= acc_s_nxt + acc_m_nxt;
        end
      end
    end
  end

endmodule
