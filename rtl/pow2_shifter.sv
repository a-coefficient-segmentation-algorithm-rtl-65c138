// pow2_shifter: the shift half of a segmented coefficient multiplication.
//
// Computes x * 2**shamt for a two's complement sample x, the product of the sample with the
// power-of-two part |s| of a coefficient. It is a logarithmic barrel shifter: stage b
// shifts left by 2**b when bit b of the shift amount is set. The result is sign extended
// to 2*WIDTH bits, the width of the multiplier's product, and cannot overflow because the
// shift amount is below WIDTH. The sign of s is applied by the accumulator, which adds or
// subtracts the shifted sample, so the unit itself performs a single shift only.
// Purely combinational. The largest result, x * 2**(WIDTH-1), needs only 2*WIDTH-1 bits, so
// the two top output bits always equal the sample's sign bit; they are kept so that the
// output has the same width as the multiplier's product. Applying s by a shift follows the method;
// the barrel structure and the output width are choices of this design.
module pow2_shifter
  import seg_fir_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  localparam int unsigned EXP_W = $clog2(WIDTH)
) (
  input  logic signed [WIDTH-1:0]   x,
  input  logic        [EXP_W-1:0]   shamt,
  output logic signed [2*WIDTH-1:0] y
);

  logic signed [2*WIDTH-1:0] stage [EXP_W+1];

  assign stage[0] = (2*WIDTH)'(x);    // sign extension

  for (genvar b = 0; b < EXP_W; b++) begin : g_stage
    assign stage[b+1] = shamt[b] ? (stage[b] <<< (2**b)) : stage[b];
  end

  assign y = stage[EXP_W];

endmodule
