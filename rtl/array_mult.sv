// array_mult: WIDTH x WIDTH two's complement array multiplier.
//
// The hardware multiplier of the filter, into whose coefficient input the small part m of
// each segmented coefficient is fed. It is a Baugh-Wooley array: partial product bit
// (i, j) is a[j] & b[i], complemented where exactly one of the two is a sign bit, and the
// constant 2**WIDTH + 2**(2*WIDTH-1) corrects the sum. Row i of the array is a ripple
// chain of full adders that adds partial product row i, weighted 2**i, to the running sum
// of the rows above, so the structure is the regular row-by-row array the switching
// figures refer to. The product is exact: 2*WIDTH bits, taken modulo 2**(2*WIDTH).
// Purely combinational. The multiplier type (two's complement array) follows the method;
// the Baugh-Wooley arrangement and the ripple rows are this design's choice.
module array_mult
  import seg_fir_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH
) (
  input  logic signed [WIDTH-1:0]   a,   // data sample
  input  logic signed [WIDTH-1:0]   b,   // coefficient input
  output logic signed [2*WIDTH-1:0] p
);

  localparam int unsigned PW = 2 * WIDTH;
  localparam logic [PW-1:0] CORR = (PW'(1) << WIDTH) | (PW'(1) << (PW - 1));

  logic [PW-1:0] sum   [WIDTH+1];   // running sum after each row
  logic [PW:0]   carry [WIDTH];     // ripple carries within each row
  logic [PW-1:0] row   [WIDTH];     // partial product row i, already weighted by 2**i

  assign sum[0] = CORR;

  for (genvar i = 0; i < WIDTH; i++) begin : g_row
    for (genvar c = 0; c < PW; c++) begin : g_col
      if (c >= i && c - i < WIDTH) begin : g_pp
        localparam int J = c - i;
        if ((J == WIDTH - 1) != (i == WIDTH - 1)) begin : g_inv
          assign row[i][c] = ~(a[J] & b[i]);
        end else begin : g_plain
          assign row[i][c] = a[J] & b[i];
        end
      end else begin : g_zero
        assign row[i][c] = 1'b0;
      end
      // full adder cell
      assign sum[i+1][c]   = sum[i][c] ^ row[i][c] ^ carry[i][c];
      assign carry[i][c+1] = (sum[i][c] & row[i][c]) | (carry[i][c] & (sum[i][c] ^ row[i][c]));
    end
    assign carry[i][0] = 1'b0;
  end

  assign p = sum[WIDTH];

endmodule
