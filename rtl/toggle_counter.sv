// toggle_counter: switching monitor for one bus.
//
// Counts signal transitions (0->1 or 1->0) on a WIDTH-bit bus: every clock it adds the
// number of bits in which the bus differs from its value at the previous clock, the
// Hamming distance, to a running count. Put on the multiplier's coefficient input it gives
// the switching activity that coefficient segmentation sets out to reduce; for a filter
// that cycles through its coefficients the count per pass is the sum of the Hamming
// distances between consecutive coefficients, the last one followed by the first.
// The previous value resets to zero; clear restarts the count and reloads the previous
// value from the bus. The count saturates at its maximum. Counting transitions follows the
// method's switching monitor; the counter width, clear and saturation are this design's own.
module toggle_counter
  import seg_fir_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [WIDTH-1:0] bus,
  output logic [CNT_W-1:0] count
);

  logic [WIDTH-1:0]         prev;
  logic [$clog2(WIDTH+1)-1:0] hamming;
  logic [CNT_W:0]           next_count;

  always_comb begin
    hamming = '0;
    for (int b = 0; b < WIDTH; b++) hamming += $bits(hamming)'(bus[b] ^ prev[b]);
  end

  assign next_count = {1'b0, count} + (CNT_W+1)'(hamming);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev  <= '0;
      count <= '0;
    end else begin
      prev <= bus;
      if (clear)                 count <= '0;
      else if (next_count[CNT_W]) count <= '1;
      else                       count <= next_count[CNT_W-1:0];
    end
  end

endmodule
