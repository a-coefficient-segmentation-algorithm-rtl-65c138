// tb_pow2_shifter: exhaustive check of the barrel shifter.
// Every sample value and every shift amount is applied; the result must equal x * 2**shamt
// worked out by multiplication in the testbench.
module tb_pow2_shifter;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned EXP_W = $clog2(WIDTH);

  logic clk = 1'b0;
  logic signed [WIDTH-1:0]   x;
  logic        [EXP_W-1:0]   shamt;
  logic signed [2*WIDTH-1:0] y;
  int checks = 0, failures = 0;

  pow2_shifter #(.WIDTH(WIDTH)) dut (.x, .shamt, .y);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2**WIDTH; i++) begin
      for (int e = 0; e < WIDTH; e++) begin
        x     = WIDTH'(i);
        shamt = EXP_W'(e);
        #1;
        checks++;
        if (int'(y) != int'(x) * (1 << e)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d << %0d gave %0d", x, e, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
