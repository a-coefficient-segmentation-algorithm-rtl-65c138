// tb_toggle_counter: checks the switching monitor.
// Feeds the coefficient set H = (-97, -15, -127, -29, -119, -103, 93, 57, -111, 127) and its
// segmented multiplier parts M = (31, 1, 1, 3, 9, 25, 29, 25, 17, 63) cyclically, one value per
// clock, and checks that one pass through each set counts 34 and 16 transitions (Hamming
// distances between consecutive values, the last followed by the first). Then random
// values are compared with a Hamming distance computed in the testbench, and clear and
// saturation are exercised.
module tb_toggle_counter;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned CNT_W = 12;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [WIDTH-1:0] bus = '0;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;

  localparam logic [WIDTH-1:0] H [10] = '{8'd159, 8'd241, 8'd129, 8'd227, 8'd137,
                                          8'd153, 8'd93, 8'd57, 8'd145, 8'd127};
  localparam logic [WIDTH-1:0] M [10] = '{8'd31, 8'd1, 8'd1, 8'd3, 8'd9,
                                          8'd25, 8'd29, 8'd25, 8'd17, 8'd63};

  toggle_counter #(.WIDTH(WIDTH), .CNT_W(CNT_W)) dut (.clk, .rst_n, .clear, .bus, .count);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one cyclic pass: start with the last value on the bus, clear, then feed all ten
  task automatic pass(input logic [WIDTH-1:0] set [10], input int expected, input string name);
    bus <= set[9];
    @(posedge clk);
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int k = 0; k < 10; k++) begin
      bus <= set[k];
      @(posedge clk);
    end
    @(posedge clk);
    #1 check(name, count, expected);
  endtask

  initial begin
    longint ref_count;
    logic [WIDTH-1:0] last, v;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    pass(H, 34, "H set switching");
    pass(M, 16, "M set switching");
    // random values
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    last = bus;
    ref_count = 0;
    for (int t = 0; t < 200; t++) begin
      v = WIDTH'($urandom);
      bus <= v;
      ref_count += $countones(v ^ last);
      last = v;
      @(posedge clk);
    end
    @(posedge clk);
    #1 check("random switching", count, ref_count);
    // saturation: alternate all-zero and all-one until the count is full
    for (int t = 0; t < 2 ** CNT_W / WIDTH + 4; t++) begin
      bus <= (t % 2 == 0) ? '1 : '0;
      @(posedge clk);
    end
    #1 check("saturation", count, 2 ** CNT_W - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
