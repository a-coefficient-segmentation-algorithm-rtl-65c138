// tb_array_mult: checks the two's complement array multiplier.
// At 8 bits every pair of operands is applied and the product compared with the signed
// product computed by the simulator. 16-bit and 24-bit instances then get the extreme
// operand pairs and 20000 random pairs each. A watchdog ends the run if it does not finish.
module tb_array_mult;
  localparam int unsigned WIDTH = 8;

  logic clk = 1'b0;
  logic signed [WIDTH-1:0]   a, b;
  logic signed [2*WIDTH-1:0] p;
  int checks = 0, failures = 0;

  array_mult #(.WIDTH(WIDTH)) dut (.a, .b, .p);

  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [23:0] a24, b24;
  logic signed [47:0] p24;
  array_mult #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .p(p16));
  array_mult #(.WIDTH(24)) dut24 (.a(a24), .b(b24), .p(p24));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2**WIDTH; i++) begin
      for (int j = 0; j < 2**WIDTH; j++) begin
        a = WIDTH'(i);
        b = WIDTH'(j);
        #1;
        checks++;
        if (p !== (2*WIDTH)'(int'(a) * int'(b))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", a, b, int'(a) * int'(b), p);
        end
      end
    end
    for (int t = 0; t < 20004; t++) begin
      case (t)
        0: begin a16 = 16'h8000; b16 = 16'h8000; a24 = 24'h800000; b24 = 24'h800000; end
        1: begin a16 = 16'h8000; b16 = 16'h7fff; a24 = 24'h800000; b24 = 24'h7fffff; end
        2: begin a16 = 16'h7fff; b16 = 16'h7fff; a24 = 24'h7fffff; b24 = 24'h7fffff; end
        3: begin a16 = 16'hffff; b16 = 16'h8000; a24 = 24'hffffff; b24 = 24'h800000; end
        default: begin
          a16 = 16'($urandom); b16 = 16'($urandom);
          a24 = 24'($urandom); b24 = 24'($urandom);
        end
      endcase
      #1;
      checks += 2;
      if (p16 !== 32'(longint'(a16) * longint'(b16))) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit %0d * %0d, got %0d", a16, b16, p16);
      end
      if (p24 !== 48'(longint'(a24) * longint'(b24))) begin
        failures++;
        if (failures < 10) $display("FAIL 24-bit %0d * %0d, got %0d", a24, b24, p24);
      end
    end
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
