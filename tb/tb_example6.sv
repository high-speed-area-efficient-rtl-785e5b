// tb_example6: the 6-bit worked example.
//
// Builds the multiplier with WIDTH = 6, where the tree has six partial-product
// rows and four carry-save adders in three levels, and multiplies 011010 by
// 110101 (26 x 53), expecting 10101100010 (1378). Then it runs all 4096
// operand pairs of the 6-bit multiplier back to back, one per clock, each
// checked one clock after it is applied.
module tb_example6;
  localparam int unsigned WIDTH = 6;

  logic               clk = 1'b0;
  logic [WIDTH-1:0]   a, b;
  logic [2*WIDTH-1:0] p;
  int checks = 0;
  int failures = 0;

  always #2.5ns clk = ~clk;

  wallace_mult32 #(.WIDTH(WIDTH)) dut (.clk(clk), .a(a), .b(b), .p(p));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    a = 6'b011010;
    b = 6'b110101;
    @(posedge clk);
    #1ps;
    checks++;
    if (p != 12'b0101_0110_0010) begin
      failures++;
      $display("FAIL example: got %b", p);
    end else begin
      $display("011010 x 110101 = %b", p);
    end
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        @(negedge clk);
        a = 6'(i);
        b = 6'(j);
        @(posedge clk);
        #1ps;
        checks++;
        if (p != 12'(i * j)) begin
          failures++;
          $display("FAIL %0d x %0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
