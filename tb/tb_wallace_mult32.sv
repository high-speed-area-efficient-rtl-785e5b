// tb_wallace_mult32: end-to-end test of the 32-bit multiplier at its default
// size, clocked at 200 MHz (5 ns period).
//
// Operands are applied on the falling edge; the product is expected on p
// right after the next rising edge, i.e. one clock (5 ns) later, and p must
// still show the previous product just before that edge. The run starts with
// the sequence 0 x 0, 1 x 7, 7 x 7, then corner cases and a long stream of
// random operands that change every cycle. Each product is compared with a *
// b computed by the simulator.
//
// Mechanisms counted, each of which must occur at least once:
//   back_to_back  a new operand pair in the cycle right after another one
//   zero_product  an operand of zero
//   full_width    a product using the top bit (long carries in the adder)
//   one_latency   product appearing exactly one edge after its operands
module tb_wallace_mult32;
  localparam int unsigned WIDTH = 32;

  logic               clk = 1'b0;
  logic [WIDTH-1:0]   a, b;
  logic [2*WIDTH-1:0] p;
  logic [2*WIDTH-1:0] expected;
  logic [2*WIDTH-1:0] previous;
  bit                 have_previous = 1'b0;
  int checks = 0;
  int failures = 0;
  int back_to_back = 0;
  int zero_product = 0;
  int full_width = 0;
  int one_latency = 0;

  always #2.5ns clk = ~clk;

  wallace_mult32 dut (.clk(clk), .a(a), .b(b), .p(p));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one operand pair and check its product one clock later.
  task automatic mul(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y);
    @(negedge clk);
    a = x;
    b = y;
    expected = (2*WIDTH)'(x) * (2*WIDTH)'(y);
    if (have_previous) begin
      back_to_back++;
      // before the edge p must still hold the earlier product
      checks++;
      if (p != previous) begin
        failures++;
        $display("FAIL p changed early: %h, want %h", p, previous);
      end
    end
    @(posedge clk);
    #1ps;
    checks++;
    if (p != expected) begin
      failures++;
      $display("FAIL %0d x %0d: got %0d want %0d", x, y, p, expected);
    end else begin
      one_latency++;
    end
    if (x == 0 || y == 0) zero_product++;
    if (expected[2*WIDTH-1]) full_width++;
    previous = expected;
    have_previous = 1'b1;
  endtask

  task automatic need(input string name, input int count);
    checks++;
    $display("%s: %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", name);
    end
  endtask

  initial begin
    a = '0;
    b = '0;
    mul(0, 0);
    mul(1, 7);
    mul(7, 7);
    mul(26, 53);
    mul('1, '1);
    mul('1, 1);
    mul(32'h8000_0000, 32'h8000_0000);
    mul(32'hffff_0000, 32'h0000_ffff);
    for (int i = 0; i < WIDTH; i++) mul(32'h1 << i, '1);
    for (int i = 0; i < 5000; i++) mul($urandom, $urandom);
    need("back_to_back", back_to_back);
    need("zero_product", zero_product);
    need("full_width", full_width);
    need("one_latency", one_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
