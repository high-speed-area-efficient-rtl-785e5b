// tb_lca: self-checking test of the look-ahead carry adder.
// The default 64-bit adder is checked against the + operator for corner
// cases (a carry that runs the full width, carry out of the top bit,
// alternating patterns) and for random operands.
module tb_lca;
  localparam int unsigned WIDTH = 64;

  logic [WIDTH-1:0] x, y, sum;
  logic             cout;
  int checks = 0;
  int failures = 0;

  lca dut (.x(x), .y(y), .sum(sum), .cout(cout));

  task automatic check();
    logic [WIDTH:0] want;
    #1;
    want = (WIDTH+1)'(x) + (WIDTH+1)'(y);
    checks++;
    if ({cout, sum} != want) begin
      failures++;
      $display("FAIL x=%h y=%h got %b_%h want %h", x, y, cout, sum, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; check();
    x = '1; y = 1;  check();
    x = '1; y = '1; check();
    x = {WIDTH/4{4'ha}}; y = {WIDTH/4{4'h5}}; check();
    x = {WIDTH/4{4'ha}}; y = {WIDTH/4{4'h6}}; check();
    for (int k = 0; k < WIDTH; k++) begin
      x = '1 >> k; y = 1; check();
    end
    for (int i = 0; i < 3000; i++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
