// tb_csa: self-checking test of the word-level carry-save adder.
// Runs the default 64-bit adder with random and corner-case operands. For each
// set it checks that s + c equals x + y + z (in WIDTH+2 bits, so no carry is
// lost), that c[0] is zero, and that s is the bitwise XOR of the inputs.
module tb_csa;
  localparam int unsigned WIDTH = 64;

  logic [WIDTH-1:0] x, y, z, s;
  logic [WIDTH:0]   c;
  int checks = 0;
  int failures = 0;

  csa dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  function automatic logic [WIDTH-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  task automatic check();
    logic [WIDTH+1:0] want, got;
    #1;
    want = (WIDTH+2)'(x) + (WIDTH+2)'(y) + (WIDTH+2)'(z);
    got  = (WIDTH+2)'(s) + (WIDTH+2)'(c);
    checks++;
    if (got != want || c[0] != 1'b0 || s != (x ^ y ^ z)) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
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
    x = '0; y = '0; z = '0; check();
    x = '1; y = '1; z = '1; check();
    x = '1; y = '0; z = '1; check();
    x = {WIDTH/4{4'ha}}; y = {WIDTH/4{4'h5}}; z = '1; check();
    for (int i = 0; i < 2000; i++) begin
      x = rnd(); y = rnd(); z = rnd();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
