// tb_wallace_tree: self-checking test of the carry-save reduction tree.
// The default tree (32 rows of 64 bits) is fed random rows, rows of all ones
// and rows with a single bit set; the two outputs must add up to the sum of
// the input rows modulo 2^64. Operands with many ones make the dropped top
// carry occur, which the modulo comparison allows for.
module tb_wallace_tree;
  localparam int unsigned ROWS = 32;
  localparam int unsigned W    = 64;

  logic [W-1:0] rows [ROWS];
  logic [W-1:0] sum_o, carry_o;
  int checks = 0;
  int failures = 0;

  wallace_tree dut (.rows_i(rows), .sum_o(sum_o), .carry_o(carry_o));

  task automatic check();
    logic [W-1:0] want;
    #1;
    want = '0;
    for (int i = 0; i < ROWS; i++) want += rows[i];
    checks++;
    if (W'(sum_o + carry_o) != want) begin
      failures++;
      $display("FAIL want %h got %h + %h", want, sum_o, carry_o);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < ROWS; i++) rows[i] = '0;
    check();
    for (int i = 0; i < ROWS; i++) rows[i] = '1;
    check();
    for (int k = 0; k < ROWS; k++) begin
      for (int i = 0; i < ROWS; i++) rows[i] = (i == k) ? W'(64'h1) << k : '0;
      check();
    end
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < ROWS; i++) rows[i] = {$urandom, $urandom};
      check();
    end
    // rows shaped like partial products
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      for (int i = 0; i < ROWS; i++) rows[i] = b[i] ? W'(a) << i : '0;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
