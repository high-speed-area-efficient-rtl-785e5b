// tb_pp_gen: self-checking test of the partial-product generator.
// Uses the default 32-bit width. Every row is compared with a reference built
// bit by bit (row i bit j+i = a[j] AND b[i], all other bits zero), and the sum
// of all rows is compared with a * b. Starts with the 6-bit example operands
// 011010 and 110101, then corner cases and random operands.
module tb_pp_gen;
  localparam int unsigned WIDTH = 32;

  logic [WIDTH-1:0]   a, b;
  logic [2*WIDTH-1:0] pp [WIDTH];
  int checks = 0;
  int failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  task automatic check();
    logic [2*WIDTH-1:0] ref_row, total;
    #1;
    total = '0;
    for (int i = 0; i < WIDTH; i++) begin
      ref_row = '0;
      for (int j = 0; j < WIDTH; j++) ref_row[i+j] = a[j] & b[i];
      checks++;
      if (pp[i] !== ref_row) begin
        failures++;
        $display("FAIL row %0d a=%h b=%h got %h want %h", i, a, b, pp[i], ref_row);
      end
      total += pp[i];
    end
    checks++;
    if (total != (2*WIDTH)'(a) * (2*WIDTH)'(b)) begin
      failures++;
      $display("FAIL sum of rows a=%h b=%h", a, b);
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
    a = WIDTH'(6'b011010); b = WIDTH'(6'b110101); check();
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = '1; b = 32'h8000_0001; check();
    for (int i = 0; i < 300; i++) begin
      a = $urandom; b = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
