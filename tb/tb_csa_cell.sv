// tb_csa_cell: exhaustive test of the one-bit carry-save cell.
// All eight input combinations are applied; for each, s and c must satisfy
// 2*c + s = x + y + z, the count of ones among the inputs.
module tb_csa_cell;
  logic x, y, z, s, c;
  int checks = 0;
  int failures = 0;

  csa_cell dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if ({c, s} != 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("FAIL x=%0b y=%0b z=%0b -> c=%0b s=%0b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
