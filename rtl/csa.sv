// csa: WIDTH-bit carry-save adder (3:2 compressor over whole words).
//
// A row of WIDTH independent csa_cell instances adds three WIDTH-bit numbers
// x, y and z into two numbers whose sum equals x + y + z. Cell i produces sum
// bit s[i] and carry bit c[i+1]; carry bit c[0] is always zero, as in the
// least significant column of hand addition. No carry travels from one cell to
// the next, so the delay is that of one full adder whatever WIDTH is.
// Interface: s is WIDTH bits, c is WIDTH+1 bits so that no carry is lost.
// Purely combinational.
module csa #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH:0]   c
);

  assign c[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    csa_cell u_cell (
      .x (x[i]),
      .y (y[i]),
      .z (z[i]),
      .s (s[i]),
      .c (c[i+1])
    );
  end

endmodule
