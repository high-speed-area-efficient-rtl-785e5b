// pp_gen: partial-product generator of an unsigned WIDTH x WIDTH multiplier.
//
// Row i is the multiplicand a when multiplier bit b[i] is one and zero when it
// is zero, shifted left by i places: an AND gate per bit, WIDTH*WIDTH gates in
// all. Each row is handed out already aligned in a 2*WIDTH-bit word, so that
// the rows can be summed directly. The sum of all rows is a * b.
// Purely combinational.
module pp_gen #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] pp [WIDTH]
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_row
    logic [WIDTH-1:0] row;
    assign row   = a & {WIDTH{b[i]}};
    assign pp[i] = {{WIDTH{1'b0}}, row} << i;
  end

endmodule
