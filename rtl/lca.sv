// lca: look-ahead carry adder, the final two-operand adder of the multiplier.
//
// Adds x and y (WIDTH bits each) into sum and carry-out cout. Instead of
// rippling, every bit's carry is computed by look-ahead: each bit first forms
// generate g = x & y and propagate p = x ^ y, then log2(WIDTH) prefix levels
// combine (g, p) pairs over spans of 1, 2, 4, ... bits (Kogge-Stone pattern):
// (g, p) o (g', p') = (g | p & g', p & p'). After the last level g[i] is the
// carry out of bit i, so sum[i] = p[i] ^ g[i-1]. Delay grows with log(WIDTH).
// A look-ahead adder with logarithmic delay is what the multiplier calls for;
// the Kogge-Stone prefix form is this design's choice. Purely combinational;
// no carry input.
module lca #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned STAGES = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] g [STAGES+1];
  logic [WIDTH-1:0] p [STAGES+1];

  assign g[0] = x & y;
  assign p[0] = x ^ y;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned SPAN = 1 << s;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= SPAN) begin : g_comb
        assign g[s+1][i] = g[s][i] | (p[s][i] & g[s][i-SPAN]);
        assign p[s+1][i] = p[s][i] & p[s][i-SPAN];
      end else begin : g_keep
        assign g[s+1][i] = g[s][i];
        assign p[s+1][i] = p[s][i];
      end
    end
  end

  assign sum  = p[0] ^ {g[STAGES][WIDTH-2:0], 1'b0};
  assign cout = g[STAGES][WIDTH-1];

endmodule
