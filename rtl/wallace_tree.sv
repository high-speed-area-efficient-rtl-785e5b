// wallace_tree: word-level Wallace tree of carry-save adders.
//
// ROWS operand rows of W bits are reduced to two rows, sum_o and carry_o,
// whose sum is the sum of all the input rows (modulo 2^W). At every level the
// rows are taken in groups of three; each group goes through one csa, which
// turns it into a sum row and a carry row (the carry row is one place further
// left). Rows that do not fill a group pass unchanged to the next level. The
// levels repeat until two rows remain; wallace_pkg works out how many levels
// and rows that takes. Every CSA of a level works in parallel, so the delay is
// one full adder per level: eight levels for 32 rows, three for 6 rows.
//
// All levels live in one flat array, level after level. The carry bit that a
// csa pushes out past bit W-1 is not kept: in a multiplier of W/2-bit
// operands the true total is below 2^W, so dropping it never changes the
// result. Reducing the rows with CSAs in a tree until two remain is the
// multiplier's method; taking the rows in order and keeping every row at the
// full width W are this design's choices. Purely combinational.
module wallace_tree
  import wallace_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned W    = 64
) (
  input  logic [W-1:0] rows_i [ROWS],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  localparam int unsigned LEVELS = tree_levels(ROWS);
  localparam int unsigned TOTAL  = row_offset(ROWS, LEVELS) + rows_at(ROWS, LEVELS);

  logic [W-1:0] r [TOTAL];

  for (genvar k = 0; k < ROWS; k++) begin : g_in
    assign r[k] = rows_i[k];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN    = rows_at(ROWS, l);
    localparam int unsigned OIN    = row_offset(ROWS, l);
    localparam int unsigned OOUT   = row_offset(ROWS, l + 1);
    localparam int unsigned GROUPS = NIN / 3;

    for (genvar g = 0; g < GROUPS; g++) begin : g_csa
      logic [W:0] c;
      csa #(.WIDTH(W)) u_csa (
        .x (r[OIN + 3*g]),
        .y (r[OIN + 3*g + 1]),
        .z (r[OIN + 3*g + 2]),
        .s (r[OOUT + 2*g]),
        .c (c)
      );
      logic       unused_top_carry;
      assign r[OOUT + 2*g + 1] = c[W-1:0];
      assign unused_top_carry  = c[W];
    end

    for (genvar k = 0; k < NIN % 3; k++) begin : g_pass
      assign r[OOUT + 2*GROUPS + k] = r[OIN + 3*GROUPS + k];
    end
  end

  localparam int unsigned OLAST = row_offset(ROWS, LEVELS);

  assign sum_o = r[OLAST];
  if (rows_at(ROWS, LEVELS) > 1) begin : g_two
    assign carry_o = r[OLAST + 1];
  end else begin : g_one
    assign carry_o = '0;
  end

endmodule
