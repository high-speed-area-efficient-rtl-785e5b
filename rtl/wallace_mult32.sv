// wallace_mult32: clocked unsigned WIDTH x WIDTH Wallace tree multiplier.
//
// Datapath: pp_gen forms the WIDTH partial products a & b[i] << i; a
// wallace_tree of carry-save adders reduces them to a sum row and a carry row;
// the lca look-ahead adder adds those two into the 2*WIDTH-bit product, which
// a register captures on the rising edge of clk. Everything between the
// inputs and that register is combinational.
//
// Timing: a and b must be stable for one clock period before a rising edge;
// after that edge p holds a * b. A new pair of operands can be applied every
// cycle, so one product is delivered per clock, one cycle after its operands
// (5 ns at the 200 MHz the design targets on an FPGA).
//
// Ports are only clk, a, b and p: there is no reset and no valid or start
// handshake, matching 2*WIDTH+2*WIDTH+1 = 129 pins for WIDTH = 32. Until the
// first clock edge p holds whatever the register powered up with. Placing the
// one register at the product output (rather than at the operands) is this
// design's choice; either placement gives the same one-cycle latency.
// The carry out of the final adder is always zero for a product and is left
// unconnected.
module wallace_mult32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic                 clk,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic [2*WIDTH-1:0]   p
);

  logic [2*WIDTH-1:0] pp [WIDTH];
  logic [2*WIDTH-1:0] tree_sum;
  logic [2*WIDTH-1:0] tree_carry;
  logic [2*WIDTH-1:0] product;
  logic               unused_cout;

  pp_gen #(.WIDTH(WIDTH)) u_pp_gen (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  wallace_tree #(.ROWS(WIDTH), .W(2*WIDTH)) u_tree (
    .rows_i  (pp),
    .sum_o   (tree_sum),
    .carry_o (tree_carry)
  );

  lca #(.WIDTH(2*WIDTH)) u_lca (
    .x    (tree_sum),
    .y    (tree_carry),
    .sum  (product),
    .cout (unused_cout)
  );

  always_ff @(posedge clk) begin
    p <= product;
  end

endmodule
