// csa_cell: one bit of a carry-save adder.
//
// It is a full adder with the usual names changed: the three inputs x, y and
// z are bits of the same weight from three operands, s is their sum bit and c
// the carry bit, which has twice the weight of s. s = x ^ y ^ z and c is the
// majority of the three. The cell is the standard full adder with renamed
// signals; the gate form is the usual XOR/majority one. Purely combinational,
// no clock.
module csa_cell (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);

  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end

endmodule
