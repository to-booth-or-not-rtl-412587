// full_adder: one-bit full adder, the cell from which every 3/2- and
// 4/2-adder of the multipliers is built.
//
// s = x ^ y ^ z, c = majority(x, y, z); c has weight 2. Combinational, no
// clock. Only the cost and delay of this cell enter the analysis the designs
// are taken from; the XOR/majority form is this design's choice.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);
endmodule
