// booth_select: selection cell for one bit of a Booth partial product.
//
// Bit i+1 of d = <a> * |B| is a[i+1] when |B| = 1, a[i] when |B| = 2 and 0
// when B = 0; it is inverted when the digit is negative, giving
// g = d[i+1] ^ s. Combinational AND-OR-XOR cell.
module booth_select (
  input  logic a_hi,  // a[i+1]
  input  logic a_lo,  // a[i]
  input  logic b1,
  input  logic b2,
  input  logic s,
  output logic g
);
  assign g = ((a_hi & b1) | (a_lo & b2)) ^ s;
endmodule
