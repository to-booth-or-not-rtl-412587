// booth_decoder: decoder for one radix-4 (Booth-2) digit.
//
// The digit is B = -2*b[2j+1] + b[2j] + b[2j-1], in {-2..2}. Outputs:
// b1 = (|B| == 1), b2 = (|B| == 2) and s = (B < 0). The triple 111 gives
// B = 0 and therefore s = 0. Combinational; the gate form is this design's
// choice, written from the digit's truth table.
module booth_decoder (
  input  logic b_hi,   // b[2j+1]
  input  logic b_mid,  // b[2j]
  input  logic b_lo,   // b[2j-1]
  output logic b1,
  output logic b2,
  output logic s
);
  assign b1 = b_mid ^ b_lo;
  assign b2 = (b_hi & ~b_mid & ~b_lo) | (~b_hi & b_mid & b_lo);
  assign s  = b_hi & ~(b_mid & b_lo);
endmodule
