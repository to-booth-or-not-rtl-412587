// csa: K-bit carry-save adder (3/2-adder).
//
// K full adders work side by side, one per bit position, and turn three
// K-bit words into a sum word s and a carry word c with
// s + c == x + y + z (mod 2^K). The carry word is returned already shifted
// to its weight (c[0] = 0); the carry out of bit K-1 is dropped because the
// multipliers compute modulo 2^(n+m). Combinational, one full-adder delay.
module csa #(
  parameter int unsigned K = 106
) (
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  input  logic [K-1:0] z,
  output logic [K-1:0] s,
  output logic [K-1:0] c
);
  logic [K-1:0] co;

  for (genvar i = 0; i < K; i++) begin : g_fa
    full_adder u_fa (.x(x[i]), .y(y[i]), .z(z[i]), .s(s[i]), .c(co[i]));
  end

  // The top carry has weight 2^K and vanishes modulo 2^K.
  assign c = {co[K-2:0], 1'b0};
endmodule
