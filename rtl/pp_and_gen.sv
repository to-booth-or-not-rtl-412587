// pp_and_gen: partial products of an unsigned (N, M) multiplier without
// Booth recoding.
//
// Partial product j is <a> * b[j] * 2^j: the N AND gates a[i] & b[j], shifted
// left by j places into an (N+M)-bit word. N*M AND gates in parallel, one
// gate delay. Combinational.
module pp_and_gen #(
  parameter int unsigned N = 53,
  parameter int unsigned M = 53
) (
  input  logic [N-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [N+M-1:0] pp [M]
);
  for (genvar j = 0; j < M; j++) begin : g_row
    logic [N-1:0] row;
    assign row   = a & {N{b[j]}};
    assign pp[j] = (N+M)'(row) << j;
  end
endmodule
