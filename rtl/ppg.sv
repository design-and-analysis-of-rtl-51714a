// ppg - partial product generation of an unsigned N x N multiplication.
//
// Every pair of operand bits is combined by an AND gate: pp[i][j] = a[j] & b[i]
// has weight 2^(i+j), so row i is a shifted by i places and masked by b[i]. The
// N*N bits are the dot matrix that the reduction network compresses.
// Combinational; N defaults to 4 as in the 4-bit design.
module ppg #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp   // pp[i][j]: row i (bit of b), column j (bit of a)
);
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i][j] = a[j] & b[i];
  end
endmodule
