// pp_array: the partial-product generator of an N x N unsigned multiplier.
// N*N two-input AND gates (64 for N = 8): pp[j][i] = a[i] & b[j], a bit of
// weight i + j. Row j is operand a gated by bit j of operand b.
// Purely combinational.
module pp_array #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output logic [N-1:0][N-1:0]   pp
);
  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        pp[j][i] = a[i] & b[j];
  end
endmodule
