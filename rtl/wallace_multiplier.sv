// wallace_multiplier: unsigned N x N bit combinational Wallace-tree multiplier
// (N = 8 by default: A7..A0 times B7..B0 gives S15..S0).
// An array of N*N AND gates (pp_array) forms the partial products; the
// wallace_tree reduces them with layers of full and half adders to two rows
// and resolves those with a carry chain. With REVISED = 1 (the default) that
// chain uses two-half-adder-plus-OR cells instead of full adders, which
// shortens the path the carry ripples along. No clock: s follows a and b after
// the propagation delay of the gates. The structure (AND array, Wallace
// reduction, revised final chain) and the 8-bit size follow the published
// design; unsigned operands and the absence of registers are this
// implementation's reading of it.
module wallace_multiplier #(
  parameter int unsigned N       = 8,
  parameter bit          REVISED = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] s
);
  logic [N-1:0][N-1:0] pp;

  pp_array #(.N(N)) u_pp (
    .a (a),
    .b (b),
    .pp(pp)
  );

  wallace_tree #(.N(N), .REVISED(REVISED)) u_tree (
    .pp(pp),
    .p (s)
  );
endmodule
