// ha_pair_or: a full adder built from two chained half adders and an OR gate.
// The first half adder adds a and b; its sum and cin go into the second half
// adder, whose sum is the cell's sum. The two half-adder carries can never be
// 1 at the same time (the second one needs a ^ b = 1, the first a & b = 1), so
// a plain OR merges them into cout.
// Used in the final carry chain of the revised Wallace tree in place of the
// full adders there: the late carry, cin, reaches cout through only one
// half-adder carry gate and the OR. Purely combinational. The cell itself is
// the published one; feeding the late carry to the second half adder is this
// implementation's choice.
module ha_pair_or (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, cout1, cout2;

  half_adder u_ha1 (.a(a),  .b(b),   .sum(s1),  .cout(cout1));
  half_adder u_ha2 (.a(s1), .b(cin), .sum(sum), .cout(cout2));

  assign cout = cout1 | cout2;
endmodule
