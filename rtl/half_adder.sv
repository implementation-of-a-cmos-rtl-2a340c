// half_adder: adds two bits of equal weight.
// sum = a ^ b keeps the weight, cout = a & b goes to the next weight.
// Purely combinational. The cell's function is the standard half adder;
// its gate-level form (one XOR, one AND) is this design's choice.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end
endmodule
