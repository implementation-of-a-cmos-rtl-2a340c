// full_adder: adds three bits of equal weight (a 3:2 counter).
// sum = a ^ b ^ cin keeps the weight; cout, the majority of the three inputs,
// goes to the next weight. Purely combinational. The reduction layers of the
// Wallace tree use this cell for every group of three wires; the equations are
// the textbook ones, the transistor-level cell is left to the library.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
