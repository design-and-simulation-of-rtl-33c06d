// Approximate mirror adder 1 (AMA1).
//
// A mirror adder with transistors removed from both stages. Its truth table
// differs from a full adder in two of eight input rows: at a,b,cin = 010 both
// outputs are wrong (sum 0, carry 1) and at 100 the sum is wrong (0).
// What remains is
//   cout = b + a.cin
//   sum  = 1 only when a,b,cin = 001 or 111, i.e. cin.NOT(cout XOR (a.b))
// written here as sum = cin.(a.b + NOT b.NOT a).
// The table is the document's; the logic that realises it is the simplest
// this design found, not a copy of the transistor schematic.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module ama1 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    cout = b | (a & cin);
    sum  = cin & ((a & b) | (~a & ~b));
  end

endmodule
