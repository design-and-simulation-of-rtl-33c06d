// Approximate mirror adder 4 (AMA4).
//
// The carry stage is reduced to an inverter on a, so the carry out equals a
// (wrong at a,b,cin = 011 and 100). The reduced sum stage gives a 1 only at
// rows 001, 011 and 111 (wrong at 010, 011 and 100):
//   cout = a
//   sum  = cin.(NOT a + b)
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module ama4 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic cout_n;  // inverted carry node, driven from a alone

  always_comb begin
    cout_n = ~a;
    cout   = ~cout_n;
    sum    = cin & (cout_n | b);
  end

endmodule
