// Approximate mirror adder 2 (AMA2).
//
// The carry is exact. The sum stage of the mirror adder is removed and the
// sum is taken from the inverted carry node through a buffer, using the fact
// that a full adder's sum is the complement of its carry in six of eight
// rows. The sum is therefore wrong only at a,b,cin = 000 (gives 1) and
// 111 (gives 0):
//   cout = a.b + cin.(a + b)
//   sum  = NOT cout
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module ama2 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic cout_n;  // inverted carry node of the carry stage

  always_comb begin
    cout_n = ~((a & b) | (cin & (a | b)));
    cout   = ~cout_n;
    sum    = cout_n;  // buffered inverted carry
  end

endmodule
