// Approximate mirror adder 3 (AMA3).
//
// Combines the simplified carry stage of AMA1 with the buffered sum of AMA2:
//   cout = b + a.cin            (wrong at a,b,cin = 010)
//   sum  = NOT cout             (wrong at 000, 010 and 111)
// Three of the eight rows give a wrong sum and one a wrong carry.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module ama3 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic cout_n;  // inverted carry node of the reduced carry stage

  always_comb begin
    cout_n = ~(b | (a & cin));
    cout   = ~cout_n;
    sum    = cout_n;  // buffered inverted carry
  end

endmodule
