// Accurate 1-bit full adder in mirror-adder form.
//
// The mirror adder computes the complemented carry first, then the
// complemented sum reusing it, and restores both polarities with output
// inverters:
//   cout_n = NOT(a.b + cin.(a + b))
//   sum_n  = NOT((a + b + cin).cout_n + a.b.cin)
// This gives sum = a XOR b XOR cin and cout = a.b + cin.(a XOR b), the full
// adder equations of the document; the two-stage split follows its mirror
// adder (carry stage first, sum stage driven by the inverted carry node).
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
// It is the accurate cell used in the upper part of the hybrid adder.
module mirror_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic cout_n;  // inverted carry node of the first stage
  logic sum_n;   // inverted sum node of the second stage

  always_comb begin
    cout_n = ~((a & b) | (cin & (a | b)));
    sum_n  = ~(((a | b | cin) & cout_n) | (a & b & cin));
    sum    = ~sum_n;
    cout   = ~cout_n;
  end

endmodule
