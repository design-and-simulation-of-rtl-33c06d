// Approximate 9-transistor full adder cell.
//
// The truth table is split on input a. For a = 0 the cell is exact:
// sum = b XOR cin, cout = b.cin. For a = 1 the cell passes cin to the sum
// and forces the carry to 1:
//   a = 0: sum = b XOR cin, cout = b.cin
//   a = 1: sum = cin,       cout = 1
// The outputs are therefore wrong at a,b,cin = 100 (sum 0, carry 1) and
// 101 (sum 1). This table follows the document's truth table for the cell,
// error marks included; the document's prose calls the a = 1 half an XNOR
// of b and cin, which would be the exact sum, and is not followed.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module fa_9t (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    if (a) begin
      sum  = cin;
      cout = 1'b1;
    end else begin
      sum  = b ^ cin;
      cout = b & cin;
    end
  end

endmodule
