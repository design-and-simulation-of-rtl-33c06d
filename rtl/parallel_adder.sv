// N-bit parallel (ripple-carry) adder built from one type of full-adder cell.
//
// WIDTH cells are chained: stage i adds x[i], y[i] and the carry out of stage
// i-1; stage 0 takes the input carry and the last stage's carry is the final
// carry. With accurate cells this is an exact adder; with approximate cells
// each stage makes the errors of its cell and passes its (possibly wrong)
// carry on.
//
// The four-stage default and the 9-transistor default cell follow the
// document's 4-bit parallel adder built from the proposed 9T cell; the
// accurate 4-bit adder it compares with is CELL = FA_ACCURATE.
//
// Interface: x, y, cin in; sum, cout out. Purely combinational; the delay is
// WIDTH cell delays along the carry chain.
module parallel_adder
  import approx_adder_pkg::*;
#(
  parameter int unsigned WIDTH = 4,
  parameter fa_cell_e    CELL  = FA_9T
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;  // carry[i] is the carry into stage i

  assign carry[0] = cin;
  assign cout     = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    fa_cell #(.CELL(CELL)) u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

endmodule
