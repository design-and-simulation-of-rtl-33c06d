// Hybrid ripple-carry adder: approximate lower bits, accurate upper bits.
//
// The APPROX_LSBS least significant bits are added by a chain of approximate
// cells (APPROX_CELL); their carry out ripples into a chain of accurate
// mirror-adder cells for the remaining WIDTH - APPROX_LSBS bits. Errors are
// thus confined to the low bits and to the carry they hand to the upper
// part, trading accuracy of the small bits for power.
//
// The split into an approximate lower and accurate upper part, the 9 LSBs
// and the 9-transistor cell follow the document's image-compression
// evaluation; the 16-bit default width is this design's choice (the
// document gives none). APPROX_LSBS may be 0 (fully accurate) up to WIDTH
// (fully approximate).
//
// Interface: x, y, cin in; sum, cout out. Purely combinational.
module approx_rca
  import approx_adder_pkg::*;
#(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned APPROX_LSBS = 9,
  parameter fa_cell_e    APPROX_CELL = FA_9T
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned ACC_BITS = WIDTH - APPROX_LSBS;

  logic mid_carry;  // carry from the approximate into the accurate part

  if (APPROX_LSBS > 0) begin : g_low
    parallel_adder #(.WIDTH(APPROX_LSBS), .CELL(APPROX_CELL)) u_low (
      .x   (x[APPROX_LSBS-1:0]),
      .y   (y[APPROX_LSBS-1:0]),
      .cin (cin),
      .sum (sum[APPROX_LSBS-1:0]),
      .cout(mid_carry)
    );
  end else begin : g_no_low
    assign mid_carry = cin;
  end

  if (ACC_BITS > 0) begin : g_high
    parallel_adder #(.WIDTH(ACC_BITS), .CELL(FA_ACCURATE)) u_high (
      .x   (x[WIDTH-1:APPROX_LSBS]),
      .y   (y[WIDTH-1:APPROX_LSBS]),
      .cin (mid_carry),
      .sum (sum[WIDTH-1:APPROX_LSBS]),
      .cout(cout)
    );
  end else begin : g_no_high
    assign cout = mid_carry;
  end

  initial begin
    assert (APPROX_LSBS <= WIDTH)
      else $fatal(1, "APPROX_LSBS (%0d) exceeds WIDTH (%0d)", APPROX_LSBS, WIDTH);
  end

endmodule
