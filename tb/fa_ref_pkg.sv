// Reference truth tables of the full-adder cells, for the testbenches.
//
// Each cell is described by two 8-bit columns, bit i holding the output for
// the input row i = {a, b, cin}. The columns are written out from the cells'
// published truth tables, independently of the RTL, and drive bit-level
// reference models of the multi-bit adders (ref_ripple).
package fa_ref_pkg;
  import approx_adder_pkg::*;

  //                                rows 7..0 = 111 110 101 100 011 010 001 000
  localparam logic [7:0] SUM_ACC  = 8'b1001_0110;
  localparam logic [7:0] COUT_ACC = 8'b1110_1000;
  localparam logic [7:0] SUM_A1   = 8'b1000_0010;
  localparam logic [7:0] COUT_A1  = 8'b1110_1100;
  localparam logic [7:0] SUM_A2   = 8'b0001_0111;
  localparam logic [7:0] COUT_A2  = 8'b1110_1000;
  localparam logic [7:0] SUM_A3   = 8'b0001_0011;
  localparam logic [7:0] COUT_A3  = 8'b1110_1100;
  localparam logic [7:0] SUM_A4   = 8'b1000_1010;
  localparam logic [7:0] COUT_A4  = 8'b1111_0000;
  localparam logic [7:0] SUM_9T   = 8'b1010_0110;
  localparam logic [7:0] COUT_9T  = 8'b1111_1000;

  function automatic logic [7:0] sum_col(fa_cell_e c);
    case (c)
      FA_AMA1: return SUM_A1;
      FA_AMA2: return SUM_A2;
      FA_AMA3: return SUM_A3;
      FA_AMA4: return SUM_A4;
      FA_9T:   return SUM_9T;
      default: return SUM_ACC;
    endcase
  endfunction

  function automatic logic [7:0] cout_col(fa_cell_e c);
    case (c)
      FA_AMA1: return COUT_A1;
      FA_AMA2: return COUT_A2;
      FA_AMA3: return COUT_A3;
      FA_AMA4: return COUT_A4;
      FA_9T:   return COUT_9T;
      default: return COUT_ACC;
    endcase
  endfunction

  // {cout, sum} of one cell for one input row
  function automatic logic [1:0] cell_ref(fa_cell_e c, logic a, logic b, logic cin);
    logic [2:0] row;
    row = {a, b, cin};
    return {cout_col(c)[row], sum_col(c)[row]};
  endfunction

  // Ripple of `width` cells: bits below `approx_lsbs` use cell `c`, the rest
  // use the accurate table. Returns {cout, sum[63:0]}.
  function automatic logic [64:0] ref_ripple(fa_cell_e c, int width, int approx_lsbs,
                                             logic [63:0] x, logic [63:0] y, logic cin);
    logic [63:0] s;
    logic        carry;
    logic [1:0]  r;
    s     = '0;
    carry = cin;
    for (int i = 0; i < width; i++) begin
      r     = cell_ref((i < approx_lsbs) ? c : FA_ACCURATE, x[i], y[i], carry);
      s[i]  = r[0];
      carry = r[1];
    end
    return {carry, s};
  endfunction

endpackage
