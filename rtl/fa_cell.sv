// One full-adder stage whose cell is chosen at elaboration time.
//
// CELL selects the accurate mirror adder, one of the approximate mirror
// adders AMA1..AMA4 or the 9-transistor cell; exactly one of them is built.
// Used by the ripple-carry adders so that a chain of any cell type can be
// described once.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module fa_cell
  import approx_adder_pkg::*;
#(
  parameter fa_cell_e CELL = FA_ACCURATE
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  generate
    case (CELL)
      FA_AMA1: begin : g_ama1
        ama1 u_cell (.a, .b, .cin, .sum, .cout);
      end
      FA_AMA2: begin : g_ama2
        ama2 u_cell (.a, .b, .cin, .sum, .cout);
      end
      FA_AMA3: begin : g_ama3
        ama3 u_cell (.a, .b, .cin, .sum, .cout);
      end
      FA_AMA4: begin : g_ama4
        ama4 u_cell (.a, .b, .cin, .sum, .cout);
      end
      FA_9T: begin : g_9t
        fa_9t u_cell (.a, .b, .cin, .sum, .cout);
      end
      default: begin : g_accurate
        mirror_adder u_cell (.a, .b, .cin, .sum, .cout);
      end
    endcase
  endgenerate

endmodule
