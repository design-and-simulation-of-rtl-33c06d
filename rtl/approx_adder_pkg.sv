// Shared types for the approximate full-adder family.
//
// fa_cell_e names the single-bit adder cells that can fill a stage of a
// ripple-carry adder: the accurate mirror adder and the approximate cells
// AMA1..AMA4 and the 9-transistor cell. Multi-bit adders take a parameter of
// this type to choose the cell of each part. The encoding (accurate = 0,
// AMA1..AMA4 = 1..4, 9T = 5) is this design's own choice; the top uses it to
// index the outputs of the cells it holds side by side.
package approx_adder_pkg;

  typedef enum logic [2:0] {
    FA_ACCURATE = 3'd0,
    FA_AMA1     = 3'd1,
    FA_AMA2     = 3'd2,
    FA_AMA3     = 3'd3,
    FA_AMA4     = 3'd4,
    FA_9T       = 3'd5
  } fa_cell_e;

  localparam int unsigned NUM_CELLS = 6;

endpackage
