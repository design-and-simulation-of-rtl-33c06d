// Top level of the approximate adder family.
//
// Holds every built adder side by side, each with its own ports:
//  * the six single-bit cells (accurate mirror adder, AMA1..AMA4, 9T) on one
//    shared set of inputs, outputs indexed by approx_adder_pkg::fa_cell_e;
//  * two 4-bit parallel adders on shared operands, one of accurate cells and
//    one of 9T cells, so the approximate result can be compared with the
//    exact one;
//  * the hybrid adder with approximate low bits (defaults: 16 bits, 9 LSBs
//    of 9T cells).
// The document evaluates these designs one by one and joins them into no
// larger datapath, so none is wired to another here.
//
// Purely combinational; all outputs follow their inputs after the cells'
// propagation delay.
module approx_adders_top
  import approx_adder_pkg::*;
#(
  parameter int unsigned PA_WIDTH        = 4,
  parameter int unsigned RCA_WIDTH       = 16,
  parameter int unsigned RCA_APPROX_LSBS = 9,
  parameter fa_cell_e    RCA_APPROX_CELL = FA_9T
) (
  // single-bit cells
  input  logic                 cell_a,
  input  logic                 cell_b,
  input  logic                 cell_cin,
  output logic [NUM_CELLS-1:0] cell_sum,
  output logic [NUM_CELLS-1:0] cell_cout,
  // 4-bit parallel adders
  input  logic [PA_WIDTH-1:0]  pa_x,
  input  logic [PA_WIDTH-1:0]  pa_y,
  input  logic                 pa_cin,
  output logic [PA_WIDTH-1:0]  pa9_sum,
  output logic                 pa9_cout,
  output logic [PA_WIDTH-1:0]  pa28_sum,
  output logic                 pa28_cout,
  // hybrid approximate adder
  input  logic [RCA_WIDTH-1:0] rca_x,
  input  logic [RCA_WIDTH-1:0] rca_y,
  input  logic                 rca_cin,
  output logic [RCA_WIDTH-1:0] rca_sum,
  output logic                 rca_cout
);

  mirror_adder u_ma (.a(cell_a), .b(cell_b), .cin(cell_cin),
                     .sum(cell_sum[FA_ACCURATE]), .cout(cell_cout[FA_ACCURATE]));
  ama1 u_ama1 (.a(cell_a), .b(cell_b), .cin(cell_cin),
               .sum(cell_sum[FA_AMA1]), .cout(cell_cout[FA_AMA1]));
  ama2 u_ama2 (.a(cell_a), .b(cell_b), .cin(cell_cin),
               .sum(cell_sum[FA_AMA2]), .cout(cell_cout[FA_AMA2]));
  ama3 u_ama3 (.a(cell_a), .b(cell_b), .cin(cell_cin),
               .sum(cell_sum[FA_AMA3]), .cout(cell_cout[FA_AMA3]));
  ama4 u_ama4 (.a(cell_a), .b(cell_b), .cin(cell_cin),
               .sum(cell_sum[FA_AMA4]), .cout(cell_cout[FA_AMA4]));
  fa_9t u_9t (.a(cell_a), .b(cell_b), .cin(cell_cin),
              .sum(cell_sum[FA_9T]), .cout(cell_cout[FA_9T]));

  parallel_adder #(.WIDTH(PA_WIDTH), .CELL(FA_9T)) u_pa9 (
    .x(pa_x), .y(pa_y), .cin(pa_cin), .sum(pa9_sum), .cout(pa9_cout)
  );

  parallel_adder #(.WIDTH(PA_WIDTH), .CELL(FA_ACCURATE)) u_pa28 (
    .x(pa_x), .y(pa_y), .cin(pa_cin), .sum(pa28_sum), .cout(pa28_cout)
  );

  approx_rca #(
    .WIDTH      (RCA_WIDTH),
    .APPROX_LSBS(RCA_APPROX_LSBS),
    .APPROX_CELL(RCA_APPROX_CELL)
  ) u_rca (
    .x(rca_x), .y(rca_y), .cin(rca_cin), .sum(rca_sum), .cout(rca_cout)
  );

endmodule
