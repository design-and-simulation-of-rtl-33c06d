// End-to-end testbench of approx_adders_top at its default parameters.
//
// Drives the three groups of the top together:
//  * all eight input rows into the six single-bit cells;
//  * all 512 operand/carry combinations into the two 4-bit parallel adders;
//  * corner cases and random operands into the 16-bit hybrid adder
//    (9 approximate LSBs of 9T cells).
// Every output is compared with bit-level models built from the cells'
// truth tables (fa_ref_pkg) and, for accurate paths, with ordinary
// addition. It counts how often each mechanism of the design occurred and
// fails if one never did: every approximate cell producing a wrong output,
// a carry rippling through all four accurate stages, the 9T parallel adder
// differing from the exact sum, a carry passed from the approximate lower
// part to the accurate upper part, a final carry out of the hybrid adder,
// and a hybrid result differing from the exact sum.
module tb_approx_adders_top;
  import approx_adder_pkg::*;
  import fa_ref_pkg::*;

  localparam int PW   = 4;
  localparam int RW   = 16;
  localparam int K    = 9;
  localparam int NRCA = 5000;

  logic                 cell_a, cell_b, cell_cin;
  logic [NUM_CELLS-1:0] cell_sum, cell_cout;
  logic [PW-1:0]        pa_x, pa_y, pa9_sum, pa28_sum;
  logic                 pa_cin, pa9_cout, pa28_cout;
  logic [RW-1:0]        rca_x, rca_y, rca_sum;
  logic                 rca_cin, rca_cout;

  int checks   = 0;
  int failures = 0;
  int cell_errors [NUM_CELLS];
  int full_ripples  = 0;
  int pa9_inexact   = 0;
  int mid_carries   = 0;
  int rca_couts     = 0;
  int rca_inexact   = 0;

  approx_adders_top dut (.*);

  task automatic expect_eq(string what, logic [RW:0] got, logic [RW:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    logic [64:0] r;
    logic [RW:0] exact;
    logic [1:0]  cr;

    foreach (cell_errors[c]) cell_errors[c] = 0;
    pa_x = '0; pa_y = '0; pa_cin = 0;
    rca_x = '0; rca_y = '0; rca_cin = 0;

    // single-bit cells, all rows
    for (int i = 0; i < 8; i++) begin
      {cell_a, cell_b, cell_cin} = 3'(i);
      #1;
      for (int c = 0; c < NUM_CELLS; c++) begin
        cr = cell_ref(fa_cell_e'(c), cell_a, cell_b, cell_cin);
        expect_eq($sformatf("cell %0d row %03b", c, 3'(i)),
                  (RW+1)'({cell_cout[c], cell_sum[c]}), (RW+1)'(cr));
        if ({cell_cout[c], cell_sum[c]} !== {COUT_ACC[i], SUM_ACC[i]}) cell_errors[c]++;
      end
    end

    // 4-bit parallel adders, exhaustive
    for (int v = 0; v < 512; v++) begin
      {pa_cin, pa_x, pa_y} = 9'(v);
      #1;
      exact = (RW+1)'(pa_x) + (RW+1)'(pa_y) + (RW+1)'(pa_cin);
      expect_eq($sformatf("pa28 %h+%h+%0b", pa_x, pa_y, pa_cin),
                (RW+1)'({pa28_cout, pa28_sum}), exact);
      r = ref_ripple(FA_9T, PW, PW, 64'(pa_x), 64'(pa_y), pa_cin);
      expect_eq($sformatf("pa9 %h+%h+%0b", pa_x, pa_y, pa_cin),
                (RW+1)'({pa9_cout, pa9_sum}), (RW+1)'({r[64], r[PW-1:0]}));
      if ((RW+1)'({pa9_cout, pa9_sum}) !== exact) pa9_inexact++;
      if (pa_cin && ((pa_x ^ pa_y) == '1)) full_ripples++;
    end

    // hybrid adder
    for (int v = 0; v < NRCA; v++) begin
      case (v)
        0: begin rca_x = '0;       rca_y = '0;       rca_cin = 0; end
        1: begin rca_x = '1;       rca_y = '1;       rca_cin = 1; end
        2: begin rca_x = 16'h01ff; rca_y = 16'h0001; rca_cin = 0; end
        default: begin rca_x = RW'($urandom); rca_y = RW'($urandom); rca_cin = 1'($urandom); end
      endcase
      #1;
      r = ref_ripple(FA_9T, RW, K, 64'(rca_x), 64'(rca_y), rca_cin);
      expect_eq($sformatf("rca %h+%h+%0b", rca_x, rca_y, rca_cin),
                {rca_cout, rca_sum}, {r[64], r[RW-1:0]});
      exact = {1'b0, rca_x} + {1'b0, rca_y} + (RW+1)'(rca_cin);
      if ({rca_cout, rca_sum} !== exact) rca_inexact++;
      r = ref_ripple(FA_9T, K, K, 64'(rca_x), 64'(rca_y), rca_cin);
      if (r[64]) mid_carries++;
      if (rca_cout) rca_couts++;
    end

    $display("mechanisms seen:");
    checks++;
    if (cell_errors[FA_ACCURATE] != 0) begin
      failures++;
      $display("FAIL: accurate cell wrong on %0d rows", cell_errors[FA_ACCURATE]);
    end
    expect_seen("AMA1 wrong rows",                   cell_errors[FA_AMA1]);
    expect_seen("AMA2 wrong rows",                   cell_errors[FA_AMA2]);
    expect_seen("AMA3 wrong rows",                   cell_errors[FA_AMA3]);
    expect_seen("AMA4 wrong rows",                   cell_errors[FA_AMA4]);
    expect_seen("9T cell wrong rows",                cell_errors[FA_9T]);
    expect_seen("carry through all 4 accurate stages", full_ripples);
    expect_seen("9T parallel adder inexact",         pa9_inexact);
    expect_seen("carry from approximate to accurate part", mid_carries);
    expect_seen("hybrid adder final carry out",      rca_couts);
    expect_seen("hybrid adder inexact",              rca_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
