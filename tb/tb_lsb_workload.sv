// Workload testbench: hybrid adders with 9 approximated LSBs.
//
// Mirrors, at adder level, an image-compression evaluation in which the
// 9 least significant bits of the transform adders use approximate cells.
// Five 16-bit hybrid adders are built, one per approximate cell (AMA1..AMA4,
// 9T), each with 9 approximate LSBs and an accurate upper part. The same
// 12 288 operand pairs (random, from a fixed seed; the transform itself is
// not modelled) are applied to all of them. Every result is checked
// against a bit-level model built from the cells' truth tables, and for
// each cell the run reports how many results are inexact and the mean and
// largest absolute error against x + y + cin. The error of a 9-LSB split
// must stay below 2^10 (the approximate part can be off by at most its own
// range plus one carry), which is checked as well.
module tb_lsb_workload;
  import approx_adder_pkg::*;
  import fa_ref_pkg::*;

  localparam int W    = 16;
  localparam int K    = 9;
  localparam int NVEC = 12288;
  localparam int NA   = 5;  // approximate cells, AMA1..AMA4 and 9T (enum 1..5)

  logic [W-1:0] x, y;
  logic         cin;
  logic [W-1:0] s  [1:NA];
  logic         co [1:NA];

  int checks   = 0;
  int failures = 0;

  approx_rca #(.WIDTH(W), .APPROX_LSBS(K), .APPROX_CELL(FA_AMA1)) u_a1 (.x, .y, .cin, .sum(s[1]), .cout(co[1]));
  approx_rca #(.WIDTH(W), .APPROX_LSBS(K), .APPROX_CELL(FA_AMA2)) u_a2 (.x, .y, .cin, .sum(s[2]), .cout(co[2]));
  approx_rca #(.WIDTH(W), .APPROX_LSBS(K), .APPROX_CELL(FA_AMA3)) u_a3 (.x, .y, .cin, .sum(s[3]), .cout(co[3]));
  approx_rca #(.WIDTH(W), .APPROX_LSBS(K), .APPROX_CELL(FA_AMA4)) u_a4 (.x, .y, .cin, .sum(s[4]), .cout(co[4]));
  approx_rca #(.WIDTH(W), .APPROX_LSBS(K), .APPROX_CELL(FA_9T))   u_9t (.x, .y, .cin, .sum(s[5]), .cout(co[5]));

  initial begin
    logic [64:0]  r;
    int           exact, got, err;
    longint       err_sum [1:NA];
    int           err_max [1:NA];
    int           inexact [1:NA];
    for (int c = 1; c <= NA; c++) begin
      err_sum[c] = 0; err_max[c] = 0; inexact[c] = 0;
    end
    void'($urandom(12288));
    for (int v = 0; v < NVEC; v++) begin
      x   = W'($urandom);
      y   = W'($urandom);
      cin = 1'b0;
      #1;
      exact = int'(x) + int'(y) + int'(cin);
      for (int c = 1; c <= NA; c++) begin
        r = ref_ripple(fa_cell_e'(c), W, K, 64'(x), 64'(y), cin);
        checks++;
        if ({co[c], s[c]} !== {r[64], r[W-1:0]}) begin
          failures++;
          $display("FAIL cell %0d x=%h y=%h: got %0b_%h expected %0b_%h",
                   c, x, y, co[c], s[c], r[64], r[W-1:0]);
        end
        got = int'({co[c], s[c]});
        err = (got > exact) ? got - exact : exact - got;
        if (err != 0) inexact[c]++;
        err_sum[c] += longint'(err);
        if (err > err_max[c]) err_max[c] = err;
        checks++;
        if (err >= (1 << (K + 1))) begin
          failures++;
          $display("FAIL cell %0d: error %0d reaches into the accurate part", c, err);
        end
      end
    end
    $display("cell   inexact/%0d   mean |error|   max |error|", NVEC);
    for (int c = 1; c <= NA; c++)
      $display("%-5s  %6d         %8.2f       %6d", fa_cell_e'(c) == FA_9T ? "9T" : $sformatf("AMA%0d", c),
               inexact[c], real'(err_sum[c]) / NVEC, err_max[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
