// Self-checking testbench of parallel_adder, the ripple-carry adder.
//
// Builds the 4-bit adder once for every cell type (the default instance is
// the 9T version) and applies all 512 combinations of x, y and cin. Each
// result is compared with a bit-level ripple model driven by the cells'
// truth tables (fa_ref_pkg). The accurate instance is also compared with
// x + y + cin. The run counts how often the 9T adder differs from the exact
// sum and how often a carry ripples through all four stages, and fails if
// either never happened.
module tb_parallel_adder;
  import approx_adder_pkg::*;
  import fa_ref_pkg::*;

  localparam int W = 4;

  logic [W-1:0] x, y;
  logic         cin;
  logic [W-1:0] s   [NUM_CELLS];
  logic         co  [NUM_CELLS];

  int checks   = 0;
  int failures = 0;
  int approx_errors = 0;
  int full_ripples  = 0;

  // default parameters: 4 bits of 9T cells
  parallel_adder dut_default (.x, .y, .cin, .sum(s[FA_9T]), .cout(co[FA_9T]));
  parallel_adder #(.WIDTH(W), .CELL(FA_ACCURATE)) dut_acc  (.x, .y, .cin, .sum(s[FA_ACCURATE]), .cout(co[FA_ACCURATE]));
  parallel_adder #(.WIDTH(W), .CELL(FA_AMA1))     dut_ama1 (.x, .y, .cin, .sum(s[FA_AMA1]), .cout(co[FA_AMA1]));
  parallel_adder #(.WIDTH(W), .CELL(FA_AMA2))     dut_ama2 (.x, .y, .cin, .sum(s[FA_AMA2]), .cout(co[FA_AMA2]));
  parallel_adder #(.WIDTH(W), .CELL(FA_AMA3))     dut_ama3 (.x, .y, .cin, .sum(s[FA_AMA3]), .cout(co[FA_AMA3]));
  parallel_adder #(.WIDTH(W), .CELL(FA_AMA4))     dut_ama4 (.x, .y, .cin, .sum(s[FA_AMA4]), .cout(co[FA_AMA4]));

  initial begin
    logic [64:0] r;
    logic [W:0]  exact;
    for (int v = 0; v < 512; v++) begin
      {cin, x, y} = 9'(v);
      #1;
      for (int c = 0; c < NUM_CELLS; c++) begin
        r = ref_ripple(fa_cell_e'(c), W, W, 64'(x), 64'(y), cin);
        checks++;
        if ({co[c], s[c]} !== {r[64], r[W-1:0]}) begin
          failures++;
          $display("FAIL cell %0d x=%h y=%h cin=%0b: got %0b_%h expected %0b_%h",
                   c, x, y, cin, co[c], s[c], r[64], r[W-1:0]);
        end
      end
      exact = {1'b0, x} + {1'b0, y} + (W+1)'(cin);
      checks++;
      if ({co[FA_ACCURATE], s[FA_ACCURATE]} !== exact) begin
        failures++;
        $display("FAIL exact x=%h y=%h cin=%0b: got %0b_%h", x, y, cin, co[FA_ACCURATE], s[FA_ACCURATE]);
      end
      if ({co[FA_9T], s[FA_9T]} !== exact) approx_errors++;
      if (cin && ((x ^ y) == '1)) full_ripples++;
    end
    checks++;
    if (approx_errors == 0) begin
      failures++;
      $display("FAIL: the 9T adder never differed from the exact sum");
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL: no carry rippled through every stage");
    end
    $display("9T adder wrong on %0d of 512 inputs; full-length ripples: %0d", approx_errors, full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
