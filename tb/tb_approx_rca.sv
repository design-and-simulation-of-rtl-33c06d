// Self-checking testbench of approx_rca, the hybrid adder with approximate
// low bits and accurate high bits.
//
// Instances: the default (16 bits, 9 approximate LSBs of 9T cells), a fully
// accurate one (0 approximate bits), a fully approximate one (16 bits) and
// one with 4 LSBs of AMA1 cells. Random operands plus corner cases are
// compared with a bit-level ripple model built from the cells' truth tables
// and, where applicable, with x + y + cin. Two properties of the split are
// checked directly: the accurate instance is exact, and in the default the
// upper bits equal the exact sum of the upper operand bits plus the carry
// that leaves the approximate part. The run counts approximate results that
// are wrong and carries handed from the lower to the upper part, and fails
// if either never happened.
module tb_approx_rca;
  import approx_adder_pkg::*;
  import fa_ref_pkg::*;

  localparam int W = 16;
  localparam int K = 9;
  localparam int NVEC = 4000;

  logic [W-1:0] x, y;
  logic         cin;
  logic [W-1:0] s_def, s_acc, s_all, s_a1;
  logic         c_def, c_acc, c_all, c_a1;

  int checks   = 0;
  int failures = 0;
  int approx_errors = 0;
  int mid_carries   = 0;

  approx_rca dut_def (.x, .y, .cin, .sum(s_def), .cout(c_def));
  approx_rca #(.WIDTH(W), .APPROX_LSBS(0),  .APPROX_CELL(FA_9T))   dut_acc (.x, .y, .cin, .sum(s_acc), .cout(c_acc));
  approx_rca #(.WIDTH(W), .APPROX_LSBS(W),  .APPROX_CELL(FA_9T))   dut_all (.x, .y, .cin, .sum(s_all), .cout(c_all));
  approx_rca #(.WIDTH(W), .APPROX_LSBS(4),  .APPROX_CELL(FA_AMA1)) dut_a1  (.x, .y, .cin, .sum(s_a1),  .cout(c_a1));

  task automatic check(string what, logic [W:0] got, logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%h y=%h cin=%0b: got %h expected %h", what, x, y, cin, got, exp);
    end
  endtask

  initial begin
    logic [64:0] r;
    logic [W:0]  exact;
    logic [K:0]  low;       // {carry out of the approximate part, low sum}
    logic [W-K:0] high;
    for (int v = 0; v < NVEC; v++) begin
      case (v)
        0: begin x = '0; y = '0; cin = 0; end
        1: begin x = '1; y = '1; cin = 1; end
        2: begin x = 16'h01ff; y = 16'h0001; cin = 0; end
        3: begin x = 16'hffff; y = 16'h0000; cin = 1; end
        default: begin x = W'($urandom); y = W'($urandom); cin = 1'($urandom); end
      endcase
      #1;
      exact = {1'b0, x} + {1'b0, y} + (W+1)'(cin);

      r = ref_ripple(FA_9T, W, K, 64'(x), 64'(y), cin);
      check("default", {c_def, s_def}, {r[64], r[W-1:0]});
      r = ref_ripple(FA_9T, W, 0, 64'(x), 64'(y), cin);
      check("accurate(ref)", {c_acc, s_acc}, {r[64], r[W-1:0]});
      check("accurate(exact)", {c_acc, s_acc}, exact);
      r = ref_ripple(FA_9T, W, W, 64'(x), 64'(y), cin);
      check("all-9T", {c_all, s_all}, {r[64], r[W-1:0]});
      r = ref_ripple(FA_AMA1, W, 4, 64'(x), 64'(y), cin);
      check("ama1x4", {c_a1, s_a1}, {r[64], r[W-1:0]});

      // split property of the default instance
      r    = ref_ripple(FA_9T, K, K, 64'(x), 64'(y), cin);
      low  = {r[64], r[K-1:0]};
      high = {1'b0, x[W-1:K]} + {1'b0, y[W-1:K]} + (W-K+1)'(low[K]);
      check("split", {c_def, s_def}, {high, low[K-1:0]});

      if ({c_def, s_def} !== exact) approx_errors++;
      if (low[K]) mid_carries++;
    end
    checks++;
    if (approx_errors == 0) begin
      failures++;
      $display("FAIL: the default adder was never inexact");
    end
    checks++;
    if (mid_carries == 0) begin
      failures++;
      $display("FAIL: no carry passed from the approximate to the accurate part");
    end
    $display("default adder inexact on %0d of %0d inputs; carries into upper part: %0d",
             approx_errors, NVEC, mid_carries);
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
