// Self-checking testbench of ama2 (approximate mirror adder 2).
//
// Applies all eight input rows and compares sum and carry with the cell's
// truth table held in fa_ref_pkg. It also counts the rows on which the cell
// differs from an exact full adder and checks that number (2), so a
// cell that is accidentally exact, or wrong on extra rows, is caught.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_ama2;
  import fa_ref_pkg::*;

  logic a, b, cin, sum, cout;
  int   checks   = 0;
  int   failures = 0;
  int   wrong_rows = 0;

  ama2 dut (.a, .b, .cin, .sum, .cout);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if (sum !== SUM_A2[i]) begin
        failures++;
        $display("FAIL row %03b: sum=%0b expected %0b", 3'(i), sum, SUM_A2[i]);
      end
      checks++;
      if (cout !== COUT_A2[i]) begin
        failures++;
        $display("FAIL row %03b: cout=%0b expected %0b", 3'(i), cout, COUT_A2[i]);
      end
      if (sum !== SUM_ACC[i] || cout !== COUT_ACC[i]) wrong_rows++;
    end
    checks++;
    if (wrong_rows != 2) begin
      failures++;
      $display("FAIL: %0d rows differ from an exact adder, expected 2", wrong_rows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
