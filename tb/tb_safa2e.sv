// tb_safa2e: exhaustive self-checking testbench for safa2e.
//
// Applies all eight input combinations and compares carry and sum with
// the published truth table of the SAFA2E cell (safa_ref_pkg). It also
// recomputes the error distance against exact addition, checks it against
// the table's ED column, and checks the number of erroneous cases (2 of 8).
// A timed watchdog ends the run with a failure if it hangs.
module tb_safa2e;
  import safa_ref_pkg::*;

  logic a, b, c;
  logic sum, carry;
  int   checks = 0;
  int   failures = 0;
  int   n_err = 0;

  safa2e dut (.a, .b, .c, .sum, .carry);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ed;
      {a, b, c} = 3'(i);
      #10;
      check(carry === CY_TAB[1][i], $sformatf("carry for ABC=%03b: got %b", i[2:0], carry));
      check(sum === S_TAB[1][i], $sformatf("sum for ABC=%03b: got %b", i[2:0], sum));
      ed = 2 * int'(carry) + int'(sum) - (int'(a) + int'(b) + int'(c));
      check(ed == ED_TAB[1][i], $sformatf("error distance for ABC=%03b: got %0d", i[2:0], ed));
      if (ed != 0) n_err++;
    end
    check(n_err == 2, $sformatf("erroneous cases: got %0d, expected 2", n_err));
    $display("SAFA2E: %0d of 8 input cases inexact, error rate %0d%%", n_err, n_err * 100 / 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
