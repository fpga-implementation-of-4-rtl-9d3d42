// tb_approx_comp42: exhaustive self-checking testbench for approx_comp42.
//
// All 32 combinations of x[3:0] and cin are applied to five compressors:
// the default one (SAFA1E in both positions), one each built only from
// SAFA2E, SAFA3E and SAFA4E, and a mixed one (SAFA1E then SAFA4E). Each
// output is compared with a reference built from the published cell truth
// tables (safa_ref_pkg) in the two-adder arrangement. For the default
// compressor the value sum + 2*(carry+cout) is also checked against the
// exact column count: it must be exact except that each SAFA1E cell whose
// three inputs are all 1 loses one. A timed watchdog guards the run.
module tb_approx_comp42;
  import safa_pkg::*;
  import safa_ref_pkg::*;

  localparam int NDUT = 5;
  localparam safa_kind_e K1 [NDUT] = '{SAFA1E, SAFA2E, SAFA3E, SAFA4E, SAFA1E};
  localparam safa_kind_e K2 [NDUT] = '{SAFA1E, SAFA2E, SAFA3E, SAFA4E, SAFA4E};

  logic [3:0]      x;
  logic            cin;
  logic [NDUT-1:0] sum, carry, cout;
  int checks = 0;
  int failures = 0;

  // default parameters: the compressor as the design uses it
  approx_comp42 dut0 (.x, .cin, .sum(sum[0]), .carry(carry[0]), .cout(cout[0]));

  for (genvar d = 1; d < NDUT; d++) begin : g_var
    approx_comp42 #(.STAGE1(K1[d]), .STAGE2(K2[d])) dut (
      .x, .cin, .sum(sum[d]), .carry(carry[d]), .cout(cout[d]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n_lost = 0;
    for (int v = 0; v < 32; v++) begin
      logic [1:0] r1, r2;
      int exact, got, lost;
      {cin, x} = 5'(v);
      #10;
      for (int d = 0; d < NDUT; d++) begin
        r1 = ref_fa(int'(K1[d]), x[0], x[1], x[2]);
        r2 = ref_fa(int'(K2[d]), r1[0], x[3], cin);
        check(cout[d] === r1[1], $sformatf("dut%0d x=%04b cin=%b: cout %b, expected %b", d, x, cin, cout[d], r1[1]));
        check(carry[d] === r2[1], $sformatf("dut%0d x=%04b cin=%b: carry %b, expected %b", d, x, cin, carry[d], r2[1]));
        check(sum[d] === r2[0], $sformatf("dut%0d x=%04b cin=%b: sum %b, expected %b", d, x, cin, sum[d], r2[0]));
      end
      // arithmetic property of the default (all-SAFA1E) compressor
      exact = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(cin);
      lost  = (x[2:0] == 3'b111) ? 1 : 0;
      // the second cell's first input is the first cell's (approximate) sum
      if ((x[2:0] != 3'b111) && ((x[0] ^ x[1] ^ x[2]) == 1'b1) && x[3] && cin) lost++;
      got = int'(sum[0]) + 2 * (int'(carry[0]) + int'(cout[0]));
      check(got == exact - lost, $sformatf("value x=%04b cin=%b: got %0d, expected %0d", x, cin, got, exact - lost));
      if (lost != 0) n_lost++;
    end
    check(n_lost == 7, $sformatf("inexact inputs of default compressor: %0d, expected 7", n_lost));
    $display("default compressor: %0d of 32 input cases inexact", n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
