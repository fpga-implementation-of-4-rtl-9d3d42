// tb_approx_comp42_top: end-to-end testbench of the four approximate 4:2
// compressors (one per SAFA cell type) side by side.
//
// Every one of the 32 column inputs {cin, x[3:0]} is applied. For each
// compressor the three outputs are compared with a reference made of the
// published cell truth tables (safa_ref_pkg), and the compressed value
// sum + 2*(carry+cout) is compared with the exact count of ones. The run
// counts, per cell type, how many inputs come out exact, too high and too
// low, and prints error rate and mean error distance. Each compressor must
// show at least one exact and at least one inexact result (the
// approximation actually happens); SAFA1E-based compressors can only err
// low, since that cell's carry is exact and its sum only drops a one.
// The top is used with its default (and only) configuration.
module tb_approx_comp42_top;
  import safa_ref_pkg::*;

  logic [3:0] x;
  logic       cin;
  logic [3:0] sum, carry, cout;
  int checks = 0;
  int failures = 0;
  int n_exact [4];
  int n_high [4];
  int n_low [4];
  int sum_abs_ed [4];

  approx_comp42_top dut (.x, .cin, .sum, .carry, .cout);

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
    for (int k = 0; k < 4; k++) begin
      n_exact[k] = 0; n_high[k] = 0; n_low[k] = 0; sum_abs_ed[k] = 0;
    end
    for (int v = 0; v < 32; v++) begin
      {cin, x} = 5'(v);
      #10;
      for (int k = 0; k < 4; k++) begin
        logic [1:0] r1, r2;
        int exact, got, ref_val;
        r1 = ref_fa(k, x[0], x[1], x[2]);
        r2 = ref_fa(k, r1[0], x[3], cin);
        check({cout[k], carry[k], sum[k]} === {r1[1], r2[1], r2[0]},
              $sformatf("type %0d x=%04b cin=%b: {cout,carry,sum}=%03b expected %03b",
                        k, x, cin, {cout[k], carry[k], sum[k]}, {r1[1], r2[1], r2[0]}));
        exact   = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(cin);
        got     = int'(sum[k]) + 2 * (int'(carry[k]) + int'(cout[k]));
        ref_val = int'(r2[0]) + 2 * (int'(r2[1]) + int'(r1[1]));
        check(got == ref_val, $sformatf("type %0d x=%04b cin=%b: value %0d expected %0d",
                                        k, x, cin, got, ref_val));
        if (got == exact) n_exact[k]++;
        else if (got > exact) n_high[k]++;
        else n_low[k]++;
        sum_abs_ed[k] += (got > exact) ? got - exact : exact - got;
      end
    end
    for (int k = 0; k < 4; k++) begin
      $display("SAFA%0dE compressor: exact %0d, high %0d, low %0d of 32; error rate %0d%%, mean |ED| %0d/32",
               k + 1, n_exact[k], n_high[k], n_low[k], (n_high[k] + n_low[k]) * 100 / 32, sum_abs_ed[k]);
      check(n_exact[k] > 0, $sformatf("type %0d never exact", k));
      check(n_high[k] + n_low[k] > 0, $sformatf("type %0d never approximated", k));
    end
    check(n_high[0] == 0 && n_low[0] == 7, "SAFA1E compressor must err low on exactly 7 inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
