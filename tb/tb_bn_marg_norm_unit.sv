// Testbench of the marginalisation / normalisation unit. Marginal mode:
// the result must be x on a first visit and the clamped log-sum of the
// read-back y and x otherwise. Total mode: a random run of entries is
// accumulated and the running sum must match the reference log-sum after
// every entry. Apply mode: the result must be x minus the total, clamped
// to 0..63.
module tb_bn_marg_norm_unit;
  import bn_pkg::*;
  `include "bn_tb_model.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid = 0, first = 0, total = 0, norm_apply = 0;
  acc_t norm_sum = 0, sum;
  cost_t x = 0, y = 0, result;
  bn_marg_norm_unit dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #(1000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int clamp(input int v);
    return v < 0 ? 0 : v > 63 ? 63 : v;
  endfunction
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // marginal mode
    for (int n = 0; n < 300; n++) begin
      int e;
      @(negedge clk);
      x = cost_t'($urandom_range(63)); y = cost_t'($urandom_range(63));
      first = (n % 5 == 0); valid = 1; #1;
      e = first ? int'(x) : clamp(ref_logadd(int'(y), int'(x)));
      check(int'(result) == e, $sformatf("marginal x=%0d y=%0d first=%0d: %0d expected %0d", x, y, first, result, e));
    end
    // total mode, several runs
    total = 1;
    for (int r = 0; r < 8; r++) begin
      int ref_acc;
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        x = cost_t'($urandom_range(63));
        first = (n == 0); valid = 1; #1;
        ref_acc = first ? int'(x) : ref_logadd(ref_acc, int'(x));
        check(int'(sum) == ref_acc, $sformatf("total run %0d entry %0d: %0d expected %0d", r, n, sum, ref_acc));
      end
      // apply mode with this total
      @(negedge clk);
      total = 0; norm_apply = 1; valid = 1; norm_sum = acc_t'(ref_acc);
      for (int v = 0; v < 64; v += 3) begin
        x = cost_t'(v); #1;
        check(int'(result) == clamp(v - ref_acc), $sformatf("apply %0d - %0d = %0d", v, ref_acc, result));
      end
      @(negedge clk);
      norm_apply = 0; total = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
