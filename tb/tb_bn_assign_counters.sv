// Testbench of the assignment counters. For random variable tables the
// strides and offsets are computed in the testbench and the counters are
// stepped through every assignment. After each step the three indices
// must equal sum(assignment[v] * stride[v]) over the members of each
// factor, grp_first must be high exactly when all eliminated variables are
// zero, and last must rise on the final assignment (number of steps =
// product of the cardinalities of the free variables).
module tb_bn_assign_counters;
  import bn_pkg::*;
  `include "bn_tb_model.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, step = 0, last, grp_first;
  var_cfg_t vcfg [NV];
  logic [IW-1:0] stride [3][NV], wrap [3][NV], offset [3], idx [3];
  bn_assign_counters dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #(20000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int asg [NV];
      int total, n;
      ref_random_cfg(vcfg, 1'b1);
      for (int f = 0; f < 3; f++) begin
        offset[f] = IW'(ref_offset(vcfg, f));
        for (int v = 0; v < NV; v++) begin
          stride[f][v] = IW'(ref_stride(vcfg, f, v));
          wrap[f][v]   = IW'(ref_stride(vcfg, f, v) * (ref_card(vcfg[v]) - 1));
        end
      end
      total = 1;
      for (int v = 0; v < NV; v++) begin
        asg[v] = vcfg[v].pinned ? int'(vcfg[v].pin_val) : 0;
        if (!vcfg[v].pinned) total *= ref_card(vcfg[v]);
      end
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      n = 1;
      forever begin
        bit gf;
        gf = 1;
        for (int v = 0; v < NV; v++) if (vcfg[v].elim && !vcfg[v].pinned && asg[v] != 0) gf = 0;
        for (int f = 0; f < 3; f++) begin
          int e;
          e = 0;
          for (int v = 0; v < NV; v++) e += asg[v] * ref_stride(vcfg, f, v);
          check(int'(idx[f]) == e, $sformatf("table %0d step %0d factor %0d: %0d expected %0d", t, n, f, idx[f], e));
        end
        check(grp_first == gf, $sformatf("table %0d step %0d grp_first", t, n));
        check(last == (n == total), $sformatf("table %0d step %0d of %0d: last=%0d", t, n, total, last));
        if (last || n > total) break;
        step = 1; @(negedge clk); step = 0;
        n++;
        for (int v = 0; v < NV; v++) begin
          if (vcfg[v].pinned || ref_card(vcfg[v]) == 1) continue;
          if (asg[v] < ref_card(vcfg[v]) - 1) begin asg[v]++; break; end
          asg[v] = 0;
        end
      end
      check(n == total, $sformatf("table %0d: %0d assignments, expected %0d", t, n, total));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
