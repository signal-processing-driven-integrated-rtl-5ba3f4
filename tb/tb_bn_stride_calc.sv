// Testbench of the stride calculator: for 200 random variable tables the
// strides, wrap steps, pinned-variable offsets and factor sizes must match
// a direct computation, and done must rise NV+1 clocks after start. One
// table with the maximum cardinality (code 0 = 256) is included.
module tb_bn_stride_calc;
  import bn_pkg::*;
  `include "bn_tb_model.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done;
  var_cfg_t vcfg [NV];
  logic [IW-1:0] stride [3][NV], wrap [3][NV], offset [3], size [3];
  bn_stride_calc dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #(10000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n;
      ref_random_cfg(vcfg, 1'b1);
      if (t == 0) begin
        vcfg[3].card = 8'd0; vcfg[3].in_a = 1; vcfg[3].in_o = 1; vcfg[3].pinned = 0;
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      check(n - 1 == NV + 1, $sformatf("done %0d clocks after start was taken", n - 1));
      for (int f = 0; f < 3; f++) begin
        check(int'(size[f]) == ref_size(vcfg, f), $sformatf("table %0d factor %0d size %0d expected %0d", t, f, size[f], ref_size(vcfg, f)));
        check(int'(offset[f]) == ref_offset(vcfg, f), $sformatf("table %0d factor %0d offset", t, f));
        for (int v = 0; v < NV; v++) begin
          check(int'(stride[f][v]) == ref_stride(vcfg, f, v), $sformatf("table %0d stride[%0d][%0d]", t, f, v));
          check(int'(wrap[f][v]) == ref_stride(vcfg, f, v) * (ref_card(vcfg[v]) - 1), $sformatf("table %0d wrap[%0d][%0d]", t, f, v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
