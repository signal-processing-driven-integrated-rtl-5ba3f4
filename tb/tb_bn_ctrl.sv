// Testbench of the accelerator control FSM. The stride unit and the
// counters are replaced by simple models (stride_done 4 clocks after
// stride_start; last after E steps). For each mode and several E the
// number of writes, of unit operations and of clocks from go to done are
// checked: product E writes, marginal E writes and E read-backs, normalise
// E accumulations then E writes with the total latched from the unit.
module tb_bn_ctrl;
  import bn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic go = 0, stride_done = 0, last, grp_first = 0;
  op_t mode = OP_PRODUCT;
  acc_t mu_sum = 11'sd17, norm_sum;
  logic busy, done, stride_start, cnt_load, cnt_step, mem_we, wsel_product;
  logic mu_valid, mu_first, mu_total, rd_b_result, norm_apply;
  bn_ctrl dut (.*);
  int cnt, E, sdly;
  assign last = (cnt == E);
  always @(posedge clk) begin
    if (cnt_load) cnt <= 1;
    else if (cnt_step) cnt <= cnt + 1;
    if (stride_start) begin sdly <= 4; stride_done <= 0; end
    else if (sdly > 0) begin sdly <= sdly - 1; if (sdly == 1) stride_done <= 1; end
  end
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
    op_t modes [3] = '{OP_PRODUCT, OP_MARGINAL, OP_NORMALIZE};
    int es [4] = '{1, 2, 7, 30};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int k = 0; k < 4; k++) begin
        int n_we, n_mu, n_clk, n_done, n_apply, n_first;
        bit sum_ok;
        mode = modes[m]; E = es[k];
        n_we = 0; n_mu = 0; n_clk = 0; n_done = 0; n_apply = 0; n_first = 0; sum_ok = 1;
        @(negedge clk); go = 1; @(negedge clk); go = 0;
        while (busy) begin
          n_clk++;
          if (mem_we) n_we++;
          if (mu_valid) n_mu++;
          if (mu_valid && mu_first) n_first++;
          if (done) n_done++;
          if (mem_we && norm_apply) begin n_apply++; if (norm_sum != mu_sum) sum_ok = 0; end
          if (n_clk > 1000) break;
          @(negedge clk);
        end
        check(n_done == 1, $sformatf("mode %0d E %0d: done pulses %0d", mode, E, n_done));
        check(n_we == E, $sformatf("mode %0d E %0d: %0d writes", mode, E, n_we));
        check(wsel_product == (mode == OP_PRODUCT) && rd_b_result == (mode == OP_MARGINAL), "datapath selects");
        case (mode)
          OP_PRODUCT:  check(n_mu == 0, "product does not use the unit");
          OP_MARGINAL: check(n_mu == E, "marginal uses the unit once per entry");
          default: begin
            check(n_mu == E && n_apply == E && sum_ok, "normalise: accumulate, then apply the total");
            check(n_first == 1, "normalise restarts the total once");
          end
        endcase
        // STRIDE + 4 clocks waiting for the stride model + LOAD + 2 per entry + DONE
        check(n_clk == 1 + 4 + 1 + 2*E + (mode == OP_NORMALIZE ? 1 + 2*E : 0) + 1,
              $sformatf("mode %0d E %0d: %0d clocks busy", mode, E, n_clk));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
