// Testbench of the product unit: for all 64 x 64 cost pairs the output
// must be the sum of the costs, saturated at 63 (probability zero).
module tb_bn_product_unit;
  import bn_pkg::*;
  cost_t a, b, p;
  bn_product_unit dut (.*);
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
  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int e;
        a = cost_t'(i); b = cost_t'(j); #1;
        e = (i + j > 63) ? 63 : i + j;
        check(int'(p) == e, $sformatf("%0d + %0d = %0d, expected %0d", i, j, p, e));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
