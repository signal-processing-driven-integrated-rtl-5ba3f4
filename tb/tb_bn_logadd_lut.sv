// Testbench of the log-domain adder. For every pair of costs 0..80 the
// output must equal min(a,b) - round(4*log2(1 + 2^(-|a-b|/4))), the exact
// log-space sum at quarter-bit resolution computed with real numbers; the
// check also covers negative partial sums down to -40.
module tb_bn_logadd_lut;
  import bn_pkg::*;
  `include "bn_tb_model.svh"
  acc_t a, b, s;
  bn_logadd_lut dut (.*);
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
    for (int i = -40; i <= 80; i++)
      for (int j = -40; j <= 80; j++) begin
        a = acc_t'(i); b = acc_t'(j); #1;
        check(int'(s) == ref_logadd(i, j), $sformatf("%0d (+) %0d = %0d, expected %0d", i, j, s, ref_logadd(i, j)));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
