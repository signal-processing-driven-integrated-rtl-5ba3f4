// Testbench of the per-rail polarity (carrier phase) corrector: every
// sample value with each combination of the two inversion flags.
module tb_zb_phase_corr;
  import zb_pkg::*;
  logic neg_i, neg_q;
  sample_t si, sq, ci, cq;
  zb_phase_corr dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #(100000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int f = 0; f < 4; f++) for (int v = -31; v <= 31; v += 2) begin
      {neg_i, neg_q} = 2'(f);
      si = sample_t'(v); sq = sample_t'(-v);
      #1;
      check(int'(ci) == (neg_i ? -v : v), "I corrected");
      check(int'(cq) == (neg_q ? v : -v), "Q corrected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
