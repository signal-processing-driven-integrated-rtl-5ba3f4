// Testbench of the random row generator: from every nonzero seed the
// sequence must follow x^6 + x^5 + 1 (checked against a software model),
// visit all 63 nonzero states and repeat after 63 steps. A zero seed must
// be replaced by 1, and the value must hold when step is low.
module tb_wht_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, step = 0;
  logic [5:0] seed = 0, value;
  wht_lfsr dut (.*);
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
    for (int s = 0; s < 64; s++) begin
      logic [5:0] m, first;
      bit seen [64];
      @(negedge clk); load = 1; seed = 6'(s); @(negedge clk); load = 0;
      m = (s == 0) ? 6'd1 : 6'(s);
      check(value == m, $sformatf("seed %0d loaded as %0d", s, value));
      first = value;
      foreach (seen[i]) seen[i] = 0;
      for (int i = 0; i < 63; i++) begin
        seen[value] = 1;
        step = 1; @(negedge clk); step = 0;
        m = {m[4:0], m[5] ^ m[4]};
        check(value == m && value != 0, $sformatf("seed %0d step %0d", s, i));
      end
      check(value == first, "period 63");
      for (int i = 1; i < 64; i++) check(seen[i], $sformatf("seed %0d state %0d visited", s, i));
      @(negedge clk);
      check(value == first, "holds without step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
