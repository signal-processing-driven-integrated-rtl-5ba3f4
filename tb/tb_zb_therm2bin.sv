// Testbench of the thermometer-to-binary encoder: clean thermometer codes
// for every level, codes with a bubble (a missing one below the top) and a
// sparkle (a stray one above it), all compared with the ones count and with
// the signed sample 2*code-31, one clock after in_valid.
module tb_zb_therm2bin;
  import zb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [30:0] therm;
  logic [4:0] code;
  sample_t sample;
  zb_therm2bin dut (.*);
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
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int lvl = 0; lvl <= 31; lvl++) for (int kind = 0; kind < 3; kind++) begin
      int ones;
      therm = '0;
      for (int i = 0; i < 31; i++) therm[i] = (i < lvl);
      if (kind == 1 && lvl >= 3) therm[lvl-2] = 1'b0;      // bubble
      if (kind == 2 && lvl <= 28) therm[lvl+2] = 1'b1;     // sparkle
      ones = $countones(therm);
      in_valid = 1; @(posedge clk); #1; in_valid = 0;
      check(out_valid, "valid after one clock");
      check(code == 5'(ones), $sformatf("level %0d kind %0d code %0d", lvl, kind, code));
      check(int'(sample) == 2*ones - 31, $sformatf("sample %0d", sample));
      @(posedge clk); #1;
      check(!out_valid, "valid is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
