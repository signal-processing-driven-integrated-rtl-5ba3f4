// Testbench of the energy detector: the windowed energy is compared with a
// model sum of the last 16 magnitudes; detection must happen on the first
// sample whose window exceeds the threshold, only when enabled and armed,
// and the tail of a strong signal must not retrigger after a clear.
module tb_zb_energy_detect;
  import zb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, clear = 0, in_valid = 0, detected;
  sample_t si, sq;
  logic [11:0] threshold = 12'd200, energy;
  zb_energy_detect dut (.*);
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
  int mags [$];
  int model, first_det;
  task automatic push(input int a, input int b);
    si = sample_t'(a); sq = sample_t'(b);
    in_valid = 1; @(posedge clk); #1; in_valid = 0;
    mags.push_front((a < 0 ? -a : a) + (b < 0 ? -b : b));
    if (mags.size() > 16) void'(mags.pop_back());
    model = 0; foreach (mags[i]) model += mags[i];
    check(int'(energy) == model, $sformatf("energy %0d model %0d", energy, model));
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int i = 0; i < 20; i++) push(1, -1);
    check(!detected, "no detection while disabled and quiet");
    enable = 1;
    for (int i = 0; i < 10; i++) push(1, 1);
    check(!detected, "no detection on noise");
    first_det = -1;
    for (int i = 0; i < 20; i++) begin
      push(25, -25);
      if (detected && first_det < 0) first_det = i;
    end
    // energy exceeds 200 once (i+1)*50 + (15-i)*2 > 200: i = 3
    check(first_det == 3, $sformatf("detected at sample %0d", first_det));
    clear = 1; @(posedge clk); #1; clear = 0;
    for (int i = 0; i < 5; i++) push(25, 25);
    check(!detected, "strong tail does not retrigger after clear");
    for (int i = 0; i < 16; i++) push(1, 1);
    for (int i = 0; i < 5; i++) push(31, 31);
    check(detected, "new rising crossing detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
