// Testbench of the channel estimator and sample selector. Samples with a
// known magnitude per pulse position (3, 21, 29, 11 on both rails, random
// signs) are fed for each link-quality setting; the kept positions must be
// the nsel most energetic ones (2; 2,1; 2,1,3; all), nsel must follow the
// thresholds and rate_force must override them. The done flag must come exactly
// two clocks after the last of the 2 x 64 accumulated samples.
module tb_zb_chan_est;
  import zb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, done;
  sample_t ci, cq;
  logic [5:0] pos = 0;
  logic [7:0] link_quality, thr_25 = 88, thr_50 = 70, thr_75 = 55;
  logic [2:0] rate_force = 0, nsel;
  logic [3:0] mask;
  zb_chan_est dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #(2000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int amp [4] = '{3, 21, 29, 11};
  task automatic trial(input int lq, input int force_n, input int exp_n, input logic [3:0] exp_mask);
    int n, last_acc;
    link_quality = 8'(lq); rate_force = 3'(force_n);
    start = 1; @(posedge clk); #1; start = 0;
    n = 0; last_acc = -1;
    while (!done) begin
      int a, b;
      a = amp[pos % 4]; b = amp[(pos + 62) % 4];
      ci = sample_t'($urandom_range(1) ? a : -a);
      cq = sample_t'($urandom_range(1) ? b : -b);
      in_valid = 1; @(posedge clk); #1; n++;
      if (dut.st == 2'd3 && last_acc < 0) last_acc = n;
      pos = pos + 6'd1;
    end
    check(n - last_acc == 1, $sformatf("done %0d clocks after accumulation", n - last_acc + 1));
    check(nsel == 3'(exp_n), $sformatf("lq %0d force %0d: nsel %0d expected %0d", lq, force_n, nsel, exp_n));
    check(mask == exp_mask, $sformatf("mask %b expected %b", mask, exp_mask));
    in_valid = 0;
    repeat (3) @(posedge clk); #1;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    pos = 6'd17;
    trial(95, 0, 1, 4'b0100);
    trial(80, 0, 2, 4'b0110);
    trial(60, 0, 3, 4'b1110);
    trial(10, 0, 4, 4'b1111);
    trial(95, 3, 3, 4'b1110);
    trial(10, 1, 1, 4'b0100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
