// Testbench of the channel sequencer. A run of K coefficients is started
// with a stand-in code generator (code = parity of n and row). On every
// clock the testbench checks that exactly one S/H samples, the one of
// channel (n/4)%3 and position n%4, with the polarity of the code; that a
// channel integrates for exactly INT_CYC clocks after each of its sampling
// windows; that adc_conv comes SETTLE clocks after the summing amplifier
// is connected; that each coefficient takes 64+INT_CYC+SETTLE+1 clocks;
// and that K conversions, K-1 row requests and one done pulse (on the
// clock busy falls) occur.
module tb_wht_channel_fsm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, walsh_neg;
  logic [6:0] k_coefs = 0;
  logic [5:0] row = 0, n, coef_row;
  logic [11:0] sh_sample;
  logic sh_neg, sum_en, adc_conv, int_reset, next_row, busy, done;
  logic [2:0] integ;
  wht_channel_fsm #(.N(64), .NCH(3), .NSH(4), .INT_CYC(8), .SETTLE(32)) dut (.*);
  assign walsh_neg = ^(n & row) ^ row[0];
  always @(posedge clk) if (rst_n && next_row) row <= row + 6'd7;
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
    int kk [3] = '{1, 5, 26};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int n_conv, n_next, n_done, n_clk, n_samp, last_conv, sum_run;
      int int_run [3];
      bit per_ok, int_ok, settle_ok, samp_ok;
      n_conv = 0; n_next = 0; n_done = 0; n_clk = 0; n_samp = 0; last_conv = 0;
      sum_run = 0; per_ok = 1; int_ok = 1; settle_ok = 1; samp_ok = 1;
      int_run = '{0, 0, 0};
      @(negedge clk); k_coefs = 7'(kk[t]); start = 1; @(negedge clk); start = 0;
      while (busy && n_clk < 10000) begin
        n_clk++;
        if (sh_sample != 0) begin
          n_samp++;
          if (sh_sample != 12'(1) << (((n / 4) % 3) * 4 + n % 4) || sh_neg != walsh_neg) samp_ok = 0;
        end
        for (int c = 0; c < 3; c++) begin
          if (integ[c]) int_run[c]++;
          else begin
            if (int_run[c] != 0 && int_run[c] != 8) int_ok = 0;
            int_run[c] = 0;
          end
        end
        if (sum_en) sum_run++;
        if (adc_conv) begin
          if (sum_run != 32) settle_ok = 0;
          sum_run = 0;
          if (n_conv > 0 && n_clk - last_conv != 105) per_ok = 0;
          if (!int_reset) settle_ok = 0;
          last_conv = n_clk;
          n_conv++;
        end
        if (next_row) n_next++;
        if (done) n_done++;
        @(negedge clk);
      end
      if (done) n_done++;   // done is registered with the return to idle
      check(samp_ok, "S/H selection and polarity follow n and the code");
      check(n_samp == 64 * kk[t], $sformatf("%0d sampling clocks", n_samp));
      check(int_ok, "integration windows of 8 clocks");
      check(settle_ok, "32 settling clocks before each conversion, then reset");
      check(per_ok, "105 clocks per coefficient");
      check(n_conv == kk[t], $sformatf("K=%0d: %0d conversions", kk[t], n_conv));
      check(n_next == kk[t] - 1 || n_next == kk[t], $sformatf("%0d row requests", n_next));
      check(n_done == 1, "one done pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
