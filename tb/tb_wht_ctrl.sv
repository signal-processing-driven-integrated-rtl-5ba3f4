// Self-checking testbench of the Walsh-Hadamard front-end control.
// A behavioural model of the analog core stands in for the S/H network,
// integrators and summing amplifier: each S/H holds +x[n] or -x[n] as
// steered by sh_neg, a channel's integrator adds its four held samples
// while `integ` is high, the summing amplifier adds the three channels,
// and adc_conv takes the coefficient. The input window x[0..63] repeats for
// every coefficient (series architecture). Each converted coefficient is
// compared with the inner product of x and the Walsh row named on coef_row,
// where the rows are built here by ordering the natural Hadamard rows by
// their number of sign changes. Also checked: K = 26 distinct rows, 105
// clocks per coefficient, one S/H per sampling clock, the channel
// rotation, 8 integration clocks per window and the calibration DAC code.
module tb_wht_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, cal_load = 0;
  logic [5:0] seed;
  logic [6:0] k_coefs, cal_code_in;
  logic [11:0] sh_sample;
  logic sh_neg, sum_en, adc_conv, int_reset, busy, done;
  logic [2:0] integ, cal_dac_en;
  logic [6:0] cal_dac_code;
  logic [5:0] coef_row;

  wht_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [64];
  int walsh [64][64];      // walsh[k][n] in {+1,-1}, k = number of sign changes
  int held [12];
  int integ_v [3];
  int sum_v, nsamp, ncoef, cyc, last_conv, integ_cnt [3], bad_onehot, bad_chan;
  bit seen_row [64];
  int rows [$];

  // natural Hadamard row h, sorted by sign changes
  initial begin
    for (int h = 0; h < 64; h++) begin
      int sc, v [64];
      for (int n = 0; n < 64; n++) v[n] = ($countones(6'(h) & 6'(n)) % 2) ? -1 : 1;
      sc = 0;
      for (int n = 1; n < 64; n++) if (v[n] != v[n-1]) sc++;
      for (int n = 0; n < 64; n++) walsh[sc][n] = v[n];
    end
  end

  always @(posedge clk) if (rst_n && busy) begin
    cyc++;
    if (sh_sample != 0) begin
      int idx;
      idx = -1;
      for (int i = 0; i < 12; i++) if (sh_sample[i]) idx = i;
      if (!$onehot(sh_sample)) bad_onehot++;
      if (idx / 4 != (nsamp / 4) % 3 || idx % 4 != nsamp % 4) bad_chan++;
      held[idx] = sh_neg ? -x[nsamp] : x[nsamp];
      nsamp++;
    end
    for (int c = 0; c < 3; c++) if (integ[c]) begin
      if (integ_cnt[c] % 8 == 0) for (int s = 0; s < 4; s++) integ_v[c] += held[c*4+s];
      integ_cnt[c]++;
    end
    if (sum_en) sum_v = integ_v[0] + integ_v[1] + integ_v[2];
    if (adc_conv) begin
      int ref_v;
      ref_v = 0;
      for (int n = 0; n < 64; n++) ref_v += x[n] * walsh[coef_row][n];
      check(sum_v == ref_v, $sformatf("coef %0d row %0d: %0d expected %0d", ncoef, coef_row, sum_v, ref_v));
      check(nsamp == 64, $sformatf("64 samples per coefficient, got %0d", nsamp));
      check(cyc - last_conv == 105, $sformatf("clocks per coefficient %0d", cyc - last_conv));
      check(!seen_row[coef_row] && coef_row != 0, "row drawn once");
      seen_row[coef_row] = 1;
      rows.push_back(coef_row);
      last_conv = cyc;
      ncoef++;
      nsamp = 0;
    end
    if (int_reset) for (int c = 0; c < 3; c++) integ_v[c] = 0;
  end

  initial begin
    logic [5:0] l;
    for (int n = 0; n < 64; n++) x[n] = int'($urandom_range(200, 0)) - 100;
    for (int c = 0; c < 3; c++) begin integ_v[c] = 0; integ_cnt[c] = 0; end
    for (int i = 0; i < 12; i++) held[i] = 0;
    sum_v = 0; nsamp = 0; ncoef = 0; cyc = 0; last_conv = 0; bad_onehot = 0; bad_chan = 0;
    seed = 6'd37; k_coefs = 7'd0; cal_code_in = 7'd90;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    cal_load = 1; @(posedge clk); #1; cal_load = 0;
    check(cal_dac_code == 7'd90, "calibration code loaded");
    start = 1; @(posedge clk); #1; start = 0;
    wait (done); @(posedge clk); #1;
    check(ncoef == 26, $sformatf("K = 26 coefficients, got %0d", ncoef));
    check(bad_onehot == 0 && bad_chan == 0, "S/H steering and channel rotation");
    // 64 samples = 16 windows: channel 1 gets 6, channels 2 and 3 get 5 each
    check(integ_cnt[0] == 26*6*8 && integ_cnt[1] == 26*5*8 && integ_cnt[2] == 26*5*8,
          $sformatf("integration clocks %0d %0d %0d", integ_cnt[0], integ_cnt[1], integ_cnt[2]));
    // row sequence follows the x^6 + x^5 + 1 LFSR from the seed
    l = 6'd37;
    for (int i = 0; i < rows.size(); i++) begin
      check(rows[i] == l, $sformatf("row %0d is LFSR state %0d (got %0d)", i, l, rows[i]));
      l = {l[4:0], l[5] ^ l[4]};
    end
    check(cal_dac_en == integ, "DAC enabled with integration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
