// End-to-end testbench of the complete chip top at its default
// parameters. The three designs run side by side on one testbench clock:
//  * Zigbee baseband: four 802.15.4 packets (clean at automatic rate, noisy
//    with both rails inverted at full rate, 50 % rate with the I rail
//    inverted, and receive-forever mode) built by the test transmitter
//    model and fed as thermometer-coded ADC words; decoded octets, the
//    sample selection and the processed-sample counts are checked.
//  * Bayesian accelerator: factors loaded through the scan chain, then a
//    product, a marginalisation, two reductions and a normalisation, each
//    result read back through the scan chain and compared with a
//    reference computed in the testbench.
//  * WHT front end: 26 coefficients of a random 64-sample input computed
//    by a behavioural model of the switched-capacitor channels driven by
//    the controller, compared with the exact Walsh-Hadamard products.
// Each mechanism is counted while it happens (energy detection, preamble
// lock, rail inversion, 25/50/100 % sampling, SFD, receive-forever
// octets, product, marginalisation, reduction, normalisation, WHT
// coefficients, random rows); a mechanism that never happens is a failure.
module tb_spdic_top;
  import zb_pkg::*;
  import zb_tx_pkg::*;
  import bn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(40_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit part_done [3] = '{0, 0, 0};
  int m_ops [string];
  int m_detect = 0, m_lock = 0, m_inv = 0, m_r25 = 0, m_r50 = 0, m_r100 = 0;
  int m_sfd = 0, m_inf = 0, m_coef = 0, m_rows = 0;
  dbb_state_t zb_state_q;
  logic [5:0] last_row;

  spdic_top dut (
    .zb_clk(clk), .zb_rst_n(rst_n), .bn_clk(clk), .bn_rst_n(rst_n),
    .wht_clk(clk), .wht_rst_n(rst_n), .*
  );

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    zb_state_q <= zb_state;
    if (zb_state_q == ST_DETECT && zb_state == ST_SYNC) m_detect++;
    if (zb_state_q == ST_SYNC && zb_state == ST_CHEST) begin
      m_lock++;
      if (dut.u_zb.neg_i || dut.u_zb.neg_q) m_inv++;
    end
    if (zb_sfd_found) m_sfd++;
    if (zb_byte_valid && zb_state == ST_PAYLOAD) begin
      if (zb_nsel == 3'd1) m_r25++;
      if (zb_nsel == 3'd2) m_r50++;
      if (zb_nsel == 3'd4) m_r100++;
      if (zb_rx_infinite) m_inf++;
    end
    if (wht_adc_conv) begin
      m_coef++;
      if (m_coef > 1 && wht_coef_row != last_row) m_rows++;
      last_row <= wht_coef_row;
    end
  end

  initial begin
    wait (part_done[0] && part_done[1] && part_done[2]);
    check(m_detect > 0, $sformatf("energy detections: %0d", m_detect));
    check(m_lock > 0, $sformatf("preamble locks: %0d", m_lock));
    check(m_inv > 0, $sformatf("rail inversions corrected: %0d", m_inv));
    check(m_r25 > 0, $sformatf("octets at 25%% sampling: %0d", m_r25));
    check(m_r50 > 0, $sformatf("octets at 50%% sampling: %0d", m_r50));
    check(m_r100 > 0, $sformatf("octets at 100%% sampling: %0d", m_r100));
    check(m_sfd > 0, $sformatf("SFDs found: %0d", m_sfd));
    check(m_inf > 0, $sformatf("receive-forever octets: %0d", m_inf));
    check(m_ops.exists("product"), "product operations");
    check(m_ops.exists("marginal"), "marginalisations");
    check(m_ops.exists("reduction"), "reductions");
    check(m_ops.exists("normalize"), "normalisations");
    check(m_coef > 0, $sformatf("WHT coefficients: %0d", m_coef));
    check(m_rows > 0, $sformatf("new random rows: %0d", m_rows));
    $display("mechanisms: detect %0d lock %0d invert %0d r25 %0d r50 %0d r100 %0d sfd %0d forever %0d coef %0d rows %0d",
             m_detect, m_lock, m_inv, m_r25, m_r50, m_r100, m_sfd, m_inf, m_coef, m_rows);
    foreach (m_ops[k]) $display("  accelerator %s: %0d", k, m_ops[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- Zigbee receiver stimulus ----

  logic zb_start, zb_rx_infinite, zb_adc_valid;
  logic [30:0] zb_therm_i, zb_therm_q;
  logic [11:0] zb_ed_threshold;
  logic [7:0] zb_thr_25, zb_thr_50, zb_thr_75;
  logic [2:0] zb_rate_force;
  dbb_state_t zb_state;
  logic [3:0] zb_sample_en;
  logic [2:0] zb_nsel;
  logic [7:0] zb_link_quality;
  logic zb_sym_valid, zb_sfd_found, zb_byte_valid, zb_frame_done;
  logic [3:0] zb_sym;
  logic [6:0] zb_frame_len;
  logic [7:0] zb_byte_data;
  logic [1:0] zb_samples_used;

  

  byte unsigned z_got [$];
  int z_byte_t [$];
  int z_used_cnt = 0, z_t_now = 0;
  bit z_sfd_seen, z_fdone_seen;
  int z_fdone_len;
  logic [3:0] z_pay_mask;

  always @(posedge clk) if (rst_n) begin
    if (zb_byte_valid) begin z_got.push_back(zb_byte_data); z_byte_t.push_back(z_t_now); end
    if (zb_sfd_found) z_sfd_seen = 1;
    if (zb_frame_done) begin z_fdone_seen = 1; z_fdone_len = zb_frame_len; end
    if (zb_state == ST_PAYLOAD) begin z_used_cnt += zb_samples_used; z_pay_mask = zb_sample_en; end
  end

  task automatic z_send(input byte unsigned z_pl [], input int amp, input int nz,
                      input bit inv_i, input bit inv_q, input int extra);
    int syms [];
    real vi, vq;
    build_ppdu(z_pl, syms);
    z_got.delete(); z_byte_t.delete(); z_used_cnt = 0; z_sfd_seen = 0; z_fdone_seen = 0;
    for (int t = -40; t < syms.size()*64 + 8 + extra; t++) begin
      vi = amp * rail_value(syms, t, 0) + noise(nz);
      vq = amp * rail_value(syms, t, 1) + noise(nz);
      if (inv_i) vi = -vi;
      if (inv_q) vq = -vq;
      zb_therm_i = adc(vi); zb_therm_q = adc(vq);
      zb_adc_valid = 1; z_t_now = t;
      @(posedge clk); #1;
    end
    zb_adc_valid = 0;
    repeat (10) @(posedge clk);
    #1;
  endtask

  byte unsigned z_pl [];
  initial begin
    zb_start = 0; zb_rx_infinite = 0; zb_adc_valid = 0; zb_therm_i = adc(0); zb_therm_q = adc(0);
    zb_ed_threshold = 12'd150; zb_thr_25 = 8'd88; zb_thr_50 = 8'd70; zb_thr_75 = 8'd55; zb_rate_force = 0;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    zb_start = 1;
    // 1: clean packet, automatic rate
    z_pl = '{8'h9, 8'hA5, 8'h3C, 8'hF0};
    z_send(z_pl, 28, 0, 0, 0, 0);
    check(z_sfd_seen, "sfd found (clean)");
    check(z_fdone_seen && z_fdone_len == 4, "zb_frame_done with length 4");
    check(z_got.size() == 4, $sformatf("4 octets, z_got %0d", z_got.size()));
    for (int i = 0; i < z_got.size() && i < 4; i++) check(z_got[i] == z_pl[i], $sformatf("octet %0d %h", i, z_got[i]));
    check(zb_link_quality >= 8'd88, $sformatf("clean link quality %0d", zb_link_quality));
    check(zb_nsel == 3'd1 && z_pay_mask == 4'b0100, $sformatf("25%% on peak: zb_nsel %0d mask %b", zb_nsel, z_pay_mask));
    for (int i = 1; i < z_byte_t.size(); i++) check(z_byte_t[i] - z_byte_t[i-1] == 128, "octet spacing 128 samples");
    // 2 symbols per octet, 16 pulses per rail per symbol, 1 sample per pulse, 2 rails
    check(z_used_cnt == 4 * 2 * 16 * 2, $sformatf("samples processed at 25%%: %0d", z_used_cnt));
    // 2: noisy, both rails inverted, forced full rate
    zb_rate_force = 3'd4;
    z_pl = '{8'h12, 8'h34, 8'h56};
    z_send(z_pl, 22, 6, 1, 1, 0);
    check(z_got.size() == 3, $sformatf("3 octets inverted, z_got %0d", z_got.size()));
    for (int i = 0; i < z_got.size() && i < 3; i++) check(z_got[i] == z_pl[i], $sformatf("inv octet %0d %h", i, z_got[i]));
    check(zb_nsel == 3'd4 && z_pay_mask == 4'hF, "forced 100%");
    check(z_used_cnt == 3 * 2 * 16 * 4 * 2, $sformatf("samples processed at 100%%: %0d", z_used_cnt));
    // 3: forced 50 %, I rail only inverted
    zb_rate_force = 3'd2;
    z_pl = '{8'hDE, 8'hAD};
    z_send(z_pl, 26, 0, 1, 0, 0);
    check(z_got.size() == 2 && z_got[0] == 8'hDE && z_got[1] == 8'hAD, "50% octets");
    check(z_pay_mask == 4'b0110, $sformatf("50%% keeps samples 2 and 3: %b", z_pay_mask));
    // 4: receive-forever mode delivers octets past the frame length
    zb_rate_force = 3'd0; zb_rx_infinite = 1;
    z_pl = '{8'h11, 8'h22, 8'h33};
    z_send(z_pl, 28, 0, 0, 0, 0);
    check(z_got.size() >= 4, $sformatf("infinite mode octets %0d", z_got.size()));
    check(z_got.size() >= 3 && z_got[0] == 8'h03 && z_got[1] == 8'h11, "infinite mode starts with PHR");
    check(!z_fdone_seen, "no frame end in infinite mode");
    zb_start = 0; @(posedge clk); #1;
    check(zb_state == ST_IDLE, "zb_start low returns to idle");
    part_done[0] = 1;
  end


  // ---- accelerator stimulus ----
  logic bn_scan_en = 0, bn_scan_in = 0, bn_scan_update = 0, bn_scan_out, bn_go = 0, bn_busy, bn_done;
  logic [15:0] bn_result_entries;
  logic bn_too_large;

  

  localparam int b_FW = 1 + SAW + CFGW;

  task automatic b_shift_frame(input logic [b_FW-1:0] f, output logic [CFGW-1:0] prev);
    bn_scan_en = 1;
    for (int i = 0; i < b_FW; i++) begin
      bn_scan_in = f[i];
      if (i < CFGW) prev[i] = bn_scan_out;
      @(posedge clk); #1;
    end
    bn_scan_en = 0;
  endtask

  task automatic b_access(input bit wr, input bit cfg, input int addr, input int data);
    logic [CFGW-1:0] dummy;
    b_shift_frame({wr, cfg, 12'(addr), 24'(data)}, dummy);
    bn_scan_update = 1; @(posedge clk); #1; bn_scan_update = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic b_read(input bit cfg, input int addr, output int data);
    logic [CFGW-1:0] b_d;
    b_access(0, cfg, addr, 0);
    b_shift_frame('0, b_d);    // unload the captured word
    data = int'(b_d);
  endtask

  function automatic int b_cost(input real p);
    real u;
    if (p <= 0.0) return 63;
    u = -4.0 * $ln(p) / $ln(2.0);
    if (u > 63.0) return 63;
    return int'(u);
  endfunction

  function automatic int b_clamp(input int v);
    return v < 0 ? 0 : v > 63 ? 63 : v;
  endfunction

  // reference log-add: min(a,b) - round(4*log2(1+2^(-|a-b|/4)))
  function automatic int b_ladd(input int a, input int b);
    int b_d, mn;
    mn = a < b ? a : b;
    b_d = a < b ? b - a : a - b;
    return mn - int'(4.0 * $ln(1.0 + 2.0 ** (-b_d / 4.0)) / $ln(2.0));
  endfunction

  // variable row: card, pin_val, pinned, elim, in_a, in_b, in_o
  function automatic int b_vrow(input int card, input int pv, input bit pin, input bit el,
                              input bit a, input bit b, input bit o);
    var_cfg_t v;
    v = '{card: 8'(card), pin_val: 8'(pv), pinned: pin, elim: el, in_a: a, in_b: b, in_o: o};
    return int'(v);
  endfunction

  task automatic b_configure(input op_t op, input int ba, input int bb, input int bo,
                           input int r0, input int r1, input int r2);
    b_access(1, 1, CFG_MODE, int'(op));
    b_access(1, 1, CFG_BASE_A, ba);
    b_access(1, 1, CFG_BASE_B, bb);
    b_access(1, 1, CFG_BASE_O, bo);
    b_access(1, 1, CFG_VAR0 + 0, r0);
    b_access(1, 1, CFG_VAR0 + 1, r1);
    b_access(1, 1, CFG_VAR0 + 2, r2);
    for (int v = 3; v < NV; v++) b_access(1, 1, CFG_VAR0 + v, b_vrow(1, 0, 0, 0, 0, 0, 0));
  endtask

  task automatic b_run(input int expect_cycles, input string what);
    int n;
    bn_go = 1; @(posedge clk); #1; bn_go = 0;
    n = 1;
    while (!bn_done) begin @(posedge clk); #1; n++; end
    if (n == expect_cycles) m_ops[what]++;
    check(n == expect_cycles, $sformatf("%s cycles %0d expected %0d", what, n, expect_cycles));
    @(posedge clk); #1;
  endtask

  real b_p1 [6] = '{0.5, 0.8, 0.1, 0.0, 0.3, 0.9};   // phi1(A,B), B fastest
  real b_p2 [4] = '{0.5, 0.7, 0.1, 0.2};             // phi2(B,C), C fastest
  int  b_c1 [6], b_c2 [4], b_c3 [12], b_m [6], b_r [6], b_nm [6];
  int  b_d, b_tot;
  real b_psum;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; #1;
    for (int i = 0; i < 6; i++) begin b_c1[i] = b_cost(b_p1[i]); b_access(1, 0, i, b_c1[i]); end
    for (int i = 0; i < 4; i++) begin b_c2[i] = b_cost(b_p2[i]); b_access(1, 0, 16 + i, b_c2[i]); end
    b_read(0, 4, b_d); check(b_d == b_c1[4], "scan b_read-back of memory");
    b_read(1, CFG_MODE, b_d);

    // 1. product: v0 = C (2), v1 = B (2), v2 = A (3)
    b_configure(OP_PRODUCT, 0, 16, 32, b_vrow(2,0,0,0,0,1,1), b_vrow(2,0,0,0,1,1,1), b_vrow(3,0,0,0,1,0,1));
    b_read(1, CFG_VAR0 + 2, b_d); check(b_d == b_vrow(3,0,0,0,1,0,1), "scan b_read-back of table");
    // bn_go, STRIDE, NV+1 stride clocks, LOAD, 2 per entry, DONE
    b_run(1 + 1 + NV + 1 + 1 + 2*12, "product");
    check(bn_result_entries == 16'd12 && !bn_too_large, "product result size 12");
    for (int a = 0; a < 3; a++) for (int b = 0; b < 2; b++) for (int c = 0; c < 2; c++) begin
      int e;
      e = b_c1[a*2+b] + b_c2[b*2+c]; if (e > 63) e = 63;
      b_c3[a*4+b*2+c] = e;
      b_read(0, 32 + a*4+b*2+c, b_d);
      check(b_d == e, $sformatf("phi3(a%0d,b%0d,c%0d)=%0d expected %0d", a+1, b+1, c+1, b_d, e));
    end

    // 2. marginalise B: result tau(A,C), C fastest
    b_configure(OP_MARGINAL, 32, 0, 64, b_vrow(2,0,0,0,1,0,1), b_vrow(2,0,0,1,1,0,0), b_vrow(3,0,0,0,1,0,1));
    b_run(1 + 1 + NV + 1 + 1 + 2*12, "marginal");
    for (int a = 0; a < 3; a++) for (int c = 0; c < 2; c++) begin
      b_m[a*2+c] = b_clamp(b_ladd(b_c3[a*4+c], b_c3[a*4+2+c]));
      b_read(0, 64 + a*2+c, b_d);
      check(b_d == b_m[a*2+c], $sformatf("tau(a%0d,c%0d)=%0d expected %0d", a+1, c+1, b_d, b_m[a*2+c]));
    end

    // 3. reduce by C = b_c1, then C = b_c2: result (A,B), B fastest
    for (int obs = 0; obs < 2; obs++) begin
      b_configure(OP_MARGINAL, 32, 0, 96, b_vrow(2,obs,1,0,1,0,0), b_vrow(2,0,0,0,1,0,1), b_vrow(3,0,0,0,1,0,1));
      b_run(1 + 1 + NV + 1 + 1 + 2*6, "reduction");
      for (int a = 0; a < 3; a++) for (int b = 0; b < 2; b++) begin
        b_read(0, 96 + a*2+b, b_d);
        check(b_d == b_c3[a*4+b*2+obs], $sformatf("reduced c%0d (a%0d,b%0d)=%0d", obs+1, a+1, b+1, b_d));
      end
    end

    // 4. normalise tau(A,C) into a new factor
    b_configure(OP_NORMALIZE, 64, 0, 128, b_vrow(2,0,0,0,1,0,1), b_vrow(3,0,0,0,1,0,1), b_vrow(1,0,0,0,0,0,0));
    b_run(1 + 1 + NV + 1 + 1 + 2*6 + 1 + 2*6, "normalize");
    b_tot = b_m[0];
    for (int i = 1; i < 6; i++) b_tot = b_ladd(b_tot, b_m[i]);
    b_psum = 0.0;
    for (int i = 0; i < 6; i++) begin
      b_nm[i] = b_clamp(b_m[i] - b_tot);
      b_read(0, 128 + i, b_d);
      check(b_d == b_nm[i], $sformatf("normalised entry %0d = %0d expected %0d", i, b_d, b_nm[i]));
      b_psum += 2.0 ** (-b_d / 4.0);
    end
    check(b_psum > 0.8 && b_psum < 1.25, $sformatf("normalised factor sums to %f", b_psum));
    part_done[1] = 1;
  end


  // ---- WHT front-end stimulus ----

  logic wht_start = 0, wht_cal_load = 0;
  logic [5:0] wht_seed;
  logic [6:0] wht_k_coefs, wht_cal_code_in;
  logic [11:0] wht_sh_sample;
  logic wht_sh_neg, wht_sum_en, wht_adc_conv, wht_int_reset, wht_busy, wht_done;
  logic [2:0] wht_integ, wht_cal_dac_en;
  logic [6:0] wht_cal_dac_code;
  logic [5:0] wht_coef_row;

  

  int w_x [64];
  int w_walsh [64][64];      // w_walsh[k][n] in {+1,-1}, k = number of sign changes
  int w_held [12];
  int w_integ_v [3];
  int w_sum_v, w_nsamp, w_ncoef, w_cyc, w_last_conv, w_integ_cnt [3], w_bad_onehot, w_bad_chan;
  bit w_seen_row [64];
  int w_rows [$];

  // natural Hadamard row h, sorted by sign changes
  initial begin
    for (int h = 0; h < 64; h++) begin
      int sc, v [64];
      for (int n = 0; n < 64; n++) v[n] = ($countones(6'(h) & 6'(n)) % 2) ? -1 : 1;
      sc = 0;
      for (int n = 1; n < 64; n++) if (v[n] != v[n-1]) sc++;
      for (int n = 0; n < 64; n++) w_walsh[sc][n] = v[n];
    end
  end

  always @(posedge clk) if (rst_n && wht_busy) begin
    w_cyc++;
    if (wht_sh_sample != 0) begin
      int idx;
      idx = -1;
      for (int i = 0; i < 12; i++) if (wht_sh_sample[i]) idx = i;
      if (!$onehot(wht_sh_sample)) w_bad_onehot++;
      if (idx / 4 != (w_nsamp / 4) % 3 || idx % 4 != w_nsamp % 4) w_bad_chan++;
      w_held[idx] = wht_sh_neg ? -w_x[w_nsamp] : w_x[w_nsamp];
      w_nsamp++;
    end
    for (int c = 0; c < 3; c++) if (wht_integ[c]) begin
      if (w_integ_cnt[c] % 8 == 0) for (int s = 0; s < 4; s++) w_integ_v[c] += w_held[c*4+s];
      w_integ_cnt[c]++;
    end
    if (wht_sum_en) w_sum_v = w_integ_v[0] + w_integ_v[1] + w_integ_v[2];
    if (wht_adc_conv) begin
      int ref_v;
      ref_v = 0;
      for (int n = 0; n < 64; n++) ref_v += w_x[n] * w_walsh[wht_coef_row][n];
      check(w_sum_v == ref_v, $sformatf("coef %0d row %0d: %0d expected %0d", w_ncoef, wht_coef_row, w_sum_v, ref_v));
      check(w_nsamp == 64, $sformatf("64 samples per coefficient, got %0d", w_nsamp));
      check(w_cyc - w_last_conv == 105, $sformatf("clocks per coefficient %0d", w_cyc - w_last_conv));
      check(!w_seen_row[wht_coef_row] && wht_coef_row != 0, "row drawn once");
      w_seen_row[wht_coef_row] = 1;
      w_rows.push_back(wht_coef_row);
      w_last_conv = w_cyc;
      w_ncoef++;
      w_nsamp = 0;
    end
    if (wht_int_reset) for (int c = 0; c < 3; c++) w_integ_v[c] = 0;
  end

  initial begin
    logic [5:0] l;
    for (int n = 0; n < 64; n++) w_x[n] = int'($urandom_range(200, 0)) - 100;
    for (int c = 0; c < 3; c++) begin w_integ_v[c] = 0; w_integ_cnt[c] = 0; end
    for (int i = 0; i < 12; i++) w_held[i] = 0;
    w_sum_v = 0; w_nsamp = 0; w_ncoef = 0; w_cyc = 0; w_last_conv = 0; w_bad_onehot = 0; w_bad_chan = 0;
    wht_seed = 6'd37; wht_k_coefs = 7'd0; wht_cal_code_in = 7'd90;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    wht_cal_load = 1; @(posedge clk); #1; wht_cal_load = 0;
    check(wht_cal_dac_code == 7'd90, "calibration code loaded");
    wht_start = 1; @(posedge clk); #1; wht_start = 0;
    wait (wht_done); @(posedge clk); #1;
    check(w_ncoef == 26, $sformatf("K = 26 coefficients, got %0d", w_ncoef));
    check(w_bad_onehot == 0 && w_bad_chan == 0, "S/H steering and channel rotation");
    // 64 samples = 16 windows: channel 1 gets 6, channels 2 and 3 get 5 each
    check(w_integ_cnt[0] == 26*6*8 && w_integ_cnt[1] == 26*5*8 && w_integ_cnt[2] == 26*5*8,
          $sformatf("integration clocks %0d %0d %0d", w_integ_cnt[0], w_integ_cnt[1], w_integ_cnt[2]));
    // row sequence follows the w_x^6 + w_x^5 + 1 LFSR from the wht_seed
    l = 6'd37;
    for (int i = 0; i < w_rows.size(); i++) begin
      check(w_rows[i] == l, $sformatf("row %0d is LFSR state %0d (got %0d)", i, l, w_rows[i]));
      l = {l[4:0], l[5] ^ l[4]};
    end
    check(wht_cal_dac_en == wht_integ, "DAC enabled with integration");
    part_done[2] = 1;
  end
endmodule
