// Self-checking testbench of the Zigbee digital baseband.
// Four packets go through the transmitter/ADC model: a clean packet in
// automatic rate mode (expects 25 % sampling on the pulse peak), a noisy
// packet with both rails inverted at forced 100 %, one at forced 50 %
// without noise (expects the two central sample positions; positions 1
// and 3 hold equal energy, and the lower one wins the tie), and one in receive-forever
// mode. Octets, frame length, the selection mask, the processed-sample
// count and the 250 kb/s octet spacing (128 samples) are checked.
module tb_zb_dbb;
  import zb_pkg::*;
  import zb_tx_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, rx_infinite, adc_valid;
  logic [30:0] therm_i, therm_q;
  logic [11:0] ed_threshold;
  logic [7:0] thr_25, thr_50, thr_75;
  logic [2:0] rate_force;
  dbb_state_t state;
  logic [3:0] sample_en;
  logic [2:0] nsel;
  logic [7:0] link_quality;
  logic sym_valid, sfd_found, byte_valid, frame_done;
  logic [3:0] sym;
  logic [6:0] frame_len;
  logic [7:0] byte_data;
  logic [1:0] samples_used;

  zb_dbb dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(20_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned got [$];
  int byte_t [$];
  int used_cnt = 0, t_now = 0;
  bit sfd_seen, fdone_seen;
  int fdone_len;
  logic [3:0] pay_mask;

  always @(posedge clk) if (rst_n) begin
    if (byte_valid) begin got.push_back(byte_data); byte_t.push_back(t_now); end
    if (sfd_found) sfd_seen = 1;
    if (frame_done) begin fdone_seen = 1; fdone_len = frame_len; end
    if (state == ST_PAYLOAD) begin used_cnt += samples_used; pay_mask = sample_en; end
  end

  task automatic send(input byte unsigned pl [], input int amp, input int nz,
                      input bit inv_i, input bit inv_q, input int extra);
    int syms [];
    real vi, vq;
    build_ppdu(pl, syms);
    got.delete(); byte_t.delete(); used_cnt = 0; sfd_seen = 0; fdone_seen = 0;
    for (int t = -40; t < syms.size()*64 + 8 + extra; t++) begin
      vi = amp * rail_value(syms, t, 0) + noise(nz);
      vq = amp * rail_value(syms, t, 1) + noise(nz);
      if (inv_i) vi = -vi;
      if (inv_q) vq = -vq;
      therm_i = adc(vi); therm_q = adc(vq);
      adc_valid = 1; t_now = t;
      @(posedge clk); #1;
    end
    adc_valid = 0;
    repeat (10) @(posedge clk);
    #1;
  endtask

  byte unsigned pl [];
  initial begin
    start = 0; rx_infinite = 0; adc_valid = 0; therm_i = adc(0); therm_q = adc(0);
    ed_threshold = 12'd150; thr_25 = 8'd88; thr_50 = 8'd70; thr_75 = 8'd55; rate_force = 0;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    start = 1;
    // 1: clean packet, automatic rate
    pl = '{8'h9, 8'hA5, 8'h3C, 8'hF0};
    send(pl, 28, 0, 0, 0, 0);
    check(sfd_seen, "sfd found (clean)");
    check(fdone_seen && fdone_len == 4, "frame_done with length 4");
    check(got.size() == 4, $sformatf("4 octets, got %0d", got.size()));
    for (int i = 0; i < got.size() && i < 4; i++) check(got[i] == pl[i], $sformatf("octet %0d %h", i, got[i]));
    check(link_quality >= 8'd88, $sformatf("clean link quality %0d", link_quality));
    check(nsel == 3'd1 && pay_mask == 4'b0100, $sformatf("25%% on peak: nsel %0d mask %b", nsel, pay_mask));
    for (int i = 1; i < byte_t.size(); i++) check(byte_t[i] - byte_t[i-1] == 128, "octet spacing 128 samples");
    // 2 symbols per octet, 16 pulses per rail per symbol, 1 sample per pulse, 2 rails
    check(used_cnt == 4 * 2 * 16 * 2, $sformatf("samples processed at 25%%: %0d", used_cnt));
    // 2: noisy, both rails inverted, forced full rate
    rate_force = 3'd4;
    pl = '{8'h12, 8'h34, 8'h56};
    send(pl, 22, 6, 1, 1, 0);
    check(got.size() == 3, $sformatf("3 octets inverted, got %0d", got.size()));
    for (int i = 0; i < got.size() && i < 3; i++) check(got[i] == pl[i], $sformatf("inv octet %0d %h", i, got[i]));
    check(nsel == 3'd4 && pay_mask == 4'hF, "forced 100%");
    check(used_cnt == 3 * 2 * 16 * 4 * 2, $sformatf("samples processed at 100%%: %0d", used_cnt));
    // 3: forced 50 %, I rail only inverted
    rate_force = 3'd2;
    pl = '{8'hDE, 8'hAD};
    send(pl, 26, 0, 1, 0, 0);
    check(got.size() == 2 && got[0] == 8'hDE && got[1] == 8'hAD, "50% octets");
    check(pay_mask == 4'b0110, $sformatf("50%% keeps samples 2 and 3: %b", pay_mask));
    // 4: receive-forever mode delivers octets past the frame length
    rate_force = 3'd0; rx_infinite = 1;
    pl = '{8'h11, 8'h22, 8'h33};
    send(pl, 28, 0, 0, 0, 0);
    check(got.size() >= 4, $sformatf("infinite mode octets %0d", got.size()));
    check(got.size() >= 3 && got[0] == 8'h03 && got[1] == 8'h11, "infinite mode starts with PHR");
    check(!fdone_seen, "no frame end in infinite mode");
    start = 0; @(posedge clk); #1;
    check(state == ST_IDLE, "start low returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
