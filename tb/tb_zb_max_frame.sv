// Workload testbench of the receiver baseband: one IEEE 802.15.4 PPDU of
// the largest size (127 payload octets, 7-bit length field), random
// payload, Q rail inverted and light noise, at the automatic sampling
// rate. Every octet must be delivered, octets must come every 128 samples
// (250 kb/s at 4 MS/s per rail), and with a clean link only one sample in
// four per pulse must be processed.
module tb_zb_max_frame;
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
    #(50_000_000);
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
    int sym_cnt;
    start = 0; rx_infinite = 0; adc_valid = 0; therm_i = adc(0); therm_q = adc(0);
    ed_threshold = 12'd150; thr_25 = 8'd88; thr_50 = 8'd70; thr_75 = 8'd55; rate_force = 0;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    start = 1;
    pl = new [127];
    foreach (pl[i]) pl[i] = 8'($urandom);
    send(pl, 28, 1, 0, 1, 0);
    check(sfd_seen && fdone_seen && fdone_len == 127, $sformatf("frame of 127 octets ended (len %0d)", fdone_len));
    check(got.size() == 127, $sformatf("127 octets delivered, got %0d", got.size()));
    for (int i = 0; i < got.size() && i < 127; i++)
      check(got[i] == pl[i], $sformatf("octet %0d: %h expected %h", i, got[i], pl[i]));
    // 128 samples per octet at 4 MS/s = 32 us per 8 bits = 250 kb/s
    for (int i = 1; i < byte_t.size(); i++)
      check(byte_t[i] - byte_t[i-1] == 128, "octet every 128 samples (250 kb/s at 4 MS/s)");
    check(nsel == 3'd1 && pay_mask == 4'b0100, $sformatf("payload at 25%% sampling (nsel %0d)", nsel));
    check(used_cnt == 127 * 2 * 16 * 2, $sformatf("samples processed %0d of %0d", used_cnt, 127 * 2 * 64 * 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
