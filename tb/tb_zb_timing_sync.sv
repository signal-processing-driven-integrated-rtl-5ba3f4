// Testbench of the preamble timing synchroniser: preambles from the
// transmitter model start at several sample offsets, with each rail
// inverted or not. After the one-symbol search the reported position must
// equal the true position of each sample in its symbol, the peak metric of
// a clean preamble must be the full 96, and the two inversion flags must
// match the applied inversions.
module tb_zb_timing_sync;
  import zb_pkg::*;
  import zb_tx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic search = 0, in_valid = 0, locked, neg_i, neg_q;
  sample_t si, sq;
  logic [5:0] pos;
  logic [7:0] peak_metric, metric;
  zb_timing_sync dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #(5000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int syms [];
  byte unsigned pl [];
  initial begin
    pl = new[0];
    build_ppdu(pl, syms);
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int trial = 0; trial < 8; trial++) begin
      int off, t;
      bit ii, iq;
      off = trial * 23 % 64; ii = trial[0]; iq = trial[1];
      t = -off - 70;
      // idle, then the preamble; search starts in the middle of symbol 1
      while (t < 64 + 17) begin
        real vi, vq;
        vi = 28 * rail_value(syms, t, 0); vq = 28 * rail_value(syms, t, 1);
        si = sample_t'(2 * int'((( ii ? -vi : vi) + 31.0) / 2.0) - 31);
        sq = sample_t'(2 * int'((( iq ? -vq : vq) + 31.0) / 2.0) - 31);
        in_valid = 1; @(posedge clk); #1; t++;
      end
      in_valid = 0; search = 1; @(posedge clk); #1; search = 0;
      for (int k = 0; k < 64 + 40; k++) begin
        real vi, vq;
        vi = 28 * rail_value(syms, t, 0); vq = 28 * rail_value(syms, t, 1);
        si = sample_t'(2 * int'((( ii ? -vi : vi) + 31.0) / 2.0) - 31);
        sq = sample_t'(2 * int'((( iq ? -vq : vq) + 31.0) / 2.0) - 31);
        in_valid = 1; #0;
        if (locked) check(int'(pos) == t % 64, $sformatf("trial %0d pos %0d true %0d", trial, pos, t % 64));
        @(posedge clk); #1; t++;
      end
      check(locked, "locked after one symbol");
      check(peak_metric == 8'd96, $sformatf("clean peak metric %0d", peak_metric));
      check(neg_i == ii && neg_q == iq, $sformatf("inversion flags %b%b expected %b%b", neg_i, neg_q, ii, iq));
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
