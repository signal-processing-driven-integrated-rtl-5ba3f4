// Testbench of the hard-decision chip detector. Random chip vectors are
// sent as half-sine pulses (I pulse k at positions 4k..4k+3, Q pulse k at
// 4k+2..4k+5) for several selection masks, with one position of each pulse
// corrupted by a large wrong-sign value that the mask excludes; the chips
// presented at position 1 of the following symbol must equal the vector
// sent. The used count must equal the number of enabled positions.
module tb_zb_chip_demod;
  import zb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, in_valid = 0, chips_valid;
  sample_t ci, cq;
  logic [5:0] pos;
  logic [3:0] mask;
  logic [31:0] chips;
  logic [1:0] used;
  zb_chip_demod dut (.*);
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
  int shape [4] = '{1, 20, 28, 20};
  logic [31:0] sent [$];
  int used_total = 0, nsym = 0, exp_used = 0;
  always @(posedge clk) if (rst_n) begin
    if (chips_valid) begin
      check(sent.size() > 0 && chips == sent[0], $sformatf("chips %h expected %h", chips, sent.size() ? sent[0] : 0));
      if (sent.size()) void'(sent.pop_front());
      nsym++;
    end
    used_total += used;
  end
  function automatic int val(input logic [31:0] c, input int idx, input int ph, input int bad);
    int v;
    v = shape[ph];
    if (ph == bad) v = 31;
    return (c[idx] ^ (ph == bad)) ? v : -v;
  endfunction
  initial begin
    logic [3:0] masks [4] = '{4'b0100, 4'b0110, 4'b1110, 4'b1111};
    int bads [4] = '{1, 3, 0, -1};
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int m = 0; m < 4; m++) begin
      logic [31:0] cur, prev;
      mask = masks[m]; enable = 1; used_total = 0; nsym = 0; exp_used = 0;
      prev = '0; cur = $urandom;
      for (int s = 0; s < 5; s++) begin
        sent.push_back(cur);
        for (int p = 0; p < 64; p++) begin
          int qi, qph;
          pos = 6'(p);
          ci = sample_t'(val(cur, 2*(p/4), p % 4, bads[m]));
          qph = (p + 62) % 4;
          qi = ((p + 62) % 64) / 4;
          cq = sample_t'(val(p < 2 ? prev : cur, 2*qi + 1, qph, bads[m]));
          in_valid = 1; exp_used += mask[p % 4] + mask[(p + 2) % 4];
          @(posedge clk); #1;
        end
        prev = cur; cur = $urandom;
      end
      // two more samples complete the last Q pulse
      for (int p = 0; p < 2; p++) begin
        pos = 6'(p); ci = 1; cq = sample_t'(val(prev, 31, (p + 62) % 4, bads[m]));
        in_valid = 1; exp_used += mask[p % 4] + mask[(p + 2) % 4];
        @(posedge clk); #1;
      end
      in_valid = 0; repeat (3) @(posedge clk); #1;
      check(nsym == 5, $sformatf("mask %b: %0d symbols", mask, nsym));
      check(used_total == exp_used, $sformatf("samples used %0d expected %0d", used_total, exp_used));
      sent.delete();
      enable = 0; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
