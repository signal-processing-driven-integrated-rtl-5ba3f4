// Testbench of the despreader: each of the 16 chip sequences of the
// standard's table (held independently in the transmitter model) is sent
// clean and with up to 6 random chip errors; the decoded symbol and the
// Hamming distance are checked one clock after chips_valid.
module tb_zb_despreader;
  import zb_pkg::*;
  import zb_tx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic chips_valid = 0, sym_valid;
  logic [31:0] chips;
  logic [3:0] sym;
  logic [5:0] hdist;
  zb_despreader dut (.*);
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
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int s = 0; s < 16; s++) for (int e = 0; e <= 6; e++) begin
      logic [31:0] c;
      for (int i = 0; i < 32; i++) c[i] = chip(s, i);
      for (int k = 0; k < e; k++) c[(k * 5 + s) % 32] ^= 1'b1;
      chips = c; chips_valid = 1; @(posedge clk); #1; chips_valid = 0;
      check(sym_valid, "sym_valid one clock after chips_valid");
      check(sym == 4'(s), $sformatf("symbol %0d with %0d errors decoded as %0d", s, e, sym));
      check(hdist == 6'(e), $sformatf("distance %0d expected %0d", hdist, e));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
