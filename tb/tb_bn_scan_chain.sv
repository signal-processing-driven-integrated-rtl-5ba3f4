// Testbench of the scan chain. Random write and read frames (38 bits, LSB
// first: data, address, table select, write flag) are shifted in; on the
// update pulse the decoded access must match the frame. For reads the
// testbench returns a word from a model memory, and the data field of the
// next shift out must carry that word.
module tb_bn_scan_chain;
  import bn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic scan_en = 0, scan_in = 0, update = 0, scan_out, req, we, sel_cfg;
  logic [SAW-2:0] addr;
  logic [CFGW-1:0] wdata, rdata;
  bn_scan_chain dut (.*);
  localparam int FW = 1 + SAW + CFGW;
  logic [CFGW-1:0] mem [1 << (SAW - 1)];
  assign rdata = mem[addr];
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #(10000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic shift(input logic [FW-1:0] f, output logic [FW-1:0] o);
    for (int i = 0; i < FW; i++) begin
      @(negedge clk); scan_en = 1; scan_in = f[i]; o[i] = scan_out;
    end
    @(negedge clk); scan_en = 0;
  endtask
  initial begin
    logic [FW-1:0] f, o;
    logic [CFGW-1:0] expect_rd;
    bit pend;
    pend = 0;
    for (int i = 0; i < (1 << (SAW - 1)); i++) mem[i] = CFGW'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      f = {$urandom, $urandom};
      shift(f, o);
      if (pend) check(o[CFGW-1:0] == expect_rd, $sformatf("frame %0d: read data %h expected %h", n, o[CFGW-1:0], expect_rd));
      check(!req, "no access while idle");
      update = 1; #1;
      check(req && we == f[FW-1] && sel_cfg == f[FW-2] && addr == f[CFGW +: SAW-1] &&
            wdata == f[CFGW-1:0], $sformatf("frame %0d decode", n));
      pend = !f[FW-1];
      expect_rd = mem[f[CFGW +: SAW-1]];
      @(negedge clk); update = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
