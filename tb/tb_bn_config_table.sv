// Testbench of the configuration table: random words are written to all
// 24 rows and read back; the mode, base and variable-row outputs must
// decode them; writes while busy and writes past the last row must be
// ignored.
module tb_bn_config_table;
  import bn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy = 0, we = 0;
  logic [4:0] addr = 0;
  logic [CFGW-1:0] wdata = 0, rdata;
  op_t mode;
  logic [AW-1:0] base [3];
  var_cfg_t vcfg [NV];
  bn_config_table dut (.*);
  logic [CFGW-1:0] model [32];
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
  task automatic wr(input int a, input logic [CFGW-1:0] d);
    @(negedge clk); we = 1; addr = 5'(a); wdata = d;
    @(negedge clk); we = 0;
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 32; a++) model[a] = '0;
    for (int r = 0; r < 3; r++) begin
      for (int a = 0; a < CFG_WORDS; a++) begin
        model[a] = CFGW'($urandom);
        if (a == CFG_MODE) model[a][1:0] = 2'($urandom_range(2));
        wr(a, model[a]);
      end
      wr(30, 24'hFFFFFF);
      busy = 1;
      wr($urandom_range(CFG_WORDS - 1), 24'h123456);
      busy = 0;
      for (int a = 0; a < 32; a++) begin
        addr = 5'(a); #1;
        check(rdata == (a < CFG_WORDS ? model[a] : '0), $sformatf("read row %0d", a));
      end
      check(mode == op_t'(model[CFG_MODE][1:0]), "mode decode");
      for (int f = 0; f < 3; f++)
        check(base[f] == model[CFG_BASE_A + f][AW-1:0], $sformatf("base %0d", f));
      for (int v = 0; v < NV; v++)
        check(vcfg[v] == var_cfg_t'(model[CFG_VAR0 + v][VCW-1:0]), $sformatf("variable row %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
