// Testbench of the factor memory: the whole 4K x 6 array is written with
// random data, then read through both ports at independent random
// addresses; each read must return the stored word one clock later. A
// read of the address being written must return the old value.
module tb_bn_factor_mem;
  import bn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] raddr_a = 0, raddr_b = 0, waddr = 0;
  cost_t rdata_a, rdata_b, wdata = 0;
  logic we = 0;
  bn_factor_mem dut (.*);
  cost_t model [1 << AW];
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
  initial begin
    @(negedge clk);
    for (int i = 0; i < (1 << AW); i++) begin
      model[i] = cost_t'($urandom);
      we = 1; waddr = AW'(i); wdata = model[i];
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      int a, b;
      a = $urandom_range((1 << AW) - 1); b = $urandom_range((1 << AW) - 1);
      raddr_a = AW'(a); raddr_b = AW'(b);
      if (n % 7 == 0) begin
        we = 1; waddr = AW'(a); wdata = ~model[a];
      end else we = 0;
      @(negedge clk);
      check(rdata_a == model[a], $sformatf("port A addr %0d", a));
      check(rdata_b == model[b] || (we && b == a), $sformatf("port B addr %0d", b));
      if (we) model[a] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
