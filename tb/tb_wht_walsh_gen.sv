// Testbench of the Walsh code generator. For all 64 rows of the 64-point
// transform the code must have exactly k sign changes for row k
// (sequency order), start with +1, and every pair of rows must be
// orthogonal, so the rows form a Walsh-Hadamard matrix.
module tb_wht_walsh_gen;
  logic [5:0] seq, n;
  logic neg;
  wht_walsh_gen #(.LOG2N(6)) dut (.*);
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
  int code [64][64];
  initial begin
    for (int k = 0; k < 64; k++) begin
      int changes;
      for (int i = 0; i < 64; i++) begin
        seq = 6'(k); n = 6'(i); #1;
        code[k][i] = neg ? -1 : 1;
      end
      changes = 0;
      for (int i = 1; i < 64; i++) if (code[k][i] != code[k][i-1]) changes++;
      check(changes == k, $sformatf("row %0d has %0d sign changes", k, changes));
      check(code[k][0] == 1, $sformatf("row %0d starts with +1", k));
    end
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        int dot;
        dot = 0;
        for (int i = 0; i < 64; i++) dot += code[a][i] * code[b][i];
        check(dot == (a == b ? 64 : 0), $sformatf("rows %0d and %0d: dot %0d", a, b, dot));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
