// Self-checking testbench of the Bayesian-network factor accelerator.
// It loads the two factors of the textbook product example phi1(A,B) and
// phi2(B,C) (cardinalities 3, 2, 2) through the scan chain, then runs
//   1. the factor product phi3(A,B,C) = phi1 * phi2,
//   2. the marginalisation of B out of phi3,
//   3. the reduction of phi3 by the observation C = c1 and by C = c2,
//   4. the normalisation of the marginal,
// reads every result back through the scan chain and compares it with a
// reference computed here from the assignment indices (C fastest, as in
// the document's stride example). Probabilities are coded as
// u = round(-4*log2 p) clamped to 63. Cycle counts per operation are checked.
module tb_bn_accel;
  import bn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic scan_en = 0, scan_in = 0, scan_update = 0, scan_out, go = 0, busy, done;
  logic [15:0] result_entries;
  logic too_large;

  bn_accel dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(5_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int FW = 1 + SAW + CFGW;

  task automatic shift_frame(input logic [FW-1:0] f, output logic [CFGW-1:0] prev);
    scan_en = 1;
    for (int i = 0; i < FW; i++) begin
      scan_in = f[i];
      if (i < CFGW) prev[i] = scan_out;
      @(posedge clk); #1;
    end
    scan_en = 0;
  endtask

  task automatic access(input bit wr, input bit cfg, input int addr, input int data);
    logic [CFGW-1:0] dummy;
    shift_frame({wr, cfg, 12'(addr), 24'(data)}, dummy);
    scan_update = 1; @(posedge clk); #1; scan_update = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic read(input bit cfg, input int addr, output int data);
    logic [CFGW-1:0] d;
    access(0, cfg, addr, 0);
    shift_frame('0, d);    // unload the captured word
    data = int'(d);
  endtask

  function automatic int cost(input real p);
    real u;
    if (p <= 0.0) return 63;
    u = -4.0 * $ln(p) / $ln(2.0);
    if (u > 63.0) return 63;
    return int'(u);
  endfunction

  function automatic int clamp(input int v);
    return v < 0 ? 0 : v > 63 ? 63 : v;
  endfunction

  // reference log-add: min(a,b) - round(4*log2(1+2^(-|a-b|/4)))
  function automatic int ladd(input int a, input int b);
    int d, mn;
    mn = a < b ? a : b;
    d = a < b ? b - a : a - b;
    return mn - int'(4.0 * $ln(1.0 + 2.0 ** (-d / 4.0)) / $ln(2.0));
  endfunction

  // variable row: card, pin_val, pinned, elim, in_a, in_b, in_o
  function automatic int vrow(input int card, input int pv, input bit pin, input bit el,
                              input bit a, input bit b, input bit o);
    var_cfg_t v;
    v = '{card: 8'(card), pin_val: 8'(pv), pinned: pin, elim: el, in_a: a, in_b: b, in_o: o};
    return int'(v);
  endfunction

  task automatic configure(input op_t op, input int ba, input int bb, input int bo,
                           input int r0, input int r1, input int r2);
    access(1, 1, CFG_MODE, int'(op));
    access(1, 1, CFG_BASE_A, ba);
    access(1, 1, CFG_BASE_B, bb);
    access(1, 1, CFG_BASE_O, bo);
    access(1, 1, CFG_VAR0 + 0, r0);
    access(1, 1, CFG_VAR0 + 1, r1);
    access(1, 1, CFG_VAR0 + 2, r2);
    for (int v = 3; v < NV; v++) access(1, 1, CFG_VAR0 + v, vrow(1, 0, 0, 0, 0, 0, 0));
  endtask

  task automatic run(input int expect_cycles, input string what);
    int n;
    go = 1; @(posedge clk); #1; go = 0;
    n = 1;
    while (!done) begin @(posedge clk); #1; n++; end
    check(n == expect_cycles, $sformatf("%s cycles %0d expected %0d", what, n, expect_cycles));
    @(posedge clk); #1;
  endtask

  real p1 [6] = '{0.5, 0.8, 0.1, 0.0, 0.3, 0.9};   // phi1(A,B), B fastest
  real p2 [4] = '{0.5, 0.7, 0.1, 0.2};             // phi2(B,C), C fastest
  int  c1 [6], c2 [4], c3 [12], m [6], r [6], nm [6];
  int  d, tot;
  real psum;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; #1;
    for (int i = 0; i < 6; i++) begin c1[i] = cost(p1[i]); access(1, 0, i, c1[i]); end
    for (int i = 0; i < 4; i++) begin c2[i] = cost(p2[i]); access(1, 0, 16 + i, c2[i]); end
    read(0, 4, d); check(d == c1[4], "scan read-back of memory");
    read(1, CFG_MODE, d);

    // 1. product: v0 = C (2), v1 = B (2), v2 = A (3)
    configure(OP_PRODUCT, 0, 16, 32, vrow(2,0,0,0,0,1,1), vrow(2,0,0,0,1,1,1), vrow(3,0,0,0,1,0,1));
    read(1, CFG_VAR0 + 2, d); check(d == vrow(3,0,0,0,1,0,1), "scan read-back of table");
    // go, STRIDE, NV+1 stride clocks, LOAD, 2 per entry, DONE
    run(1 + 1 + NV + 1 + 1 + 2*12, "product");
    check(result_entries == 16'd12 && !too_large, "product result size 12");
    for (int a = 0; a < 3; a++) for (int b = 0; b < 2; b++) for (int c = 0; c < 2; c++) begin
      int e;
      e = c1[a*2+b] + c2[b*2+c]; if (e > 63) e = 63;
      c3[a*4+b*2+c] = e;
      read(0, 32 + a*4+b*2+c, d);
      check(d == e, $sformatf("phi3(a%0d,b%0d,c%0d)=%0d expected %0d", a+1, b+1, c+1, d, e));
    end

    // 2. marginalise B: result tau(A,C), C fastest
    configure(OP_MARGINAL, 32, 0, 64, vrow(2,0,0,0,1,0,1), vrow(2,0,0,1,1,0,0), vrow(3,0,0,0,1,0,1));
    run(1 + 1 + NV + 1 + 1 + 2*12, "marginal");
    for (int a = 0; a < 3; a++) for (int c = 0; c < 2; c++) begin
      m[a*2+c] = clamp(ladd(c3[a*4+c], c3[a*4+2+c]));
      read(0, 64 + a*2+c, d);
      check(d == m[a*2+c], $sformatf("tau(a%0d,c%0d)=%0d expected %0d", a+1, c+1, d, m[a*2+c]));
    end

    // 3. reduce by C = c1, then C = c2: result (A,B), B fastest
    for (int obs = 0; obs < 2; obs++) begin
      configure(OP_MARGINAL, 32, 0, 96, vrow(2,obs,1,0,1,0,0), vrow(2,0,0,0,1,0,1), vrow(3,0,0,0,1,0,1));
      run(1 + 1 + NV + 1 + 1 + 2*6, "reduction");
      for (int a = 0; a < 3; a++) for (int b = 0; b < 2; b++) begin
        read(0, 96 + a*2+b, d);
        check(d == c3[a*4+b*2+obs], $sformatf("reduced c%0d (a%0d,b%0d)=%0d", obs+1, a+1, b+1, d));
      end
    end

    // 4. normalise tau(A,C) into a new factor
    configure(OP_NORMALIZE, 64, 0, 128, vrow(2,0,0,0,1,0,1), vrow(3,0,0,0,1,0,1), vrow(1,0,0,0,0,0,0));
    run(1 + 1 + NV + 1 + 1 + 2*6 + 1 + 2*6, "normalize");
    tot = m[0];
    for (int i = 1; i < 6; i++) tot = ladd(tot, m[i]);
    psum = 0.0;
    for (int i = 0; i < 6; i++) begin
      nm[i] = clamp(m[i] - tot);
      read(0, 128 + i, d);
      check(d == nm[i], $sformatf("normalised entry %0d = %0d expected %0d", i, d, nm[i]));
      psum += 2.0 ** (-d / 4.0);
    end
    check(psum > 0.8 && psum < 1.25, $sformatf("normalised factor sums to %f", psum));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
