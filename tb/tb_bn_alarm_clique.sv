// Workload testbench of the factor accelerator at the size of the largest
// clique of the ALARM monitoring network: five variables with 144 joint
// assignments (4 x 3 x 3 x 2 x 2). Random log-domain factors phi1(A,B,C,D)
// and phi2(D,E) are loaded through the scan chain, multiplied into the
// 144-entry clique potential, summed onto the sepset (B,D) and the message
// is renormalised, as one step of clique-tree message passing. All results
// are read back and compared with a reference computed here, and the run
// time of each operation is checked (2 clocks per assignment).
module tb_bn_alarm_clique;
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
    #(20_000_000);
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
                           input int r0, input int r1, input int r2,
                           input int r3 = 0, input int r4 = 0);
    access(1, 1, CFG_MODE, int'(op));
    access(1, 1, CFG_BASE_A, ba);
    access(1, 1, CFG_BASE_B, bb);
    access(1, 1, CFG_BASE_O, bo);
    access(1, 1, CFG_VAR0 + 0, r0);
    access(1, 1, CFG_VAR0 + 1, r1);
    access(1, 1, CFG_VAR0 + 2, r2);
    access(1, 1, CFG_VAR0 + 3, r3 == 0 ? vrow(1, 0, 0, 0, 0, 0, 0) : r3);
    access(1, 1, CFG_VAR0 + 4, r4 == 0 ? vrow(1, 0, 0, 0, 0, 0, 0) : r4);
    for (int v = 5; v < NV; v++) access(1, 1, CFG_VAR0 + v, vrow(1, 0, 0, 0, 0, 0, 0));
  endtask

  task automatic run(input int expect_cycles, input string what);
    int n;
    go = 1; @(posedge clk); #1; go = 0;
    n = 1;
    while (!done) begin @(posedge clk); #1; n++; end
    check(n == expect_cycles, $sformatf("%s cycles %0d expected %0d", what, n, expect_cycles));
    @(posedge clk); #1;
  endtask

  // variables, fastest first: E(2) D(2) C(3) B(3) A(4); clique A..E = 144 entries
  localparam int CE = 2, CD = 2, CC = 3, CB = 3, CA = 4;
  int p1 [72], p2 [4], psi [144], msg [6], nmsg [6];
  int d, tot;
  real psum;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; #1;
    // phi1(A,B,C,D): D fastest; phi2(D,E): E fastest
    for (int i = 0; i < 72; i++) begin p1[i] = $urandom_range(40); access(1, 0, i, p1[i]); end
    for (int i = 0; i < 4; i++)  begin p2[i] = $urandom_range(20); access(1, 0, 200 + i, p2[i]); end

    // 1. clique potential psi(A,B,C,D,E) = phi1 * phi2
    configure(OP_PRODUCT, 0, 200, 300,
              vrow(CE,0,0,0,0,1,1), vrow(CD,0,0,0,1,1,1), vrow(CC,0,0,0,1,0,1),
              vrow(CB,0,0,0,1,0,1), vrow(CA,0,0,0,1,0,1));
    run(1 + 1 + NV + 1 + 1 + 2*144, "product to a 144-entry clique");
    check(result_entries == 16'd144 && !too_large, $sformatf("clique size %0d", result_entries));
    for (int a = 0; a < CA; a++) for (int b = 0; b < CB; b++) for (int c = 0; c < CC; c++)
      for (int dd = 0; dd < CD; dd++) for (int e = 0; e < CE; e++) begin
        int i1, i2, io, ev;
        i1 = dd + CD*(c + CC*(b + CB*a));
        i2 = e + CE*dd;
        io = e + CE*i1;
        ev = p1[i1] + p2[i2]; if (ev > 63) ev = 63;
        psi[io] = ev;
      end
    for (int i = 0; i < 144; i++) begin
      read(0, 300 + i, d);
      check(d == psi[i], $sformatf("psi[%0d] = %0d expected %0d", i, d, psi[i]));
    end

    // 2. message onto the sepset (B,D): sum out A, C and E
    configure(OP_MARGINAL, 300, 0, 500,
              vrow(CE,0,0,1,1,0,0), vrow(CD,0,0,0,1,0,1), vrow(CC,0,0,1,1,0,0),
              vrow(CB,0,0,0,1,0,1), vrow(CA,0,0,1,1,0,0));
    run(1 + 1 + NV + 1 + 1 + 2*144, "marginal of the clique");
    for (int b = 0; b < CB; b++) for (int dd = 0; dd < CD; dd++) begin
      bit first;
      int acc;
      first = 1;
      // same visiting order as the hardware: E fastest, then C, then A
      for (int a = 0; a < CA; a++) for (int c = 0; c < CC; c++) for (int e = 0; e < CE; e++) begin
        int v;
        v = psi[e + CE*(dd + CD*(c + CC*(b + CB*a)))];
        acc = first ? v : clamp(ladd(acc, v));
        first = 0;
      end
      msg[dd + CD*b] = acc;
    end
    for (int i = 0; i < 6; i++) begin
      read(0, 500 + i, d);
      check(d == msg[i], $sformatf("message[%0d] = %0d expected %0d", i, d, msg[i]));
    end

    // 3. renormalise the message
    configure(OP_NORMALIZE, 500, 0, 600,
              vrow(CD,0,0,0,1,0,1), vrow(CB,0,0,0,1,0,1), vrow(1,0,0,0,0,0,0));
    run(1 + 1 + NV + 1 + 1 + 2*6 + 1 + 2*6, "normalise the message");
    tot = msg[0];
    for (int i = 1; i < 6; i++) tot = ladd(tot, msg[i]);
    psum = 0.0;
    for (int i = 0; i < 6; i++) begin
      nmsg[i] = clamp(msg[i] - tot);
      read(0, 600 + i, d);
      check(d == nmsg[i], $sformatf("normalised message[%0d] = %0d expected %0d", i, d, nmsg[i]));
      psum += 2.0 ** (-d / 4.0);
    end
    check(psum > 0.75 && psum < 1.3, $sformatf("normalised message sums to %f", psum));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
