// Testbench of the baseband controller. The status inputs of the other
// blocks are driven by hand: detection, lock and estimation handshakes,
// then a symbol stream with leading zeros, the SFD pair 7, A, a length of
// three octets and the payload. The state sequence, the pulses, the
// assembled octets (low nibble first), the frame end and the rearm into
// DETECT are checked. Further cases: a false SFD half (7 then 3), the SFD
// timeout, a zero length, receive-forever mode and dropping start.
module tb_zb_dbb_ctrl;
  import zb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, rx_infinite = 0, detected = 0, locked = 0, ce_done = 0;
  logic sym_valid = 0;
  logic [3:0] sym = 0;
  dbb_state_t state;
  logic ed_enable, ed_clear, ts_search, ce_start, demod_enable, sfd_found;
  logic [6:0] frame_len;
  logic byte_valid, frame_done;
  logic [7:0] byte_data;
  zb_dbb_ctrl #(.SFD_TIMEOUT(16)) dut (.*);

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

  int n_sfd = 0, n_done = 0, n_clear = 0, n_search = 0, n_cest = 0;
  logic [7:0] got [$];
  always @(posedge clk) if (rst_n) begin
    if (sfd_found) n_sfd++;
    if (frame_done) n_done++;
    if (ed_clear) n_clear++;
    if (ts_search) n_search++;
    if (ce_start) n_cest++;
    if (byte_valid) got.push_back(byte_data);
  end

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask
  task automatic send(input logic [3:0] s);
    sym = s; sym_valid = 1; tick(); sym_valid = 0; tick(3);
  endtask
  // bring the controller from DETECT to SFD search
  task automatic acquire();
    check(state == ST_DETECT, $sformatf("in DETECT (state %0d)", state));
    check(ed_enable && !demod_enable, "detector enabled in DETECT");
    detected = 1; tick(); detected = 0; tick();
    check(state == ST_SYNC, "SYNC after detection");
    tick(2);
    locked = 1; tick(); locked = 0; tick();
    check(state == ST_CHEST, "CHEST after lock");
    tick(3);
    ce_done = 1; tick(); ce_done = 0; tick();
    check(state == ST_SFD && demod_enable, "SFD search after estimation");
  endtask

  initial begin
    tick(2); rst_n = 1; tick(2);
    check(state == ST_IDLE, "idle after reset");
    start = 1; tick(2);
    // frame 1: zeros, false half, SFD, length 3, payload 12 34 56
    acquire();
    send(0); send(0); send(7); send(3); send(0);
    check(state == ST_SFD && n_sfd == 0, "no SFD on 7,3");
    send(7); send(4'hA);
    check(n_sfd == 1 && state == ST_PHR, "SFD found, PHR next");
    send(3); send(0);
    check(frame_len == 7'd3 && state == ST_PAYLOAD, $sformatf("length %0d", frame_len));
    send(2); send(1); send(4); send(3); send(6); send(5);
    check(got.size() == 3 && got[0] == 8'h12 && got[1] == 8'h34 && got[2] == 8'h56,
          $sformatf("payload %p", got));
    check(n_done == 1, "frame_done once");
    check(state == ST_DETECT, "rearmed after frame");
    got.delete();
    // frame 2: SFD timeout
    acquire();
    for (int i = 0; i < 17; i++) send(0);
    check(state == ST_DETECT && n_sfd == 1, "SFD timeout returns to DETECT");
    // frame 3: zero length
    acquire();
    send(7); send(4'hA); send(0); send(0);
    check(n_done == 2 && state == ST_DETECT && got.size() == 0, "zero-length frame");
    // frame 4: receive forever
    rx_infinite = 1;
    acquire();
    send(7); send(4'hA);
    check(state == ST_PAYLOAD, "infinite mode skips PHR");
    for (int i = 0; i < 300; i++) send(4'(i));
    check(got.size() == 150 && state == ST_PAYLOAD && n_done == 2, "infinite mode never ends");
    check(got[149] == {4'(299), 4'(298)}, "last octet in infinite mode");
    start = 0; tick();
    check(state == ST_IDLE, "start low returns to IDLE");
    check(n_search == 4 && n_cest == 4, "one search and one estimation per frame");
    check(n_clear == 4, $sformatf("detector cleared on each DETECT entry (%0d)", n_clear));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
