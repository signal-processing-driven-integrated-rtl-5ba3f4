// Test-only model of an IEEE 802.15.4 2.45 GHz O-QPSK transmitter and of
// the receiver's flash ADC, used by the baseband testbenches.
//
// A PPDU (8 zero preamble symbols, SFD 0xA7, PHR, payload, each octet sent
// low nibble first) is spread with the chip table printed in the standard
// (written out here as strings, independently of the design's own table
// generator), mapped onto half-sine pulses with four samples per pulse
// (sin(pi*m/4), m = 0..3), the Q rail delayed by two samples, scaled,
// optionally inverted per rail, given uniform noise and quantised by a
// 5-bit flash ADC model: code = round((v+31)/2) clamped to 0..31, output as
// a 31-bit thermometer code.
package zb_tx_pkg;

  localparam string CHIP_TABLE [16] = '{
    "11011001110000110101001000101110", "11101101100111000011010100100010",
    "00101110110110011100001101010010", "00100010111011011001110000110101",
    "01010010001011101101100111000011", "00110101001000101110110110011100",
    "11000011010100100010111011011001", "10011100001101010010001011101101",
    "10001100100101100000011101111011", "10111000110010010110000001110111",
    "01111011100011001001011000000111", "01110111101110001100100101100000",
    "00000111011110111000110010010110", "01100000011101111011100011001001",
    "10010110000001110111101110001100", "11001001011000000111011110111000"};

  function automatic bit chip(input int sym, input int c);
    return CHIP_TABLE[sym][c] == "1";
  endfunction

  // Symbols of a PPDU carrying `payload`.
  function automatic void build_ppdu(input byte unsigned payload [], output int syms []);
    int n;
    n = 8 + 2 + 2 + 2 * payload.size();
    syms = new[n];
    for (int i = 0; i < 8; i++) syms[i] = 0;
    syms[8] = 7; syms[9] = 10;
    syms[10] = payload.size() & 15;
    syms[11] = (payload.size() >> 4) & 7;
    for (int b = 0; b < payload.size(); b++) begin
      syms[12 + 2*b]     = payload[b] & 15;
      syms[12 + 2*b + 1] = (payload[b] >> 4) & 15;
    end
  endfunction

  // Noise-free pulse sample of one rail at sample t (0 = first preamble sample).
  function automatic real rail_value(input int syms [], input int t, input bit q);
    int tt, p, m, s, c;
    real w;
    tt = q ? t - 2 : t;
    if (tt < 0) return 0.0;
    p = tt / 4; m = tt % 4;
    s = p / 16;
    if (s >= syms.size()) return 0.0;
    c = 2 * (p % 16) + (q ? 1 : 0);
    w = $sin(3.14159265358979 * m / 4.0);
    return chip(syms[s], c) ? w : -w;
  endfunction

  function automatic logic [30:0] adc(input real v);
    int code;
    logic [30:0] th;
    code = int'((v + 31.0) / 2.0);   // int'() rounds to nearest
    if (code < 0) code = 0;
    if (code > 31) code = 31;
    th = '0;
    for (int i = 0; i < 31; i++) th[i] = (i < code);
    return th;
  endfunction

  function automatic real noise(input int amp);
    if (amp == 0) return 0.0;
    return real'(int'($urandom_range(2*amp, 0)) - amp);
  endfunction

endpackage
