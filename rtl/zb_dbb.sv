// Digital baseband of the 2.45 GHz IEEE 802.15.4 (Zigbee) receiver with
// adaptive sampling.
//
// The I and Q flash ADCs deliver 31-bit thermometer codes at 4 MS/s, four
// samples per half-sine chip pulse on each rail. The baseband converts them
// to signed samples, detects the packet by its energy, finds symbol timing
// by correlating with the all-zero preamble, fixes the carrier phase, and
// learns from the preamble which sample positions of a pulse hold the most
// energy. From the link quality (the height of the preamble correlation
// peak) it then keeps 1, 2, 3 or 4 samples per pulse for the rest of the
// packet (25 to 100 % of the 2x Nyquist rate); `sample_en` tells the front
// end which positions are needed. Chips are detected by hard decision,
// despread to 4-bit symbols by minimum Hamming distance, and the SFD, the
// PHY header and the payload octets are extracted.
//
// Interface: one ADC sample pair per clock with adc_valid high (the clock
// may run faster than the sample rate). Octets leave on byte_valid.
// The structure follows the document; the widths, thresholds and
// handshakes are choices of this design, described in each sub-block.
module zb_dbb
  import zb_pkg::*;
#(
  parameter int unsigned ED_WIN      = 16,
  parameter int unsigned CE_SYMS     = 2,
  parameter int unsigned SFD_TIMEOUT = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        rx_infinite,
  input  logic        adc_valid,
  input  logic [30:0] therm_i,
  input  logic [30:0] therm_q,
  input  logic [11:0] ed_threshold,
  input  logic [7:0]  thr_25,
  input  logic [7:0]  thr_50,
  input  logic [7:0]  thr_75,
  input  logic [2:0]  rate_force,
  output dbb_state_t  state,
  output logic [3:0]  sample_en,
  output logic [2:0]  nsel,
  output logic [7:0]  link_quality,
  output logic        sym_valid,
  output logic [3:0]  sym,
  output logic        sfd_found,
  output logic [6:0]  frame_len,
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic        frame_done,
  output logic [1:0]  samples_used
);

  logic       s_valid, s_valid_q;
  sample_t    si, sq, ci, cq;
  logic [4:0] code_i, code_q;
  logic       ed_enable, ed_clear, detected;
  logic [11:0] energy;
  logic       ts_search, locked, neg_i, neg_q;
  logic [5:0] pos;
  logic [7:0] metric;
  logic       ce_start, ce_done;
  logic [3:0] mask;
  logic       demod_enable, chips_valid;
  logic [31:0] chips;
  logic [5:0] hdist;

  zb_therm2bin u_t2b_i (.clk, .rst_n, .in_valid(adc_valid), .therm(therm_i),
                        .out_valid(s_valid), .code(code_i), .sample(si));
  zb_therm2bin u_t2b_q (.clk, .rst_n, .in_valid(adc_valid), .therm(therm_q),
                        .out_valid(s_valid_q), .code(code_q), .sample(sq));

  zb_energy_detect #(.WIN(ED_WIN)) u_ed (
    .clk, .rst_n, .enable(ed_enable), .clear(ed_clear), .in_valid(s_valid),
    .si, .sq, .threshold(ed_threshold), .energy, .detected);

  zb_timing_sync u_ts (
    .clk, .rst_n, .search(ts_search), .in_valid(s_valid), .si, .sq,
    .locked, .pos, .peak_metric(link_quality), .neg_i, .neg_q, .metric);

  zb_phase_corr u_pc (.neg_i, .neg_q, .si, .sq, .ci, .cq);

  zb_chan_est #(.CE_SYMS(CE_SYMS)) u_ce (
    .clk, .rst_n, .start(ce_start), .in_valid(s_valid), .ci, .cq, .pos,
    .link_quality, .thr_25, .thr_50, .thr_75, .rate_force,
    .done(ce_done), .nsel, .mask);

  // Until a selection exists every sample position is needed.
  assign sample_en = demod_enable ? mask : 4'hF;

  zb_chip_demod u_cd (
    .clk, .rst_n, .enable(demod_enable), .in_valid(s_valid), .ci, .cq, .pos,
    .mask, .chips_valid, .chips, .used(samples_used));

  zb_despreader u_ds (.clk, .rst_n, .chips_valid, .chips, .sym_valid, .sym, .hdist(hdist));

  zb_dbb_ctrl #(.SFD_TIMEOUT(SFD_TIMEOUT)) u_ctrl (
    .clk, .rst_n, .start, .rx_infinite, .detected, .locked, .ce_done,
    .sym_valid, .sym, .state, .ed_enable, .ed_clear, .ts_search, .ce_start,
    .demod_enable, .sfd_found, .frame_len, .byte_valid, .byte_data, .frame_done);

endmodule
