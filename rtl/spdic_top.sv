// Top level holding the three energy-constrained signal-processing
// designs side by side. They do not share logic or clocks:
//  * zb_*  the adaptive-sampling digital baseband of a 2.4 GHz IEEE
//          802.15.4 receiver (4 MS/s flash-ADC samples in, octets out);
//  * bn_*  the Bayesian-network factor accelerator (scan chain in/out);
//  * wht_* the digital control of the 64-point Walsh-Hadamard
//          compressed-sensing front end (control strobes to the analog
//          S/H, integrator, summing amplifier and ADC circuits).
// Analog parts (RF front end, flash ADC, S/H network, integrators) are
// outside; their digital signals are the ports of this module.
module spdic_top
  import zb_pkg::*;
  import bn_pkg::*;
(
  // Zigbee receiver baseband
  input  logic        zb_clk,
  input  logic        zb_rst_n,
  input  logic        zb_start,
  input  logic        zb_rx_infinite,
  input  logic        zb_adc_valid,
  input  logic [30:0] zb_therm_i,
  input  logic [30:0] zb_therm_q,
  input  logic [11:0] zb_ed_threshold,
  input  logic [7:0]  zb_thr_25,
  input  logic [7:0]  zb_thr_50,
  input  logic [7:0]  zb_thr_75,
  input  logic [2:0]  zb_rate_force,
  output dbb_state_t  zb_state,
  output logic [3:0]  zb_sample_en,
  output logic [2:0]  zb_nsel,
  output logic [7:0]  zb_link_quality,
  output logic        zb_sym_valid,
  output logic [3:0]  zb_sym,
  output logic        zb_sfd_found,
  output logic [6:0]  zb_frame_len,
  output logic        zb_byte_valid,
  output logic [7:0]  zb_byte_data,
  output logic        zb_frame_done,
  output logic [1:0]  zb_samples_used,
  // Bayesian accelerator
  input  logic        bn_clk,
  input  logic        bn_rst_n,
  input  logic        bn_scan_en,
  input  logic        bn_scan_in,
  input  logic        bn_scan_update,
  output logic        bn_scan_out,
  input  logic        bn_go,
  output logic        bn_busy,
  output logic        bn_done,
  output logic [15:0] bn_result_entries,
  output logic        bn_too_large,
  // WHT front-end control
  input  logic        wht_clk,
  input  logic        wht_rst_n,
  input  logic        wht_start,
  input  logic [5:0]  wht_seed,
  input  logic [6:0]  wht_k_coefs,
  input  logic [6:0]  wht_cal_code_in,
  input  logic        wht_cal_load,
  output logic [11:0] wht_sh_sample,
  output logic        wht_sh_neg,
  output logic [2:0]  wht_integ,
  output logic [2:0]  wht_cal_dac_en,
  output logic [6:0]  wht_cal_dac_code,
  output logic        wht_sum_en,
  output logic        wht_adc_conv,
  output logic        wht_int_reset,
  output logic [5:0]  wht_coef_row,
  output logic        wht_busy,
  output logic        wht_done
);

  zb_dbb u_zb (
    .clk(zb_clk), .rst_n(zb_rst_n), .start(zb_start), .rx_infinite(zb_rx_infinite),
    .adc_valid(zb_adc_valid), .therm_i(zb_therm_i), .therm_q(zb_therm_q),
    .ed_threshold(zb_ed_threshold), .thr_25(zb_thr_25), .thr_50(zb_thr_50),
    .thr_75(zb_thr_75), .rate_force(zb_rate_force), .state(zb_state),
    .sample_en(zb_sample_en), .nsel(zb_nsel), .link_quality(zb_link_quality),
    .sym_valid(zb_sym_valid), .sym(zb_sym), .sfd_found(zb_sfd_found),
    .frame_len(zb_frame_len), .byte_valid(zb_byte_valid), .byte_data(zb_byte_data),
    .frame_done(zb_frame_done), .samples_used(zb_samples_used));

  bn_accel u_bn (
    .clk(bn_clk), .rst_n(bn_rst_n), .scan_en(bn_scan_en), .scan_in(bn_scan_in),
    .scan_update(bn_scan_update), .scan_out(bn_scan_out), .go(bn_go),
    .busy(bn_busy), .done(bn_done), .result_entries(bn_result_entries),
    .too_large(bn_too_large));

  wht_ctrl u_wht (
    .clk(wht_clk), .rst_n(wht_rst_n), .start(wht_start), .seed(wht_seed),
    .k_coefs(wht_k_coefs), .cal_code_in(wht_cal_code_in), .cal_load(wht_cal_load),
    .sh_sample(wht_sh_sample), .sh_neg(wht_sh_neg), .integ(wht_integ),
    .cal_dac_en(wht_cal_dac_en), .cal_dac_code(wht_cal_dac_code),
    .sum_en(wht_sum_en), .adc_conv(wht_adc_conv), .int_reset(wht_int_reset),
    .coef_row(wht_coef_row), .busy(wht_busy), .done(wht_done));

endmodule
