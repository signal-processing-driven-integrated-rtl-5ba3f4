// Digital control of the compressed-sensing Walsh-Hadamard front end for
// GHz sampling of ultra-wide-band pulses.
//
// A UWB pulse is sparse in time, so instead of digitising all N = 64
// Nyquist samples the front end computes K randomly chosen Hadamard
// coefficients (inner products of the input with Walsh rows) in the
// analog domain and converts only those, at 1/64 of the Nyquist rate.
// This block supplies the analog core with everything digital: a 6-bit
// LFSR draws the Walsh row, the Walsh generator gives the sign of each of
// the 64 samples, and the channel sequencer steers the twelve
// time-interleaved S/H circuits, the three integrators, the summing
// amplifier and the ADC. It also holds the 7-bit code of the current DAC
// that cancels the integrator overshoot; the DAC is enabled only while a
// channel integrates (its charge-transfer phase).
//
// Interface: `start` begins K coefficients with the row sequence seeded by
// `seed`; coef_row tells the recovery which row each converted value
// belongs to. Timing: 64 + 8 + 32 + 1 = 105 Nyquist clocks per
// coefficient.
module wht_ctrl #(
  parameter int unsigned K_DEFAULT = 26    // compressed measurements
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [5:0]  seed,
  input  logic [6:0]  k_coefs,      // 0: use K_DEFAULT
  input  logic [6:0]  cal_code_in,
  input  logic        cal_load,
  output logic [11:0] sh_sample,
  output logic        sh_neg,
  output logic [2:0]  integ,
  output logic [2:0]  cal_dac_en,
  output logic [6:0]  cal_dac_code,
  output logic        sum_en,
  output logic        adc_conv,
  output logic        int_reset,
  output logic [5:0]  coef_row,
  output logic        busy,
  output logic        done
);

  logic [5:0] row, n;
  logic       walsh_neg, next_row;

  wht_lfsr u_lfsr (.clk, .rst_n, .load(start && !busy), .seed, .step(next_row), .value(row));

  wht_walsh_gen u_wg (.seq(row), .n, .neg(walsh_neg));

  wht_channel_fsm u_fsm (
    .clk, .rst_n, .start(start && !busy),
    .k_coefs((k_coefs == 7'd0) ? 7'(K_DEFAULT) : k_coefs),
    .walsh_neg, .row, .n, .sh_sample, .sh_neg, .integ, .sum_en, .adc_conv,
    .int_reset, .coef_row, .next_row, .busy, .done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cal_dac_code <= 7'd64;
    else if (cal_load) cal_dac_code <= cal_code_in;
  end

  assign cal_dac_en = integ;

endmodule
