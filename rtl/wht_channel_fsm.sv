// Sampling and integration sequencer of the three time-interleaved
// channels of the discrete-time Walsh-Hadamard front end.
//
// Each channel owns four differential sample-and-holds, twelve in all.
// The input is sampled at the Nyquist clock: sample n of the 64-point
// window goes to S/H (n mod 4) of channel (n div 4) mod 3, with the
// polarity given by the Walsh code (`sh_neg`). After its four sampling
// clocks a channel integrates its four held samples for INT_CYC = 8
// clocks, the next two four-clock slots, while the other two channels
// sample; each channel therefore cycles through SAMPLE and INTEGRATE with
// a period of 12 clocks (a shorter INT_CYC leaves it waiting for the rest
// of the period; INT_CYC must not exceed 8). When sample 63
// has been integrated the three channel outputs are connected to the
// summing amplifier for SETTLE clocks, then the sub-Nyquist ADC is
// told to convert (`adc_conv`) and the integrators are reset. That
// completes one Hadamard coefficient; K of them are computed one after the
// other (the series architecture, in which the input repeats), each with
// the Walsh row supplied on `row`. `next_row` asks for a new random row.
//
// Timing: one coefficient takes 64 + INT_CYC + SETTLE + 1 clocks. The
// 4-clock sampling windows, the channel rotation, the integration over the
// two following slots and the 32-clock settling follow the document; the
// single conversion
// clock, which also resets the integrators, is this design's choice.
module wht_channel_fsm #(
  parameter int unsigned N       = 64,   // points of the transform
  parameter int unsigned NCH     = 3,    // interleaved channels
  parameter int unsigned NSH     = 4,    // S/H circuits per channel
  parameter int unsigned INT_CYC = 8,    // integration clocks
  parameter int unsigned SETTLE  = 32    // output settling clocks
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [6:0]             k_coefs,   // coefficients per run (1..N)
  input  logic                   walsh_neg, // Walsh code at sample n
  input  logic [5:0]             row,       // Walsh row in use
  output logic [5:0]             n,         // sample index for the code generator
  output logic [NCH*NSH-1:0]     sh_sample, // S/H that samples this clock
  output logic                   sh_neg,    // crossed (inverting) connection
  output logic [NCH-1:0]         integ,     // channel integrating
  output logic                   sum_en,    // channels on the summing amplifier
  output logic                   adc_conv,  // convert the settled coefficient
  output logic                   int_reset, // discharge the integrators
  output logic [5:0]             coef_row,  // row of the converted coefficient
  output logic                   next_row,  // request a new Walsh row
  output logic                   busy,
  output logic                   done
);

  typedef enum logic [1:0] {P_IDLE, P_ACQ, P_SETTLE, P_CONV} phase_t;
  typedef enum logic [1:0] {CH_WAIT, CH_SAMPLE, CH_INT} ch_state_t;

  phase_t    ph;
  ch_state_t ch_st [NCH];
  logic [7:0] cyc;          // clock within the present phase
  logic [6:0] coefs_left;
  logic [3:0] ch_cnt [NCH];
  logic [1:0] cur_ch;

  assign busy = (ph != P_IDLE);
  assign n    = cyc[5:0];

  // which channel samples: (n div 4) mod 3
  always_comb begin
    cur_ch = 2'((int'(cyc[5:0]) / NSH) % NCH);
    sh_sample = '0;
    if (ph == P_ACQ && cyc < 8'(N))
      sh_sample[int'(cur_ch)*NSH + int'(cyc[1:0])] = 1'b1;
    sh_neg = (ph == P_ACQ && cyc < 8'(N)) ? walsh_neg : 1'b0;
    for (int c = 0; c < NCH; c++) integ[c] = (ch_st[c] == CH_INT);
  end

  assign sum_en    = (ph == P_SETTLE);
  assign adc_conv  = (ph == P_CONV);
  assign int_reset = (ph == P_CONV);
  assign next_row  = (ph == P_CONV) && (coefs_left != 7'd1);
  assign coef_row  = row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= P_IDLE; cyc <= '0; coefs_left <= '0; done <= 1'b0;
      for (int c = 0; c < NCH; c++) begin ch_st[c] <= CH_WAIT; ch_cnt[c] <= '0; end
    end else begin
      done <= 1'b0;
      // per-channel state machines
      for (int c = 0; c < NCH; c++) begin
        unique case (ch_st[c])
          CH_WAIT:
            if (ph == P_ACQ && cyc < 8'(N) && int'(cur_ch) == c && cyc[1:0] == 2'd0)
              ch_st[c] <= CH_SAMPLE;
          CH_SAMPLE:
            if (cyc[1:0] == 2'd3) begin ch_st[c] <= CH_INT; ch_cnt[c] <= '0; end
          CH_INT: begin
            ch_cnt[c] <= ch_cnt[c] + 4'd1;
            if (ch_cnt[c] == 4'(INT_CYC-1)) ch_st[c] <= CH_WAIT;
          end
          default: ch_st[c] <= CH_WAIT;
        endcase
        if (ph == P_IDLE) ch_st[c] <= CH_WAIT;
      end
      unique case (ph)
        P_IDLE: if (start) begin
          ph <= P_ACQ; cyc <= '0;
          coefs_left <= (k_coefs == 7'd0) ? 7'd1 : k_coefs;
        end
        P_ACQ: begin
          cyc <= cyc + 8'd1;
          if (cyc == 8'(N + INT_CYC - 1)) begin ph <= P_SETTLE; cyc <= '0; end
        end
        P_SETTLE: begin
          cyc <= cyc + 8'd1;
          if (cyc == 8'(SETTLE - 1)) begin ph <= P_CONV; cyc <= '0; end
        end
        P_CONV: begin
          cyc <= '0;
          coefs_left <= coefs_left - 7'd1;
          if (coefs_left == 7'd1) begin ph <= P_IDLE; done <= 1'b1; end
          else ph <= P_ACQ;
        end
        default: ph <= P_IDLE;
      endcase
    end
  end

endmodule
