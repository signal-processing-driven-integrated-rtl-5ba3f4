// Channel template learning and adaptive sample selection.
//
// After timing lock the block accumulates, over CE_SYMS preamble symbols,
// the energy (magnitude sum) seen at each of the four sample positions of
// a half-sine pulse, for the I and Q rails together (the Q pulse starts two
// samples later, so its sample position is (pos-2) mod 4). The four
// positions are then ranked by energy, and the number of positions kept
// per pulse is chosen from the link quality: 1, 2, 3 or 4 samples, that is
// 25, 50, 75 or 100 % of the 2x Nyquist rate. The kept positions are those
// with the most energy, as in the document's example where samples two and
// three of the pulse are kept at 50 %. The selection mask also tells the
// front end which samples need converting.
//
// Link quality is compared with three programmable thresholds
// (thr_25 >= thr_50 >= thr_75): quality >= thr_25 keeps one sample, >=
// thr_50 two, >= thr_75 three, otherwise four. rate_force (1..4) overrides
// the choice; 0 selects the automatic mode. The energy measure, the tie
// rule (lower position wins) and the threshold scheme are choices of this
// design. `done` rises two clocks after the last accumulated sample, together
// with the registered nsel and mask.
module zb_chan_est
  import zb_pkg::*;
#(
  parameter int unsigned CE_SYMS = 2      // preamble symbols used for the template
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,        // pulse: learn from the next full symbol on
  input  logic       in_valid,
  input  sample_t    ci,
  input  sample_t    cq,
  input  logic [5:0] pos,
  input  logic [7:0] link_quality,
  input  logic [7:0] thr_25,
  input  logic [7:0] thr_50,
  input  logic [7:0] thr_75,
  input  logic [2:0] rate_force,
  output logic       done,
  output logic [2:0] nsel,         // samples kept per pulse, 1..4
  output logic [3:0] mask          // bit p: sample position p of a pulse is used
);

  typedef enum logic [1:0] {CE_IDLE, CE_WAIT, CE_ACC, CE_FIN} ce_state_t;
  ce_state_t st;

  logic [15:0] e [SPC];
  logic [15:0] left;
  logic [1:0]  ph_i, ph_q;
  logic [2:0]  n_auto, n_use;
  logic [3:0]  mask_c;

  function automatic logic [5:0] absval(input sample_t x);
    return x[SW-1] ? 6'(-x) : 6'(x);
  endfunction

  assign ph_i = pos[1:0];
  assign ph_q = pos[1:0] - 2'd2;

  always_comb begin
    if      (link_quality >= thr_25) n_auto = 3'd1;
    else if (link_quality >= thr_50) n_auto = 3'd2;
    else if (link_quality >= thr_75) n_auto = 3'd3;
    else                             n_auto = 3'd4;
    n_use = (rate_force >= 3'd1 && rate_force <= 3'd4) ? rate_force : n_auto;
    for (int p = 0; p < SPC; p++) begin
      int r;
      r = 0;
      for (int q = 0; q < SPC; q++)
        if (q != p && (e[q] > e[p] || (e[q] == e[p] && q < p))) r++;
      mask_c[p] = (r < int'(n_use));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= CE_IDLE; done <= 1'b0; left <= '0;
      nsel <= 3'd4; mask <= 4'hF;
      for (int p = 0; p < SPC; p++) e[p] <= '0;
    end else begin
      unique case (st)
        CE_IDLE: if (start) begin
          st   <= CE_WAIT;
          done <= 1'b0;
          for (int p = 0; p < SPC; p++) e[p] <= '0;
        end
        CE_WAIT: if (in_valid && pos == 6'd63) begin
          st   <= CE_ACC;
          left <= 16'(CE_SYMS * SPS);
        end
        CE_ACC: if (in_valid) begin
          for (int p = 0; p < SPC; p++)
            e[p] <= e[p] + ((ph_i == 2'(p)) ? 16'(absval(ci)) : 16'd0)
                         + ((ph_q == 2'(p)) ? 16'(absval(cq)) : 16'd0);
          left <= left - 16'd1;
          if (left == 16'd1) st <= CE_FIN;
        end
        CE_FIN: begin
          nsel <= n_use;
          mask <= mask_c;
          done <= 1'b1;
          st   <= CE_IDLE;
        end
        default: st <= CE_IDLE;
      endcase
    end
  end

endmodule
