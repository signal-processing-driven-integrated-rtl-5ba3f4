// Hard-decision chip detector on the adaptive sampling grid.
//
// Each rail carries one half-sine pulse per chip, seen by four samples.
// Only the sample positions enabled in `mask` (chosen by the channel
// estimator) are added up for a pulse; the sign of the sum is the hard chip
// decision (a sum of zero counts as chip 1). I pulse k of a symbol occupies
// positions 4k..4k+3; Q pulse k occupies 4k+2..4k+5, so the last Q pulse of
// a symbol ends at position 1 of the next one. At that sample the 32 chips
// of the symbol (I chips on even, Q chips on odd indices) are presented
// with `chips_valid` for one clock. `used` marks each sample that entered a
// sum, one count per rail, so the effective sampling rate can be observed.
// Chip value 1 is taken as a positive pulse (a choice of this design).
//
// Timing: chips_valid is registered, one clock after the input sample with
// pos == 1. A symbol is only presented if it was accumulated in full.
module zb_chip_demod
  import zb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        in_valid,
  input  sample_t     ci,
  input  sample_t     cq,
  input  logic [5:0]  pos,
  input  logic [3:0]  mask,
  output logic        chips_valid,
  output logic [31:0] chips,
  output logic [1:0]  used          // samples that entered a sum this clock
);

  logic signed [8:0] acc_i, acc_q, sum_i, sum_q;
  logic [1:0]  ph_i, ph_q;
  logic [3:0]  k_i, k_q;
  logic [15:0] ichips, qchips;
  logic        run, full;
  logic        take_i, take_q;

  assign ph_i   = pos[1:0];
  assign ph_q   = pos[1:0] - 2'd2;
  assign k_i    = pos[5:2];
  assign k_q    = 4'((pos - 6'd2) >> 2);
  assign take_i = mask[ph_i];
  assign take_q = mask[ph_q];
  assign sum_i  = acc_i + (take_i ? 9'(ci) : 9'sd0);
  assign sum_q  = acc_q + (take_q ? 9'(cq) : 9'sd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0; acc_q <= '0; ichips <= '0; qchips <= '0;
      run <= 1'b0; full <= 1'b0; chips_valid <= 1'b0; chips <= '0; used <= '0;
    end else begin
      chips_valid <= 1'b0;
      used        <= '0;
      if (!enable) begin
        run <= 1'b0; full <= 1'b0; acc_i <= '0; acc_q <= '0;
      end else if (in_valid) begin
        if (!run && pos == 6'd0) run <= 1'b1;
        if (run || pos == 6'd0) begin
          used <= 2'(take_i) + 2'(take_q);
          // I rail
          if (ph_i == 2'd3) begin
            ichips[k_i] <= ~sum_i[8];
            acc_i       <= '0;
          end else begin
            acc_i <= sum_i;
          end
          // Q rail
          if (ph_q == 2'd3) begin
            qchips[k_q] <= ~sum_q[8];
            acc_q       <= '0;
          end else begin
            acc_q <= sum_q;
          end
          if (pos == 6'd63) full <= 1'b1;
          if (pos == 6'd1 && full) begin
            chips_valid <= 1'b1;
            for (int k = 0; k < RAIL_CHIPS; k++) begin
              chips[2*k]   <= ichips[k];
              chips[2*k+1] <= (k == RAIL_CHIPS-1) ? ~sum_q[8] : qchips[k];
            end
          end
        end
      end
    end
  end

endmodule
