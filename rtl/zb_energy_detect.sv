// RF signal detection by simple energy detection.
//
// The magnitudes |I|+|Q| of the last WIN samples are kept in a shift
// register and their running sum is compared with a programmable threshold.
// When the sum rises above the threshold while the detector is enabled,
// `detected` is raised and held until `clear`. Only a rising crossing
// counts: after `clear` the energy must first be seen at or below the
// threshold, so the tail of the packet just received cannot retrigger. The window length and the
// threshold port are choices of this design; the document only says that
// the signal is found by energy detection.
//
// Timing: one sample per in_valid; `detected` rises the clock after the
// sample that pushes the windowed energy over the threshold.
module zb_energy_detect
  import zb_pkg::*;
#(
  parameter int unsigned WIN = 16                 // samples in the energy window
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        clear,
  input  logic        in_valid,
  input  sample_t     si,
  input  sample_t     sq,
  input  logic [11:0] threshold,
  output logic [11:0] energy,
  output logic        detected
);

  localparam int unsigned MW = SW;   // magnitude width (|x| <= 31)

  logic [MW-1:0] mag_sr [WIN];
  logic [MW-1:0] mag_now;
  logic [11:0]   sum_next;
  logic          armed;

  function automatic logic [MW-1:0] absval(input sample_t x);
    return x[SW-1] ? MW'(-x) : MW'(x);
  endfunction

  assign mag_now  = MW'(absval(si) + absval(sq));
  assign sum_next = energy + 12'(mag_now) - 12'(mag_sr[WIN-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WIN; i++) mag_sr[i] <= '0;
      energy   <= '0;
      detected <= 1'b0;
      armed    <= 1'b0;
    end else begin
      if (clear) begin
        detected <= 1'b0;
        armed    <= 1'b0;
      end
      if (in_valid) begin
        mag_sr[0] <= mag_now;
        for (int i = 1; i < WIN; i++) mag_sr[i] <= mag_sr[i-1];
        energy <= sum_next;
        if (!clear && sum_next <= threshold) armed <= 1'b1;
        if (enable && !clear && armed && sum_next > threshold) detected <= 1'b1;
      end
    end
  end

endmodule
